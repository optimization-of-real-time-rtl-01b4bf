// Communication IP: the FPGA end of a processor-FPGA link driven by a static
// schedule.
//
// The distribution and scheduling step fixes, once and for all, which data
// items cross the link, in what order, in which direction and in how many
// packets. On the processor this becomes a sequence of transfer calls; on the
// FPGA the same sequence is stored in the schedule ROM (com_rom) and this IP
// replays it forever:
//  * the data counter addresses the ROM; the current word gives the item's
//    packet count, direction and synchro flag;
//  * the control FSM (com_fsm) moves one packet per handshake with the
//    processor and advances the packet counter; a comparator raises end_xfer
//    when the packet counter equals the item's packet count, and the FSM
//    then clears the packet counter and moves the data counter on;
//  * received packets land in registers of their own (com_datapath), chosen
//    by the received-packet counter; sent packets are chosen by the
//    sent-packet counter;
//  * the synchronisation unit (opr_d_synch) starts the operators when an
//    item flagged synchro has been received and acknowledges their results
//    when an item flagged synchro has been sent.
// The structure is the published one. Separate in/out buses, the packet
// width and the synchronous init are this design's own; the received- and
// sent-packet counters are also cleared when the schedule wraps, so that a
// new repetition always starts from register 0.
//
// Processor handshake. Receive: the processor puts a packet on bus_din and
// raises req_f_cpu; the IP stores it and pulses ack_t_cpu for one cycle; the
// processor drops req_f_cpu and keeps it low for at least two clock cycles
// before offering the next packet (the FSM must see it low once in
// S_RECEIVE2, and the one-cycle ack gives the processor no other way to know
// that it has). Send: the IP
// puts a packet on bus_dout (bus_oe high) and raises req_t_cpu until
// ack_f_cpu; the processor drops ack_f_cpu after req_t_cpu has fallen.
module com_ip
  import com_ip_pkg::*;
#(
  parameter int unsigned PKT_W     = intra16_pkg::PKT_W,
  parameter int unsigned N_ENTRIES = intra16_pkg::N_ENTRIES,
  parameter int unsigned RX_PKTS   = intra16_pkg::RX_PKTS,
  parameter int unsigned TX_PKTS   = intra16_pkg::TX_PKTS,
  parameter rom_word_t [N_ENTRIES-1:0] SCHEDULE = intra16_pkg::SCHEDULE
) (
  input  logic                          clk,
  input  logic                          init,
  // processor side
  input  logic [PKT_W-1:0]              bus_din,
  output logic [PKT_W-1:0]              bus_dout,
  output logic                          bus_oe,
  input  logic                          req_f_cpu,
  output logic                          ack_t_cpu,
  output logic                          req_t_cpu,
  input  logic                          ack_f_cpu,
  // operator side
  output logic [RX_PKTS-1:0][PKT_W-1:0] rx_regs,
  input  logic [TX_PKTS-1:0][PKT_W-1:0] tx_data,
  output logic                          req_t_oprd,
  input  logic                          ack_f_oprd,
  input  logic                          req_f_oprd,
  output logic                          ack_t_oprd,
  // observation
  output com_state_t                    state
);

  localparam int unsigned ADDR_W = (N_ENTRIES > 1) ? $clog2(N_ENTRIES) : 1;
  localparam int unsigned RX_W   = (RX_PKTS > 1) ? $clog2(RX_PKTS) : 1;
  localparam int unsigned TX_W   = (TX_PKTS > 1) ? $clog2(TX_PKTS) : 1;

  rom_word_t         word;
  logic [ADDR_W-1:0] data_cnt;
  logic [NPKT_W-1:0] pkt_cnt;
  logic [RX_W-1:0]   rx_cnt;
  logic [TX_W-1:0]   tx_cnt;
  logic              wr, start, cnt_reset, end_xfer, sched_wrap;
  logic              pkt_wrap_unused, rx_wrap_unused, tx_wrap_unused;

  com_rom #(.N_ENTRIES(N_ENTRIES), .ADDR_W(ADDR_W), .CONTENTS(SCHEDULE)) u_rom (
    .addr(data_cnt), .q(word)
  );

  // Comparator: all packets of the current item have been moved.
  assign end_xfer = (pkt_cnt == word.npkts);

  com_fsm u_fsm (
    .clk, .init,
    .req_f_opr_d(req_f_oprd),
    .req_f_cpu, .ack_f_cpu,
    .in_out(word.in_out),
    .end_xfer,
    .ack_t_cpu, .req_t_cpu,
    .wr, .start, .cnt_reset,
    .state
  );

  // Packet counter of the current item.
  com_counter #(.W(NPKT_W)) u_pkt_cnt (
    .clk, .init, .clr(cnt_reset), .inc(start), .count(pkt_cnt), .wrap(pkt_wrap_unused)
  );

  // Data counter: ROM address.
  com_counter #(.W(ADDR_W), .MODULUS(N_ENTRIES)) u_data_cnt (
    .clk, .init, .clr(1'b0), .inc(cnt_reset), .count(data_cnt), .wrap(sched_wrap)
  );

  // Received- and sent-packet counters.
  com_counter #(.W(RX_W), .MODULUS(RX_PKTS)) u_rx_cnt (
    .clk, .init, .clr(sched_wrap), .inc(wr), .count(rx_cnt), .wrap(rx_wrap_unused)
  );

  com_counter #(.W(TX_W), .MODULUS(TX_PKTS)) u_tx_cnt (
    .clk, .init, .clr(sched_wrap), .inc(start && word.in_out == DIR_SEND),
    .count(tx_cnt), .wrap(tx_wrap_unused)
  );

  com_datapath #(.PKT_W(PKT_W), .RX_PKTS(RX_PKTS), .TX_PKTS(TX_PKTS),
                 .RX_W(RX_W), .TX_W(TX_W)) u_dp (
    .clk, .init,
    .in_out(word.in_out),
    .wr, .rx_sel(rx_cnt), .tx_sel(tx_cnt),
    .bus_din, .bus_dout, .bus_oe,
    .rx_regs, .tx_data
  );

  // en: end of the current item's transfer, i.e. the FSM's reset state.
  opr_d_synch u_sync (
    .clk, .init,
    .synchro(word.synchro),
    .in_out(word.in_out),
    .en(cnt_reset),
    .req_f_oprd, .ack_f_oprd,
    .req_t_oprd, .ack_t_oprd
  );

endmodule

// Data path of the communication IP.
//
// Received data: every packet of every received item gets a register of its
// own, so that the operators see steady inputs for as long as they need
// them. The FSM's wr strobe is demultiplexed to the register selected by the
// received-packet counter (rx_sel). Sent data: the send multiplexer
// (send_pck_mux) puts the result packet selected by the sent-packet counter
// (tx_sel) on the outgoing bus. The direction multiplexer drives the bus only
// while the current item is a send (bus_oe). This split follows the published
// description; the separate in/out buses with an output enable in place of a
// bidirectional bus, zero on the unused output, and clearing the registers on
// init are this design's own choices.
//
// Timing: a packet on bus_din is stored at the rising edge that ends the
// cycle in which wr is high. bus_dout and bus_oe are combinational.
module com_datapath
  import com_ip_pkg::*;
#(
  parameter int unsigned PKT_W   = intra16_pkg::PKT_W,
  parameter int unsigned RX_PKTS = intra16_pkg::RX_PKTS,
  parameter int unsigned TX_PKTS = intra16_pkg::TX_PKTS,
  parameter int unsigned RX_W    = $clog2(RX_PKTS),
  parameter int unsigned TX_W    = (TX_PKTS > 1) ? $clog2(TX_PKTS) : 1
) (
  input  logic                            clk,
  input  logic                            init,
  input  logic                            in_out,
  input  logic                            wr,
  input  logic [RX_W-1:0]                 rx_sel,
  input  logic [TX_W-1:0]                 tx_sel,
  input  logic [PKT_W-1:0]                bus_din,
  output logic [PKT_W-1:0]                bus_dout,
  output logic                            bus_oe,
  output logic [RX_PKTS-1:0][PKT_W-1:0]   rx_regs,
  input  logic [TX_PKTS-1:0][PKT_W-1:0]   tx_data
);

  // wr demultiplexer and packet registers.
  always_ff @(posedge clk) begin
    if (init) begin
      rx_regs <= '0;
    end else begin
      for (int unsigned i = 0; i < RX_PKTS; i++) begin
        if (wr && rx_sel == RX_W'(i)) rx_regs[i] <= bus_din;
      end
    end
  end

  // send_pck_mux followed by the direction multiplexer.
  logic [PKT_W-1:0] tx_pkt;

  always_comb begin
    tx_pkt = '0;
    for (int unsigned i = 0; i < TX_PKTS; i++) begin
      if (tx_sel == TX_W'(i)) tx_pkt = tx_data[i];
    end
  end

  assign bus_oe   = (in_out == DIR_SEND);
  assign bus_dout = bus_oe ? tx_pkt : '0;

endmodule

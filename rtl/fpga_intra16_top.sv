// FPGA part of the H.264 intra 16x16 mode decision on a processor + FPGA
// platform.
//
// The processor acquires the source macroblock and its TOP and LEFT
// neighbours, computes the DC value and ships all of it over the bus; the
// FPGA computes the three sums of absolute differences (vertical, horizontal,
// DC) at the same time, each on a degenerate operator of its own, and ships
// the three results back; the processor then keeps the smallest. This module
// holds the FPGA side: one communication IP (com_ip) facing the bus and the
// three SAD operators (sad_oprd) behind it.
//
// The FPGA's internal network is modelled as a fully connected, zero-delay
// medium, so the operators are wired straight to the IP's packet registers
// and send multiplexer. The IP's single request/acknowledge pair towards the
// operators is shared: its request and acknowledgement are broadcast to the
// three operators, and their acknowledgements and requests are ANDed, so the
// IP proceeds only when all three are ready; this is how a generated control
// unit waits for all of its upstream requests. The operator set and the
// CPU/FPGA split follow the published final mapping; the packet layout
// (intra16_pkg), the AND-combining and the PAR defaults are this design's
// choices. The defaults give every SAD operator full unrolling (PAR = 256);
// a smaller PAR_H or PAR_DC gives the area-saving refactorized variants.
//
// Ports: the processor-side bus and handshake of com_ip, plus the three SAD
// values and the FSM state for observation. init is a synchronous
// active-high reset.
module fpga_intra16_top
  import com_ip_pkg::*;
  import intra16_pkg::*;
#(
  parameter int unsigned PAR_V  = NPIX,
  parameter int unsigned PAR_H  = NPIX,
  parameter int unsigned PAR_DC = NPIX
) (
  input  logic              clk,
  input  logic              init,
  input  logic [PKT_W-1:0]  bus_din,
  output logic [PKT_W-1:0]  bus_dout,
  output logic              bus_oe,
  input  logic              req_f_cpu,
  output logic              ack_t_cpu,
  output logic              req_t_cpu,
  input  logic              ack_f_cpu,
  output logic [SAD_W-1:0]  sad_v,
  output logic [SAD_W-1:0]  sad_h,
  output logic [SAD_W-1:0]  sad_dc,
  output com_state_t        com_state
);

  logic [RX_PKTS-1:0][PKT_W-1:0] rx_regs;
  logic [TX_PKTS-1:0][PKT_W-1:0] tx_data;
  logic req_t_oprd, ack_t_oprd, ack_f_oprd, req_f_oprd;
  logic [2:0] op_ack, op_req;

  com_ip u_com (
    .clk, .init,
    .bus_din, .bus_dout, .bus_oe,
    .req_f_cpu, .ack_t_cpu, .req_t_cpu, .ack_f_cpu,
    .rx_regs, .tx_data,
    .req_t_oprd, .ack_f_oprd, .req_f_oprd, .ack_t_oprd,
    .state(com_state)
  );

  // Unpack the packet registers into the operators' inputs.
  logic [NPIX-1:0][PIX_W-1:0]    src;
  logic [MB_SIZE-1:0][PIX_W-1:0] top, left;
  logic [PIX_W-1:0]              dc_val;

  assign src    = rx_regs[SRC_BASE  +: SRC_PKTS];
  assign top    = rx_regs[TOP_BASE  +: TOP_PKTS];
  assign left   = rx_regs[LEFT_BASE +: LEFT_PKTS];
  assign dc_val = rx_regs[DC_BASE][PIX_W-1:0];

  sad_oprd #(.MODE(MODE_V), .PAR(PAR_V)) u_sad_v (
    .clk, .init, .src, .top, .left, .dc_val,
    .req_in(req_t_oprd), .ack_out(op_ack[0]),
    .req_out(op_req[0]), .ack_in(ack_t_oprd), .sad(sad_v)
  );

  sad_oprd #(.MODE(MODE_H), .PAR(PAR_H)) u_sad_h (
    .clk, .init, .src, .top, .left, .dc_val,
    .req_in(req_t_oprd), .ack_out(op_ack[1]),
    .req_out(op_req[1]), .ack_in(ack_t_oprd), .sad(sad_h)
  );

  sad_oprd #(.MODE(MODE_DC), .PAR(PAR_DC)) u_sad_dc (
    .clk, .init, .src, .top, .left, .dc_val,
    .req_in(req_t_oprd), .ack_out(op_ack[2]),
    .req_out(op_req[2]), .ack_in(ack_t_oprd), .sad(sad_dc)
  );

  assign ack_f_oprd = &op_ack;
  assign req_f_oprd = &op_req;

  always_comb begin
    tx_data            = '0;
    tx_data[TX_SAD_V]  = PKT_W'(sad_v);
    tx_data[TX_SAD_H]  = PKT_W'(sad_h);
    tx_data[TX_SAD_DC] = PKT_W'(sad_dc);
  end

endmodule

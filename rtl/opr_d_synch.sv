// Synchronisation unit between the communication IP and the OPRd operators.
//
// Once a data item flagged by the ROM's synchro bit has been transferred
// (rising edge of en), the unit either starts the operators or releases them:
//  * synchro = 1, in_out = receive: the operators' inputs are now in the
//    packet registers, so req_t_oprd rises and stays high until the
//    operators acknowledge with ack_f_oprd;
//  * synchro = 1, in_out = send: the operators' results have been sent, so
//    ack_t_oprd rises and stays high until the operators withdraw their
//    request req_f_oprd.
// This is the published behaviour. The published text names req_f_oprd as
// the signal that ends req_t_oprd; since it calls that signal "the
// acknowledgment from OPRd", this design uses ack_f_oprd, which keeps both
// handshakes four-phase. Edge detection on en (one register) and the
// synchronous active-high init are this design's own.
//
// Timing: req_t_oprd / ack_t_oprd rise in the cycle after the one in which en
// rises, and fall in the cycle after their release condition is seen.
module opr_d_synch
  import com_ip_pkg::*;
(
  input  logic clk,
  input  logic init,
  input  logic synchro,
  input  logic in_out,
  input  logic en,
  input  logic req_f_oprd,
  input  logic ack_f_oprd,
  output logic req_t_oprd,
  output logic ack_t_oprd
);

  logic en_q;
  logic en_rise;

  assign en_rise = en && !en_q;

  always_ff @(posedge clk) begin
    if (init) begin
      en_q       <= 1'b0;
      req_t_oprd <= 1'b0;
      ack_t_oprd <= 1'b0;
    end else begin
      en_q <= en;
      if (en_rise && synchro && in_out == DIR_RECEIVE) req_t_oprd <= 1'b1;
      else if (ack_f_oprd)                            req_t_oprd <= 1'b0;
      if (en_rise && synchro && in_out == DIR_SEND)    ack_t_oprd <= 1'b1;
      else if (!req_f_oprd)                           ack_t_oprd <= 1'b0;
    end
  end

endmodule

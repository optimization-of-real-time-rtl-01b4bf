// Control FSM of the communication IP.
//
// It paces the transfer of each packet between the processor's communicator
// and the FPGA with a request/acknowledge handshake, enables the write of a
// received packet, and commands the packet counter. Its ports and the output
// values of its six states follow the published description:
//
//   state      wr start reset req_t_cpu ack_t_cpu
//   S_IDLE      0    0     0       0         0
//   S_RECEIVE1  1    1     0       0         1
//   S_RECEIVE2  0    0     0       0         0
//   S_RESET     0    0     1       0         0
//   S_SEND1     0    0     0       1         0
//   S_SEND2     0    1     0       0         0
//
// The transitions are this design's own:
//   S_IDLE     -> S_RESET    when end_xfer (all packets of the item moved)
//              -> S_RECEIVE1 when in_out = receive and req_f_cpu
//              -> S_SEND1    when in_out = send, req_f_opr_d (the operators'
//                            results are ready) and ack_f_cpu is low
//   S_RECEIVE1 -> S_RECEIVE2 (one cycle: the packet on the bus is written and
//                            counted, the processor gets a one-cycle ack)
//   S_RECEIVE2 -> S_IDLE     once the processor has dropped req_f_cpu
//   S_SEND1    -> S_SEND2    once the processor acknowledges (ack_f_cpu);
//                            the packet is on the bus during the whole state
//   S_SEND2    -> S_IDLE     (one cycle: the sent packet is counted)
//   S_RESET    -> S_IDLE     (one cycle: packet counter cleared, next item)
//
// Timing: one received packet costs at least 3 cycles, one sent packet at
// least 3 cycles, and each item one extra S_RESET cycle. init is a
// synchronous active-high reset into S_IDLE.
module com_fsm
  import com_ip_pkg::*;
(
  input  logic       clk,
  input  logic       init,
  input  logic       req_f_opr_d,  // results of the operators are ready
  input  logic       req_f_cpu,    // processor offers a packet
  input  logic       ack_f_cpu,    // processor took the packet offered
  input  logic       in_out,       // direction of the current item
  input  logic       end_xfer,     // packet counter reached the item's size
  output logic       ack_t_cpu,
  output logic       req_t_cpu,
  output logic       wr,
  output logic       start,        // advance the packet counter
  output logic       cnt_reset,    // clear the packet counter, next item
  output com_state_t state
);

  com_state_t next;

  always_comb begin
    next = state;
    unique case (state)
      S_IDLE: begin
        if (end_xfer)                                              next = S_RESET;
        else if (in_out == DIR_RECEIVE && req_f_cpu)               next = S_RECEIVE1;
        else if (in_out == DIR_SEND && req_f_opr_d && !ack_f_cpu)  next = S_SEND1;
      end
      S_RECEIVE1: next = S_RECEIVE2;
      S_RECEIVE2: if (!req_f_cpu) next = S_IDLE;
      S_SEND1:    if (ack_f_cpu)  next = S_SEND2;
      S_SEND2:    next = S_IDLE;
      S_RESET:    next = S_IDLE;
      default:    next = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (init) state <= S_IDLE;
    else      state <= next;
  end

  // Moore outputs, one row of the table above per state.
  always_comb begin
    wr        = 1'b0;
    start     = 1'b0;
    cnt_reset = 1'b0;
    req_t_cpu = 1'b0;
    ack_t_cpu = 1'b0;
    unique case (state)
      S_RECEIVE1: begin wr = 1'b1; start = 1'b1; ack_t_cpu = 1'b1; end
      S_RESET:    cnt_reset = 1'b1;
      S_SEND1:    req_t_cpu = 1'b1;
      S_SEND2:    start = 1'b1;
      default: ;
    endcase
  end

  // Handshake rule towards the processor: a request to send is held until
  // the processor acknowledges it.
  a_req_held : assert property (@(posedge clk) disable iff (init)
    (req_t_cpu && !ack_f_cpu) |=> req_t_cpu);

endmodule

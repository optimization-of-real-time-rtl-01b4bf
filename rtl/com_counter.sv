// Modulo up counter with synchronous clear.
//
// The communication IP uses four of them: the packet counter of the current
// data item (advanced by the FSM's start output, cleared by its reset
// output), the data counter that addresses the schedule ROM, and the counters
// of received and of sent packets that steer the write demultiplexer and the
// send multiplexer. The published description names these counters and what
// they count; their form (one shared modulo counter, synchronous active-high
// clear and init) is this design's own.
//
// Interface: count holds values 0..MODULUS-1. inc advances it by one at the
// next rising clock edge, wrapping to 0 after MODULUS-1; clr (or init) forces
// it to 0 and wins over inc. wrap is high, combinationally, in the cycle in
// which an inc takes the count from MODULUS-1 back to 0.
module com_counter #(
  parameter int unsigned W       = 8,
  parameter int unsigned MODULUS = 2 ** W
) (
  input  logic         clk,
  input  logic         init,
  input  logic         clr,
  input  logic         inc,
  output logic [W-1:0] count,
  output logic         wrap
);

  localparam logic [W-1:0] LAST = W'(MODULUS - 1);

  assign wrap = inc && (count == LAST);

  always_ff @(posedge clk) begin
    if (init || clr) begin
      count <= '0;
    end else if (inc) begin
      count <= (count == LAST) ? '0 : count + 1'b1;
    end
  end

endmodule

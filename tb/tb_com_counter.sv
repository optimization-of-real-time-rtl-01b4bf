// Self-checking testbench for com_counter.
// Drives random inc/clr on a modulo-5 counter and on a full 3-bit counter
// and compares count and wrap with a behavioural reference every cycle.
module tb_com_counter;
  logic clk = 0, init;
  logic clr, inc;
  logic [2:0] c5, c8;
  logic w5, w8;
  int checks = 0, failures = 0;
  int ref5, ref8, wraps5;

  always #5 clk = ~clk;

  com_counter #(.W(3), .MODULUS(5)) dut5 (.clk, .init, .clr, .inc, .count(c5), .wrap(w5));
  com_counter #(.W(3))              dut8 (.clk, .init, .clr, .inc, .count(c8), .wrap(w8));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init = 1; clr = 0; inc = 0;
    ref5 = 0; ref8 = 0; wraps5 = 0;
    @(posedge clk); #1 init = 0;
    for (int n = 0; n < 400; n++) begin
      clr = ($urandom % 16) == 0;
      inc = ($urandom % 4) != 0;
      #1;
      checks += 4;
      if (c5 != 3'(ref5)) begin failures++; $display("c5 %0d exp %0d", c5, ref5); end
      if (c8 != 3'(ref8)) begin failures++; $display("c8 %0d exp %0d", c8, ref8); end
      if (w5 != (inc && ref5 == 4)) begin failures++; $display("w5 wrong"); end
      if (w8 != (inc && ref8 == 7)) begin failures++; $display("w8 wrong"); end
      if (w5) wraps5++;
      @(posedge clk);
      if (clr) begin ref5 = 0; ref8 = 0; end
      else if (inc) begin ref5 = (ref5 + 1) % 5; ref8 = (ref8 + 1) % 8; end
      #1;
    end
    checks++;
    if (wraps5 == 0) begin failures++; $display("no wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

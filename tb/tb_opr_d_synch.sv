// Self-checking testbench for opr_d_synch.
// Plays the four cases of (synchro, in_out) at an en pulse, holds en high for
// several cycles to check edge detection, and checks that req_t_oprd is
// held until ack_f_oprd and ack_t_oprd until req_f_oprd falls.
module tb_opr_d_synch;
  import com_ip_pkg::*;
  logic clk = 0, init;
  logic synchro, in_out, en, req_f_oprd, ack_f_oprd;
  logic req_t_oprd, ack_t_oprd;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  opr_d_synch dut (.*);

  task automatic expect_out(input logic r, input logic a, input string what);
    checks += 2;
    if (req_t_oprd !== r) begin failures++; $display("%s: req_t_oprd=%b exp %b", what, req_t_oprd, r); end
    if (ack_t_oprd !== a) begin failures++; $display("%s: ack_t_oprd=%b exp %b", what, ack_t_oprd, a); end
  endtask

  task automatic pulse_en(input logic s, input logic d, input int len);
    synchro = s; in_out = d; en = 1;
    repeat (len) @(posedge clk);
    #1 en = 0;
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init = 1; synchro = 0; in_out = 0; en = 0; req_f_oprd = 0; ack_f_oprd = 0;
    repeat (2) @(posedge clk); #1 init = 0;
    expect_out(0, 0, "after init");
    // no synchro: nothing happens
    pulse_en(0, DIR_RECEIVE, 1); expect_out(0, 0, "no synchro rx");
    pulse_en(0, DIR_SEND, 1);    expect_out(0, 0, "no synchro tx");
    // receive + synchro: request held until ack_f_oprd
    pulse_en(1, DIR_RECEIVE, 3); expect_out(1, 0, "rx synchro");
    repeat (5) @(posedge clk); #1 expect_out(1, 0, "request held");
    ack_f_oprd = 1; @(posedge clk); #1 expect_out(0, 0, "request released");
    // en still high: a second edge is needed
    ack_f_oprd = 0; synchro = 1; in_out = DIR_RECEIVE; en = 1;
    @(posedge clk); #1 expect_out(1, 0, "second edge");
    ack_f_oprd = 1; @(posedge clk); #1 ack_f_oprd = 0;
    repeat (3) @(posedge clk); #1 expect_out(0, 0, "level en gives one request");
    en = 0; @(posedge clk); #1;
    // send + synchro: acknowledgement held until req_f_oprd falls
    req_f_oprd = 1;
    pulse_en(1, DIR_SEND, 1); expect_out(0, 1, "tx synchro");
    repeat (4) @(posedge clk); #1 expect_out(0, 1, "ack held");
    req_f_oprd = 0; @(posedge clk); #1 expect_out(0, 0, "ack released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for com_rom.
// Reads every word of the default (intra 16x16) schedule and of a custom
// three-word schedule and compares the fields with values written out here.
module tb_com_rom;
  import com_ip_pkg::*;
  logic [2:0] addr;
  rom_word_t  q;
  logic [1:0] addr2;
  rom_word_t  q2;
  int checks = 0, failures = 0;

  localparam rom_word_t [2:0] CUSTOM = {9'b1_1_0000010, 9'b0_0_1000000, 9'b1_0_0000011};

  com_rom dut (.addr, .q);
  com_rom #(.N_ENTRIES(3), .ADDR_W(2), .CONTENTS(CUSTOM)) dut2 (.addr(addr2), .q(q2));

  // expected {synchro, in_out, npkts} of the default schedule
  int exp_sync [7] = '{0, 0, 0, 1, 0, 0, 1};
  int exp_dir  [7] = '{0, 0, 0, 0, 1, 1, 1};
  int exp_n    [7] = '{64, 4, 4, 1, 1, 1, 1};
  int exp2     [4] = '{9'b100000011, 9'b001000000, 9'b110000010, 0};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 7; i++) begin
      addr = 3'(i); #1;
      checks += 3;
      if (q.synchro != exp_sync[i][0]) begin failures++; $display("synchro %0d", i); end
      if (q.in_out  != exp_dir[i][0])  begin failures++; $display("in_out %0d", i); end
      if (q.npkts   != 7'(exp_n[i]))   begin failures++; $display("npkts %0d = %0d", i, q.npkts); end
    end
    addr = 3'd7; #1;
    checks++;
    if (q != '0) begin failures++; $display("unused address not zero"); end
    for (int i = 0; i < 4; i++) begin
      addr2 = 2'(i); #1;
      checks++;
      if (q2 != 9'(exp2[i])) begin failures++; $display("custom %0d = %b", i, q2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

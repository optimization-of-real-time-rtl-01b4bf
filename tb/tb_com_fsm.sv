// Self-checking testbench for com_fsm.
// A monitor checks, every cycle, the five outputs against the state output
// table. Directed sequences then walk every transition: a received packet
// (including a processor that holds its request), end of item, a send that
// waits for the operators and for the processor's acknowledgement, and the
// priority of end_xfer over a pending request.
module tb_com_fsm;
  import com_ip_pkg::*;
  logic clk = 0, init;
  logic req_f_opr_d, req_f_cpu, ack_f_cpu, in_out, end_xfer;
  logic ack_t_cpu, req_t_cpu, wr, start, cnt_reset;
  com_state_t state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  com_fsm dut (.*);

  // Output table, {wr, start, reset, req_t_cpu, ack_t_cpu} per state.
  function automatic logic [4:0] table_row(com_state_t s);
    case (s)
      S_RECEIVE1: return 5'b11001;
      S_RESET:    return 5'b00100;
      S_SEND1:    return 5'b00010;
      S_SEND2:    return 5'b01000;
      default:    return 5'b00000;
    endcase
  endfunction

  always @(negedge clk) if (!init) begin
    checks++;
    if ({wr, start, cnt_reset, req_t_cpu, ack_t_cpu} != table_row(state)) begin
      failures++;
      $display("outputs %b in state %s", {wr, start, cnt_reset, req_t_cpu, ack_t_cpu}, state.name());
    end
  end

  task automatic expect_state(com_state_t s, string what);
    checks++;
    if (state != s) begin failures++; $display("%s: state %s exp %s", what, state.name(), s.name()); end
  endtask

  task automatic step(); @(posedge clk); #1; endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init = 1; req_f_opr_d = 0; req_f_cpu = 0; ack_f_cpu = 0; in_out = DIR_RECEIVE; end_xfer = 0;
    step(); init = 0;
    expect_state(S_IDLE, "after init");
    step(); expect_state(S_IDLE, "idle without request");
    // receive one packet; the processor keeps its request for 3 cycles
    req_f_cpu = 1; step(); expect_state(S_RECEIVE1, "rx1");
    step(); expect_state(S_RECEIVE2, "rx2");
    step(); expect_state(S_RECEIVE2, "rx2 waits for request to fall");
    req_f_cpu = 0; step(); expect_state(S_IDLE, "back to idle");
    // end of item has priority over a new request
    end_xfer = 1; req_f_cpu = 1; step(); expect_state(S_RESET, "reset");
    end_xfer = 0; req_f_cpu = 0; step(); expect_state(S_IDLE, "idle after reset");
    // send: waits for the operators' results
    in_out = DIR_SEND; step(); step(); expect_state(S_IDLE, "send waits for operators");
    req_f_opr_d = 1; ack_f_cpu = 1; step(); expect_state(S_IDLE, "send waits for ack low");
    ack_f_cpu = 0; step(); expect_state(S_SEND1, "send1");
    step(); step(); expect_state(S_SEND1, "send1 holds request");
    ack_f_cpu = 1; step(); expect_state(S_SEND2, "send2");
    step(); expect_state(S_IDLE, "idle after send");
    step(); expect_state(S_IDLE, "no new send while ack high");
    ack_f_cpu = 0; step(); expect_state(S_SEND1, "second send");
    // synchronous init from a busy state
    init = 1; step(); init = 0; expect_state(S_IDLE, "init from send1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for com_ip with its default (intra 16x16) schedule.
// A processor model pushes the 73 packets of the four received items and
// pulls the three result packets, with random handshake delays, over three
// repetitions of the schedule. An operator model answers the IP's request,
// derives three results from the received registers and offers them.
// Checked: every packet register, every packet returned to the processor,
// that the operators are started only after the last received item and
// released only after the last sent item, and the handshake counts.
module tb_com_ip;
  import com_ip_pkg::*;
  import intra16_pkg::*;
  localparam int REPS = 3;

  logic clk = 0, init;
  logic [PKT_W-1:0] bus_din, bus_dout;
  logic bus_oe, req_f_cpu, ack_t_cpu, req_t_cpu, ack_f_cpu;
  logic [RX_PKTS-1:0][PKT_W-1:0] rx_regs;
  logic [TX_PKTS-1:0][PKT_W-1:0] tx_data;
  logic req_t_oprd, ack_f_oprd, req_f_oprd, ack_t_oprd;
  com_state_t state;

  int checks = 0, failures = 0;
  int pkts_sent_by_cpu = 0, op_starts = 0, op_releases = 0, stalls = 0;
  logic [PKT_W-1:0] sent [RX_PKTS];

  always #5 clk = ~clk;

  com_ip dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- operator model ----------------
  function automatic logic [PKT_W-1:0] op_result(int k, logic [RX_PKTS-1:0][PKT_W-1:0] r);
    return r[k] + r[RX_PKTS-1] * PKT_W'(k + 1);
  endfunction

  initial begin
    ack_f_oprd = 0; req_f_oprd = 0; tx_data = '0;
    forever begin
      @(posedge clk); #1;
      if (req_t_oprd && !ack_f_oprd) begin
        op_starts++;
        checks++;
        if (pkts_sent_by_cpu % RX_PKTS != 0 || pkts_sent_by_cpu == 0) begin
          failures++; $display("operators started after %0d packets", pkts_sent_by_cpu);
        end
        for (int k = 0; k < TX_PKTS; k++) tx_data[k] = op_result(k, rx_regs);
        repeat ($urandom % 3) @(posedge clk);
        #1 ack_f_oprd = 1;
        while (req_t_oprd) begin @(posedge clk); #1; end
        ack_f_oprd = 0;
        repeat ($urandom % 4) @(posedge clk);
        #1 req_f_oprd = 1;
        while (!ack_t_oprd) begin @(posedge clk); #1; end
        op_releases++;
        req_f_oprd = 0;
      end
    end
  end

  // ---------------- processor model ----------------
  task automatic cpu_send(input logic [PKT_W-1:0] d);
    bus_din = d; req_f_cpu = 1;
    do begin @(posedge clk); #1; end while (!ack_t_cpu);
    repeat ($urandom % 3) @(posedge clk);
    #1 req_f_cpu = 0;
    repeat (2) @(posedge clk);
    #1 pkts_sent_by_cpu++;
  endtask

  task automatic cpu_recv(output logic [PKT_W-1:0] d);
    int w = 0;
    do begin @(posedge clk); #1; end while (!req_t_cpu);
    checks++;
    if (!bus_oe) begin failures++; $display("bus not driven during send"); end
    d = bus_dout;
    w = $urandom % 3;
    if (w > 0) stalls++;
    repeat (w) @(posedge clk);
    #1 ack_f_cpu = 1;
    do begin @(posedge clk); #1; end while (req_t_cpu);
    ack_f_cpu = 0;
  endtask

  initial begin
    logic [PKT_W-1:0] d;
    init = 1; bus_din = 0; req_f_cpu = 0; ack_f_cpu = 0;
    repeat (2) @(posedge clk); #1 init = 0;
    for (int rep = 0; rep < REPS; rep++) begin
      for (int i = 0; i < RX_PKTS; i++) begin
        sent[i] = PKT_W'($urandom);
        cpu_send(sent[i]);
      end
      for (int k = 0; k < TX_PKTS; k++) begin
        logic [PKT_W-1:0] exp_d;
        cpu_recv(d);
        exp_d = sent[k] + sent[RX_PKTS-1] * PKT_W'(k + 1);
        checks++;
        if (d != exp_d) begin failures++; $display("rep %0d result %0d = %h exp %h", rep, k, d, exp_d); end
      end
      for (int i = 0; i < RX_PKTS; i++) begin
        checks++;
        if (rx_regs[i] != sent[i]) begin failures++; $display("rep %0d reg %0d = %h exp %h", rep, i, rx_regs[i], sent[i]); end
      end
    end
    repeat (10) @(posedge clk);
    checks += 3;
    if (op_starts != REPS)   begin failures++; $display("operator starts %0d", op_starts); end
    if (op_releases != REPS) begin failures++; $display("operator releases %0d", op_releases); end
    if (stalls == 0)         begin failures++; $display("no processor stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

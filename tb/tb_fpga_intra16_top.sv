// End-to-end testbench for fpga_intra16_top at its default parameters.
//
// A processor model plays the processor's part of the intra 16x16 mode
// decision for a series of macroblocks: it makes the source block and its
// TOP and LEFT neighbours, computes the DC value
// (sum of the 32 neighbours + 16) / 32, sends SRC, TOP, LEFT and the DC value
// as 73 packets, reads back the three SADs, and picks the mode with the
// smallest SAD (0 vertical, 1 horizontal, 2 DC; ties go to the lower mode
// number). The testbench computes the SADs itself and compares, checks the
// cycle count from operator start to results (1 + 256/PAR), and counts how
// often each mechanism happened: packets received and sent, operator start
// and release, processor stalls on a send, schedule repetitions, and each
// mode winning. A mechanism that never happened counts as a failure.
module tb_fpga_intra16_top;
  import com_ip_pkg::*;
  import intra16_pkg::*;
  localparam int NBLOCKS = 12;

  logic clk = 0, init;
  logic [PKT_W-1:0] bus_din, bus_dout;
  logic bus_oe, req_f_cpu, ack_t_cpu, req_t_cpu, ack_f_cpu;
  logic [SAD_W-1:0] sad_v, sad_h, sad_dc;
  com_state_t com_state;

  int checks = 0, failures = 0;
  int n_rx_pkts = 0, n_tx_pkts = 0, n_op_start = 0, n_op_release = 0;
  int n_stalls = 0, n_reps = 0;
  int n_mode [3] = '{0, 0, 0};

  logic [7:0] src [256];
  logic [7:0] top [16];
  logic [7:0] left [16];
  logic [7:0] dc;

  always #5 clk = ~clk;

  fpga_intra16_top dut (.*);

  initial begin
    repeat (NBLOCKS * 800 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Operator start/release events and the operators' latency, seen on the
  // IP's operator handshake.
  int t_start = 0, cyc = 0;
  logic rto_q = 0, ato_q = 0, rfo_q = 0;
  always @(posedge clk) begin
    cyc++;
    if (!init) begin
      if (dut.req_t_oprd && !rto_q) begin n_op_start++; t_start = cyc; end
      if (dut.ack_t_oprd && !ato_q) n_op_release++;
      if (dut.req_f_oprd && !rfo_q) begin
        checks++;
        if (cyc - t_start != 1 + NPIX / NPIX) begin
          // default PAR = 256: the operators answer 1 + 256/PAR cycles later
          failures++; $display("operator latency %0d cycles", cyc - t_start);
        end
      end
    end
    rto_q <= dut.req_t_oprd; ato_q <= dut.ack_t_oprd; rfo_q <= dut.req_f_oprd;
  end

  task automatic cpu_send(input logic [PKT_W-1:0] d);
    bus_din = d; req_f_cpu = 1;
    do begin @(posedge clk); #1; end while (!ack_t_cpu);
    repeat ($urandom % 2) @(posedge clk);
    #1 req_f_cpu = 0;
    repeat (2) @(posedge clk);
    #1 n_rx_pkts++;
  endtask

  task automatic cpu_recv(output logic [PKT_W-1:0] d);
    int w;
    do begin @(posedge clk); #1; end while (!req_t_cpu);
    checks++;
    if (!bus_oe) begin failures++; $display("bus not driven during send"); end
    d = bus_dout;
    w = $urandom % 3;
    if (w > 0) n_stalls++;
    repeat (w) @(posedge clk);
    #1 ack_f_cpu = 1;
    do begin @(posedge clk); #1; end while (req_t_cpu);
    ack_f_cpu = 0;
    n_tx_pkts++;
  endtask

  function automatic int ref_sad(int mode);
    int s = 0;
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) begin
        int p = (mode == 0) ? int'(top[x]) : (mode == 1) ? int'(left[y]) : int'(dc);
        int a = src[y*16 + x];
        s += (a > p) ? a - p : p - a;
      end
    return s;
  endfunction

  task automatic make_block(int b);
    foreach (top[i])  top[i]  = 8'($urandom);
    foreach (left[i]) left[i] = 8'($urandom);
    begin
      int sum = 16;
      foreach (top[i])  sum += top[i];
      foreach (left[i]) sum += left[i];
      dc = 8'(sum / 32);
    end
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++)
        case (b % 4)
          0: src[y*16+x] = top[x] ^ 8'($urandom % 4);     // vertical texture
          1: src[y*16+x] = left[y] ^ 8'($urandom % 4);    // horizontal texture
          2: src[y*16+x] = dc ^ 8'($urandom % 4);         // flat block
          default: src[y*16+x] = 8'($urandom);            // noise
        endcase
  endtask

  initial begin
    logic [PKT_W-1:0] d;
    int got [3], exp_sad [3], best, best_ref;
    init = 1; bus_din = 0; req_f_cpu = 0; ack_f_cpu = 0;
    repeat (3) @(posedge clk); #1 init = 0;
    for (int b = 0; b < NBLOCKS; b++) begin
      make_block(b);
      for (int k = 0; k < 64; k++) cpu_send({src[4*k+3], src[4*k+2], src[4*k+1], src[4*k]});
      for (int k = 0; k < 4; k++)  cpu_send({top[4*k+3], top[4*k+2], top[4*k+1], top[4*k]});
      for (int k = 0; k < 4; k++)  cpu_send({left[4*k+3], left[4*k+2], left[4*k+1], left[4*k]});
      cpu_send(PKT_W'(dc));
      for (int m = 0; m < 3; m++) begin
        cpu_recv(d);
        got[m] = int'(d);
        exp_sad[m] = ref_sad(m);
        checks++;
        if (got[m] != exp_sad[m]) begin
          failures++; $display("block %0d mode %0d: SAD %0d exp %0d", b, m, got[m], exp_sad[m]);
        end
      end
      // SAD_comparator, run by the processor
      best = 0;
      for (int m = 1; m < 3; m++) if (got[m] < got[best]) best = m;
      best_ref = (b % 4 == 0) ? 0 : (b % 4 == 1) ? 1 : (b % 4 == 2) ? 2 : -1;
      if (best_ref >= 0) begin
        checks++;
        if (best != best_ref) begin failures++; $display("block %0d: best mode %0d exp %0d", b, best, best_ref); end
      end
      n_mode[best]++;
      // the IP closes the last item and wraps to the start of its schedule
      repeat (4) @(posedge clk);
      #1 if (dut.u_com.data_cnt == 0 && com_state == S_IDLE) n_reps++;
    end
    repeat (10) @(posedge clk);
    checks += 9;
    if (n_rx_pkts != NBLOCKS * RX_PKTS) begin failures++; $display("received packets %0d", n_rx_pkts); end
    if (n_tx_pkts != NBLOCKS * TX_PKTS) begin failures++; $display("sent packets %0d", n_tx_pkts); end
    if (n_op_start != NBLOCKS)          begin failures++; $display("operator starts %0d", n_op_start); end
    if (n_op_release != NBLOCKS)        begin failures++; $display("operator releases %0d", n_op_release); end
    if (n_stalls == 0)                  begin failures++; $display("no processor stall"); end
    if (n_reps != NBLOCKS)              begin failures++; $display("schedule repetitions %0d", n_reps); end
    for (int m = 0; m < 3; m++) if (n_mode[m] == 0) begin failures++; $display("mode %0d never chosen", m); end
    $display("rx_pkts=%0d tx_pkts=%0d op_start=%0d op_release=%0d stalls=%0d reps=%0d modes=%0d/%0d/%0d",
             n_rx_pkts, n_tx_pkts, n_op_start, n_op_release, n_stalls, n_reps, n_mode[0], n_mode[1], n_mode[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

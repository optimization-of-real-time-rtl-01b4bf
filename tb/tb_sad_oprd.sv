// Self-checking testbench for sad_oprd.
// Three operators (vertical, horizontal, DC) are built twice: fully unrolled
// (PAR = 256) and partly refactorized (PAR = 16). For random and for
// structured blocks the testbench computes the three SADs on its own,
// starts all six operators with a four-phase request, checks the result,
// the request/acknowledge sequence and the latency of 1 + 256/PAR cycles.
module tb_sad_oprd;
  import intra16_pkg::*;
  logic clk = 0, init;
  logic [NPIX-1:0][7:0]    src;
  logic [MB_SIZE-1:0][7:0] top, left;
  logic [7:0]              dc_val;
  logic req_in, ack_in;
  logic [5:0] ack_out, req_out;
  logic [SAD_W-1:0] sad [6];
  int checks = 0, failures = 0;
  int lat [6];

  always #5 clk = ~clk;

  localparam int PARS [2] = '{256, 16};
  localparam mode_t MODES [3] = '{MODE_V, MODE_H, MODE_DC};

  for (genvar k = 0; k < 6; k++) begin : g_op
    sad_oprd #(.MODE(MODES[k % 3]), .PAR(PARS[k / 3])) u (
      .clk, .init, .src, .top, .left, .dc_val,
      .req_in, .ack_out(ack_out[k]), .req_out(req_out[k]), .ack_in, .sad(sad[k])
    );
  end

  function automatic int ref_sad(int mode);
    int s = 0;
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) begin
        int a = src[y*16 + x];
        int p = (mode == 0) ? top[x] : (mode == 1) ? left[y] : dc_val;
        s += (a > p) ? a - p : p - a;
      end
    return s;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block();
    int cyc = 0;
    lat = '{default: -1};
    @(posedge clk); #1 req_in = 1;
    // each operator acknowledges and offers its result in the same cycle
    while (!(&req_out) && cyc < 100) begin
      @(posedge clk); cyc++; #1;
      for (int k = 0; k < 6; k++) if (req_out[k] && lat[k] < 0) begin
        lat[k] = cyc;
        checks++;
        if (!ack_out[k]) begin failures++; $display("op %0d: no ack with result", k); end
      end
    end
    for (int k = 0; k < 6; k++) begin
      int exp_lat = 1 + 256 / PARS[k / 3];
      checks += 2;
      if (sad[k] != SAD_W'(ref_sad(k % 3))) begin
        failures++; $display("op %0d: sad %0d exp %0d", k, sad[k], ref_sad(k % 3));
      end
      if (lat[k] != exp_lat) begin failures++; $display("op %0d: latency %0d exp %0d", k, lat[k], exp_lat); end
    end
    req_in = 0; @(posedge clk); #1;
    checks++;
    if (ack_out != 0) begin failures++; $display("ack not released"); end
    checks++;
    if (req_out != 6'h3f) begin failures++; $display("result withdrawn before ack"); end
    ack_in = 1; @(posedge clk); #1;
    checks++;
    if (req_out != 0) begin failures++; $display("request not released"); end
    ack_in = 0; @(posedge clk); #1;
  endtask

  initial begin
    init = 1; req_in = 0; ack_in = 0; src = '0; top = '0; left = '0; dc_val = 0;
    repeat (2) @(posedge clk); #1 init = 0;
    // no request: no start
    repeat (40) @(posedge clk); #1;
    checks++;
    if (req_out != 0 || ack_out != 0) begin failures++; $display("started without request"); end
    for (int b = 0; b < 8; b++) begin
      for (int i = 0; i < 16; i++) begin top[i] = 8'($urandom); left[i] = 8'($urandom); end
      dc_val = 8'($urandom);
      for (int i = 0; i < NPIX; i++) begin
        case (b % 4)
          0: src[i] = 8'($urandom);
          1: src[i] = top[i % 16] ^ 8'($urandom % 3);        // vertical-like
          2: src[i] = left[i / 16] ^ 8'($urandom % 3);       // horizontal-like
          default: src[i] = (b == 7) ? 8'hff : 8'h00;        // extremes
        endcase
      end
      if (b == 7) begin top = '0; left = '0; dc_val = 0; end   // maximal SAD 65280
      run_block();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

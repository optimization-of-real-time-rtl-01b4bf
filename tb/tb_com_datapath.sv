// Self-checking testbench for com_datapath (small sizes: 8-bit packets, 6
// receive registers, 3 send packets). Writes random packets to random
// registers through the wr demultiplexer, keeps a reference copy, and checks
// every register, the send multiplexer and the direction control.
module tb_com_datapath;
  import com_ip_pkg::*;
  localparam int RX = 6, TX = 3;
  logic clk = 0, init;
  logic in_out, wr;
  logic [2:0] rx_sel;
  logic [1:0] tx_sel;
  logic [7:0] bus_din, bus_dout;
  logic bus_oe;
  logic [RX-1:0][7:0] rx_regs;
  logic [TX-1:0][7:0] tx_data;
  logic [7:0] ref_regs [RX];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  com_datapath #(.PKT_W(8), .RX_PKTS(RX), .TX_PKTS(TX), .RX_W(3), .TX_W(2)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init = 1; in_out = DIR_RECEIVE; wr = 0; rx_sel = 0; tx_sel = 0; bus_din = 0;
    tx_data = {8'h33, 8'h22, 8'h11};
    foreach (ref_regs[i]) ref_regs[i] = 0;
    @(posedge clk); #1 init = 0;
    for (int n = 0; n < 300; n++) begin
      wr = ($urandom % 2) == 1;
      rx_sel = 3'($urandom % RX);
      bus_din = 8'($urandom);
      in_out = 1'($urandom);
      tx_sel = 2'($urandom % TX);
      tx_data[$urandom % TX] = 8'($urandom);
      #1;
      checks += 2;
      if (bus_oe != in_out) begin failures++; $display("bus_oe"); end
      if (bus_dout != (in_out ? tx_data[tx_sel] : 8'h00)) begin failures++; $display("bus_dout %h", bus_dout); end
      @(posedge clk);
      if (wr) ref_regs[rx_sel] = bus_din;
      #1;
      for (int i = 0; i < RX; i++) begin
        checks++;
        if (rx_regs[i] != ref_regs[i]) begin failures++; $display("reg %0d = %h exp %h", i, rx_regs[i], ref_regs[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

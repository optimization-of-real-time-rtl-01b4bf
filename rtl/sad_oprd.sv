// SAD degenerate operator (OPRd) for one H.264 intra 16x16 prediction mode.
//
// It computes SAD = sum over the 256 pixels of |SRC(x,y) - P(x,y)|, where
// the prediction P is TOP(x) for the vertical mode, LEFT(y) for the
// horizontal mode and the DC value for the DC mode (MODE parameter). The
// sum is a loop of 256 independent iterations; the PAR parameter is the
// defactorization degree, the number of iterations unrolled into hardware:
// PAR = 256 is the fully parallel operator (one accumulation cycle),
// PAR = 1 the fully sequential one (256 cycles), anything between trades
// area for time. Pixels are visited in raster order, index y*16 + x. In the
// terms of the original circuit generator, the selection of the PAR pixels
// of the current iteration is the fork multiplexer, the subtract/absolute/add
// array is the unrolled loop body, and the accumulator is the iterate
// register.
//
// Control follows the request/acknowledge rule of the generated circuits: an
// operator starts when its upstream request req_in is high, acknowledges the
// consumption of its inputs with ack_out (held until req_in falls), offers
// its result with req_out (held until ack_in rises) and starts again only
// when both handshakes are back to idle. The SAD itself, the operation split
// and the handshake rule follow the published mapping; the predictor
// definitions are those of the H.264 standard; the PAR parameterisation, the
// exact cycle timing and the register holding the result are this design's
// own.
//
// Timing: req_out and ack_out rise 1 + 256/PAR cycles after the rising edge
// at which req_in is first seen high; sad is valid while req_out is high.
// Inputs must stay steady from req_in until ack_out.
module sad_oprd
  import intra16_pkg::*;
#(
  parameter mode_t       MODE = MODE_V,
  parameter int unsigned PAR  = NPIX
) (
  input  logic                            clk,
  input  logic                            init,
  input  logic [NPIX-1:0][PIX_W-1:0]      src,
  input  logic [MB_SIZE-1:0][PIX_W-1:0]   top,
  input  logic [MB_SIZE-1:0][PIX_W-1:0]   left,
  input  logic [PIX_W-1:0]                dc_val,
  input  logic                            req_in,
  output logic                            ack_out,
  output logic                            req_out,
  input  logic                            ack_in,
  output logic [SAD_W-1:0]                sad
);

  localparam int unsigned ITERS = NPIX / PAR;
  localparam int unsigned IT_W  = (ITERS > 1) ? $clog2(ITERS) : 1;

  initial begin
    assert (PAR >= 1 && PAR <= NPIX && NPIX % PAR == 0)
      else $error("sad_oprd: PAR must divide %0d", NPIX);
  end

  logic             busy;
  logic [IT_W-1:0]  it;
  logic [SAD_W-1:0] acc;
  logic [SAD_W-1:0] part;
  logic             start_ok;

  // PAR unrolled iterations: subtract, absolute value, add.
  always_comb begin
    part = '0;
    for (int unsigned j = 0; j < PAR; j++) begin
      int unsigned idx;
      logic [PIX_W-1:0] s, p, d;
      idx = int'(it) * PAR + j;
      s   = src[idx];
      unique case (MODE)
        MODE_V:  p = top[idx % MB_SIZE];
        MODE_H:  p = left[idx / MB_SIZE];
        default: p = dc_val;
      endcase
      d    = (s > p) ? s - p : p - s;
      part = part + SAD_W'(d);
    end
  end

  assign start_ok = req_in && !busy && !ack_out && !req_out && !ack_in;

  always_ff @(posedge clk) begin
    if (init) begin
      busy    <= 1'b0;
      it      <= '0;
      acc     <= '0;
      sad     <= '0;
      ack_out <= 1'b0;
      req_out <= 1'b0;
    end else begin
      if (ack_out && !req_in) ack_out <= 1'b0;
      if (req_out && ack_in)  req_out <= 1'b0;
      if (start_ok) begin
        busy <= 1'b1;
        it   <= '0;
        acc  <= '0;
      end else if (busy) begin
        acc <= acc + part;
        it  <= it + 1'b1;
        if (int'(it) == ITERS - 1) begin
          busy    <= 1'b0;
          sad     <= acc + part;
          ack_out <= 1'b1;
          req_out <= 1'b1;
        end
      end
    end
  end

  a_req_held : assert property (@(posedge clk) disable iff (init)
    (req_out && !ack_in) |=> req_out);

endmodule

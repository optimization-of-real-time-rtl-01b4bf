// Sizes, packet map and transfer schedule of the H.264 intra 16x16 mode
// decision mapped onto a processor plus an FPGA.
//
// The processor acquires the 16x16 source block (SRC, 256 pixels), the row of
// 16 pixels above it (TOP) and the column of 16 pixels to its left (LEFT),
// computes the DC prediction value and sends all of it to the FPGA. The FPGA
// computes the three sums of absolute differences (vertical, horizontal and
// DC prediction) in parallel and sends them back; the processor picks the
// smallest. Pixel sizes and the operation split follow the published
// mapping. The 32-bit packet (four pixels, little-endian: pixel 4k+i sits in
// bits 8i+7..8i of packet k), the order of the items in the schedule and the
// 16-bit SAD width are this design's own choices.
package intra16_pkg;

  import com_ip_pkg::*;

  localparam int unsigned PIX_W       = 8;           // unsigned char pixels
  localparam int unsigned MB_SIZE     = 16;          // 16x16 macroblock
  localparam int unsigned NPIX        = MB_SIZE * MB_SIZE;
  localparam int unsigned PKT_W       = 32;          // bus packet width
  localparam int unsigned PIX_PER_PKT = PKT_W / PIX_W;
  localparam int unsigned SAD_W       = 16;          // 256 * 255 < 2**16

  // Received packets, in schedule order, and their place in the register bank.
  localparam int unsigned SRC_PKTS  = NPIX / PIX_PER_PKT;     // 64
  localparam int unsigned TOP_PKTS  = MB_SIZE / PIX_PER_PKT;  // 4
  localparam int unsigned LEFT_PKTS = MB_SIZE / PIX_PER_PKT;  // 4
  localparam int unsigned DC_PKTS   = 1;
  localparam int unsigned SRC_BASE  = 0;
  localparam int unsigned TOP_BASE  = SRC_BASE + SRC_PKTS;
  localparam int unsigned LEFT_BASE = TOP_BASE + TOP_PKTS;
  localparam int unsigned DC_BASE   = LEFT_BASE + LEFT_PKTS;
  localparam int unsigned RX_PKTS   = DC_BASE + DC_PKTS;      // 73

  // Sent packets: one per SAD result, in mode order.
  localparam int unsigned TX_SAD_V  = 0;
  localparam int unsigned TX_SAD_H  = 1;
  localparam int unsigned TX_SAD_DC = 2;
  localparam int unsigned TX_PKTS   = 3;

  // Prediction modes, numbered as the mode decision reports them.
  typedef enum logic [1:0] {
    MODE_V  = 2'd0,
    MODE_H  = 2'd1,
    MODE_DC = 2'd2
  } mode_t;

  localparam int unsigned N_ENTRIES = 7;

  // The schedule: SRC, TOP, LEFT, DC_val received (the last one starts the
  // three SAD operators), then SAD_V, SAD_H, SAD_DC sent (the last one
  // acknowledges the operators).
  function automatic rom_word_t [N_ENTRIES-1:0] make_schedule();
    rom_word_t [N_ENTRIES-1:0] s;
    s[0] = '{synchro: 1'b0, in_out: DIR_RECEIVE, npkts: NPKT_W'(SRC_PKTS)};
    s[1] = '{synchro: 1'b0, in_out: DIR_RECEIVE, npkts: NPKT_W'(TOP_PKTS)};
    s[2] = '{synchro: 1'b0, in_out: DIR_RECEIVE, npkts: NPKT_W'(LEFT_PKTS)};
    s[3] = '{synchro: 1'b1, in_out: DIR_RECEIVE, npkts: NPKT_W'(DC_PKTS)};
    s[4] = '{synchro: 1'b0, in_out: DIR_SEND,    npkts: NPKT_W'(1)};
    s[5] = '{synchro: 1'b0, in_out: DIR_SEND,    npkts: NPKT_W'(1)};
    s[6] = '{synchro: 1'b1, in_out: DIR_SEND,    npkts: NPKT_W'(1)};
    return s;
  endfunction

  localparam rom_word_t [N_ENTRIES-1:0] SCHEDULE = make_schedule();

endpackage

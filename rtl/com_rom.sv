// Schedule ROM of the communication IP.
//
// Word i describes the i-th data item of the static communication schedule
// that the distribution and scheduling step produced: its packet count, its
// direction and whether the OPRd operators are to be synchronised once it has
// been transferred (layout in com_ip_pkg). The ROM is filled at elaboration
// time from the CONTENTS parameter, so the same IP serves any schedule; the
// default holds the schedule of the intra 16x16 mode decision.
//
// Interface: addr selects a word; q follows addr combinationally (a LUT ROM,
// no read latency). Addresses at or above N_ENTRIES read as zero. The
// content layout follows the published description; the asynchronous read is
// this design's own choice.
module com_rom
  import com_ip_pkg::*;
#(
  parameter int unsigned N_ENTRIES = intra16_pkg::N_ENTRIES,
  parameter int unsigned ADDR_W    = $clog2(N_ENTRIES),
  parameter rom_word_t [N_ENTRIES-1:0] CONTENTS = intra16_pkg::SCHEDULE
) (
  input  logic [ADDR_W-1:0] addr,
  output rom_word_t         q
);

  always_comb begin
    q = '0;
    for (int unsigned i = 0; i < N_ENTRIES; i++) begin
      if (addr == ADDR_W'(i)) q = CONTENTS[i];
    end
  end

endmodule

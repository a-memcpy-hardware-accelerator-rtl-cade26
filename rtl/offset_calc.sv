// offset_calc: address translation for a read or write of a copied word.
//
// A copy is stored only as a pointer: the indexing-table slot of the copy's
// word holds the line index of the original (index_src) and the difference
// offset_dst - offset_src (offset_calc). Because the copy and the original need
// not share their position within a cache line, the original word may lie in
// the line before or after index_src. The translation follows the document's
// algorithm:
//   cal = req_offset - offcal   (offcal: the entry's offset_calculation)
//   cal > 7  -> index_src + 1, offset cal - 8
//   cal < 0  -> index_src - 1, offset cal + 8
//   else     -> index_src,     offset cal
// As this design's own addition, the tag of the original line (tag_src) is
// carried along and incremented or decremented when the index wraps, so a
// line step across a tag boundary also addresses the right word.
// Purely combinational; the result is used in the same cycle.
module offset_calc
  import memcpy_pkg::*;
(
  input  logic [OFFSET_W-1:0]        req_offset,
  input  logic [INDEX_W-1:0]         index_src,
  input  logic [TAG_W-1:0]           tag_src,
  input  logic signed [OFFCAL_W-1:0] offcal,
  output waddr_t                     cache_addr,
  output logic                       next_line,  // cal > 7
  output logic                       prev_line   // cal < 0
);

  logic signed [OFFCAL_W:0] cal;  // -7 .. 14

  always_comb begin
    cal = $signed({2'b00, req_offset}) - {offcal[OFFCAL_W-1], offcal};
    next_line = cal > $signed((OFFCAL_W+1)'(LINE_WORDS - 1));
    prev_line = cal < 0;
    cache_addr.tag    = tag_src;
    cache_addr.index  = index_src;
    cache_addr.offset = cal[OFFSET_W-1:0];
    if (next_line) begin
      {cache_addr.tag, cache_addr.index} = {tag_src, index_src} + 1'b1;
      cache_addr.offset = OFFSET_W'(cal - $signed((OFFCAL_W+1)'(LINE_WORDS)));
    end else if (prev_line) begin
      {cache_addr.tag, cache_addr.index} = {tag_src, index_src} - 1'b1;
      cache_addr.offset = OFFSET_W'(cal + $signed((OFFCAL_W+1)'(LINE_WORDS)));
    end
  end

endmodule

// data_cache: storage of the 32 KB direct-mapped, write-through data cache.
//
// The cache directory is a tag-memory (one 9-bit tag per line) and a
// valid-memory (one bit per line); the data-memory holds 1024 lines of eight
// 32-bit words and is written with a byte-enable per byte of the word. The
// index selects the line, the offset the word, and a read hits when the line
// is valid and its stored tag equals the tag of the address. These are the
// document's organisation and sizes.
//
// Interface and timing (this design's choice): one access port. A read
// (acc_en, !acc_we) returns rdata and hit one cycle later; a write
// (acc_en, acc_we) writes the enabled bytes of the word unconditionally (the
// controller checks the hit first). A separate directory port writes the tag
// and valid bit of one line, used when a line is refilled. Valid bits are
// cleared by reset; tags and data are plain RAM arrays.
module data_cache
  import memcpy_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // access port
  input  logic              acc_en,
  input  logic              acc_we,
  input  waddr_t            acc_addr,
  input  logic [BE_W-1:0]   acc_be,
  input  logic [DATA_W-1:0] acc_wdata,
  output logic [DATA_W-1:0] rdata,
  output logic              hit,
  // directory port
  input  logic              dir_we,
  input  logic [INDEX_W-1:0] dir_index,
  input  logic [TAG_W-1:0]  dir_tag,
  input  logic              dir_valid
);

  localparam int unsigned LINES = 1 << INDEX_W;
  localparam int unsigned WORDS = 1 << SLOT_W;

  logic [DATA_W-1:0] data_mem [WORDS];
  logic [TAG_W-1:0]  tag_mem  [LINES];
  logic [LINES-1:0]  valid_q;

  logic [TAG_W-1:0]  line_tag_q;
  logic              line_valid_q;
  logic [TAG_W-1:0]  req_tag_q;

  wire [SLOT_W-1:0] word_sel = {acc_addr.index, acc_addr.offset};

  // data-memory with byte writes
  always_ff @(posedge clk) begin
    if (acc_en && acc_we) begin
      for (int b = 0; b < int'(BE_W); b++)
        if (acc_be[b]) data_mem[word_sel][8*b +: 8] <= acc_wdata[8*b +: 8];
    end
    if (acc_en && !acc_we) rdata <= data_mem[word_sel];
  end

  // tag-memory
  always_ff @(posedge clk) begin
    if (dir_we) tag_mem[dir_index] <= dir_tag;
    if (acc_en) begin
      line_tag_q <= tag_mem[acc_addr.index];
      req_tag_q  <= acc_addr.tag;
    end
  end

  // valid-memory
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q      <= '0;
      line_valid_q <= 1'b0;
    end else begin
      if (dir_we) valid_q[dir_index] <= dir_valid;
      if (acc_en) line_valid_q <= valid_q[acc_addr.index];
    end
  end

  assign hit = line_valid_q && (line_tag_q == req_tag_q);

endmodule

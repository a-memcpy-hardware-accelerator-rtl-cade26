// indexing_table: the table that turns a memcpy into pointers.
//
// One slot per word of the cache, addressed by the index and word offset of a
// copy's destination address (13 bits, 8192 slots). A valid slot says: the
// word at {tag_dst, slot} is a copy of the word that offset_calc finds from
// index_src, tag_src and offset_calc. The fields are the ones the document
// lists for an entry; the source tag is kept in full so a copy can be
// translated to a complete address.
//
// Interface and timing (this design's choice): two synchronous read ports,
// A and B, each returning {valid, entry} one cycle after its address, and one
// write port that writes valid and entry in one cycle. The valid bits are
// flip-flops cleared by reset; the entry fields are a plain RAM array. A read
// of a slot written in the same cycle returns the old contents.
module indexing_table
  import memcpy_pkg::*;
#(
  parameter int unsigned DEPTH = 1 << SLOT_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // read port A
  input  logic [$clog2(DEPTH)-1:0] ra_slot,
  output logic                     ra_valid,
  output itab_entry_t              ra_entry,
  // read port B
  input  logic [$clog2(DEPTH)-1:0] rb_slot,
  output logic                     rb_valid,
  output itab_entry_t              rb_entry,
  // write port
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] w_slot,
  input  logic                     w_valid,
  input  itab_entry_t              w_entry
);

  itab_entry_t      mem [DEPTH];
  logic [DEPTH-1:0] valid_q;

  always_ff @(posedge clk) begin
    if (we) mem[w_slot] <= w_entry;
    ra_entry <= mem[ra_slot];
    rb_entry <= mem[rb_slot];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q  <= '0;
      ra_valid <= 1'b0;
      rb_valid <= 1'b0;
    end else begin
      if (we) valid_q[w_slot] <= w_valid;
      ra_valid <= valid_q[ra_slot];
      rb_valid <= valid_q[rb_slot];
    end
  end

endmodule

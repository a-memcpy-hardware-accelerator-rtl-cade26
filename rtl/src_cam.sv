// src_cam: content-addressable memory over the sources of all copies.
//
// Slot s of the CAM mirrors slot s of the indexing table and holds the full
// word address of the original data that copy points to. Before the original
// is overwritten, the controller searches the CAM with the written address and
// learns, one cycle later, whether a valid copy points to it and at which slot
// (lowest matching slot first). The document uses one CAM whose read answers
// in one cycle and whose write takes two; the two-cycle write is reproduced
// here by a write that is accepted in one cycle and lands in the array at the
// end of the next (busy is high in between).
//
// So that a search issued while a write is still in flight sees the newest
// contents, the search compares against the pending write as well (a bypass;
// this design's choice). Valid bits are cleared by reset.
module src_cam
  import memcpy_pkg::*;
#(
  parameter int unsigned DEPTH        = 1 << SLOT_W,
  parameter int unsigned KEY_W        = ADDR_W,
  parameter int unsigned WRITE_CYCLES = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // write: accepted when we && !busy
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] w_slot,
  input  logic [KEY_W-1:0]         w_key,
  input  logic                     w_valid,
  output logic                     busy,
  // search: result one cycle after search
  input  logic                     search,
  input  logic [KEY_W-1:0]         s_key,
  output logic                     match,
  output logic [$clog2(DEPTH)-1:0] match_slot
);

  localparam int unsigned SW = $clog2(DEPTH);

  logic [KEY_W-1:0] keys [DEPTH];
  logic [DEPTH-1:0] valid_q;

  logic             pend_q;
  logic [SW-1:0]    pend_slot_q;
  logic [KEY_W-1:0] pend_key_q;
  logic             pend_valid_q;
  logic [$clog2(WRITE_CYCLES+1)-1:0] pend_cnt_q;

  assign busy = pend_q;

  // write pipeline
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q       <= 1'b0;
      pend_slot_q  <= '0;
      pend_key_q   <= '0;
      pend_valid_q <= 1'b0;
      pend_cnt_q   <= '0;
      valid_q      <= '0;
    end else if (pend_q) begin
      if (pend_cnt_q == 1) begin
        valid_q[pend_slot_q] <= pend_valid_q;
        pend_q <= 1'b0;
      end
      pend_cnt_q <= pend_cnt_q - 1'b1;
    end else if (we) begin
      pend_q       <= 1'b1;
      pend_slot_q  <= w_slot;
      pend_key_q   <= w_key;
      pend_valid_q <= w_valid;
      pend_cnt_q   <= ($clog2(WRITE_CYCLES+1))'(WRITE_CYCLES - 1);
    end
  end

  always_ff @(posedge clk) begin
    if (pend_q && pend_cnt_q == 1) keys[pend_slot_q] <= pend_key_q;
  end

  // search: compare every slot, the pending write taking the place of its
  // slot; scanning from the top leaves the lowest matching slot
  logic          hit_c;
  logic [SW-1:0] hit_slot_c;

  always_comb begin
    hit_c      = 1'b0;
    hit_slot_c = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if ((pend_q && pend_slot_q == SW'(i)) ? (pend_valid_q && pend_key_q == s_key)
                                             : (valid_q[i] && keys[i] == s_key)) begin
        hit_c      = 1'b1;
        hit_slot_c = SW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      match      <= 1'b0;
      match_slot <= '0;
    end else if (search) begin
      match      <= hit_c;
      match_slot <= hit_slot_c;
    end
  end

  a_write_when_idle: assert property (@(posedge clk) disable iff (!rst_n) we |-> !busy);

endmodule

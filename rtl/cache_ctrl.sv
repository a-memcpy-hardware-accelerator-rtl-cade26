// cache_ctrl: controller of the data cache and its memcpy hardware.
//
// The controller serves the processor's data-side requests and runs the
// hardware memcpy. A memcpy moves no data: for each destination word it writes
// an indexing-table slot (and the matching CAM slot) that points at the
// source word, which is assumed to be in the cache. Correctness is then kept
// by the rules below, which follow the document except where marked.
//
// Read (processor port): the cache and the table slot of the address are read
// together. A valid slot whose tag_dst equals the request's tag means the word
// is a copy: the address is translated by offset_calc and the cache is read
// again, so a copy costs one extra cycle (data two cycles after the request,
// against one for an ordinary hit). A miss refills the line from main memory
// (own choice: the document assumes the data is present); for a copy the
// refilled line is the original's.
//
// Write: (1) if the written word is a copy, the copy is first written back to
// main memory at its own address and its slot is invalidated; (2) the CAM is
// searched with the written address and every copy pointing at it is written
// back and invalidated, one at a time; (3) the bytes are written to main memory
// (write-through) and to the cache on a hit (no allocation on a write miss,
// own choice). A write-back ("flush") also updates the copy's own line when
// that line is cached, so the cache never holds a stale copy (own choice).
//
// memcpy: two cycles per word without conflicts, as in the document (the CAM
// write takes two cycles): cycle 1 reads the table slots of the destination and
// of the source and searches the CAM for the destination; cycle 2 writes the
// new slot. Three conflicts are resolved first by a flush (own choices): the
// source word is itself a copy, the destination slot holds a copy of another
// tag, or another copy points at the destination word.
//
// Processor port: req/we/addr/be/wdata held until ack, a one-cycle pulse;
// rdata is valid with ack. Main-memory port: one word per transfer, held until
// mem_ack, mem_rdata valid with mem_ack. Processor requests wait while a
// memcpy runs.
module cache_ctrl
  import memcpy_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // processor data side
  input  logic              ocm_req,
  input  logic              ocm_we,
  input  waddr_t            ocm_addr,
  input  logic [BE_W-1:0]   ocm_be,
  input  logic [DATA_W-1:0] ocm_wdata,
  output logic [DATA_W-1:0] ocm_rdata,
  output logic              ocm_ack,
  // memcpy parameters
  input  logic              mc_start,
  input  waddr_t            mc_src,
  input  waddr_t            mc_dst,
  input  logic [SIZE_W-1:0] mc_size,
  output logic              mc_busy,
  // main memory
  output logic              mem_req,
  output logic              mem_we,
  output waddr_t            mem_addr,
  output logic [BE_W-1:0]   mem_be,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata,
  input  logic              mem_ack,
  // data cache
  output logic              c_en,
  output logic              c_we,
  output waddr_t            c_addr,
  output logic [BE_W-1:0]   c_be,
  output logic [DATA_W-1:0] c_wdata,
  input  logic [DATA_W-1:0] c_rdata,
  input  logic              c_hit,
  output logic              dir_we,
  output logic [INDEX_W-1:0] dir_index,
  output logic [TAG_W-1:0]  dir_tag,
  output logic              dir_valid,
  // indexing table
  output logic [SLOT_W-1:0] ta_slot,
  input  logic              ta_valid,
  input  itab_entry_t       ta_entry,
  output logic [SLOT_W-1:0] tb_slot,
  input  logic              tb_valid,
  input  itab_entry_t       tb_entry,
  output logic              t_we,
  output logic [SLOT_W-1:0] t_wslot,
  output logic              t_wvalid,
  output itab_entry_t       t_wentry,
  // source CAM
  output logic              cam_we,
  output logic [SLOT_W-1:0] cam_wslot,
  output waddr_t            cam_wkey,
  output logic              cam_wvalid,
  input  logic              cam_busy,
  output logic              cam_search,
  output waddr_t            cam_skey,
  input  logic              cam_match,
  input  logic [SLOT_W-1:0] cam_match_slot
);

  state_t state_q, state_d;

  // latched processor request
  logic              rq_we_q;
  waddr_t            rq_addr_q;
  logic [BE_W-1:0]   rq_be_q;
  logic [DATA_W-1:0] rq_wdata_q;
  // refill
  waddr_t            fill_line_q, fill_line_d;
  logic [OFFSET_W-1:0] fill_k_q;
  state_t            fill_ret_q, fill_ret_d;
  logic              fill_start;
  // flush (write a copy back and invalidate its slot)
  logic [SLOT_W-1:0] fl_slot_q, fl_slot_d;
  state_t            fl_ret_q, fl_ret_d;
  logic              fl_start;
  waddr_t            fl_dst_q, fl_tr_q;
  logic [DATA_W-1:0] fl_data_q;
  // memcpy engine
  waddr_t            e_src_q, e_dst_q;
  logic [SIZE_W-1:0] e_left_q;
  logic signed [OFFCAL_W-1:0] e_offcal_q;
  logic              e_step;
  // copy-read translation
  waddr_t            tr_q;

  // translation of the entry on read port A for the word offset in use
  waddr_t              tr_addr;
  logic [OFFSET_W-1:0] tr_offset;
  offset_calc u_offset_calc (
    .req_offset (tr_offset),
    .index_src  (ta_entry.index_src),
    .tag_src    (ta_entry.tag_src),
    .offcal     (ta_entry.offset_calc),
    .cache_addr (tr_addr),
    .next_line  (),
    .prev_line  ()
  );
  assign tr_offset = (state_q == S_F_TR) ? fl_slot_q[OFFSET_W-1:0] : rq_addr_q.offset;

  wire table_hit = ta_valid && (ta_entry.tag_dst == rq_addr_q.tag);

  // source line of the new entry: the line whose words, seen from the
  // destination's offsets shifted by offset_calc, hold the source word
  waddr_t e_base;
  assign e_base = waddr_t'(e_src_q - ADDR_W'(e_dst_q.offset) + ADDR_W'(e_offcal_q));

  // a copy is in progress from the start command until its last slot is written
  assign mc_busy   = mc_start || e_left_q != 0;
  assign ocm_rdata = c_rdata;

  always_comb begin
    state_d     = state_q;
    fill_line_d = fill_line_q;
    fill_ret_d  = fill_ret_q;
    fill_start  = 1'b0;
    fl_slot_d   = fl_slot_q;
    fl_ret_d    = fl_ret_q;
    fl_start    = 1'b0;
    e_step      = 1'b0;

    ocm_ack   = 1'b0;
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = rq_addr_q;
    mem_be    = '1;
    mem_wdata = rq_wdata_q;
    c_en      = 1'b0;
    c_we      = 1'b0;
    c_addr    = rq_addr_q;
    c_be      = '1;
    c_wdata   = rq_wdata_q;
    dir_we    = 1'b0;
    dir_index = fill_line_q.index;
    dir_tag   = fill_line_q.tag;
    dir_valid = 1'b1;
    ta_slot   = {rq_addr_q.index, rq_addr_q.offset};
    tb_slot   = {e_src_q.index, e_src_q.offset};
    t_we      = 1'b0;
    t_wslot   = fl_slot_q;
    t_wvalid  = 1'b0;
    t_wentry  = '{index_src: e_base.index, tag_dst: e_dst_q.tag,
                  offset_calc: e_offcal_q, tag_src: e_base.tag};
    cam_we     = 1'b0;
    cam_wslot  = fl_slot_q;
    cam_wkey   = e_src_q;
    cam_wvalid = 1'b0;
    cam_search = 1'b0;
    cam_skey   = rq_addr_q;

    unique case (state_q)
      S_IDLE: begin
        if ((mc_start && mc_size != 0) || e_left_q != 0) begin
          state_d = S_E_ISSUE;
        end else if (ocm_req) begin
          c_en    = 1'b1;
          c_addr  = ocm_addr;
          ta_slot = {ocm_addr.index, ocm_addr.offset};
          state_d = S_LOOKUP;
        end
      end

      S_LOOKUP: begin
        if (!rq_we_q) begin
          if (table_hit) begin
            c_en    = 1'b1;
            c_addr  = tr_addr;
            state_d = S_RCOPY;
          end else if (c_hit) begin
            ocm_ack = 1'b1;
            state_d = S_IDLE;
          end else begin
            fill_start  = 1'b1;
            fill_line_d = rq_addr_q;
            fill_ret_d  = S_IDLE;
          end
        end else if (table_hit) begin
          fl_start  = 1'b1;
          fl_slot_d = {rq_addr_q.index, rq_addr_q.offset};
          fl_ret_d  = S_WSEARCH;
        end else begin
          state_d = S_WSEARCH;
        end
      end

      S_RCOPY: begin
        if (c_hit) begin
          ocm_ack = 1'b1;
          state_d = S_IDLE;
        end else begin
          fill_start  = 1'b1;
          fill_line_d = tr_q;
          fill_ret_d  = S_IDLE;
        end
      end

      S_WSEARCH: begin
        cam_search = 1'b1;
        state_d    = S_WSCHK;
      end

      S_WSCHK: begin
        if (cam_match) begin
          fl_start  = 1'b1;
          fl_slot_d = cam_match_slot;
          fl_ret_d  = S_WSEARCH;
        end else begin
          state_d = S_WMEM;
        end
      end

      S_WMEM: begin
        mem_req = 1'b1;
        mem_we  = 1'b1;
        mem_be  = rq_be_q;
        if (mem_ack) state_d = S_WCRD;
      end

      S_WCRD: begin
        c_en    = 1'b1;
        state_d = S_WCWR;
      end

      S_WCWR: begin
        if (c_hit) begin
          c_en = 1'b1;
          c_we = 1'b1;
          c_be = rq_be_q;
        end
        ocm_ack = 1'b1;
        state_d = S_IDLE;
      end

      S_FILL: begin
        mem_req  = 1'b1;
        mem_addr = '{tag: fill_line_q.tag, index: fill_line_q.index, offset: fill_k_q};
        if (mem_ack) begin
          c_en    = 1'b1;
          c_we    = 1'b1;
          c_addr  = mem_addr;
          c_wdata = mem_rdata;
          if (fill_k_q == OFFSET_W'(LINE_WORDS - 1)) state_d = S_FILL_DIR;
        end
      end

      S_FILL_DIR: begin
        dir_we  = 1'b1;
        state_d = fill_ret_q;
      end

      S_F_RD: begin
        ta_slot = fl_slot_q;
        state_d = S_F_TR;
      end

      S_F_TR: begin
        if (!ta_valid) begin
          state_d = fl_ret_q;
        end else begin
          c_en    = 1'b1;
          c_addr  = tr_addr;
          state_d = S_F_DATA;
        end
      end

      S_F_DATA: begin
        if (c_hit) begin
          state_d = S_F_MEM;
        end else begin
          fill_start  = 1'b1;
          fill_line_d = fl_tr_q;
          fill_ret_d  = S_F_RD;
        end
      end

      S_F_MEM: begin
        mem_req   = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = fl_dst_q;
        mem_wdata = fl_data_q;
        if (mem_ack) state_d = S_F_CRD;
      end

      S_F_CRD: begin
        c_en    = 1'b1;
        c_addr  = fl_dst_q;
        state_d = S_F_CWR;
      end

      S_F_CWR: begin
        if (c_hit) begin
          c_en    = 1'b1;
          c_we    = 1'b1;
          c_addr  = fl_dst_q;
          c_wdata = fl_data_q;
        end
        state_d = S_F_INV;
      end

      S_F_INV: begin
        t_we = 1'b1;
        if (!cam_busy) begin
          cam_we  = 1'b1;
          state_d = fl_ret_q;
        end
      end

      S_E_ISSUE: begin
        ta_slot    = {e_dst_q.index, e_dst_q.offset};
        cam_search = 1'b1;
        cam_skey   = e_dst_q;
        state_d    = S_E_CHECK;
      end

      S_E_CHECK: begin
        if (tb_valid && tb_entry.tag_dst == e_src_q.tag) begin
          // the source word is itself a copy: make it real first
          fl_start  = 1'b1;
          fl_slot_d = {e_src_q.index, e_src_q.offset};
          fl_ret_d  = S_E_ISSUE;
        end else if (ta_valid && ta_entry.tag_dst != e_dst_q.tag) begin
          // the destination slot holds a copy of another address
          fl_start  = 1'b1;
          fl_slot_d = {e_dst_q.index, e_dst_q.offset};
          fl_ret_d  = S_E_ISSUE;
        end else if (cam_match) begin
          // a copy points at the destination word, which is about to change
          fl_start  = 1'b1;
          fl_slot_d = cam_match_slot;
          fl_ret_d  = S_E_ISSUE;
        end else if (!cam_busy) begin
          t_we       = 1'b1;
          t_wslot    = {e_dst_q.index, e_dst_q.offset};
          t_wvalid   = 1'b1;
          cam_we     = 1'b1;
          cam_wslot  = {e_dst_q.index, e_dst_q.offset};
          cam_wvalid = 1'b1;
          e_step     = 1'b1;
          state_d    = (e_left_q == 1) ? S_IDLE : S_E_ISSUE;
        end
      end

      default: state_d = S_IDLE;
    endcase

    if (fill_start) state_d = S_FILL;
    if (fl_start)   state_d = S_F_RD;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      rq_we_q     <= 1'b0;
      rq_addr_q   <= '0;
      rq_be_q     <= '0;
      rq_wdata_q  <= '0;
      fill_line_q <= '0;
      fill_k_q    <= '0;
      fill_ret_q  <= S_IDLE;
      fl_slot_q   <= '0;
      fl_ret_q    <= S_IDLE;
      fl_dst_q    <= '0;
      fl_tr_q     <= '0;
      fl_data_q   <= '0;
      e_src_q     <= '0;
      e_dst_q     <= '0;
      e_left_q    <= '0;
      e_offcal_q  <= '0;
      tr_q        <= '0;
    end else begin
      state_q     <= state_d;
      fill_line_q <= fill_line_d;
      fill_ret_q  <= fill_ret_d;
      fl_slot_q   <= fl_slot_d;
      fl_ret_q    <= fl_ret_d;

      if (state_q == S_IDLE && ocm_req && !(mc_start && mc_size != 0) && e_left_q == 0) begin
        rq_we_q    <= ocm_we;
        rq_addr_q  <= ocm_addr;
        rq_be_q    <= ocm_be;
        rq_wdata_q <= ocm_wdata;
      end
      if (state_q == S_LOOKUP) tr_q <= tr_addr;

      if (fill_start) fill_k_q <= '0;
      else if (state_q == S_FILL && mem_ack) fill_k_q <= fill_k_q + 1'b1;

      if (state_q == S_F_TR) begin
        fl_dst_q <= '{tag: ta_entry.tag_dst, index: fl_slot_q[SLOT_W-1:OFFSET_W],
                      offset: fl_slot_q[OFFSET_W-1:0]};
        fl_tr_q  <= tr_addr;
      end
      if (state_q == S_F_DATA && c_hit) fl_data_q <= c_rdata;

      // memcpy parameters: taken at the start command
      if (mc_start && mc_size != 0) begin
        e_src_q    <= mc_src;
        e_dst_q    <= mc_dst;
        e_left_q   <= mc_size;
        e_offcal_q <= OFFCAL_W'($signed({1'b0, mc_dst.offset}) - $signed({1'b0, mc_src.offset}));
      end else begin
        if (e_step) begin
          e_src_q  <= e_src_q + 1'b1;
          e_dst_q  <= e_dst_q + 1'b1;
          e_left_q <= e_left_q - 1'b1;
        end
      end
    end
  end

  // handshake rules
  a_mem_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req && !mem_ack |=> mem_req && $stable(mem_addr) && $stable(mem_we));
  a_ack_has_req: assert property (@(posedge clk) disable iff (!rst_n) ocm_ack |-> ocm_req);
  a_cam_not_busy: assert property (@(posedge clk) disable iff (!rst_n) cam_we |-> !cam_busy);

endmodule

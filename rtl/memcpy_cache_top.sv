// memcpy_cache_top: data cache with memcpy hardware for a processor's data side.
//
// A 32 KB direct-mapped write-through cache (data_cache) is extended with an
// indexing table (indexing_table) and a CAM over the copies' sources
// (src_cam). A memcpy of word-aligned but not necessarily line-aligned data is
// started through four parameter registers (memcpy_regs) and is carried out by
// cache_ctrl as pointer insertion at two cycles per word; reads of a copy are
// translated by offset_calc inside cache_ctrl and take one extra cycle.
//
// Ports: the processor data side (22-bit word address, 32-bit data, byte
// enables, req/ack handshake), the parameter-register port (word select 0
// start, 1 src, 2 dst, 3 size), and a word-wide main-memory port used for
// line refills, write-through and copy write-backs. The processor itself,
// the instruction-side bus and main memory are outside this block.
module memcpy_cache_top
  import memcpy_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // processor data side
  input  logic              ocm_req,
  input  logic              ocm_we,
  input  logic [ADDR_W-1:0] ocm_addr,
  input  logic [BE_W-1:0]   ocm_be,
  input  logic [DATA_W-1:0] ocm_wdata,
  output logic [DATA_W-1:0] ocm_rdata,
  output logic              ocm_ack,
  // memcpy parameter registers
  input  logic              reg_we,
  input  logic [1:0]        reg_addr,
  input  logic [DATA_W-1:0] reg_wdata,
  output logic [DATA_W-1:0] reg_rdata,
  // main memory
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [BE_W-1:0]   mem_be,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata,
  input  logic              mem_ack
);

  // parameter registers
  waddr_t            mc_src, mc_dst;
  logic [SIZE_W-1:0] mc_size;
  logic              mc_start, mc_busy;

  // cache
  logic              c_en, c_we, c_hit;
  waddr_t            c_addr;
  logic [BE_W-1:0]   c_be;
  logic [DATA_W-1:0] c_wdata, c_rdata;
  logic              dir_we, dir_valid;
  logic [INDEX_W-1:0] dir_index;
  logic [TAG_W-1:0]  dir_tag;

  // indexing table
  logic [SLOT_W-1:0] ta_slot, tb_slot, t_wslot;
  logic              ta_valid, tb_valid, t_we, t_wvalid;
  itab_entry_t       ta_entry, tb_entry, t_wentry;

  // CAM
  logic              cam_we, cam_wvalid, cam_busy, cam_search, cam_match;
  logic [SLOT_W-1:0] cam_wslot, cam_match_slot;
  waddr_t            cam_wkey, cam_skey;

  waddr_t            mem_waddr;
  assign mem_addr = mem_waddr;

  memcpy_regs u_regs (
    .clk, .rst_n,
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .busy (mc_busy),
    .src  (mc_src),
    .dst  (mc_dst),
    .size (mc_size),
    .start(mc_start)
  );

  cache_ctrl u_ctrl (
    .clk, .rst_n,
    .ocm_req, .ocm_we,
    .ocm_addr (waddr_t'(ocm_addr)),
    .ocm_be, .ocm_wdata, .ocm_rdata, .ocm_ack,
    .mc_start, .mc_src, .mc_dst, .mc_size, .mc_busy,
    .mem_req, .mem_we,
    .mem_addr (mem_waddr),
    .mem_be, .mem_wdata, .mem_rdata, .mem_ack,
    .c_en, .c_we, .c_addr, .c_be, .c_wdata, .c_rdata, .c_hit,
    .dir_we, .dir_index, .dir_tag, .dir_valid,
    .ta_slot, .ta_valid, .ta_entry, .tb_slot, .tb_valid, .tb_entry,
    .t_we, .t_wslot, .t_wvalid, .t_wentry,
    .cam_we, .cam_wslot, .cam_wkey, .cam_wvalid, .cam_busy,
    .cam_search, .cam_skey, .cam_match, .cam_match_slot
  );

  data_cache u_cache (
    .clk, .rst_n,
    .acc_en   (c_en),
    .acc_we   (c_we),
    .acc_addr (c_addr),
    .acc_be   (c_be),
    .acc_wdata(c_wdata),
    .rdata    (c_rdata),
    .hit      (c_hit),
    .dir_we, .dir_index, .dir_tag, .dir_valid
  );

  indexing_table u_table (
    .clk, .rst_n,
    .ra_slot (ta_slot),
    .ra_valid(ta_valid),
    .ra_entry(ta_entry),
    .rb_slot (tb_slot),
    .rb_valid(tb_valid),
    .rb_entry(tb_entry),
    .we      (t_we),
    .w_slot  (t_wslot),
    .w_valid (t_wvalid),
    .w_entry (t_wentry)
  );

  src_cam u_cam (
    .clk, .rst_n,
    .we        (cam_we),
    .w_slot    (cam_wslot),
    .w_key     (cam_wkey),
    .w_valid   (cam_wvalid),
    .busy      (cam_busy),
    .search    (cam_search),
    .s_key     (cam_skey),
    .match     (cam_match),
    .match_slot(cam_match_slot)
  );

endmodule

// tb_cache_ctrl: directed test of the controller's rules for copies.
//
// The controller is connected to the cache arrays, the indexing table, the CAM
// and a behavioural main memory, and driven directly (no parameter registers).
// It checks what main memory and the table hold after each rule:
//   - a memcpy writes nothing to main memory and fills one slot per word,
//     two cycles per word;
//   - a read of a copy returns the original word, two cycles after the request,
//     and an ordinary hit one cycle after;
//   - a write to an original first writes every copy of it back to main memory
//     at the copy's address and invalidates those slots;
//   - a write to a copy first writes the copied word back at its own address,
//     invalidates the slot, and then applies the written bytes;
//   - a write goes through to main memory.
module tb_cache_ctrl;
  import memcpy_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              ocm_req, ocm_we, ocm_ack;
  waddr_t            ocm_addr;
  logic [BE_W-1:0]   ocm_be;
  logic [DATA_W-1:0] ocm_wdata, ocm_rdata;
  logic              mc_start, mc_busy;
  waddr_t            mc_src, mc_dst;
  logic [SIZE_W-1:0] mc_size;
  logic              mem_req, mem_we, mem_ack;
  waddr_t            mem_addr;
  logic [BE_W-1:0]   mem_be;
  logic [DATA_W-1:0] mem_wdata, mem_rdata;
  logic              c_en, c_we, c_hit, dir_we, dir_valid;
  waddr_t            c_addr;
  logic [BE_W-1:0]   c_be;
  logic [DATA_W-1:0] c_wdata, c_rdata;
  logic [INDEX_W-1:0] dir_index;
  logic [TAG_W-1:0]  dir_tag;
  logic [SLOT_W-1:0] ta_slot, tb_slot, t_wslot, cam_wslot, cam_match_slot;
  logic              ta_valid, tb_valid, t_we, t_wvalid;
  itab_entry_t       ta_entry, tb_entry, t_wentry;
  logic              cam_we, cam_wvalid, cam_busy, cam_search, cam_match;
  waddr_t            cam_wkey, cam_skey;

  cache_ctrl dut (.*);
  data_cache u_cache (.clk, .rst_n, .acc_en(c_en), .acc_we(c_we), .acc_addr(c_addr),
                      .acc_be(c_be), .acc_wdata(c_wdata), .rdata(c_rdata), .hit(c_hit),
                      .dir_we, .dir_index, .dir_tag, .dir_valid);
  indexing_table u_table (.clk, .rst_n, .ra_slot(ta_slot), .ra_valid(ta_valid),
                          .ra_entry(ta_entry), .rb_slot(tb_slot), .rb_valid(tb_valid),
                          .rb_entry(tb_entry), .we(t_we), .w_slot(t_wslot),
                          .w_valid(t_wvalid), .w_entry(t_wentry));
  src_cam u_cam (.clk, .rst_n, .we(cam_we), .w_slot(cam_wslot), .w_key(cam_wkey),
                 .w_valid(cam_wvalid), .busy(cam_busy), .search(cam_search),
                 .s_key(cam_skey), .match(cam_match), .match_slot(cam_match_slot));
  main_memory u_mem (.clk, .mem_req, .mem_we, .mem_addr(mem_addr), .mem_be, .mem_wdata,
                     .mem_rdata, .mem_ack);

  int checks = 0, failures = 0;
  int mem_writes_before;

  task automatic chk(input string what, input logic [DATA_W-1:0] got, input logic [DATA_W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  function automatic waddr_t wa(input int tag, input int index, input int offset);
    return '{tag: TAG_W'(tag), index: INDEX_W'(index), offset: OFFSET_W'(offset)};
  endfunction

  function automatic logic slot_valid(input waddr_t a);
    return u_table.valid_q[{a.index, a.offset}];
  endfunction

  task automatic rd(input waddr_t a, output logic [DATA_W-1:0] d, output int cycles);
    ocm_req = 1; ocm_we = 0; ocm_addr = a; cycles = 0;
    forever begin @(negedge clk); cycles++; if (ocm_ack) break; end
    d = ocm_rdata;
    @(posedge clk); #1; ocm_req = 0;
  endtask

  task automatic wr(input waddr_t a, input logic [BE_W-1:0] be, input logic [DATA_W-1:0] d);
    ocm_req = 1; ocm_we = 1; ocm_addr = a; ocm_be = be; ocm_wdata = d;
    forever begin @(negedge clk); if (ocm_ack) break; end
    @(posedge clk); #1; ocm_req = 0;
  endtask

  task automatic copy(input waddr_t s, input waddr_t d, input int n, output int cycles);
    mc_src = s; mc_dst = d; mc_size = SIZE_W'(n); mc_start = 1;
    @(posedge clk); #1; mc_start = 0;
    cycles = 0;
    while (mc_busy) begin @(posedge clk); #1; cycles++; end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] d;
    int cyc;
    ocm_req = 0; ocm_we = 0; ocm_addr = '0; ocm_be = '0; ocm_wdata = '0;
    mc_start = 0; mc_src = '0; mc_dst = '0; mc_size = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // bring source lines 0 and 1 of tag 2 into the cache
    for (int o = 0; o < 16; o++) rd(wa(2, 0, 0) + ADDR_W'(o), d, cyc);
    rd(wa(2, 0, 3), d, cyc);
    chk("ordinary hit latency", cyc, 2);
    chk("ordinary hit data", d, u_mem.init_word(wa(2, 0, 3)));

    // copy 11 words from (0,1) to (14,5) of tag 4: the first worked example
    mem_writes_before = u_mem.writes;
    copy(wa(2, 0, 1), wa(4, 14, 5), 11, cyc);
    chk("copy time, 2 cycles per word", cyc, 22);
    chk("copy writes no memory", u_mem.writes, mem_writes_before);
    for (int i = 0; i < 11; i++) chk("slot valid", slot_valid(wa(4, 14, 5) + ADDR_W'(i)), 1);
    chk("slot after the copy stays free", slot_valid(wa(4, 16, 0)), 0);
    rd(wa(4, 15, 2), d, cyc);
    chk("copy read latency", cyc, 3);
    chk("copy read: word F", d, u_mem.init_word(wa(2, 0, 6)));

    // write to an original: copy at (15,0) points at (0,4)
    wr(wa(2, 0, 4), 4'b1111, 32'hdead_beef);
    chk("copy written back at its own address", u_mem.peek(wa(4, 15, 0)), u_mem.init_word(wa(2, 0, 4)));
    chk("copy slot invalidated", slot_valid(wa(4, 15, 0)), 0);
    chk("original written through", u_mem.peek(wa(2, 0, 4)), 32'hdead_beef);
    rd(wa(4, 15, 0), d, cyc);
    chk("former copy keeps old value", d, u_mem.init_word(wa(2, 0, 4)));
    rd(wa(2, 0, 4), d, cyc);
    chk("original reads new value", d, 32'hdead_beef);

    // write to a copy: (15,3) points at (0,7); write one byte
    wr(wa(4, 15, 3), 4'b0001, 32'h0000_00a5);
    chk("copy slot invalidated on write", slot_valid(wa(4, 15, 3)), 0);
    chk("copy written back then byte applied", u_mem.peek(wa(4, 15, 3)),
        {u_mem.init_word(wa(2, 0, 7))[31:8], 8'ha5});
    chk("original untouched", u_mem.peek(wa(2, 0, 7)), u_mem.init_word(wa(2, 0, 7)));
    rd(wa(4, 15, 3), d, cyc);
    chk("written copy reads back", d, {u_mem.init_word(wa(2, 0, 7))[31:8], 8'ha5});
    rd(wa(4, 14, 6), d, cyc);
    chk("other copies unaffected", d, u_mem.init_word(wa(2, 0, 2)));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

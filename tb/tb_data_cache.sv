// tb_data_cache: self-checking test of the cache arrays.
//
// After reset no line hits. Lines are installed through the directory port
// with random tags and filled word by word; reads must then hit with the right
// data one cycle after the request, and miss for a different tag or an
// invalidated line. Random byte-enable writes are checked against a reference
// copy of the data-memory.
module tb_data_cache;
  import memcpy_pkg::*;

  logic              clk = 0, rst_n = 0;
  logic              acc_en, acc_we, hit, dir_we, dir_valid;
  waddr_t            acc_addr;
  logic [BE_W-1:0]   acc_be;
  logic [DATA_W-1:0] acc_wdata, rdata;
  logic [INDEX_W-1:0] dir_index;
  logic [TAG_W-1:0]  dir_tag;

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] ref_d [1 << SLOT_W];
  logic [TAG_W-1:0]  ref_t [1 << INDEX_W];
  logic              ref_v [1 << INDEX_W];
  logic [DATA_W-1:0] wd;

  data_cache dut (.*);

  always #5 clk = ~clk;

  task automatic do_read(input waddr_t a);
    logic exp_hit;
    acc_en = 1; acc_we = 0; acc_addr = a;
    @(posedge clk); #1;
    acc_en = 0;
    exp_hit = ref_v[a.index] && ref_t[a.index] == a.tag;
    checks++;
    if (hit !== exp_hit || (exp_hit && rdata !== ref_d[{a.index, a.offset}])) begin
      failures++;
      $display("FAIL read %h: hit %b data %h, expected %b %h", a, hit, rdata, exp_hit,
               ref_d[{a.index, a.offset}]);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc_en = 0; acc_we = 0; acc_addr = '0; acc_be = '0; acc_wdata = '0;
    dir_we = 0; dir_index = '0; dir_tag = '0; dir_valid = 0;
    for (int i = 0; i < (1 << INDEX_W); i++) ref_v[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) do_read(waddr_t'($urandom));
    // install 32 lines
    for (int l = 0; l < 32; l++) begin
      dir_we = 1; dir_index = INDEX_W'(l * 31); dir_tag = TAG_W'($urandom); dir_valid = 1;
      ref_v[dir_index] = 1; ref_t[dir_index] = dir_tag;
      for (int w = 0; w < int'(LINE_WORDS); w++) begin
        acc_en = 1; acc_we = 1; acc_be = '1; acc_wdata = $urandom;
        acc_addr = '{tag: dir_tag, index: dir_index, offset: OFFSET_W'(w)};
        ref_d[{dir_index, OFFSET_W'(w)}] = acc_wdata;
        @(posedge clk); #1;
        dir_we = 0;
      end
      acc_en = 0;
    end
    // random reads, byte writes and invalidations over the installed lines
    for (int n = 0; n < 4000; n++) begin
      waddr_t a;
      a.index  = INDEX_W'(($urandom % 32) * 31);
      a.offset = OFFSET_W'($urandom);
      a.tag    = ($urandom % 4 == 0) ? TAG_W'($urandom) : ref_t[a.index];
      case ($urandom % 8)
        0: begin
          acc_en = 1; acc_we = 1; acc_addr = a; acc_be = BE_W'($urandom); wd = $urandom;
          acc_wdata = wd;
          for (int b = 0; b < int'(BE_W); b++)
            if (acc_be[b]) ref_d[{a.index, a.offset}][8*b +: 8] = wd[8*b +: 8];
          @(posedge clk); #1; acc_en = 0;
        end
        1: begin
          dir_we = 1; dir_index = a.index; dir_tag = ref_t[a.index]; dir_valid = ($urandom % 2);
          ref_v[a.index] = dir_valid;
          @(posedge clk); #1; dir_we = 0;
        end
        default: do_read(a);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

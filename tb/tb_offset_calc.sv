// tb_offset_calc: self-checking test of the copy-address translation.
//
// Checks the two worked examples of the design (copy at line 15 offset 2
// pointing one line back, copy at line 14 offset 7 pointing one line forward)
// and then every combination of request offset and offset difference
// (-7..+7) over a set of source lines, including the tag carry at index
// 1023 -> 0 and 0 -> 1023, against a linear-address reference:
// original = {tag_src, index_src, 0} + req_offset - offset_calculation.
module tb_offset_calc;
  import memcpy_pkg::*;

  logic [OFFSET_W-1:0]        req_offset;
  logic [INDEX_W-1:0]         index_src;
  logic [TAG_W-1:0]           tag_src;
  logic signed [OFFCAL_W-1:0] offcal;
  waddr_t                     cache_addr;
  logic                       next_line, prev_line;

  int checks = 0, failures = 0;
  int prev_cnt = 0, next_cnt = 0;
  logic [ADDR_W-1:0] lin;

  offset_calc dut (.*);

  task automatic check(input string what, input logic [ADDR_W-1:0] expect_addr);
    #1;
    checks++;
    if (cache_addr !== expect_addr) begin
      failures++;
      $display("FAIL %s: off=%0d idx=%0d tag=%0d cal=%0d -> %h, expected %h", what, req_offset,
               index_src, tag_src, offcal, cache_addr, expect_addr);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked example 1: offset_calculation 4, request (15,2) -> (0,6)
    tag_src = '0; index_src = 10'd1; offcal = 4'sd4; req_offset = 3'd2;
    check("example 1", {9'd0, 10'd0, 3'd6});
    // worked example 2: offset_calculation -2, request (14,7) -> (1,1)
    index_src = 10'd0; offcal = -4'sd2; req_offset = 3'd7;
    check("example 2", {9'd0, 10'd1, 3'd1});
    // exhaustive over offsets and differences
    for (int t = 0; t < 3; t++) begin
      for (int l = 0; l < 6; l++) begin
        for (int d = -7; d <= 7; d++) begin
          for (int o = 0; o < 8; o++) begin
            tag_src    = (t == 0) ? 9'd0 : (t == 1) ? 9'd5 : 9'd511;
            index_src  = (l == 0) ? 10'd0 : (l == 1) ? 10'd1023 : 10'(l * 97);
            offcal     = 4'(d);
            req_offset = 3'(o);
            lin = {tag_src, index_src, 3'd0} + ADDR_W'(o) - ADDR_W'(d);
            check("sweep", lin);
            if (prev_line) prev_cnt++;
            if (next_line) next_cnt++;
          end
        end
      end
    end
    checks++;
    if (prev_cnt == 0 || next_cnt == 0) begin
      failures++;
      $display("FAIL line steps not exercised: prev=%0d next=%0d", prev_cnt, next_cnt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

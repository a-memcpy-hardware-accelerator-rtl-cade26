// tb_src_cam: self-checking test of the source CAM.
//
// Checks that nothing matches after reset, that a write keeps the CAM busy for
// exactly one further cycle (two-cycle write), that a search issued while a
// write is in flight already sees it, that the lowest matching slot is
// reported, and then runs random writes, invalidations and searches on a small
// key space against a reference array.
module tb_src_cam;
  import memcpy_pkg::*;

  localparam int unsigned DEPTH = 1 << SLOT_W;

  logic              clk = 0, rst_n = 0;
  logic              we, w_valid, busy, search, match;
  logic [SLOT_W-1:0] w_slot, match_slot;
  logic [ADDR_W-1:0] w_key, s_key;

  int checks = 0, failures = 0;
  logic              ref_v [DEPTH];
  logic [ADDR_W-1:0] ref_k [DEPTH];
  logic              exp_m;
  logic [SLOT_W-1:0] exp_s;

  src_cam dut (.*);

  always #5 clk = ~clk;

  task automatic expect_search(input string what);
    exp_m = 0; exp_s = '0;
    for (int i = 0; i < int'(DEPTH); i++)
      if (!exp_m && ref_v[i] && ref_k[i] == s_key) begin exp_m = 1; exp_s = SLOT_W'(i); end
  endtask

  task automatic compare(input string what);
    checks++;
    if (match !== exp_m || (exp_m && match_slot !== exp_s)) begin
      failures++;
      $display("FAIL %s key %h: match %b slot %0d, expected %b slot %0d", what, s_key, match,
               match_slot, exp_m, exp_s);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; w_valid = 0; w_slot = '0; w_key = '0; search = 0; s_key = '0;
    for (int i = 0; i < int'(DEPTH); i++) begin ref_v[i] = 0; ref_k[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // no match after reset
    s_key = '0; search = 1; expect_search("reset");
    @(posedge clk); #1; compare("reset");
    search = 0;
    // two-cycle write: busy for one cycle after acceptance, search sees it at once
    we = 1; w_slot = 13'd100; w_key = 22'h12345; w_valid = 1;
    @(posedge clk); #1;
    ref_v[100] = 1; ref_k[100] = 22'h12345;
    we = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL busy not set in second write cycle"); end
    search = 1; s_key = 22'h12345; expect_search("bypass");
    @(posedge clk); #1; compare("bypass");
    checks++;
    if (busy) begin failures++; $display("FAIL busy longer than two cycles"); end
    // a lower slot with the same key wins
    search = 0;
    we = 1; w_slot = 13'd7; w_key = 22'h12345; w_valid = 1;
    @(posedge clk); #1; we = 0; ref_v[7] = 1; ref_k[7] = 22'h12345;
    @(posedge clk); #1;
    search = 1; expect_search("priority");
    @(posedge clk); #1; compare("priority");
    checks++;
    if (match_slot != 7) begin failures++; $display("FAIL priority slot %0d", match_slot); end
    // invalidate slot 7: slot 100 must be found again
    search = 0; we = 1; w_slot = 13'd7; w_valid = 0;
    @(posedge clk); #1; we = 0; ref_v[7] = 0;
    search = 1; expect_search("invalidate");
    @(posedge clk); #1; compare("invalidate");
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      if (!busy && ($urandom % 2)) begin
        we = 1; w_slot = SLOT_W'($urandom % 32 * 251); w_key = ADDR_W'($urandom % 16);
        w_valid = ($urandom % 4) != 0;
      end else we = 0;
      search = 1; s_key = ADDR_W'($urandom % 16);
      expect_search("random");
      @(posedge clk); #1;
      compare("random");
      if (we) begin ref_v[w_slot] = w_valid; ref_k[w_slot] = w_key; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

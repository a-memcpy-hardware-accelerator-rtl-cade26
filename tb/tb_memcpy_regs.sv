// tb_memcpy_regs: self-checking test of the memcpy parameter registers.
//
// Writes src, dst and size and reads them back, checks that a store of 1 to
// word 0 gives a start pulse of exactly one cycle with the parameters stable,
// that a store of 0 does not start, that no start is issued while busy, and
// that word 0 reads back the busy flag.
module tb_memcpy_regs;
  import memcpy_pkg::*;

  logic              clk = 0, rst_n = 0;
  logic              reg_we, busy, start;
  logic [1:0]        reg_addr;
  logic [DATA_W-1:0] reg_wdata, reg_rdata;
  waddr_t            src, dst;
  logic [SIZE_W-1:0] size;

  int checks = 0, failures = 0;
  int starts = 0;

  memcpy_regs dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (start) starts++;

  task automatic wr(input logic [1:0] a, input logic [DATA_W-1:0] d);
    reg_we = 1; reg_addr = a; reg_wdata = d;
    @(posedge clk); #1;
    reg_we = 0;
  endtask

  task automatic chk(input string what, input logic [DATA_W-1:0] got, input logic [DATA_W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reg_we = 0; reg_addr = '0; reg_wdata = '0; busy = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      logic [DATA_W-1:0] s, d, z;
      s = $urandom; d = $urandom; z = $urandom % 8193;
      wr(2'd1, s); wr(2'd2, d); wr(2'd3, z);
      reg_addr = 2'd1; #1; chk("src readback", reg_rdata, DATA_W'(s[ADDR_W-1:0]));
      reg_addr = 2'd2; #1; chk("dst readback", reg_rdata, DATA_W'(d[ADDR_W-1:0]));
      reg_addr = 2'd3; #1; chk("size readback", reg_rdata, DATA_W'(z[SIZE_W-1:0]));
      chk("src out", DATA_W'(src), DATA_W'(s[ADDR_W-1:0]));
      chk("dst out", DATA_W'(dst), DATA_W'(d[ADDR_W-1:0]));
      chk("size out", DATA_W'(size), DATA_W'(z[SIZE_W-1:0]));
      // start: pulse for one cycle
      wr(2'd0, 32'h1);
      chk("start pulse", DATA_W'(start), 1);
      @(posedge clk); #1;
      chk("start length", DATA_W'(start), 0);
      // a store of 0 does not start
      wr(2'd0, 32'h0);
      chk("no start on 0", DATA_W'(start), 0);
      // no start while busy; busy reads back
      busy = 1;
      reg_addr = 2'd0; #1; chk("busy readback", reg_rdata, 1);
      wr(2'd0, 32'h1);
      chk("no start while busy", DATA_W'(start), 0);
      busy = 0;
      reg_addr = 2'd0; #1; chk("idle readback", reg_rdata, 0);
    end
    chk("start count", starts, 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

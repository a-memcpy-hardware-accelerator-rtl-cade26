// tb_memcpy_workloads: the copy sizes of the performance evaluation.
//
// Runs hardware copies of 1, 8, 40 and 8192 words (the sizes of the
// evaluation table) and a sweep of 4 to 4096 bytes (the throughput curve)
// on the top at its default sizes. Every copy must take exactly two cycles
// per word after its start command; adding the 28 cycles that software needs
// to write the four parameter registers on the original platform must give
// the table's totals of 30, 44, 108 and 16412 cycles. The copied words are
// read back and compared with main memory's initial contents. For each size
// the throughput at 100 MHz is printed, with and without that setup time.
// All copies go to one destination tag so that every copy finds its table
// slots free or owned by the same tag, as in a fresh unit.
module tb_memcpy_workloads;
  import memcpy_pkg::*;

  logic              clk = 0, rst_n = 0;
  logic              ocm_req, ocm_we, ocm_ack;
  logic [ADDR_W-1:0] ocm_addr;
  logic [BE_W-1:0]   ocm_be;
  logic [DATA_W-1:0] ocm_wdata, ocm_rdata;
  logic              reg_we;
  logic [1:0]        reg_addr;
  logic [DATA_W-1:0] reg_wdata, reg_rdata;
  logic              mem_req, mem_we, mem_ack;
  logic [ADDR_W-1:0] mem_addr;
  logic [BE_W-1:0]   mem_be;
  logic [DATA_W-1:0] mem_wdata, mem_rdata;

  memcpy_cache_top dut (.*);
  main_memory u_mem (.*);

  always #5 clk = ~clk;

  localparam int SETUP_CYCLES = 28;  // software setup on the original platform
  int checks = 0, failures = 0;

  task automatic reg_write(input logic [1:0] a, input logic [DATA_W-1:0] d);
    reg_we = 1; reg_addr = a; reg_wdata = d;
    @(posedge clk); #1;
    reg_we = 0;
  endtask

  task automatic ocm_read(input logic [ADDR_W-1:0] a, output logic [DATA_W-1:0] d);
    ocm_req = 1; ocm_we = 0; ocm_addr = a;
    forever begin @(negedge clk); if (ocm_ack) break; end
    d = ocm_rdata;
    @(posedge clk); #1;
    ocm_req = 0;
  endtask

  task automatic run_copy(input int words, input int expect_total);
    logic [ADDR_W-1:0] src, dst;
    logic [DATA_W-1:0] d;
    int cycles;
    // both ranges stay inside one tag, so no slot of another tag is met
    src = {TAG_W'(10), SLOT_W'($urandom % (8193 - words))};
    dst = {TAG_W'(20), SLOT_W'($urandom % (8193 - words))};
    reg_write(2'd1, DATA_W'(src));
    reg_write(2'd2, DATA_W'(dst));
    reg_write(2'd3, DATA_W'(words));
    reg_write(2'd0, 32'h1);
    cycles = 0;
    reg_addr = 2'd0; #1;
    while (reg_rdata[0]) begin @(posedge clk); #1; cycles++; end
    cycles--;  // the start command's own cycle
    checks++;
    if (cycles != 2 * words) begin
      failures++;
      $display("FAIL %0d words: %0d cycles, expected %0d", words, cycles, 2 * words);
    end
    if (expect_total > 0) begin
      checks++;
      if (SETUP_CYCLES + cycles != expect_total) begin
        failures++;
        $display("FAIL %0d words: %0d cycles with setup, table gives %0d", words,
                 SETUP_CYCLES + cycles, expect_total);
      end
    end
    $display("%5d bytes: %6d cycles, %6.1f MB/s copy only, %6.1f MB/s with setup", 4 * words,
             cycles, 400.0 * words / cycles, 400.0 * words / (cycles + SETUP_CYCLES));
    // read back: all words of small copies, 64 spread words of large ones
    for (int k = 0; k < ((words <= 64) ? words : 64); k++) begin
      int i;
      i = (words <= 64) ? k : (k * words) / 64;
      ocm_read(dst + ADDR_W'(i), d);
      checks++;
      if (d !== u_mem.init_word(src + ADDR_W'(i))) begin
        failures++;
        $display("FAIL %0d words: word %0d read %h expected %h", words, i, d,
                 u_mem.init_word(src + ADDR_W'(i)));
      end
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ocm_req = 0; ocm_we = 0; ocm_addr = '0; ocm_be = '0; ocm_wdata = '0;
    reg_we = 0; reg_addr = '0; reg_wdata = '0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    // evaluation table: 1, 8, 40 and 8192 words
    run_copy(1, 30);
    run_copy(8, 44);
    run_copy(40, 108);
    run_copy(8192, 16412);
    // throughput curve: 4 to 4096 bytes
    for (int b = 4; b <= 4096; b = (b < 64) ? b + 4 : b + 64) run_copy(b / 4, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

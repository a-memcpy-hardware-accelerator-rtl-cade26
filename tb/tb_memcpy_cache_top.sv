// tb_memcpy_cache_top: end-to-end test of the cache with memcpy hardware.
//
// The top runs with its default sizes (32 KB cache, 8192-slot table and CAM)
// against a behavioural main memory. A reference model keeps the value every
// word address should read as a program sees it (sequential memcpy semantics:
// dst[i] = src[i] for i = 0, 1, ...). Phases:
//   1. the two worked examples (11 words, offset difference +4 and -2), with
//      read latency checked: one cycle for an ordinary hit, two for a copy,
//      and copies of 1, 8 and 11 words taking two cycles per word;
//   2. one copy of the maximum size, 8192 words, which must take exactly two
//      cycles per word after the start command, then every copied word read back;
//   3. random reads, byte writes and copies, overlapping ones included, on a few
//      conflicting lines so copies are written back, lines evicted and refilled.
// Each mechanism of the controller is counted and must occur at least once.
module tb_memcpy_cache_top;
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

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] ref_mem [logic [ADDR_W-1:0]];

  function automatic logic [DATA_W-1:0] ref_rd(input logic [ADDR_W-1:0] a);
    return ref_mem.exists(a) ? ref_mem[a] : u_mem.init_word(a);
  endfunction

  // ---------------------------------------------------------------- mechanisms
  localparam int N_MECH = 13;
  int    mech [N_MECH];
  string mech_name [N_MECH] = '{
    "ordinary read hit", "copy read", "copy read from previous line",
    "copy read from next line", "line refill", "refill of an original for a copy",
    "write to a copy", "write to an original", "memcpy: source is a copy",
    "memcpy: destination slot taken", "memcpy: copy points at destination",
    "processor request held during memcpy", "write miss (no allocation)"};

  wire table_hit = dut.u_ctrl.table_hit;
  always @(posedge clk) if (rst_n) begin
    unique case (dut.u_ctrl.state_q)
      S_LOOKUP: begin
        if (!dut.u_ctrl.rq_we_q && !table_hit && dut.c_hit) mech[0]++;
        if (!dut.u_ctrl.rq_we_q && table_hit && dut.u_ctrl.u_offset_calc.prev_line) mech[2]++;
        if (!dut.u_ctrl.rq_we_q && table_hit && dut.u_ctrl.u_offset_calc.next_line) mech[3]++;
        if (dut.u_ctrl.rq_we_q && table_hit) mech[6]++;
      end
      S_RCOPY: if (dut.c_hit) mech[1]++; else mech[5]++;
      S_FILL_DIR: mech[4]++;
      S_WSCHK: if (dut.cam_match) mech[7]++;
      S_WCWR: if (!dut.c_hit) mech[12]++;
      S_E_CHECK: begin
        if (dut.tb_valid && dut.tb_entry.tag_dst == dut.u_ctrl.e_src_q.tag) mech[8]++;
        else if (dut.ta_valid && dut.ta_entry.tag_dst != dut.u_ctrl.e_dst_q.tag) mech[9]++;
        else if (dut.cam_match) mech[10]++;
      end
      S_E_ISSUE: if (ocm_req) mech[11]++;
      default: ;
    endcase
  end

  // ------------------------------------------------------------------- drivers
  task automatic ocm_read(input logic [ADDR_W-1:0] a, output logic [DATA_W-1:0] d,
                          output int cycles);
    ocm_req = 1; ocm_we = 0; ocm_addr = a;
    cycles = 0;
    forever begin
      @(negedge clk);
      cycles++;
      if (ocm_ack) break;
    end
    d = ocm_rdata;
    @(posedge clk); #1;
    ocm_req = 0;
  endtask

  task automatic ocm_write(input logic [ADDR_W-1:0] a, input logic [BE_W-1:0] be,
                           input logic [DATA_W-1:0] d);
    logic [DATA_W-1:0] w;
    ocm_req = 1; ocm_we = 1; ocm_addr = a; ocm_be = be; ocm_wdata = d;
    forever begin
      @(negedge clk);
      if (ocm_ack) break;
    end
    @(posedge clk); #1;
    ocm_req = 0;
    w = ref_rd(a);
    for (int b = 0; b < int'(BE_W); b++) if (be[b]) w[8*b +: 8] = d[8*b +: 8];
    ref_mem[a] = w;
  endtask

  task automatic reg_write(input logic [1:0] a, input logic [DATA_W-1:0] d);
    reg_we = 1; reg_addr = a; reg_wdata = d;
    @(posedge clk); #1;
    reg_we = 0;
  endtask

  // start a copy and return the cycles from the start command to the end
  task automatic hw_memcpy(input logic [ADDR_W-1:0] src, input logic [ADDR_W-1:0] dst,
                           input int size, output int cycles);
    reg_write(2'd1, DATA_W'(src));
    reg_write(2'd2, DATA_W'(dst));
    reg_write(2'd3, DATA_W'(size));
    reg_write(2'd0, 32'h1);     // start pulse is issued during the next cycle
    cycles = 0;
    reg_addr = 2'd0;
    #1;
    // the cycle that carries the start pulse is the command itself
    while (reg_rdata[0]) begin
      @(posedge clk); #1;
      cycles++;
    end
    cycles--;
    for (int i = 0; i < size; i++) begin
      logic [ADDR_W-1:0] s, d;
      s = src + ADDR_W'(i); d = dst + ADDR_W'(i);
      ref_mem[d] = ref_rd(s);
    end
  endtask

  task automatic check_read(input logic [ADDR_W-1:0] a, input int exp_cycles, input string what);
    logic [DATA_W-1:0] d;
    int cyc;
    ocm_read(a, d, cyc);
    checks++;
    if (d !== ref_rd(a)) begin
      failures++;
      $display("FAIL %s: read %h = %h, expected %h", what, a, d, ref_rd(a));
    end
    if (exp_cycles > 0) begin
      checks++;
      if (cyc != exp_cycles) begin
        failures++;
        $display("FAIL %s: read %h took %0d cycles, expected %0d", what, a, cyc, exp_cycles);
      end
    end
  endtask

  function automatic logic [ADDR_W-1:0] wa(input int tag, input int index, input int offset);
    return {TAG_W'(tag), INDEX_W'(index), OFFSET_W'(offset)};
  endfunction

  // ------------------------------------------------------------------ watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    logic [DATA_W-1:0] d;
    ocm_req = 0; ocm_we = 0; ocm_addr = '0; ocm_be = '0; ocm_wdata = '0;
    reg_we = 0; reg_addr = '0; reg_wdata = '0;
    for (int i = 0; i < N_MECH; i++) mech[i] = 0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // ---- 1. worked examples, one-word and eight-word copy timing
    for (int l = 0; l < 2; l++)
      for (int o = 0; o < 8; o++) check_read(wa(7, l, o), 0, "warm up");
    check_read(wa(7, 0, 3), 2, "ordinary hit latency");
    // example 1: source (0,1), destination (14,5), 11 words A..K
    hw_memcpy(wa(7, 0, 1), wa(5, 14, 5), 11, cyc);
    checks++;
    if (cyc != 22) begin failures++; $display("FAIL 11-word copy took %0d cycles", cyc); end
    check_read(wa(5, 15, 2), 3, "example 1 word F (copy latency)");
    for (int i = 0; i < 11; i++) check_read(wa(5, 14, 5) + ADDR_W'(i), 3, "example 1");
    // example 2: source (0,4), destination (14,2)
    hw_memcpy(wa(7, 0, 4), wa(5, 14, 2), 11, cyc);
    check_read(wa(5, 14, 7), 3, "example 2 word F");
    for (int i = 0; i < 11; i++) check_read(wa(5, 14, 2) + ADDR_W'(i), 3, "example 2");
    hw_memcpy(wa(7, 1, 0), wa(5, 20, 0), 1, cyc);
    checks++;
    if (cyc != 2) begin failures++; $display("FAIL 1-word copy took %0d cycles", cyc); end
    hw_memcpy(wa(7, 1, 0), wa(5, 21, 0), 8, cyc);
    checks++;
    if (cyc != 16) begin failures++; $display("FAIL 8-word copy took %0d cycles", cyc); end

    // ---- 2. maximum-size copy: 8192 words, two cycles per word; it replaces
    //         the same-tag slots of phase 1 without any write-back
    hw_memcpy(wa(3, 0, 3), wa(5, 0, 6), 8192, cyc);
    checks++;
    if (cyc != 2 * 8192) begin
      failures++;
      $display("FAIL 8192-word copy took %0d cycles, expected %0d", cyc, 2 * 8192);
    end
    $display("8192-word copy: %0d cycles", cyc);
    for (int i = 0; i < 8192; i++) check_read(wa(5, 0, 6) + ADDR_W'(i), 0, "8192-word copy");

    // ---- 3. random traffic on three tags and a few lines
    for (int n = 0; n < 6000; n++) begin
      logic [ADDR_W-1:0] a, b;
      a = wa($urandom % 3, 32 + $urandom % 6, $urandom % 8);
      b = wa($urandom % 3, 32 + $urandom % 6, $urandom % 8);
      case ($urandom % 10)
        0, 1, 2, 3, 4: check_read(a, 0, "random read");
        5, 6, 7: ocm_write(a, BE_W'($urandom % 15 + 1), $urandom);
        8: hw_memcpy(a, b, 1 + $urandom % 20, cyc);
        default: begin
          // processor request issued while a copy runs
          reg_write(2'd1, DATA_W'(a));
          reg_write(2'd2, DATA_W'(b));
          reg_write(2'd3, DATA_W'(4));
          reg_write(2'd0, 32'h1);
          for (int i = 0; i < 4; i++) ref_mem[b + ADDR_W'(i)] = ref_rd(a + ADDR_W'(i));
          check_read(b + ADDR_W'($urandom % 4), 0, "read during copy");
        end
      endcase
    end
    // everything copied must still read back right
    for (int t = 0; t < 3; t++)
      for (int l = 32; l < 38; l++)
        for (int o = 0; o < 8; o++) check_read(wa(t, l, o), 0, "final sweep");

    for (int i = 0; i < N_MECH; i++) begin
      checks++;
      $display("mechanism %-40s %0d", mech_name[i], mech[i]);
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism never happened: %s", mech_name[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

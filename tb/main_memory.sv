// main_memory: behavioural model of the main memory behind the cache.
//
// Not part of the design: a testbench stand-in. It holds one 32-bit word per
// 22-bit word address in a sparse array; a word never written reads as
// init_word(addr), a fixed hash of the address, so testbenches can predict it.
// A request (held until ack) is acknowledged one cycle after it appears; read
// data comes with the ack; writes honour the byte enables.
module main_memory
  import memcpy_pkg::*;
(
  input  logic              clk,
  input  logic              mem_req,
  input  logic              mem_we,
  input  logic [ADDR_W-1:0] mem_addr,
  input  logic [BE_W-1:0]   mem_be,
  input  logic [DATA_W-1:0] mem_wdata,
  output logic [DATA_W-1:0] mem_rdata,
  output logic              mem_ack
);

  logic [DATA_W-1:0] store [logic [ADDR_W-1:0]];
  int reads = 0, writes = 0;

  function automatic logic [DATA_W-1:0] init_word(input logic [ADDR_W-1:0] a);
    return {a[9:0], a[21:0]} ^ 32'h9e37_79b9;
  endfunction

  function automatic logic [DATA_W-1:0] peek(input logic [ADDR_W-1:0] a);
    return store.exists(a) ? store[a] : init_word(a);
  endfunction

  initial begin
    mem_ack   = 1'b0;
    mem_rdata = '0;
  end

  always @(posedge clk) begin
    if (mem_req && !mem_ack) begin
      mem_ack <= 1'b1;
      if (mem_we) begin
        logic [DATA_W-1:0] w;
        w = peek(mem_addr);
        for (int b = 0; b < int'(BE_W); b++)
          if (mem_be[b]) w[8*b +: 8] = mem_wdata[8*b +: 8];
        store[mem_addr] = w;
        writes++;
      end else begin
        mem_rdata <= peek(mem_addr);
        reads++;
      end
    end else begin
      mem_ack <= 1'b0;
    end
  end

endmodule

// memcpy_regs: the parameter registers of the memcpy unit.
//
// Software starts a hardware copy with four stores: the source word address
// (word 1), the destination word address (word 2), the number of words
// (word 3), and finally a 1 in bit 0 of word 0, which issues a one-cycle start
// pulse. These offsets (0x0 start, 0x4 src, 0x8 dst, 0xc size) are the
// document's. Reading word 0 returns the busy flag of the unit in bit 0 so
// software can wait for the end of a copy; the read-back and the bus widths
// are this design's choice. The register port is a plain synchronous
// write/read strobe on word addresses; reads answer in the same cycle.
module memcpy_regs
  import memcpy_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              reg_we,
  input  logic [1:0]        reg_addr,   // word select: 0 start, 1 src, 2 dst, 3 size
  input  logic [DATA_W-1:0] reg_wdata,
  output logic [DATA_W-1:0] reg_rdata,
  input  logic              busy,
  output waddr_t            src,
  output waddr_t            dst,
  output logic [SIZE_W-1:0] size,
  output logic              start
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src   <= '0;
      dst   <= '0;
      size  <= '0;
      start <= 1'b0;
    end else begin
      start <= 1'b0;
      if (reg_we) begin
        unique case (reg_addr)
          2'd0: start <= reg_wdata[0] && !busy;
          2'd1: src   <= reg_wdata[ADDR_W-1:0];
          2'd2: dst   <= reg_wdata[ADDR_W-1:0];
          2'd3: size  <= reg_wdata[SIZE_W-1:0];
        endcase
      end
    end
  end

  always_comb begin
    unique case (reg_addr)
      2'd0:    reg_rdata = DATA_W'(busy);
      2'd1:    reg_rdata = DATA_W'(src);
      2'd2:    reg_rdata = DATA_W'(dst);
      default: reg_rdata = DATA_W'(size);
    endcase
  end

endmodule

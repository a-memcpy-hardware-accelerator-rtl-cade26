// tb_indexing_table: self-checking test of the indexing table.
//
// After reset every slot must read invalid. Random writes of entries and of
// invalidations are mirrored in a reference array; both read ports are read at
// random slots every cycle and compared, one cycle later, with the reference
// as it stood when the read was issued (read-before-write in the same cycle).
module tb_indexing_table;
  import memcpy_pkg::*;

  localparam int unsigned DEPTH = 1 << SLOT_W;

  logic              clk = 0, rst_n = 0;
  logic [SLOT_W-1:0] ra_slot, rb_slot, w_slot;
  logic              ra_valid, rb_valid, we, w_valid;
  itab_entry_t       ra_entry, rb_entry, w_entry;

  int checks = 0, failures = 0;

  logic        ref_v [DEPTH];
  itab_entry_t ref_e [DEPTH];
  logic        exp_va, exp_vb;
  itab_entry_t exp_ea, exp_eb;

  indexing_table dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; ra_slot = '0; rb_slot = '0; w_slot = '0; w_valid = 0; w_entry = '0;
    for (int i = 0; i < int'(DEPTH); i++) begin ref_v[i] = 0; ref_e[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // every slot invalid after reset
    for (int i = 0; i < int'(DEPTH); i++) begin
      ra_slot = SLOT_W'(i); rb_slot = SLOT_W'(DEPTH - 1 - i);
      @(posedge clk); #1;
      checks++;
      if (ra_valid || rb_valid) begin
        failures++;
        $display("FAIL slot %0d valid after reset", i);
      end
    end
    // random traffic on a small window of slots so reads meet writes
    for (int n = 0; n < 20000; n++) begin
      we      = ($urandom % 3) != 0;
      w_slot  = SLOT_W'($urandom % 64);
      w_valid = ($urandom % 4) != 0;
      w_entry = itab_entry_t'($urandom);
      ra_slot = SLOT_W'($urandom % 64);
      rb_slot = SLOT_W'($urandom % 64);
      exp_va = ref_v[ra_slot]; exp_ea = ref_e[ra_slot];
      exp_vb = ref_v[rb_slot]; exp_eb = ref_e[rb_slot];
      @(posedge clk);
      if (we) begin ref_v[w_slot] = w_valid; ref_e[w_slot] = w_entry; end
      #1;
      checks += 2;
      if (ra_valid !== exp_va || (exp_va && ra_entry !== exp_ea)) begin
        failures++;
        $display("FAIL port A slot %0d: %b %h expected %b %h", ra_slot, ra_valid, ra_entry, exp_va, exp_ea);
      end
      if (rb_valid !== exp_vb || (exp_vb && rb_entry !== exp_eb)) begin
        failures++;
        $display("FAIL port B slot %0d: %b %h expected %b %h", rb_slot, rb_valid, rb_entry, exp_vb, exp_eb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

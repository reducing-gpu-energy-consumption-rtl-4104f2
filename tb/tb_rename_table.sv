// tb_rename_table: self-checking test of the renaming table.
// Writes random mappings at random (warp, register) pairs for several
// registers-per-thread settings, keeps a reference array indexed by
// warp*regs+reg, and checks both lookup ports, the out-of-range flag, that
// unwritten entries and entries written with mask 0000 read as unmapped, and
// that all 2048 entries are distinct.
module tb_rename_table;
  import owar_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [REG_W-1:0] regs = 6'd32;
  logic [WARP_ID_W-1:0] a_warp = '0, b_warp = '0, wr_warp = '0;
  logic [REG_W-1:0] a_reg = '0, b_reg = '0, wr_reg = '0;
  rt_entry_t a_entry, b_entry, wr_entry = '0;
  logic a_oob, wr_en = 0;
  int checks = 0, failures = 0;
  rt_entry_t model [RT_ENTRIES];

  rename_table dut (.clk, .rst_n, .regs_per_thread(regs), .a_warp, .a_reg, .a_entry, .a_oob,
                    .b_warp, .b_reg, .b_entry, .wr_en, .wr_warp, .wr_reg, .wr_entry);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // every entry written with its own index: no two indices alias
    regs = 6'd16;
    for (int i = 0; i < RT_ENTRIES; i++) begin
      wr_en = 1; wr_warp = 7'(i / 16); wr_reg = 6'(i % 16);
      wr_entry = rt_entry_t'{preg: 10'(i), mask: 4'(i[3:0] | 4'b0001)};
      model[i] = wr_entry;
      @(negedge clk);
    end
    wr_en = 0;
    for (int i = 0; i < RT_ENTRIES; i++) begin
      b_warp = 7'(i / 16); b_reg = 6'(i % 16);
      #1;
      check(b_entry == model[i], $sformatf("dense entry %0d", i));
    end
    // random traffic with other register counts
    for (int round = 0; round < 3; round++) begin
      int r;
      r = (round == 0) ? 63 : (round == 1) ? 21 : 40;
      regs = 6'(r);
      for (int n = 0; n < 3000; n++) begin
        int wi, ai;
        wr_en = ($urandom_range(0, 3) != 0);
        wr_warp = 7'($urandom_range(0, (RT_ENTRIES / r) - 1));
        wr_reg  = 6'($urandom_range(0, r - 1));
        wr_entry = rt_entry_t'{preg: 10'($urandom), mask: 4'($urandom)};
        a_warp = 7'($urandom_range(0, 127));
        a_reg  = 6'($urandom_range(0, r - 1));
        b_warp = wr_warp;
        b_reg  = 6'($urandom_range(0, r - 1));
        #1;
        ai = int'(a_warp) * r + int'(a_reg);
        check(a_oob == (ai >= RT_ENTRIES), "out-of-range flag");
        if (ai < RT_ENTRIES) check(a_entry == model[ai], $sformatf("port A index %0d", ai));
        else                 check(a_entry == '0, "out-of-range lookup reads unmapped");
        check(b_entry == model[int'(b_warp) * r + int'(b_reg)], "port B");
        @(negedge clk);
        wi = int'(wr_warp) * r + int'(wr_reg);
        if (wr_en) model[wi] = (wr_entry.mask == '0) ? rt_entry_t'('0) : wr_entry;
      end
      wr_en = 0;
    end
    // reset clears every mapping
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    regs = 6'd16;
    for (int i = 0; i < RT_ENTRIES; i += 97) begin
      b_warp = 7'(i / 16); b_reg = 6'(i % 16);
      #1;
      check(b_entry.mask == '0, "unmapped after reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

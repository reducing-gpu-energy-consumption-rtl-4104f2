// tb_rf_array: self-checking test of the banked register file.
// Random masked warp-register writes and reads (one of each per cycle) against a
// reference array of 1024 registers x 4 entries. Checks read data one cycle after
// the request (entries outside the mask read as zero), read-old-data when a read
// and a write hit the same register, that entries outside a write mask keep their
// value, and that the bank access counters count one access per mask bit.
module tb_rf_array;
  import owar_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [9:0] wr_preg = '0, rd_preg = '0;
  logic [3:0] wr_mask = '0, rd_mask = '0, rd_mask_q;
  reg_entries_t wr_entries = '0, rd_entries;
  logic [31:0] bank_reads, bank_writes;
  int checks = 0, failures = 0;
  int exp_reads = 0, exp_writes = 0;
  logic [ENTRY_W-1:0] model [NUM_PREGS][4];

  rf_array dut (.clk, .rst_n, .sa_active(8'hFF), .wr_en, .wr_preg, .wr_mask, .wr_entries,
                .rd_en, .rd_preg, .rd_mask, .rd_entries, .rd_mask_q, .bank_reads, .bank_writes);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [ENTRY_W-1:0] rnd_entry();
    logic [ENTRY_W-1:0] v;
    for (int i = 0; i < ENTRY_W / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    logic [3:0]         pmask;
    logic [ENTRY_W-1:0] pexp [4];
    logic               pvalid;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill every register fully so that all reads are defined
    for (int p = 0; p < NUM_PREGS; p++) begin
      wr_en = 1; wr_preg = 10'(p); wr_mask = 4'hF;
      for (int e = 0; e < 4; e++) begin
        wr_entries[e] = rnd_entry();
        model[p][e]   = wr_entries[e];
      end
      exp_writes += 4;
      @(negedge clk);
    end
    pvalid = 0;
    for (int n = 0; n < 5000; n++) begin
      wr_en   = ($urandom_range(0, 3) != 0);
      wr_preg = 10'($urandom_range(0, NUM_PREGS - 1));
      wr_mask = 4'($urandom);
      for (int e = 0; e < 4; e++) wr_entries[e] = rnd_entry();
      rd_en   = ($urandom_range(0, 3) != 0);
      rd_preg = (n % 5 == 0) ? wr_preg : 10'($urandom_range(0, NUM_PREGS - 1));
      rd_mask = 4'($urandom);
      // expected read data are the contents before this cycle's write
      for (int e = 0; e < 4; e++) pexp[e] = rd_mask[e] ? model[rd_preg][e] : '0;
      pmask = rd_en ? rd_mask : '0;
      if (wr_en) exp_writes += $countones(wr_mask);
      if (rd_en) exp_reads  += $countones(rd_mask);
      @(negedge clk);
      if (wr_en)
        for (int e = 0; e < 4; e++) if (wr_mask[e]) model[wr_preg][e] = wr_entries[e];
      check(rd_mask_q == pmask, "returned mask");
      if (pmask != '0)
        for (int e = 0; e < 4; e++)
          check(rd_entries[e] == pexp[e], $sformatf("read data entry %0d reg %0d", e, rd_preg));
    end
    wr_en = 0; rd_en = 0;
    @(negedge clk);
    check(bank_writes == 32'(exp_writes), $sformatf("write count %0d exp %0d", bank_writes, exp_writes));
    check(bank_reads  == 32'(exp_reads),  $sformatf("read count %0d exp %0d", bank_reads, exp_reads));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

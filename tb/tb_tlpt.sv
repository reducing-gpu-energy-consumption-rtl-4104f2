// tb_tlpt: self-checking test of the thread-level packing table.
// Keeps a reference copy of the 63 widths, applies random width updates, and checks
// the merged width, the misprediction flag (only when a recorded width grows), the
// prediction latched at thread-block completion (1/2/4 entries per 8/16/32-bit
// register, 4 for an empty entry) and the clear at kernel start.
module tb_tlpt;
  import owar_pkg::*;
  logic clk = 0, rst_n = 0;
  logic clear = 0, upd_valid = 0, cta_done = 0;
  logic [REG_W-1:0] upd_reg = '0, regs = 6'd20;
  width_e upd_width = W_8, width_out;
  logic mispredict, pred_valid;
  logic [8:0] pred_entries;
  int checks = 0, failures = 0, n_misp = 0;
  width_e model [MAX_REGS];

  tlpt dut (.clk, .rst_n, .clear, .upd_valid, .upd_reg, .upd_width, .width_out,
            .mispredict, .regs_per_thread(regs), .cta_done, .pred_valid, .pred_entries);

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

  function automatic int ent(width_e w);
    return (w == W_8) ? 1 : (w == W_16) ? 2 : 4;
  endfunction

  initial begin
    for (int r = 0; r < MAX_REGS; r++) model[r] = W_NONE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!pred_valid, "no prediction after reset");
    for (int round = 0; round < 4; round++) begin
      regs = 6'($urandom_range(1, 63));
      for (int n = 0; n < 400; n++) begin
        width_e exp_w;
        logic   exp_m;
        upd_valid = 1;
        upd_reg   = 6'($urandom_range(0, 62));
        upd_width = width_e'($urandom_range(1, 3 - (round % 2)));
        #1;
        exp_w = (upd_width > model[upd_reg]) ? upd_width : model[upd_reg];
        exp_m = (model[upd_reg] != W_NONE) && (upd_width > model[upd_reg]);
        check(width_out == exp_w, $sformatf("width_out reg %0d", upd_reg));
        check(mispredict == exp_m, $sformatf("mispredict reg %0d", upd_reg));
        if (exp_m) n_misp++;
        @(negedge clk);
        model[upd_reg] = exp_w;
        if (n % 100 == 99) begin
          int sum;
          sum = 0;
          upd_valid = 0;
          for (int r = 0; r < int'(regs); r++) sum += ent(model[r]);
          cta_done = 1;
          @(negedge clk);
          cta_done = 0;
          check(pred_valid, "prediction valid after block completion");
          check(int'(pred_entries) == sum, $sformatf("prediction %0d exp %0d", pred_entries, sum));
        end
      end
      upd_valid = 0;
      // kernel start empties the table
      clear = 1;
      @(negedge clk);
      clear = 0;
      for (int r = 0; r < MAX_REGS; r++) model[r] = W_NONE;
      check(!pred_valid, "clear drops the prediction");
      cta_done = 1;
      @(negedge clk);
      cta_done = 0;
      check(int'(pred_entries) == 4 * int'(regs), "empty table predicts full width");
    end
    check(n_misp > 0, "mispredictions were exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_reg_allocator: self-checking test of the availability vector and search.
// A reference copy of the 1024 x 4 availability bits is kept. Each cycle a random
// request size and random set of powered sub-arrays are applied; the search result
// is compared with a first-fit reference (lowest register in a powered sub-array
// with enough free entries, lowest free entries taken). Random allocations, frees
// and same-cycle re-maps update both copies; per-sub-array and total occupancy are
// checked against the reference.
module tb_reg_allocator;
  import owar_pkg::*;
  localparam int NSA = 8, PER = NUM_PREGS / NSA;
  logic clk = 0, rst_n = 0;
  logic [NSA-1:0] sa_active = '1;
  logic [2:0] req_k = 3'd1;
  logic fit;
  logic [9:0] fit_preg, alloc_preg = '0, free_preg = '0;
  logic [3:0] fit_mask, alloc_mask = '0, free_mask = '0;
  logic alloc_en = 0, free_en = 0;
  logic [NSA-1:0][9:0] used_per_sa;
  logic [12:0] used_total;
  int checks = 0, failures = 0, n_nofit = 0;
  logic [3:0] model [NUM_PREGS];

  reg_allocator dut (.clk, .rst_n, .sa_active, .req_k, .fit, .fit_preg,
    .fit_mask, .alloc_en, .alloc_preg, .alloc_mask, .free_en, .free_preg, .free_mask,
    .used_per_sa, .used_total);

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

  initial begin
    for (int p = 0; p < NUM_PREGS; p++) model[p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 6000; n++) begin
      logic       efit;
      int         ep, tk, tot;
      logic [3:0] em;
      logic [2:0] ks [3] = '{3'd1, 3'd2, 3'd4};
      req_k     = ks[$urandom_range(0, 2)];
      sa_active = (n % 500 < 250) ? 8'h03 : 8'($urandom);
      #1;
      efit = 0; ep = 0; em = '0;
      for (int p = 0; p < NUM_PREGS && !efit; p++)
        if (sa_active[p / PER] && $countones(~model[p]) >= req_k) begin
          efit = 1; ep = p; tk = 0;
          for (int e = 0; e < 4; e++)
            if (!model[p][e] && tk < req_k) begin em[e] = 1; tk++; end
        end
      check(fit == efit, "fit flag");
      if (efit) check(fit_preg == 10'(ep) && fit_mask == em,
                      $sformatf("search: got %0d/%b exp %0d/%b", fit_preg, fit_mask, ep, em));
      else n_nofit++;
      tot = 0;
      for (int s = 0; s < NSA; s++) begin
        int u;
        u = 0;
        for (int p = s * PER; p < (s + 1) * PER; p++) u += $countones(model[p]);
        check(int'(used_per_sa[s]) == u, $sformatf("occupancy of sub-array %0d", s));
        tot += u;
      end
      check(int'(used_total) == tot, "total occupancy");
      // allocate what was found (mostly), free a random allocated register
      alloc_en   = efit && ($urandom_range(0, 9) < 7);
      alloc_preg = fit_preg;
      alloc_mask = fit_mask;
      free_en    = ($urandom_range(0, 9) < 4);
      free_preg  = (free_en && $urandom_range(0, 1) == 1 && efit) ? fit_preg : 10'($urandom_range(0, 300));
      free_mask  = model[free_preg] & 4'($urandom);
      @(negedge clk);
      if (free_en)  model[free_preg]  = model[free_preg] & ~free_mask;
      if (alloc_en) model[alloc_preg] = model[alloc_preg] | alloc_mask;
      alloc_en = 0; free_en = 0;
    end
    check(n_nofit > 0, "a full condition was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

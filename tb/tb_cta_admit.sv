// tb_cta_admit: self-checking test of the thread block admission check.
// Runs both modes. In baseline limits (to_mode=0) it checks the register limit
// (warps*regs*4 entries of 4096), the 16-block and 48-warp limits. In thread-overrun
// mode it checks that with a prediction more blocks are admitted, bounded by the
// predicted entries, the renaming table and the block limit, that a block's
// reservation is returned when it completes, and that slots and warp bases are the
// lowest free ones. The reference is computed independently in the testbench.
module tb_cta_admit;
  import owar_pkg::*;
  logic clk = 0, rst_n = 0;
  logic to_mode = 0, pred_valid = 0, cta_req = 0, cta_done = 0;
  logic [5:0] regs = '0, wpc = '0;
  logic [8:0] pred = '0;
  logic grant;
  logic [4:0] gslot, dslot = '0;
  logic [6:0] gbase;
  logic [5:0] resident;
  logic [15:0] reserved;
  int checks = 0, failures = 0;

  cta_admit dut (.clk, .rst_n, .to_mode, .regs_per_thread(regs), .warps_per_cta(wpc),
    .pred_valid, .pred_entries(pred), .cta_req, .grant, .grant_slot(gslot),
    .grant_warp_base(gbase), .cta_done, .done_slot(dslot), .resident_ctas(resident),
    .reserved_entries(reserved));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // launch blocks until refused; return how many were granted
  task automatic fill(output int n);
    n = 0;
    cta_req = 1;
    forever begin
      #1;
      if (!grant) break;
      check(gslot == 5'(n), "lowest free slot");
      check(gbase == 7'(n * int'(wpc)), "warp base");
      @(negedge clk);
      n++;
      if (n > 40) break;
    end
    cta_req = 0;
  endtask

  task automatic drain(int n);
    for (int s = 0; s < n; s++) begin
      cta_done = 1; dslot = 5'(s);
      @(negedge clk);
    end
    cta_done = 0;
    check(resident == 0 && reserved == 0, "all reservations returned");
  endtask

  function automatic int min3(int a, int b, int c);
    int m;
    m = (a < b) ? a : b;
    return (m < c) ? m : c;
  endfunction

  initial begin
    int n, e;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // baseline: 8 warps x 32 regs: 1024 entries per block -> 4 blocks
    to_mode = 0; wpc = 8; regs = 32; pred = 9'd40; pred_valid = 1;
    fill(n); check(n == 4, $sformatf("register-limited baseline: %0d", n));
    check(reserved == 16'd4096, "baseline reservation");
    drain(n);
    // baseline: 8 warps x 8 regs: warp limit 48 -> 6 blocks
    regs = 8;
    fill(n); check(n == 6, $sformatf("warp-limited baseline: %0d", n));
    drain(n);
    // baseline: 1 warp x 4 regs: block limit 16
    wpc = 1; regs = 4;
    fill(n); check(n == 16, $sformatf("block-limited baseline: %0d", n));
    drain(n);
    // thread overrun without a prediction behaves like full usage on registers
    to_mode = 1; pred_valid = 0; wpc = 8; regs = 32;
    fill(n); check(n == 4, $sformatf("overrun without prediction: %0d", n));
    drain(n);
    // thread overrun with prediction 40 entries/warp: min(4096/320, 2048/256, 32) = 8
    pred_valid = 1; pred = 9'd40;
    fill(n);
    e = min3(4096 / (8 * 40), 2048 / (8 * 32), 32);
    check(n == e, $sformatf("overrun: %0d exp %0d", n, e));
    check(int'(reserved) == n * 8 * 40, "predicted reservation");
    // a completed block in the middle frees its slot, which is reused
    cta_done = 1; dslot = 5'd2;
    @(negedge clk);
    cta_done = 0;
    cta_req = 1;
    #1;
    check(grant && gslot == 5'd2, "freed slot reused");
    @(negedge clk);
    cta_req = 0;
    drain(n);
    // overrun, small prediction: limited by the block limit of overrun mode
    wpc = 2; regs = 10; pred = 9'd12;
    fill(n);
    e = min3(4096 / (2 * 12), 2048 / (2 * 10), 32);
    check(n == e, $sformatf("overrun block limit: %0d exp %0d", n, e));
    drain(n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

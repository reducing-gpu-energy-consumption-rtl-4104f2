// tb_owar_top: end-to-end test of the OWAR register file at its default sizes
// (32 banks x 128 entries x 256 bits, 2048-entry renaming table, 8 sub-arrays).
// The testbench keeps its own model of every architectural warp register value,
// of the TLPT widths and of the entries each register occupies, and checks:
//  - every read returns the last value written (one cycle after the request);
//  - the occupied bank entries equal the model's sum (1/2/4 per 8/16/32-bit);
//  - bank writes are fewer than four per write-back (packing saves accesses);
//  - each sub-array wake-up stalls write-back for exactly one cycle;
//  - released blocks free their entries and empty sub-arrays are gated;
//  - thread overrun admits more blocks than the baseline limits once a
//    prediction exists;
//  - a register file overflow stalls write-back until a block is released.
// Each of these mechanisms is counted and a failure is recorded if one never
// happened.
module tb_owar_top;
  import owar_pkg::*;
  logic clk = 0, rst_n = 0;
  logic kernel_start = 0, to_mode = 0;
  logic [5:0] regs = 6'd16, wpc = 6'd8;
  logic wb_valid = 0, wb_ready;
  logic [6:0] wb_warp = '0, rd_warp = '0;
  logic [5:0] wb_reg = '0, rd_reg = '0;
  warp_data_t wb_data = '0, rd_data;
  logic rd_valid = 0, rd_data_valid;
  logic cta_req = 0, cta_grant, cta_done_valid = 0, cta_done_ready;
  logic [4:0] cta_slot, cta_done_slot = '0;
  logic [6:0] cta_warp_base;
  logic [7:0] sa_active;
  logic rf_full, pred_valid;
  logic [12:0] used_entries;
  logic [5:0] resident_ctas;
  logic [15:0] reserved_entries;
  logic [8:0] pred_entries;
  logic [31:0] cnt_mispredict, cnt_remap, cnt_wake_stall, cnt_wake, cnt_gate,
               cnt_bank_reads, cnt_bank_writes, cnt_pred_grant;

  owar_top dut (.*, .regs_per_thread(regs), .warps_per_cta(wpc));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit stuck = 0;   // set once a write-back never completed
  int n_writes = 0, n_narrow = 0, n_full_seen = 0, n_overrun = 0;
  warp_data_t model [128][64];
  int         have [128][64];    // entries the register occupies
  int         twid [64];         // TLPT width in entries (0 = none)

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic warp_data_t gen(int cls);
    warp_data_t d;
    for (int t = 0; t < WARP_SIZE; t++)
      case (cls)
        0: d[t] = $urandom_range(0, 255);
        1: d[t] = $urandom_range(0, 65535);
        default: d[t] = $urandom;
      endcase
    if (cls == 1) d[$urandom_range(0, 31)] = 32'h0000_8001;
    if (cls == 2) d[$urandom_range(0, 31)] = 32'h8000_0001;
    return d;
  endfunction

  function automatic int ent_of(warp_data_t d);
    int e = 1;
    for (int t = 0; t < WARP_SIZE; t++)
      if (d[t] > 32'hFFFF) e = 4;
      else if (d[t] > 32'hFF && e < 2) e = 2;
    return e;
  endfunction

  function automatic int model_used();
    int s = 0;
    for (int w = 0; w < 128; w++) for (int r = 0; r < 64; r++) s += have[w][r];
    return s;
  endfunction

  task automatic do_write(int w, int r, warp_data_t d);
    int e, need, waited;
    wb_valid = 1; wb_warp = 7'(w); wb_reg = 6'(r); wb_data = d;
    waited = 0;
    #1;
    while (!wb_ready) begin
      @(negedge clk);
      #1;
      waited++;
      if (waited > 2000 || stuck) begin
        if (!stuck) begin failures++; $display("FAIL write-back stalled"); end
        stuck = 1;
        break;
      end
    end
    @(negedge clk);
    wb_valid = 0;
    e = ent_of(d);
    if (e == 1) n_narrow++;
    need = (e > twid[r]) ? e : twid[r];
    twid[r] = need;
    if (have[w][r] < need) have[w][r] = need;
    model[w][r] = d;
    n_writes++;
  endtask

  task automatic do_read(int w, int r);
    rd_valid = 1; rd_warp = 7'(w); rd_reg = 6'(r);
    @(negedge clk);
    rd_valid = 0;
    check(rd_data_valid, "read data valid one cycle later");
    check(rd_data == model[w][r], $sformatf("read warp %0d reg %0d", w, r));
  endtask

  task automatic launch(output int slot, output logic ok);
    cta_req = 1;
    #1;
    ok   = cta_grant;
    slot = int'(cta_slot);
    @(negedge clk);
    cta_req = 0;
  endtask

  task automatic release_cta(int slot);
    cta_done_valid = 1; cta_done_slot = 5'(slot);
    #1;
    while (!cta_done_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cta_done_valid = 0;
    #1;
    while (!cta_done_ready) begin @(negedge clk); #1; end
    for (int w = slot * int'(wpc); w < (slot + 1) * int'(wpc); w++)
      for (int r = 0; r < 64; r++) begin have[w][r] = 0; model[w][r] = '0; end
  endtask

  // run one block: write all its registers (class by register number, sometimes
  // wider), rewrite some, read all back
  task automatic run_block(int slot, int widen_pct);
    for (int w = slot * int'(wpc); w < (slot + 1) * int'(wpc); w++)
      for (int r = 0; r < int'(regs); r++) begin
        int cls;
        cls = r % 3;
        if ($urandom_range(0, 99) < widen_pct && cls < 2) cls++;
        do_write(w, r, gen(cls));
        if (r % 4 == 0) do_read(w, r);
      end
    // rewrite a quarter of the registers, some of them wider than before
    for (int w = slot * int'(wpc); w < (slot + 1) * int'(wpc); w++)
      for (int r = 0; r < int'(regs); r++)
        if ($urandom_range(0, 3) == 0) do_write(w, r, gen($urandom_range(0, 2)));
    for (int w = slot * int'(wpc); w < (slot + 1) * int'(wpc); w++)
      for (int r = 0; r < int'(regs); r++) do_read(w, r);
  endtask

  initial begin
    int slot, nb, wake0, stall0, rb0;
    logic ok;
    for (int w = 0; w < 128; w++) for (int r = 0; r < 64; r++) begin have[w][r] = 0; model[w][r] = '0; end
    for (int r = 0; r < 64; r++) twid[r] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    kernel_start = 1;
    @(negedge clk);
    kernel_start = 0;
    check(sa_active == '0, "all sub-arrays gated at start");

    // ---- OWAR-PG: baseline admission limit 6 blocks (8 warps of 48) ----
    to_mode = 0;
    nb = 0;
    do begin launch(slot, ok); if (ok) nb++; end while (ok && nb < 40);
    check(nb == 6, $sformatf("baseline admits %0d blocks", nb));
    wake0 = int'(cnt_wake);
    for (int s = 0; s < nb; s++) begin
      run_block(s, 10);
      check(int'(used_entries) == model_used(), $sformatf("occupied entries %0d exp %0d", used_entries, model_used()));
    end
    check(cnt_mispredict > 0, "mispredictions occurred");
    check(cnt_remap > 0, "re-maps occurred");
    check(int'(cnt_bank_writes) < 4 * n_writes, "packing reduced bank writes");
    check(cnt_wake_stall == cnt_wake, $sformatf("one stall cycle per wake-up (%0d/%0d)", cnt_wake_stall, cnt_wake));
    check(cnt_wake > 1, "more than one sub-array woken");
    // sub-arrays in use are contiguous from 0
    check(((sa_active + 8'd1) & sa_active) == '0, "in-service sub-arrays are the lowest ones");

    // ---- release everything: entries freed, sub-arrays gated ----
    for (int s = 0; s < nb; s++) release_cta(s);
    @(negedge clk);
    check(used_entries == '0, "all entries freed");
    check(sa_active == '0, "all sub-arrays gated after release");
    check(cnt_gate > 0, "gating happened");
    check(pred_valid, "prediction available after block completion");
    do_read(0, 0);

    // ---- OWAR-TO-PG: thread overrun with the prediction ----
    to_mode = 1;
    nb = 0;
    do begin launch(slot, ok); if (ok) nb++; end while (ok && nb < 40);
    n_overrun = nb;
    check(nb > 6, $sformatf("thread overrun admits %0d blocks (> 6)", nb));
    check(cnt_pred_grant > 0, "prediction-based grants counted");
    for (int s = 0; s < nb; s++) run_block(s, 0);
    check(int'(used_entries) == model_used(), "occupied entries in overrun");

    // ---- overflow: widen every register until the file is full ----
    rb0 = 0;
    begin : overflow
      for (int w = 0; w < nb * int'(wpc); w++)
        for (int r = 0; r < int'(regs); r++) begin
          wb_valid = 1; wb_warp = 7'(w); wb_reg = 6'(r); wb_data = gen(2);
          #1;
          if (!wb_ready && rf_full) begin
            n_full_seen++;
            // releasing a block lets the stalled write finish
            release_cta(nb - 1);
            rb0 = 1;
            wb_valid = 1; wb_warp = 7'(w); wb_reg = 6'(r);
            #1;
          end
          do_write(w, r, wb_data);
          if (rb0) disable overflow;
        end
    end
    check(n_full_seen > 0, "register file overflow was reached");
    check(int'(used_entries) == model_used(), "occupied entries after overflow");
    for (int w = 0; w < 8; w++) for (int r = 0; r < int'(regs); r++) do_read(w, r);

    $display("writes=%0d narrow=%0d mispredict=%0d remap=%0d wake=%0d stall=%0d gate=%0d bank_wr=%0d bank_rd=%0d overrun_blocks=%0d full=%0d",
             n_writes, n_narrow, cnt_mispredict, cnt_remap, cnt_wake, cnt_wake_stall, cnt_gate,
             cnt_bank_writes, cnt_bank_reads, n_overrun, n_full_seen);
    check(n_narrow > 0, "narrow writes occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

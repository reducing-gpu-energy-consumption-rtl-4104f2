// tb_owar_workloads: runs the thread-block shapes of seventeen GPU benchmarks
// (backprop ... 2MM, warps per block 1 to 16) through the full-size OWAR register
// file in both modes.
// The real kernels cannot run here, so each kernel is a synthetic one:
//  - registers per thread are fixed at REGS (20);
//  - each register id gets a width class drawn with the measured mix of register
//    writes: 45.3% 8-bit, 16.1% 16-bit, 38.6% 32-bit;
//  - every value written is random within the register's class.
// For each kernel the test:
//  1. admits blocks under the baseline limits and checks the count
//     min(16, 48/wpc, 4096/(wpc*REGS*4));
//  2. writes every register of the first block, reads it back and retires the
//     block, which gives the TLPT prediction;
//  3. switches to thread overrun and checks the admitted count against
//     min(32, 128/wpc, 2048/(wpc*REGS), 4096/(wpc*pred));
//  4. writes and reads back every register of every admitted block;
//  5. checks the occupied entries against the n_packed sum, and reports them
//     against an unpacked file, together with the bank-write ratio.
// Finally every block is retired and the file must be empty and gated.
module tb_owar_workloads;
  import owar_pkg::*;
  localparam int REGS = 20;
  logic clk = 0, rst_n = 0;
  logic kernel_start = 0, to_mode = 0;
  logic [5:0] regs = 6'(REGS), wpc = 6'd8;
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
  int cls_of [REGS];
  warp_data_t last;

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
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
    if (cls == 1) d[$urandom_range(0, 31)] = 32'h0000_F00D;
    if (cls == 2) d[$urandom_range(0, 31)] = 32'hC001_0001;
    return d;
  endfunction

  task automatic wr_rd(int w, int r);
    warp_data_t d;
    d = gen(cls_of[r]);
    wb_valid = 1; wb_warp = 7'(w); wb_reg = 6'(r); wb_data = d;
    #1;
    while (!wb_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    wb_valid = 0;
    rd_valid = 1; rd_warp = 7'(w); rd_reg = 6'(r);
    @(negedge clk);
    rd_valid = 0;
    check(rd_data_valid && rd_data == d, $sformatf("read back warp %0d reg %0d", w, r));
  endtask

  task automatic launch_all(output int n);
    n = 0;
    cta_req = 1;
    forever begin
      #1;
      if (!cta_grant || n >= 40) break;
      @(negedge clk);
      n++;
    end
    cta_req = 0;
  endtask

  task automatic retire(int slot);
    cta_done_valid = 1; cta_done_slot = 5'(slot);
    #1;
    while (!cta_done_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cta_done_valid = 0;
    #1;
    while (!cta_done_ready) begin @(negedge clk); #1; end
  endtask

  function automatic int min2(int a, int b);
    return (a < b) ? a : b;
  endfunction

  string names [17] = '{"backprop", "bfs", "b+tree", "cfd", "dwt2d", "gaussian", "hotspot",
                        "hybridsort", "kmeans", "lud", "nw", "particlefilter", "pathfinder",
                        "sad1", "sad2", "2DCONV", "2MM"};
  int    wpcs  [17] = '{8, 16, 8, 8, 6, 8, 8, 8, 8, 8, 1, 8, 8, 16, 8, 8, 8};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 17; b++) begin
      int n_pg, n_to, e_pg, e_to, pred, n_packed, bw0, nw0;
      wpc = 6'(wpcs[b]);
      kernel_start = 1;
      @(negedge clk);
      kernel_start = 0;
      pred = 0;
      for (int r = 0; r < REGS; r++) begin
        int u;
        u = $urandom_range(0, 999);
        cls_of[r] = (u < 453) ? 0 : (u < 614) ? 1 : 2;
        pred += (cls_of[r] == 0) ? 1 : (cls_of[r] == 1) ? 2 : 4;
      end
      // baseline admission
      to_mode = 0;
      launch_all(n_pg);
      e_pg = min2(16, min2(48 / wpcs[b], 4096 / (wpcs[b] * REGS * 4)));
      check(n_pg == e_pg, $sformatf("%s: baseline blocks %0d exp %0d", names[b], n_pg, e_pg));
      // first block runs to completion, the rest are retired unused
      for (int w = 0; w < wpcs[b]; w++) for (int r = 0; r < REGS; r++) wr_rd(w, r);
      for (int s = 0; s < n_pg; s++) retire(s);
      check(pred_valid && int'(pred_entries) == pred,
            $sformatf("%s: prediction %0d exp %0d", names[b], pred_entries, pred));
      // thread overrun
      to_mode = 1;
      launch_all(n_to);
      e_to = min2(min2(32, 128 / wpcs[b]), min2(2048 / (wpcs[b] * REGS), 4096 / (wpcs[b] * pred)));
      check(n_to == e_to, $sformatf("%s: overrun blocks %0d exp %0d", names[b], n_to, e_to));
      check(n_to >= n_pg, "overrun never admits fewer blocks");
      bw0 = int'(cnt_bank_writes);
      nw0 = 0;
      for (int w = 0; w < n_to * wpcs[b]; w++)
        for (int r = 0; r < REGS; r++) begin wr_rd(w, r); nw0++; end
      n_packed = n_to * wpcs[b] * pred;
      check(int'(used_entries) == n_packed,
            $sformatf("%s: occupied entries %0d exp %0d", names[b], used_entries, n_packed));
      $display("%-15s wpc=%2d blocks baseline=%0d overrun=%0d  entries %0d of %0d unpacked (%0d%%)  bank writes per 100 write-backs %0d  sub-arrays on=%b",
               names[b], wpcs[b], n_pg, n_to, n_packed, n_to * wpcs[b] * REGS * 4,
               100 * n_packed / (n_to * wpcs[b] * REGS * 4),
               100 * (int'(cnt_bank_writes) - bw0) / nw0,
               sa_active);
      for (int s = 0; s < n_to; s++) retire(s);
      @(negedge clk);
      check(used_entries == '0 && sa_active == '0, $sformatf("%s: file empty and gated", names[b]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_subarray_pg: self-checking test of the sub-array power gating controller.
// Checks that all sub-arrays start gated, that a wake request powers the lowest
// gated sub-array after WAKE_CYCLES cycles (run with 1, the default, and with 3),
// that an empty powered sub-array is gated on the next edge unless it is being
// allocated into, that occupied ones stay powered, the none_left flag, and the
// wake and gate event counts.
module tb_subarray_pg;
  localparam int NSA = 8;
  int checks = 0, failures = 0;

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic clk = 0;
  always #5 clk = ~clk;

  for (genvar g = 0; g < 2; g++) begin : g_cfg
    localparam int WC = (g == 0) ? 1 : 3;
    logic rst_n = 0, wake_req = 0, alloc_valid = 0;
    logic [2:0] alloc_sa = '0;
    logic [NSA-1:0][9:0] used = '0;
    logic [NSA-1:0] sa_active;
    logic waking, none_left;
    logic [31:0] wake_events, gate_events;
    bit done = 0;

    subarray_pg #(.NUM_SA(NSA), .WAKE_CYCLES(WC), .CNT_W(10)) dut (
      .clk, .rst_n, .used_per_sa(used), .wake_req, .alloc_valid, .alloc_sa,
      .sa_active, .waking, .none_left, .wake_events, .gate_events);

    initial begin
      repeat (2) @(negedge clk);
      rst_n = 1;
      check(sa_active == '0, "all gated after reset");
      // wake sub-arrays 0..7 one by one, keeping each occupied once awake
      for (int s = 0; s < NSA; s++) begin
        int cyc;
        wake_req = 1;
        cyc = 0;
        while (!sa_active[s]) begin
          @(negedge clk);
          cyc++;
          if (cyc > 10) break;
        end
        check(cyc == WC, $sformatf("wake-up of sub-array %0d took %0d cycles", s, cyc));
        check(sa_active == NSA'((1 << (s + 1)) - 1), "lowest gated sub-array woken");
        wake_req = 0;
        // allocate into it this cycle so it is not gated while empty
        alloc_valid = 1; alloc_sa = 3'(s);
        @(negedge clk);
        alloc_valid = 0;
        used[s] = 10'd5;
        check(sa_active[s], "allocated sub-array stays powered");
      end
      check(wake_events == NSA, "wake events counted");
      wake_req = 1;
      #1;
      check(none_left, "none_left when all are powered");
      @(negedge clk);
      wake_req = 0;
      // empty sub-arrays 2 and 5: they are gated on the next edge
      used[2] = '0; used[5] = '0;
      @(negedge clk);
      check(sa_active == 8'b1101_1011, "empty sub-arrays gated");
      check(gate_events == 2, "gate events counted");
      // an empty sub-array receiving an allocation is kept
      wake_req = 1;
      repeat (WC) @(negedge clk);
      check(sa_active[2], "re-wake picks the lowest gated sub-array (2)");
      wake_req = 0;
      @(negedge clk);
      check(!sa_active[2], "woken but unused sub-array is gated again");
      done = 1;
    end
  end

  initial begin
    wait (g_cfg[0].done && g_cfg[1].done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

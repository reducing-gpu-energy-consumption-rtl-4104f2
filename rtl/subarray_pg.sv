// subarray_pg: coarse-grained sub-array power gating controller.
// The register file is cut horizontally into NUM_SA sub-arrays (groups of bank
// rows). A sub-array is powered only while it holds in-service registers: an
// active sub-array with no assigned entries, and no allocation into it this
// cycle, is gated at the next edge. When the allocator finds no room in the active
// sub-arrays it raises wake_req; the lowest gated sub-array is then re-activated,
// which takes WAKE_CYCLES cycles (default 1), and the requester stalls until the
// allocation fits. At reset every sub-array is gated.
// Outputs: sa_active (powered and ready), waking (a wake-up is in progress; with
// WAKE_CYCLES = 1 it stays 0, since the wake-up completes at the first edge) and
// event counters for wake-ups and gatings.
// Gating unused sub-arrays, waking one only when the active ones are full, and the
// one-cycle wake-up penalty are the document's; the number of sub-arrays, the
// gate-when-empty rule and the reset state are this design's choices.
module subarray_pg
  import owar_pkg::*;
#(
  parameter int unsigned NUM_SA      = 8,
  parameter int unsigned WAKE_CYCLES = 1,
  parameter int unsigned CNT_W       = 10,
  localparam int unsigned SA_W       = (NUM_SA > 1) ? $clog2(NUM_SA) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [NUM_SA-1:0][CNT_W-1:0] used_per_sa,
  input  logic                         wake_req,
  input  logic                         alloc_valid,
  input  logic [SA_W-1:0]              alloc_sa,
  output logic [NUM_SA-1:0]            sa_active,
  output logic                         waking,
  output logic                         none_left,   // wake requested, all powered
  output logic [31:0]                  wake_events,
  output logic [31:0]                  gate_events
);
  logic [NUM_SA-1:0] waking_sa;
  logic [7:0]        wcnt;
  logic              have_off;
  logic [SA_W-1:0]   off_sa;

  assign waking = |waking_sa;

  always_comb begin
    have_off = 1'b0;
    off_sa   = '0;
    for (int s = 0; s < NUM_SA; s++)
      if (!have_off && !sa_active[s] && !waking_sa[s]) begin
        have_off = 1'b1;
        off_sa   = SA_W'(s);
      end
  end

  logic [NUM_SA-1:0] gate_now;
  logic [31:0]       n_gate;
  always_comb begin
    n_gate = '0;
    for (int s = 0; s < NUM_SA; s++) begin
      gate_now[s] = sa_active[s] && used_per_sa[s] == '0 &&
                    !(alloc_valid && alloc_sa == SA_W'(s));
      n_gate      = n_gate + 32'(gate_now[s]);
    end
  end

  assign none_left = wake_req && !have_off && !waking;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sa_active   <= '0;
      waking_sa   <= '0;
      wcnt        <= '0;
      wake_events <= '0;
      gate_events <= '0;
    end else begin
      // finish a wake-up in progress
      if (waking) begin
        if (wcnt <= 8'd1) begin
          sa_active <= sa_active | waking_sa;
          waking_sa <= '0;
        end
        wcnt <= wcnt - 8'd1;
      end else if (wake_req && have_off) begin
        wake_events <= wake_events + 32'd1;
        if (WAKE_CYCLES <= 1) begin
          sa_active[off_sa] <= 1'b1;
        end else begin
          waking_sa[off_sa] <= 1'b1;
          wcnt              <= 8'(WAKE_CYCLES - 1);
        end
      end
      // gate empty sub-arrays
      for (int s = 0; s < NUM_SA; s++)
        if (gate_now[s]) sa_active[s] <= 1'b0;
      gate_events <= gate_events + n_gate;
    end
  end
endmodule

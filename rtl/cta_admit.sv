// cta_admit: register-file admission check of the thread block (CTA) scheduler.
// A CTA of warps_per_cta warps, each using regs_per_thread registers, is launched
// only if the SM has room for it. Two modes:
//  - to_mode = 0 (OWAR-PG): the baseline limits hold. Each warp register reserves
//    all four bank entries, so a CTA needs warps*regs*4 of the 4096 entries, and at
//    most MAX_CTA CTAs and MAX_WARPS warps are resident.
//  - to_mode = 1 (OWAR-TO-PG, thread overrun): once the TLPT has a prediction, a
//    CTA reserves warps * pred_entries entries, the predicted packed usage, so more
//    CTAs fit. The CTA and warp limits are loosened to MAX_CTA_TO CTAs and the
//    warp id space; the renaming table (2048 architectural warp registers) bounds
//    the total.
// Each granted CTA gets the lowest free slot s; its warps are s*warps_per_cta ..
// +warps_per_cta-1, which keeps every global architectural id
// (warp * regs_per_thread + reg) inside the renaming table. cta_done frees a slot
// and its reservation. grant is combinational from cta_req; state changes at the
// edge. The use of the predicted usage and the loosened limits are the document's;
// the slot scheme, reservation bookkeeping and MAX_CTA_TO are this design's.
module cta_admit
  import owar_pkg::*;
#(
  parameter int unsigned MAX_CTA    = 16,
  parameter int unsigned MAX_WARPS  = 48,
  parameter int unsigned MAX_CTA_TO = 32,
  parameter int unsigned RF_ENTRIES = NUM_PREGS * ENT_PER_REG,  // 4096
  parameter int unsigned ARCH_REGS  = RT_ENTRIES,               // 2048
  localparam int unsigned SLOT_W    = $clog2(MAX_CTA_TO)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 to_mode,
  input  logic [REG_W-1:0]     regs_per_thread,
  input  logic [5:0]           warps_per_cta,
  input  logic                 pred_valid,
  input  logic [8:0]           pred_entries,
  input  logic                 cta_req,
  output logic                 grant,
  output logic [SLOT_W-1:0]    grant_slot,
  output logic [WARP_ID_W-1:0] grant_warp_base,
  input  logic                 cta_done,
  input  logic [SLOT_W-1:0]    done_slot,
  output logic [SLOT_W:0]      resident_ctas,
  output logic [15:0]          reserved_entries
);
  logic [MAX_CTA_TO-1:0] busy;
  logic [15:0]           resv [MAX_CTA_TO];

  logic              have_slot;
  logic [31:0]       need_phys, n_after, warps_after, arch_after, cta_lim;
  logic              use_pred;

  always_comb begin
    have_slot  = 1'b0;
    grant_slot = '0;
    for (int s = 0; s < MAX_CTA_TO; s++)
      if (!have_slot && !busy[s]) begin
        have_slot  = 1'b1;
        grant_slot = SLOT_W'(s);
      end
    use_pred    = to_mode && pred_valid;
    need_phys   = use_pred ? 32'(warps_per_cta) * 32'(pred_entries)
                           : 32'(warps_per_cta) * 32'(regs_per_thread) * ENT_PER_REG;
    n_after     = 32'(resident_ctas) + 1;
    // warps and architectural registers up to the granted slot (slots are dense)
    warps_after = (32'(grant_slot) + 1) * 32'(warps_per_cta);
    arch_after  = warps_after * 32'(regs_per_thread);
    cta_lim     = to_mode ? MAX_CTA_TO : MAX_CTA;
    grant = cta_req && have_slot && warps_per_cta != '0 &&
            n_after <= cta_lim &&
            (to_mode || 32'(resident_ctas + 1) * 32'(warps_per_cta) <= MAX_WARPS) &&
            warps_after <= (1 << WARP_ID_W) &&
            arch_after <= ARCH_REGS &&
            32'(reserved_entries) + need_phys <= RF_ENTRIES;
    grant_warp_base = WARP_ID_W'(32'(grant_slot) * 32'(warps_per_cta));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy             <= '0;
      resident_ctas    <= '0;
      reserved_entries <= '0;
      for (int s = 0; s < MAX_CTA_TO; s++) resv[s] <= '0;
    end else begin
      logic [15:0] r;
      logic [SLOT_W:0] n;
      r = reserved_entries;
      n = resident_ctas;
      if (cta_done && busy[done_slot]) begin
        busy[done_slot] <= 1'b0;
        r = r - resv[done_slot];
        n = n - 1'b1;
      end
      if (grant) begin
        busy[grant_slot] <= 1'b1;
        resv[grant_slot] <= 16'(need_phys);
        r = r + 16'(need_phys);
        n = n + 1'b1;
      end
      reserved_entries <= r;
      resident_ctas    <= n;
    end
  end
endmodule

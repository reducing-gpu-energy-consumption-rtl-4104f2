// reg_allocator: bank entry availability vector and free-entry search.
// One bit per bank entry (1024 physical warp registers x 4 entries = 4096 bits);
// here 1 marks an entry assigned to an architectural warp register, 0 a free one.
// For a request of k entries (1, 2 or 4) the search returns the lowest-numbered
// physical warp register, inside a powered sub-array, with at least k free entries,
// and a mask of its k lowest free entries, so in-service registers gather in the
// low sub-arrays and the rest can stay power gated. Entries need not be adjacent.
// Each register computes its own "fits" flag; a priority encoder over the 1024
// flags picks the winner. alloc and free take effect at the clock edge; a free and
// an alloc in one cycle (a re-map) are both applied, free first. used_per_sa counts
// the assigned entries of each sub-array for the power gating controller.
// The vector and its size are the document's; the first-fit search order and the
// lowest-free-entries mask are this design's choices.
module reg_allocator
  import owar_pkg::*;
#(
  parameter int unsigned NPREGS = NUM_PREGS,
  parameter int unsigned NUM_SA = 8,
  localparam int unsigned PW    = $clog2(NPREGS),
  localparam int unsigned CNT_W = $clog2(NPREGS * ENT_PER_REG / NUM_SA + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NUM_SA-1:0]      sa_active,
  // search
  input  logic [2:0]             req_k,
  output logic                   fit,
  output logic [PW-1:0]          fit_preg,
  output logic [ENT_PER_REG-1:0] fit_mask,
  // update
  input  logic                   alloc_en,
  input  logic [PW-1:0]          alloc_preg,
  input  logic [ENT_PER_REG-1:0] alloc_mask,
  input  logic                   free_en,
  input  logic [PW-1:0]          free_preg,
  input  logic [ENT_PER_REG-1:0] free_mask,
  // occupancy
  output logic [NUM_SA-1:0][CNT_W-1:0] used_per_sa,
  output logic [PW+2:0]          used_total
);
  localparam int unsigned PER_SA = NPREGS / NUM_SA;

  logic [NPREGS-1:0][ENT_PER_REG-1:0] avail;
  logic [NPREGS-1:0]                  fits;
  logic [NPREGS-1:0][2:0]             used_cnt;

  for (genvar p = 0; p < NPREGS; p++) begin : g_reg
    assign fits[p]     = sa_active[p / PER_SA] && (popcount4(~avail[p]) >= req_k);
    assign used_cnt[p] = popcount4(avail[p]);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        avail[p] <= '0;
      end else if ((free_en && free_preg == PW'(p)) || (alloc_en && alloc_preg == PW'(p))) begin
        avail[p] <= (avail[p] & ~((free_en && free_preg == PW'(p)) ? free_mask : '0))
                    | ((alloc_en && alloc_preg == PW'(p)) ? alloc_mask : '0);
      end
    end
  end

  // lowest register that fits
  always_comb begin
    fit      = 1'b0;
    fit_preg = '0;
    for (int p = NPREGS - 1; p >= 0; p--)
      if (fits[p]) begin
        fit      = 1'b1;
        fit_preg = PW'(p);
      end
  end

  // its k lowest free entries
  always_comb begin
    logic [ENT_PER_REG-1:0] fr;
    logic [2:0]             taken;
    fr       = ~avail[fit_preg];
    taken    = '0;
    fit_mask = '0;
    for (int e = 0; e < ENT_PER_REG; e++)
      if (fit && fr[e] && taken < req_k) begin
        fit_mask[e] = 1'b1;
        taken       = taken + 3'd1;
      end
  end

  for (genvar s = 0; s < NUM_SA; s++) begin : g_sa
    always_comb begin
      used_per_sa[s] = '0;
      for (int p = s * PER_SA; p < (s + 1) * PER_SA; p++)
        used_per_sa[s] = used_per_sa[s] + CNT_W'(used_cnt[p]);
    end
  end

  always_comb begin
    used_total = '0;
    for (int s = 0; s < NUM_SA; s++) used_total = used_total + (PW+3)'(used_per_sa[s]);
  end
endmodule

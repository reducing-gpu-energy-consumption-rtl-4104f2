// tlpt: thread-level packing table (TLPT) of one SM.
// One 2-bit width entry per register id (63 entries, 126 bits). Each write-back
// presents the warp's upper-bound width for a register; the table keeps the wider of
// the stored and the new width. A new width wider than a non-empty stored width is a
// misprediction and is flagged so the renaming table re-maps the register.
// When a thread block completes (cta_done), the predicted physical usage per warp is
// latched: the sum, over the kernel's registers 0..regs_per_thread-1, of the bank
// entries each needs (8 bit: 1, 16 bit: 2, 32 bit: 4; a register with no width yet
// is counted as 4). The scheduler uses it for later thread blocks.
// Timing: width_out and mispredict are combinational from the update inputs; the
// table and the prediction update at the clock edge. clear empties the table at a
// kernel start. Table, update rule and prediction are the document's; the encoding
// of an empty entry (00), its conservative count, and the clear input are this
// design's choices.
module tlpt
  import owar_pkg::*;
#(
  parameter int unsigned ENTRIES = MAX_REGS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             upd_valid,
  input  logic [REG_W-1:0] upd_reg,
  input  width_e           upd_width,
  output width_e           width_out,     // width the register must be stored at
  output logic             mispredict,
  input  logic [REG_W-1:0] regs_per_thread,
  input  logic             cta_done,
  output logic             pred_valid,
  output logic [8:0]       pred_entries   // predicted bank entries per warp
);
  width_e tab [ENTRIES];
  width_e stored;

  assign stored     = (32'(upd_reg) < ENTRIES) ? tab[upd_reg] : W_NONE;
  assign width_out  = (upd_width > stored) ? upd_width : stored;
  assign mispredict = upd_valid && (stored != W_NONE) && (upd_width > stored);

  logic [8:0] sum;
  always_comb begin
    sum = '0;
    for (int r = 0; r < ENTRIES; r++)
      if (r < 32'(regs_per_thread)) sum = sum + 9'(entries_for(tab[r]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ENTRIES; r++) tab[r] <= W_NONE;
      pred_valid   <= 1'b0;
      pred_entries <= '0;
    end else if (clear) begin
      for (int r = 0; r < ENTRIES; r++) tab[r] <= W_NONE;
      pred_valid   <= 1'b0;
      pred_entries <= '0;
    end else begin
      if (upd_valid && 32'(upd_reg) < ENTRIES && upd_width > stored)
        tab[upd_reg] <= upd_width;
      if (cta_done) begin
        pred_valid   <= 1'b1;
        pred_entries <= sum;
      end
    end
  end
endmodule

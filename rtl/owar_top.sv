// owar_top: operand-width-aware register (OWAR) file of one streaming
// multiprocessor.
// Many GPU register values are narrow: they fit in 8 or 16 bits. OWAR measures the
// width of every warp result at write-back and stores narrow warp registers in one
// or two of the four bank entries of a physical warp register, so several
// architectural warp registers share one physical register. A renaming table maps
// each architectural warp register to its physical register and entry mask. The
// space saved is used twice: empty sub-arrays of the register file are power gated,
// and (in thread-overrun mode) the thread block scheduler admits extra blocks using
// the predicted packed usage.
//
// Write-back (wb_*), one warp register per cycle when wb_ready is high:
//   nw_detector finds the upper-bound width of the 32 results; the TLPT merges it
//   with the width recorded for that register id. If the register is unmapped, or
//   mapped to fewer entries than that width needs (a misprediction or a narrower
//   earlier allocation), the reg_allocator supplies a physical register with enough
//   free entries in a powered sub-array; the old entries are freed and the renaming
//   table updated in the same cycle (a re-map). The data are packed at the width of
//   the mapping and written to the enabled banks only. If no powered sub-array has
//   room, subarray_pg wakes one and the write stalls for the wake-up time.
// Read (rd_*): the renaming table gives register and mask, only the masked banks
//   are read, and rd_data (zero-extended values) appears one cycle later with
//   rd_data_valid. A read and a write of the same register in one cycle return the
//   old value. An unwritten register reads as zero.
// Thread blocks: cta_req/cta_grant ask cta_admit for a slot; cta_done_* retires a
//   slot: the TLPT then latches its usage prediction and a release walker frees
//   the warp registers of the block's warps, one per cycle, during which
//   write-back stalls and cta_done_ready is low.
// kernel_start empties the TLPT. Counters report the mechanisms' activity;
// cnt_wake_stall counts write-back stall cycles other than release stalls, i.e.
// sub-array wake-ups and register file overflow (rf_full).
// What follows the document: the detector, TLPT, renaming table format,
// availability vector, masked bank accesses, sub-array gating with a wake-up stall,
// and prediction-based admission. This design's own choices: the single-cycle
// write-back flow, when re-maps happen, the release walker, and all handshakes.
module owar_top
  import owar_pkg::*;
#(
  parameter int unsigned NUM_SA      = 8,
  parameter int unsigned WAKE_CYCLES = 1,
  parameter int unsigned MAX_CTA     = 16,
  parameter int unsigned MAX_WARPS   = 48,
  parameter int unsigned MAX_CTA_TO  = 32,
  localparam int unsigned SLOT_W     = $clog2(MAX_CTA_TO),
  localparam int unsigned CNT_W      = $clog2(NUM_PREGS * ENT_PER_REG / NUM_SA + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // kernel configuration
  input  logic                 kernel_start,
  input  logic                 to_mode,
  input  logic [REG_W-1:0]     regs_per_thread,
  input  logic [5:0]           warps_per_cta,
  // write-back
  input  logic                 wb_valid,
  output logic                 wb_ready,
  input  logic [WARP_ID_W-1:0] wb_warp,
  input  logic [REG_W-1:0]     wb_reg,
  input  warp_data_t           wb_data,
  // register read
  input  logic                 rd_valid,
  input  logic [WARP_ID_W-1:0] rd_warp,
  input  logic [REG_W-1:0]     rd_reg,
  output logic                 rd_data_valid,
  output warp_data_t           rd_data,
  // thread blocks
  input  logic                 cta_req,
  output logic                 cta_grant,
  output logic [SLOT_W-1:0]    cta_slot,
  output logic [WARP_ID_W-1:0] cta_warp_base,
  input  logic                 cta_done_valid,
  output logic                 cta_done_ready,
  input  logic [SLOT_W-1:0]    cta_done_slot,
  // status
  output logic [NUM_SA-1:0]    sa_active,
  output logic                 rf_full,
  output logic [PREG_W+2:0]    used_entries,
  output logic [SLOT_W:0]      resident_ctas,
  output logic [15:0]          reserved_entries,
  output logic                 pred_valid,
  output logic [8:0]           pred_entries,
  output logic [31:0]          cnt_mispredict,
  output logic [31:0]          cnt_remap,
  output logic [31:0]          cnt_wake_stall,
  output logic [31:0]          cnt_wake,
  output logic [31:0]          cnt_gate,
  output logic [31:0]          cnt_bank_reads,
  output logic [31:0]          cnt_bank_writes,
  output logic [31:0]          cnt_pred_grant
);
  localparam int unsigned SA_W = (NUM_SA > 1) ? $clog2(NUM_SA) : 1;

  // ---------------- release walker ----------------
  logic                 rel_busy;
  logic [WARP_ID_W-1:0] rel_warp, rel_warp_end;
  logic [REG_W-1:0]     rel_reg;

  // ---------------- write-back path ----------------
  width_e    det_width, need_width;
  logic      tlpt_mispredict;
  rt_entry_t a_entry, b_entry;
  logic      a_oob;
  logic [2:0] have_k, need_k;
  logic       need_alloc;
  logic       fit;
  logic [PREG_W-1:0]      fit_preg;
  logic [ENT_PER_REG-1:0] fit_mask;
  logic       wb_fire;
  logic       waking, none_left;

  nw_detector u_det (.data(wb_data), .warp_width(det_width));

  logic cta_done_fire;
  assign cta_done_ready = !rel_busy;
  assign cta_done_fire  = cta_done_valid && cta_done_ready;

  tlpt u_tlpt (
    .clk, .rst_n, .clear(kernel_start),
    .upd_valid(wb_fire), .upd_reg(wb_reg), .upd_width(det_width),
    .width_out(need_width), .mispredict(tlpt_mispredict),
    .regs_per_thread, .cta_done(cta_done_fire),
    .pred_valid, .pred_entries);

  assign have_k     = popcount4(a_entry.mask);
  assign need_k     = entries_for(need_width);
  assign need_alloc = have_k < need_k;

  // write-back may proceed unless releasing or waiting for room
  assign wb_ready = !rel_busy && (!need_alloc || fit || a_oob);
  assign wb_fire  = wb_valid && wb_ready;

  logic      do_alloc;
  rt_entry_t tgt;
  assign do_alloc = wb_fire && need_alloc && !a_oob;
  assign tgt      = need_alloc ? rt_entry_t'{preg: fit_preg, mask: fit_mask} : a_entry;

  // rename table ports: A shared by write-back and the release walker
  logic [WARP_ID_W-1:0] a_warp;
  logic [REG_W-1:0]     a_reg;
  assign a_warp = rel_busy ? rel_warp : wb_warp;
  assign a_reg  = rel_busy ? rel_reg  : wb_reg;

  logic rt_wr;
  assign rt_wr = rel_busy || do_alloc;

  rename_table u_rt (
    .clk, .rst_n, .regs_per_thread,
    .a_warp, .a_reg, .a_entry, .a_oob,
    .b_warp(rd_warp), .b_reg(rd_reg), .b_entry,
    .wr_en(rt_wr), .wr_warp(a_warp), .wr_reg(a_reg),
    .wr_entry(rel_busy ? rt_entry_t'('0) : tgt));

  // ---------------- allocation and power gating ----------------
  logic [NUM_SA-1:0][CNT_W-1:0] used_per_sa;
  logic free_en;
  assign free_en = (rel_busy && a_entry.mask != '0) || (do_alloc && a_entry.mask != '0);

  reg_allocator #(.NUM_SA(NUM_SA)) u_alloc (
    .clk, .rst_n, .sa_active,
    .req_k(need_k), .fit, .fit_preg, .fit_mask,
    .alloc_en(do_alloc), .alloc_preg(fit_preg), .alloc_mask(fit_mask),
    .free_en, .free_preg(a_entry.preg), .free_mask(a_entry.mask),
    .used_per_sa, .used_total(used_entries));

  logic wake_req;
  assign wake_req = wb_valid && !rel_busy && need_alloc && !fit && !a_oob;

  subarray_pg #(.NUM_SA(NUM_SA), .WAKE_CYCLES(WAKE_CYCLES), .CNT_W(CNT_W)) u_pg (
    .clk, .rst_n, .used_per_sa, .wake_req,
    .alloc_valid(do_alloc), .alloc_sa(SA_W'(32'(fit_preg) / (NUM_PREGS / NUM_SA))),
    .sa_active, .waking, .none_left,
    .wake_events(cnt_wake), .gate_events(cnt_gate));

  assign rf_full = none_left;

  // ---------------- register file ----------------
  reg_entries_t wr_entries, rd_entries;
  logic [ENT_PER_REG-1:0] rd_mask_q;
  logic rf_we;
  assign rf_we = wb_fire && !a_oob;

  operand_packer u_pack (
    .wr_data(wb_data), .wr_width(width_of_mask(tgt.mask)), .wr_mask(tgt.mask),
    .wr_entries,
    .rd_entries, .rd_mask(rd_mask_q), .rd_data);

  rf_array #(.NUM_SA(NUM_SA)) u_rf (
    .clk, .rst_n, .sa_active,
    .wr_en(rf_we), .wr_preg(tgt.preg), .wr_mask(tgt.mask), .wr_entries,
    .rd_en(rd_valid), .rd_preg(b_entry.preg), .rd_mask(b_entry.mask),
    .rd_entries, .rd_mask_q,
    .bank_reads(cnt_bank_reads), .bank_writes(cnt_bank_writes));

  // ---------------- thread block admission ----------------
  cta_admit #(.MAX_CTA(MAX_CTA), .MAX_WARPS(MAX_WARPS), .MAX_CTA_TO(MAX_CTA_TO)) u_admit (
    .clk, .rst_n, .to_mode, .regs_per_thread, .warps_per_cta,
    .pred_valid, .pred_entries,
    .cta_req, .grant(cta_grant), .grant_slot(cta_slot), .grant_warp_base(cta_warp_base),
    .cta_done(cta_done_fire), .done_slot(cta_done_slot),
    .resident_ctas, .reserved_entries);

  // ---------------- sequential control and counters ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rel_busy       <= 1'b0;
      rel_warp       <= '0;
      rel_warp_end   <= '0;
      rel_reg        <= '0;
      rd_data_valid  <= 1'b0;
      cnt_mispredict <= '0;
      cnt_remap      <= '0;
      cnt_wake_stall <= '0;
      cnt_pred_grant <= '0;
    end else begin
      rd_data_valid <= rd_valid;
      if (cta_done_fire && warps_per_cta != '0 && regs_per_thread != '0) begin
        rel_busy     <= 1'b1;
        rel_warp     <= WARP_ID_W'(32'(cta_done_slot) * 32'(warps_per_cta));
        rel_warp_end <= WARP_ID_W'(32'(cta_done_slot) * 32'(warps_per_cta) +
                                   32'(warps_per_cta) - 1);
        rel_reg      <= '0;
      end else if (rel_busy) begin
        if (rel_reg == regs_per_thread - 1'b1) begin
          rel_reg <= '0;
          if (rel_warp == rel_warp_end) rel_busy <= 1'b0;
          else                          rel_warp <= rel_warp + 1'b1;
        end else begin
          rel_reg <= rel_reg + 1'b1;
        end
      end
      if (wb_fire && tlpt_mispredict)            cnt_mispredict <= cnt_mispredict + 1;
      if (do_alloc && a_entry.mask != '0)        cnt_remap      <= cnt_remap + 1;
      if (wb_valid && !wb_ready && !rel_busy)    cnt_wake_stall <= cnt_wake_stall + 1;
      if (cta_grant && to_mode && pred_valid)    cnt_pred_grant <= cnt_pred_grant + 1;
    end
  end

  // A write must never target an index outside the renaming table.
  a_wb_in_table: assert property (@(posedge clk) disable iff (!rst_n)
    wb_fire |-> !a_oob);
endmodule

// rename_table: the OWAR renaming table.
// 2048 entries, each holding one architectural warp register's mapping: a 10-bit
// physical warp register address and a 4-bit mask of the bank entries (of the four
// consecutive banks at one row) that hold its data. The index is the global
// architectural id, warp_id * regs_per_thread + register id, which this module
// computes. A mask of 0000 means "not mapped" (the register was never written or
// was released).
// Ports: two combinational lookup ports (write-back path and read path), and one
// write port that sets or clears an entry at the clock edge. oob flags an index
// beyond the table.
// The 14-bit entries are kept in a plain array (an SRAM in silicon); a separate
// resettable valid bit per entry marks it mapped, so reset needs no table sweep.
// Entry format, size and index formula are the document's; the combinational
// lookup, the zero-mask convention and the valid bits are this design's choices.
module rename_table
  import owar_pkg::*;
#(
  parameter int unsigned ENTRIES = RT_ENTRIES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [REG_W-1:0]     regs_per_thread,
  // lookup A (write-back path)
  input  logic [WARP_ID_W-1:0] a_warp,
  input  logic [REG_W-1:0]     a_reg,
  output rt_entry_t            a_entry,
  output logic                 a_oob,
  // lookup B (read path)
  input  logic [WARP_ID_W-1:0] b_warp,
  input  logic [REG_W-1:0]     b_reg,
  output rt_entry_t            b_entry,
  // update
  input  logic                 wr_en,
  input  logic [WARP_ID_W-1:0] wr_warp,
  input  logic [REG_W-1:0]     wr_reg,
  input  rt_entry_t            wr_entry
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);

  rt_entry_t         tab [ENTRIES];   // payload, no reset (SRAM-like)
  logic [ENTRIES-1:0] valid;           // mapped flags, reset to 0

  function automatic logic [WARP_ID_W+REG_W:0] gidx(logic [WARP_ID_W-1:0] w,
                                                    logic [REG_W-1:0] r,
                                                    logic [REG_W-1:0] n);
    return (WARP_ID_W+REG_W+1)'(w * n) + (WARP_ID_W+REG_W+1)'(r);
  endfunction

  logic [WARP_ID_W+REG_W:0] ia, ib, iw;
  assign ia = gidx(a_warp, a_reg, regs_per_thread);
  assign ib = gidx(b_warp, b_reg, regs_per_thread);
  assign iw = gidx(wr_warp, wr_reg, regs_per_thread);

  assign a_oob   = 32'(ia) >= ENTRIES;
  assign a_entry = (32'(ia) < ENTRIES && valid[IDX_W'(ia)]) ? tab[IDX_W'(ia)] : '0;
  assign b_entry = (32'(ib) < ENTRIES && valid[IDX_W'(ib)]) ? tab[IDX_W'(ib)] : '0;

  always_ff @(posedge clk) begin
    if (wr_en && 32'(iw) < ENTRIES) tab[IDX_W'(iw)] <= wr_entry;
  end

  for (genvar i = 0; i < ENTRIES; i++) begin : g_valid
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                                      valid[i] <= 1'b0;
      else if (wr_en && iw == (WARP_ID_W+REG_W+1)'(i)) valid[i] <= (wr_entry.mask != '0);
    end
  end
endmodule

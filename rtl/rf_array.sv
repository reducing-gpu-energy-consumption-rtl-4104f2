// rf_array: the banked register file of one SM and its bank arbitrator.
// NUM_BANKS banks (default 32) of BANK_ROWS entries (default 128) of 256 bits,
// 128 kB in all. A physical warp register is four bank entries from consecutive
// banks at the same row: register p sits at row p / (NUM_BANKS/4), banks
// 4*(p mod (NUM_BANKS/4)) .. +3. One warp-register write and one warp-register read
// are served per cycle; the arbitrator enables only the banks whose bit is set in the
// access's 4-bit entry mask, so a packed 8-bit register costs one bank access
// instead of four. The two accesses use the banks' separate read and write ports and
// never conflict. Read data appear one cycle after rd_en, per entry, unordered
// (entry j = bank 4g+j); rd_mask_q is the mask of the returned read.
// Counters give the number of bank-entry reads and writes performed.
// Rows are grouped into NUM_SA power-gating sub-arrays; an assertion checks that
// no access reaches a gated sub-array.
// Bank count, size, port count and the four-entries-per-register layout are the
// document's; the single read and write per cycle is this design's choice (the
// operand collectors and crossbar that would queue more requests are not modelled).
module rf_array
  import owar_pkg::*;
#(
  parameter int unsigned BANKS  = NUM_BANKS,
  parameter int unsigned ROWS   = BANK_ROWS,
  parameter int unsigned NUM_SA = 8,
  localparam int unsigned GROUPS = BANKS / ENT_PER_REG,
  localparam int unsigned NPREGS = GROUPS * ROWS,
  localparam int unsigned PW     = $clog2(NPREGS),
  localparam int unsigned GW     = (GROUPS > 1) ? $clog2(GROUPS) : 1,
  localparam int unsigned RW     = $clog2(ROWS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NUM_SA-1:0]      sa_active,
  input  logic                   wr_en,
  input  logic [PW-1:0]          wr_preg,
  input  logic [ENT_PER_REG-1:0] wr_mask,
  input  reg_entries_t           wr_entries,
  input  logic                   rd_en,
  input  logic [PW-1:0]          rd_preg,
  input  logic [ENT_PER_REG-1:0] rd_mask,
  output reg_entries_t           rd_entries,
  output logic [ENT_PER_REG-1:0] rd_mask_q,
  output logic [31:0]            bank_reads,
  output logic [31:0]            bank_writes
);
  localparam int unsigned ROWS_PER_SA = ROWS / NUM_SA;

  logic [GW-1:0] wg, rg, rg_q;
  logic [RW-1:0] wrow, rrow;

  assign wg   = GW'(wr_preg % GROUPS);
  assign rg   = GW'(rd_preg % GROUPS);
  assign wrow = RW'(wr_preg / GROUPS);
  assign rrow = RW'(rd_preg / GROUPS);

  logic [BANKS-1:0]        b_we, b_re;
  logic [ENTRY_W-1:0]      b_wd [BANKS];
  logic [ENTRY_W-1:0]      b_rd [BANKS];

  always_comb begin
    for (int b = 0; b < BANKS; b++) begin
      b_we[b] = wr_en && (b / ENT_PER_REG == int'(wg)) && wr_mask[b % ENT_PER_REG];
      b_re[b] = rd_en && (b / ENT_PER_REG == int'(rg)) && rd_mask[b % ENT_PER_REG];
      b_wd[b] = wr_entries[b % ENT_PER_REG];
    end
  end

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    rf_bank #(.ROWS(ROWS), .WIDTH(ENTRY_W)) u_bank (
      .clk(clk), .wr_en(b_we[b]), .wr_row(wrow), .wr_data(b_wd[b]),
      .rd_en(b_re[b]), .rd_row(rrow), .rd_data(b_rd[b]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rg_q        <= '0;
      rd_mask_q   <= '0;
      bank_reads  <= '0;
      bank_writes <= '0;
    end else begin
      rg_q        <= rg;
      rd_mask_q   <= rd_en ? rd_mask : '0;
      bank_reads  <= bank_reads + 32'($countones(b_re));
      bank_writes <= bank_writes + 32'($countones(b_we));
    end
  end

  always_comb begin
    for (int e = 0; e < ENT_PER_REG; e++)
      rd_entries[e] = rd_mask_q[e] ? b_rd[int'(rg_q) * ENT_PER_REG + e] : '0;
  end

  // No access may reach a power-gated sub-array.
  a_wr_powered: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_en && wr_mask != '0) |-> sa_active[32'(wrow) / ROWS_PER_SA]);
  a_rd_powered: assert property (@(posedge clk) disable iff (!rst_n)
    (rd_en && rd_mask != '0) |-> sa_active[32'(rrow) / ROWS_PER_SA]);
endmodule

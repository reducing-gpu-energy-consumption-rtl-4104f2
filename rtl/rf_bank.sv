// rf_bank: one register file bank, ROWS entries of WIDTH bits, with one read port
// and one write port (dual-ported as in the document's baseline). The read is
// synchronous: rd_data holds the addressed entry one cycle after rd_en. A read and a
// write of the same row in one cycle return the old contents. Written as an array so
// that synthesis can map it to an SRAM macro; the contents are not reset.
module rf_bank #(
  parameter int unsigned ROWS  = 128,
  parameter int unsigned WIDTH = 256,
  localparam int unsigned AW   = $clog2(ROWS)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_row,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_row,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row] <= wr_data;
    if (rd_en) rd_data <= mem[rd_row];
  end
endmodule

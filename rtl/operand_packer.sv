// operand_packer: packs a warp register's 32 thread values into bank entries and
// unpacks them.
// A bank entry is 256 bits. At width w (8, 16 or 32 bits) the low w bits of each
// thread's value are laid side by side, thread 0 lowest, giving 32*w bits, i.e. 1, 2
// or 4 entries' worth. Chunk c (bits 256c..256c+255) goes to the c-th set bit of the
// entry mask, so the entries may be any of the four banks of the physical warp
// register (mask 0101 uses the first and third). At width 32 with mask 1111 this is
// the unpacked layout: entry j holds threads 8j..8j+7.
// Unpacking reverses this, with the width taken from the number of mask bits, and
// zero-extends each value (narrow values were detected by leading zeros).
// Both directions are combinational. One, two or four entries per 8-, 16- or 32-bit
// register and masks of non-adjacent entries are the document's; the bit layout
// inside the entries is this design's choice.
module operand_packer
  import owar_pkg::*;
(
  // pack
  input  warp_data_t             wr_data,
  input  width_e                 wr_width,
  input  logic [ENT_PER_REG-1:0] wr_mask,
  output reg_entries_t           wr_entries,
  // unpack
  input  reg_entries_t           rd_entries,
  input  logic [ENT_PER_REG-1:0] rd_mask,
  output warp_data_t             rd_data
);
  localparam int unsigned PK_W = WARP_SIZE * DATA_W; // 1024

  logic [PK_W-1:0] wpk, rpk;
  width_e          rd_width;

  always_comb begin
    wpk = '0;
    for (int t = 0; t < WARP_SIZE; t++)
      case (wr_width)
        W_8:     wpk[t*8  +: 8]  = wr_data[t][7:0];
        W_16:    wpk[t*16 +: 16] = wr_data[t][15:0];
        default: wpk[t*32 +: 32] = wr_data[t];
      endcase
  end

  always_comb begin
    int c;
    c = 0;
    wr_entries = '0;
    for (int e = 0; e < ENT_PER_REG; e++)
      if (wr_mask[e]) begin
        wr_entries[e] = wpk[c*ENTRY_W +: ENTRY_W];
        c = c + 1;
      end
  end

  assign rd_width = width_of_mask(rd_mask);

  always_comb begin
    int c;
    c   = 0;
    rpk = '0;
    for (int e = 0; e < ENT_PER_REG; e++)
      if (rd_mask[e]) begin
        rpk[c*ENTRY_W +: ENTRY_W] = rd_entries[e];
        c = c + 1;
      end
    for (int t = 0; t < WARP_SIZE; t++)
      case (rd_width)
        W_8:     rd_data[t] = {24'd0, rpk[t*8 +: 8]};
        W_16:    rd_data[t] = {16'd0, rpk[t*16 +: 16]};
        W_32:    rd_data[t] = rpk[t*32 +: 32];
        default: rd_data[t] = '0;
      endcase
  end
endmodule

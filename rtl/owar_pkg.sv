// owar_pkg: shared sizes, types and helper functions for the operand-width-aware
// register (OWAR) file of one streaming multiprocessor (SM).
// Sizes follow the Fermi-like register file: 32 banks, 128 entries of 256 bits per
// bank (128 kB), a warp of 32 threads, 63 registers per thread, a renaming table of
// 2048 entries, 1024 physical warp registers of four bank entries each.
// The operand width code follows the zero-detection output: 01 = 8 bit,
// 10 = 16 bit, 11 = 32 bit. Code 00 is this design's "nothing recorded yet".
package owar_pkg;

  localparam int unsigned WARP_SIZE   = 32;   // threads per warp
  localparam int unsigned DATA_W      = 32;   // full register width
  localparam int unsigned NUM_BANKS   = 32;   // RF banks per SM
  localparam int unsigned BANK_ROWS   = 128;  // entries per bank
  localparam int unsigned ENTRY_W     = 256;  // bits per bank entry
  localparam int unsigned ENT_PER_REG = 4;    // bank entries per physical warp register
  localparam int unsigned NUM_PREGS   = NUM_BANKS * BANK_ROWS / ENT_PER_REG; // 1024
  localparam int unsigned PREG_W      = $clog2(NUM_PREGS);                   // 10
  localparam int unsigned MAX_REGS    = 63;   // registers per thread
  localparam int unsigned REG_W       = 6;
  localparam int unsigned RT_ENTRIES  = 2048; // renaming table entries
  localparam int unsigned WARP_ID_W   = 7;    // warp slot id (assumed)

  typedef enum logic [1:0] {
    W_NONE = 2'b00,
    W_8    = 2'b01,
    W_16   = 2'b10,
    W_32   = 2'b11
  } width_e;

  typedef logic [WARP_SIZE-1:0][DATA_W-1:0] warp_data_t;   // one value per thread
  typedef logic [ENT_PER_REG-1:0][ENTRY_W-1:0] reg_entries_t; // four bank entries

  // One renaming table entry: 10-bit physical warp register + 4-bit entry mask.
  typedef struct packed {
    logic [PREG_W-1:0]      preg;
    logic [ENT_PER_REG-1:0] mask;
  } rt_entry_t;

  // Bank entries needed to hold a warp register of the given width.
  function automatic logic [2:0] entries_for(width_e w);
    case (w)
      W_8:     return 3'd1;
      W_16:    return 3'd2;
      default: return 3'd4;  // W_32, and W_NONE counted conservatively as full
    endcase
  endfunction

  function automatic logic [2:0] popcount4(logic [3:0] m);
    return 3'(m[0]) + 3'(m[1]) + 3'(m[2]) + 3'(m[3]);
  endfunction

  // Width implied by the number of entries a register occupies.
  function automatic width_e width_of_mask(logic [3:0] m);
    case (popcount4(m))
      3'd1:    return W_8;
      3'd2:    return W_16;
      3'd4:    return W_32;
      default: return W_NONE;
    endcase
  endfunction

endpackage

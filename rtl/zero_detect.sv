// zero_detect: zero-detection logic for one thread's 32-bit result.
// It looks at the high-order bits of the operand: if bits 31..8 are all zero the
// value fits in 8 bits (code 01), else if bits 31..16 are zero it fits in 16 bits
// (code 10), otherwise it needs the full 32 bits (code 11). The codes are the
// document's; treating only leading zeros as narrow (not sign-extended negative
// values) follows its "zero-detection" wording. Purely combinational.
module zero_detect
  import owar_pkg::*;
(
  input  logic [DATA_W-1:0] value,
  output width_e            width
);
  always_comb begin
    if (value[31:8] == '0)       width = W_8;
    else if (value[31:16] == '0) width = W_16;
    else                         width = W_32;
  end
endmodule

// 2D-code encoder: turns a 16-bit data word into a 32-bit codeword.
//
// The word is divided into the four groups X, Y, Z, W (region division) and
// the diagonal, parity and check bits are computed by XOR trees
// (redundancy calculation); see ecc2d_pkg for the equations and the
// codeword layout. The data bits are carried through unchanged, so the code
// is systematic.
//
// Interface: data_i in, code_o out. Timing: purely combinational, one level
// of 4-input XOR per redundancy bit.
module ecc2d_encoder
  import ecc2d_pkg::*;
(
  input  data_t data_i,
  output code_t code_o
);

  always_comb begin
    code_o.data = data_i;
    code_o.red  = calc_red(data_i);
  end

endmodule

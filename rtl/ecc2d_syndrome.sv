// 2D-code syndrome calculation.
//
// Recomputes the diagonal, parity and check bits from the data half of a
// stored codeword and XORs them with the stored redundancy bits:
// SDi = Di ^ RDi, SPi = Pi ^ RPi, SCi = Ci ^ RCi. A zero syndrome means the
// codeword is consistent. The syndrome has the same {C, P, D} layout as the
// redundancy field (see ecc2d_pkg).
//
// Interface: code_i in, syn_o out. Timing: purely combinational.
module ecc2d_syndrome
  import ecc2d_pkg::*;
(
  input  code_t code_i,
  output red_t  syn_o
);

  always_comb syn_o = code_i.red ^ calc_red(code_i.data);

endmodule

// 2D-code decoder: syndrome calculation followed by region selection and
// correction, recovering the 16-bit data word from a 32-bit codeword.
//
// The chain follows the published decoder outline (syndrome calculation,
// region selection, XOR correction, corrected output bits); the XOR with
// the selected error pattern takes the place of the "XOR & shift" step.
//
// Interface: code_i in; data_o, syn_o, status_o, region_o, err_mask_o out
// (see ecc2d_corrector). Timing: purely combinational.
module ecc2d_decoder
  import ecc2d_pkg::*;
(
  input  code_t      code_i,
  output data_t      data_o,
  output red_t       syn_o,
  output status_t    status_o,
  output logic [1:0] region_o,
  output data_t      err_mask_o
);

  ecc2d_syndrome u_syn (
    .code_i (code_i),
    .syn_o  (syn_o)
  );

  ecc2d_corrector u_cor (
    .data_i     (code_i.data),
    .syn_i      (syn_o),
    .data_o     (data_o),
    .status_o   (status_o),
    .region_o   (region_o),
    .err_mask_o (err_mask_o)
  );

endmodule

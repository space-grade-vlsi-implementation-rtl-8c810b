// ECC-protected word memory using the 2D divide-symbol code.
//
// A write encodes data_in into a 32-bit codeword (16 data bits plus
// diagonal, parity and check bits) and stores it at address. A read fetches
// the codeword, recomputes the syndrome, selects the region holding any
// multiple-cell upset and returns the corrected word. The read codeword and
// its syndrome are brought out, as in the published top-level block, along
// with the corrected data, the decode status, the region used and the mask
// of data bits that were flipped.
//
// inject_mask is XORed into the codeword as it is written, so upsets can be
// planted in the stored word; tie it to zero in normal use. This port, the
// data_out/status/region outputs and the read timing are this design's own
// additions.
//
// Timing: a write takes effect at the clock edge where write is high. A read
// requested in cycle t gives valid, codeword, syndrome, data_out, status,
// region and err_mask in cycle t+1; decoding is combinational after the memory's read
// register.
module ecc2d_top
  import ecc2d_pkg::*;
#(
  parameter int unsigned ADDR_W = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              read,
  input  logic              write,
  input  logic [ADDR_W-1:0] address,
  input  data_t             data_in,
  input  code_t             inject_mask,
  output code_t             codeword,
  output red_t              syndrome,
  output data_t             data_out,
  output logic              valid,
  output status_t           status,
  output logic [1:0]        region,
  output data_t             err_mask
);

  code_t enc_code;

  ecc2d_encoder u_enc (
    .data_i (data_in),
    .code_o (enc_code)
  );

  ecc2d_memory #(.ADDR_W(ADDR_W)) u_mem (
    .clk    (clk),
    .rst    (rst),
    .we     (write),
    .re     (read),
    .addr   (address),
    .wdata  (enc_code ^ inject_mask),
    .rdata  (codeword),
    .rvalid (valid)
  );

  ecc2d_decoder u_dec (
    .code_i     (codeword),
    .data_o     (data_out),
    .syn_o      (syndrome),
    .status_o   (status),
    .region_o   (region),
    .err_mask_o (err_mask)
  );

endmodule

// 2D-code verification, region selection and correction.
//
// The code targets multiple cell upsets that stay inside two neighbouring
// bit columns of the 4x4 data array. Three regions are defined by bit index:
// region 1 = indices 1&2, region 2 = indices 3&4, region 3 = indices 2&3,
// each across all four groups X, Y, Z, W.
//
// Inside any one region each data bit is covered by exactly one check bit
// (Cg13 covers index 1 or 3, Cg24 index 2 or 4), so the check syndrome SC
// names the erroneous bits once the region is known:
//   region 1: SCg13 -> G1, SCg24 -> G2
//   region 2: SCg13 -> G3, SCg24 -> G4
//   region 3: SCg13 -> G3, SCg24 -> G2
// Each candidate pattern is verified by recomputing the diagonal and parity
// syndromes it would cause and comparing them with the measured SD and SP.
// If at least one region verifies and every verified region proposes the
// same pattern, that pattern is XORed into the data. Region selection order
// follows the published region numbering; the verification rule itself is
// this design's own reading of the outlined decoding steps.
//
// Other outcomes: a zero syndrome passes the data untouched. A zero SC with
// nonzero SD/SP means only stored diagonal/parity bits were hit; a single
// SC bit with zero SD and SP means only one stored check bit was hit (every
// data error inside a region that sets one SC bit is a single-bit error,
// which also sets an SP bit). In both cases the data is passed untouched and
// the status says so. Anything else is flagged uncorrectable, including the
// few region-confined patterns that two regions explain differently (for
// example X1,X2,Y1,Y2 against X3,X4,Y3,Y4).
//
// Interface: data_i and syn_i in; data_o (corrected), status_o, region_o
// (1..3, 0 when no correction was made) and err_mask_o (flipped bits) out.
// Timing: purely combinational.
module ecc2d_corrector
  import ecc2d_pkg::*;
(
  input  data_t       data_i,
  input  red_t        syn_i,
  output data_t       data_o,
  output status_t     status_o,
  output logic [1:0]  region_o,
  output data_t       err_mask_o
);

  // Candidate error pattern of each region, built from the check syndrome:
  // a = SCg13, b = SCg24 placed at the indices the region covers.
  data_t      cand1, cand2, cand3;
  logic [2:0] match;
  logic       c_single;  // exactly one check syndrome bit set

  for (genvar g = 0; g < NGROUP; g++) begin : g_cand
    logic a, b;
    assign a = syn_i.c[2*g];
    assign b = syn_i.c[2*g+1];
    assign cand1[GROUP_W*g +: GROUP_W] = {2'b00, b, a};       // indices 1&2
    assign cand2[GROUP_W*g +: GROUP_W] = {b, a, 2'b00};       // indices 3&4
    assign cand3[GROUP_W*g +: GROUP_W] = {1'b0, a, b, 1'b0};  // indices 2&3
  end

  // Verification: the candidate must reproduce the whole syndrome (its SC
  // part matches by construction; SD and SP decide).
  assign match[0] = (calc_red(cand1) == syn_i);
  assign match[1] = (calc_red(cand2) == syn_i);
  assign match[2] = (calc_red(cand3) == syn_i);

  assign c_single = (syn_i.c != '0) && ((syn_i.c & (syn_i.c - 8'd1)) == '0);

  // Region selection: lowest verified region; all verified regions must
  // propose the same pattern.
  data_t      pick;
  logic [1:0] pick_r;
  logic       agree;

  always_comb begin
    pick   = '0;
    pick_r = 2'd0;
    if (match[0]) begin
      pick   = cand1;
      pick_r = 2'd1;
    end else if (match[1]) begin
      pick   = cand2;
      pick_r = 2'd2;
    end else if (match[2]) begin
      pick   = cand3;
      pick_r = 2'd3;
    end
  end

  assign agree = (!match[0] || cand1 == pick) &&
                 (!match[1] || cand2 == pick) &&
                 (!match[2] || cand3 == pick);

  always_comb begin
    data_o     = data_i;
    err_mask_o = '0;
    region_o   = 2'd0;
    if (syn_i == '0) begin
      status_o = ST_NO_ERROR;
    end else if (syn_i.c == '0 || (c_single && syn_i.p == '0 && syn_i.d == '0)) begin
      status_o = ST_REDUNDANCY_ERR;
    end else if (match != 3'b000 && agree) begin
      status_o   = ST_CORRECTED;
      err_mask_o = pick;
      region_o   = pick_r;
      data_o     = data_i ^ pick;
    end else begin
      status_o = ST_UNCORRECTABLE;
    end
  end

endmodule

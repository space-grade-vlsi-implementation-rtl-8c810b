// Test of the complete decoder on corrupted codewords.
//
// Codewords are built from random data with the reference equations, then
// corrupted: every single codeword bit (32 cases), every region-confined
// data error pattern, all 24 adjacent double upsets, and random errors in the stored redundancy bits. The
// expected outcome of each region pattern comes from a brute-force table of
// all region patterns and their syndromes, built independently of the
// design.
module ecc2d_decoder_tb;
  import ecc2d_pkg::*;
  import ecc2d_ref_pkg::*;

  code_t      code;
  data_t      data_o, err_mask;
  red_t       syn;
  status_t    status;
  logic [1:0] region;
  int         checks = 0;
  int         failures = 0;

  ecc2d_decoder dut (
    .code_i(code), .data_o(data_o), .syn_o(syn), .status_o(status),
    .region_o(region), .err_mask_o(err_mask)
  );

  task automatic expect_eq(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s code=%h data_o=%h syn=%h status=%0d region=%0d",
                 what, code, data_o, syn, status, region);
    end
  endtask

  logic [15:0] pat [768];
  logic [15:0] psyn [768];
  logic        amb [768];

  initial begin
    for (int k = 0; k < 768; k++) begin
      pat[k]  = region_pattern(k / 256 + 1, k % 256);
      psyn[k] = ref_red(pat[k]);
    end
    for (int k = 0; k < 768; k++) begin
      amb[k] = 1'b0;
      for (int j = 0; j < 768; j++)
        if (j % 256 != 0 && psyn[j] == psyn[k] && pat[j] != pat[k]) amb[k] = 1'b1;
    end
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    logic [31:0] good;
    #1;
    for (int rep = 0; rep < 8; rep++) begin
      d = 16'($urandom);
      good = {ref_red(d), d};
      code = good;
      #1;
      expect_eq(data_o == d && syn == 0 && status == ST_NO_ERROR, "clean");
      // Any single upset of the 32 stored bits leaves the data recoverable.
      for (int b = 0; b < 32; b++) begin
        code = good ^ (32'h1 << b);
        #1;
        expect_eq(data_o == d && syn == ref_red(code[15:0]) ^ code[31:16], "single upset data");
        expect_eq(b < 16 ? status == ST_CORRECTED : status == ST_REDUNDANCY_ERR,
                  "single upset status");
      end
      // Region-confined multiple cell upsets in the data bits.
      for (int k = 1; k < 768; k++) if (k % 256 != 0) begin
        code = good ^ {16'h0, pat[k]};
        #1;
        if (!amb[k])
          expect_eq(data_o == d && status == ST_CORRECTED, "MCU corrected");
        else
          expect_eq(status == ST_UNCORRECTABLE, "MCU flagged");
      end
      // Adjacent double upsets (neighbouring indices in a group, or the same
      // index in neighbouring groups) must all be corrected.
      for (int g = 0; g < 4; g++)
        for (int i = 0; i < 4; i++) begin
          if (i < 3) begin
            code = good ^ {16'h0, 16'h3 << (4*g + i)};
            #1;
            expect_eq(data_o == d && status == ST_CORRECTED, "adjacent pair in group");
          end
          if (g < 3) begin
            code = good ^ {16'h0, 16'h11 << (4*g + i)};
            #1;
            expect_eq(data_o == d && status == ST_CORRECTED, "adjacent pair across groups");
          end
        end
      // Upsets confined to the stored diagonal and parity bits.
      for (int k = 1; k < 256; k++) begin
        code = good ^ {8'h00, 8'(k), 16'h0};
        #1;
        expect_eq(data_o == d && status == ST_REDUNDANCY_ERR, "D/P upsets");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Test of region selection and correction.
//
// Every nonzero error pattern confined to region 1, 2 or 3 (3 x 255
// patterns) is applied to random data words. The expected verdict comes
// from a brute-force search over all region-confined patterns with the same
// syndrome: a unique one must be corrected exactly (status CORRECTED, data
// restored, err_mask equal to it, region the lowest that explains it);
// several different ones must be flagged UNCORRECTABLE with the data
// untouched. Errors in the stored diagonal/parity bits only, or in a single
// stored check bit, must leave the data alone with status REDUNDANCY_ERR.
module ecc2d_corrector_tb;
  import ecc2d_pkg::*;
  import ecc2d_ref_pkg::*;

  data_t      data_i, data_o, err_mask;
  red_t       syn;
  status_t    status;
  logic [1:0] region;
  int         checks = 0;
  int         failures = 0;
  int         n_fixed = 0, n_ambig = 0;

  ecc2d_corrector dut (
    .data_i(data_i), .syn_i(syn), .data_o(data_o),
    .status_o(status), .region_o(region), .err_mask_o(err_mask)
  );

  task automatic expect_eq(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s data_i=%h syn=%h data_o=%h status=%0d region=%0d mask=%h",
                 what, data_i, syn, data_o, status, region, err_mask);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference tables, built at time 0 without any delay: every pattern of
  // every region, its syndrome, whether another region explains the same
  // syndrome with a different pattern, and the lowest region explaining it.
  logic [15:0] pat [768];
  logic [15:0] psyn [768];
  logic        amb [768];
  int          preg [768];

  initial begin
    for (int k = 0; k < 768; k++) begin
      pat[k]  = region_pattern(k / 256 + 1, k % 256);
      psyn[k] = ref_red(pat[k]);
    end
    for (int k = 0; k < 768; k++) begin
      amb[k]  = 1'b0;
      preg[k] = 0;
      for (int j = 767; j >= 0; j--)
        if (j % 256 != 0 && psyn[j] == psyn[k]) begin
          preg[k] = j / 256 + 1;
          if (pat[j] != pat[k]) amb[k] = 1'b1;
        end
    end
  end

  initial begin
    logic [15:0] d, e;
    #1;
    // No error.
    d = 16'($urandom);
    data_i = d;
    syn = '0;
    #1;
    expect_eq(status == ST_NO_ERROR && data_o == d && err_mask == 0 && region == 0, "clean");

    for (int rep = 0; rep < 4; rep++) begin
      d = 16'($urandom);
      for (int k = 1; k < 768; k++) if (k % 256 != 0) begin
        e = pat[k];
        data_i = d ^ e;
        syn = psyn[k];
        #1;
        if (!amb[k]) begin
          if (rep == 0) n_fixed++;
          expect_eq(status == ST_CORRECTED && data_o == d && err_mask == e &&
                    int'(region) == preg[k], "region error not corrected");
        end else begin
          if (rep == 0) n_ambig++;
          expect_eq(status == ST_UNCORRECTABLE && data_o == (d ^ e) && err_mask == 0,
                    "ambiguous error not flagged");
        end
      end
    end

    // Stored diagonal / parity bits only: any nonzero combination.
    for (int k = 1; k < 256; k++) begin
      d = 16'($urandom);
      data_i = d;
      syn = {8'h00, 8'(k)};
      #1;
      expect_eq(status == ST_REDUNDANCY_ERR && data_o == d && err_mask == 0,
                "D/P-only error");
    end
    // One stored check bit.
    for (int k = 0; k < 8; k++) begin
      d = 16'($urandom);
      data_i = d;
      syn = {8'h1 << k, 8'h00};
      #1;
      expect_eq(status == ST_REDUNDANCY_ERR && data_o == d && err_mask == 0,
                "single check-bit error");
    end
    // Region error combined with stored-parity error: no region explains
    // it, so it must be flagged rather than miscorrected.
    d = 16'($urandom);
    e = pat[1];                          // X1 only
    data_i = d ^ e;
    syn = psyn[1] ^ 16'h0040;            // plus P3 flipped in storage
    #1;
    expect_eq(status == ST_UNCORRECTABLE && data_o == (d ^ e), "mixed error");

    $display("region patterns: %0d corrected uniquely, %0d ambiguous (of 765)",
             n_fixed, n_ambig);
    // Every single-bit data error must be uniquely correctable.
    for (int k = 1; k < 768; k++)
      if (k % 256 != 0 && $countones(pat[k]) == 1) begin
        checks++;
        if (amb[k]) begin
          failures++;
          $display("FAIL single-bit pattern %h is ambiguous", pat[k]);
        end
      end
    checks++;
    if (n_fixed + n_ambig != 765) begin
      failures++;
      $display("FAIL pattern count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

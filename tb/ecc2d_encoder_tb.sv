// Exhaustive test of the 2D-code encoder: all 65536 data words are encoded
// and the codeword is compared with the reference equations. The data half
// must equal the input (systematic code).
module ecc2d_encoder_tb;
  import ecc2d_pkg::*;
  import ecc2d_ref_pkg::*;

  data_t data;
  code_t code;
  int    checks = 0;
  int    failures = 0;

  ecc2d_encoder dut (.data_i(data), .code_o(code));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      data = 16'(v);
      #1;
      checks++;
      if (code != {ref_red(data), data}) begin
        failures++;
        if (failures < 10)
          $display("FAIL data=%h code=%h expected=%h", data, code, {ref_red(data), data});
      end
    end
    // Spot check of one worked value: A = 16'h0001 sets X1 only, which
    // enters D1, P1 and Cx13.
    data = 16'h0001;
    #1;
    checks++;
    if (code != 32'h0111_0001) begin
      failures++;
      $display("FAIL X1 spot check code=%h", code);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Test of the syndrome unit: valid codewords give a zero syndrome; codewords
// with random bits flipped give stored-redundancy XOR reference-redundancy
// of the stored data; single flips of each of the 32 codeword bits give the
// expected one- to three-bit syndromes.
module ecc2d_syndrome_tb;
  import ecc2d_pkg::*;
  import ecc2d_ref_pkg::*;

  code_t code;
  red_t  syn;
  int    checks = 0;
  int    failures = 0;

  ecc2d_syndrome dut (.code_i(code), .syn_o(syn));

  task automatic check(logic [15:0] exp, string what);
    #1;
    checks++;
    if (syn != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s code=%h syn=%h expected=%h", what, code, syn, exp);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    logic [31:0] flip;
    for (int n = 0; n < 2000; n++) begin
      d = 16'($urandom);
      code = {ref_red(d), d};
      check(16'h0, "clean");
      flip = $urandom;
      code = {ref_red(d), d} ^ flip;
      check(code[31:16] ^ ref_red(code[15:0]), "random flips");
    end
    // Single data-bit flip of group g, index i hits D, P and one C bit.
    for (int b = 0; b < 16; b++) begin
      int g, i;
      logic [15:0] exp;
      g = b / 4;
      i = b % 4;
      d = 16'($urandom);
      code = {ref_red(d), d ^ (16'h1 << b)};
      exp = '0;
      exp[i ^ (g & 1)] = 1'b1;            // diagonal D
      exp[4 + i] = 1'b1;                  // parity P
      exp[8 + 2*g + (i % 2)] = 1'b1;      // check C
      check(exp, "single data flip");
    end
    for (int b = 16; b < 32; b++) begin
      d = 16'($urandom);
      code = {ref_red(d), d} ^ (32'h1 << b);
      check(16'h1 << (b - 16), "single redundancy flip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// End-to-end test of the ECC-protected memory at its default size.
//
// Every address is written with random data, each write planting a
// different kind of upset through inject_mask: none, a multiple cell upset
// inside region 1, 2 or 3, upsets in the stored diagonal/parity bits, a
// single stored check-bit upset, and a pattern that two regions explain
// differently. Every word is then read back and the codeword, syndrome,
// corrected data, status and region are compared with values computed from
// the reference equations. The read result must appear exactly one cycle
// after the request. Each mechanism is counted and must occur at least
// once: clean read, correction in each of the three regions,
// redundancy-only upset, uncorrectable upset, reset clearing the array.
module ecc2d_top_tb;
  import ecc2d_pkg::*;
  import ecc2d_ref_pkg::*;

  localparam int unsigned AW = 4;   // default address width of the top
  localparam int unsigned DEPTH = 2 ** AW;

  logic          clk = 1'b0;
  logic          rst, read, write;
  logic [AW-1:0] address;
  data_t         data_in, data_out, err_mask;
  code_t         inject_mask, codeword;
  red_t          syndrome;
  logic          valid;
  status_t       status;
  logic [1:0]    region;

  int checks = 0;
  int failures = 0;
  int n_clean = 0, n_reg1 = 0, n_reg2 = 0, n_reg3 = 0;
  int n_red = 0, n_unc = 0, n_reset = 0;

  logic [15:0] w_data [DEPTH];
  logic [31:0] w_mask [DEPTH];
  status_t     w_stat [DEPTH];
  int          w_reg  [DEPTH];

  ecc2d_top dut (
    .clk, .rst, .read, .write, .address, .data_in, .inject_mask,
    .codeword, .syndrome, .data_out, .valid, .status, .region, .err_mask
  );

  always #5 clk = ~clk;

  task automatic expect_eq(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s addr=%0d code=%h syn=%h data_out=%h status=%0d region=%0d",
                 what, address, codeword, syndrome, data_out, status, region);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Upset plan per address, with the outcome worked out by hand from the
  // code equations:
  //   X1,Y1 (region 1)        SD1,SD2 set, SP clear  -> region 1
  //   X3,Z3,X4 (region 2)     only region 2 fits      -> region 2
  //   Y2,Y3 (region 3)        only region 3 fits      -> region 3
  //   X1,X2,Y1,Y2             regions 1 and 2 both fit -> uncorrectable
  function automatic void plan(int a, output logic [31:0] m, output status_t st,
                               output int rg);
    m  = '0;
    st = ST_CORRECTED;
    rg = 0;
    case (a % 8)
      0: st = ST_NO_ERROR;
      1: begin m = 32'h0000_0011; rg = 1; end             // X1, Y1
      2: begin m = 32'h0000_040C; rg = 2; end             // X3, X4, Z3
      3: begin m = 32'h0000_0060; rg = 3; end             // Y2, Y3
      4: begin m = 32'h00A5_0000; st = ST_REDUNDANCY_ERR; end  // D1,D3,P2,P4
      5: begin m = 32'h1000_0000; st = ST_REDUNDANCY_ERR; end  // Cz13
      6: begin m = 32'h0000_0033; st = ST_UNCORRECTABLE; end   // X1,X2,Y1,Y2
      default: begin m = 32'h0000_8000; rg = 2; end       // W4 alone
    endcase
  endfunction

  initial begin
    logic [31:0] exp_code;
    rst = 1'b1; read = 1'b0; write = 1'b0; address = '0; data_in = '0;
    inject_mask = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);

    // Write every word with its planned upset.
    for (int a = 0; a < DEPTH; a++) begin
      w_data[a] = 16'($urandom);
      plan(a, w_mask[a], w_stat[a], w_reg[a]);
      write <= 1'b1; address <= AW'(a); data_in <= w_data[a];
      inject_mask <= w_mask[a];
      @(posedge clk);
    end
    write <= 1'b0; inject_mask <= '0;

    // Read every word back.
    for (int a = 0; a < DEPTH; a++) begin
      read <= 1'b1; address <= AW'(a);
      @(posedge clk);
      read <= 1'b0;
      #1;
      exp_code = {ref_red(w_data[a]), w_data[a]} ^ w_mask[a];
      expect_eq(valid, "valid one cycle after read");
      expect_eq(codeword == exp_code, "codeword");
      expect_eq(syndrome == (exp_code[31:16] ^ ref_red(exp_code[15:0])), "syndrome");
      expect_eq(status == w_stat[a], "status");
      if (w_stat[a] == ST_UNCORRECTABLE)
        expect_eq(data_out == exp_code[15:0], "uncorrectable data untouched");
      else
        expect_eq(data_out == w_data[a], "data restored");
      if (w_stat[a] == ST_CORRECTED) begin
        expect_eq(int'(region) == w_reg[a], "region");
        expect_eq(err_mask == w_mask[a][15:0], "corrected bits");
      end
      case (status)
        ST_NO_ERROR:       n_clean++;
        ST_REDUNDANCY_ERR: n_red++;
        ST_UNCORRECTABLE:  n_unc++;
        default: case (region)
          2'd1: n_reg1++;
          2'd2: n_reg2++;
          default: n_reg3++;
        endcase
      endcase
      @(posedge clk);
      #1 expect_eq(!valid, "valid is a single-cycle pulse");
    end

    // Reset clears the array: reading any word gives zero data, no error.
    rst <= 1'b1;
    @(posedge clk);
    rst <= 1'b0;
    read <= 1'b1; address <= AW'(6);
    @(posedge clk);
    read <= 1'b0;
    #1;
    expect_eq(valid && data_out == 0 && codeword == 0 && status == ST_NO_ERROR, "reset");
    if (valid && codeword == 0) n_reset++;

    $display("clean=%0d region1=%0d region2=%0d region3=%0d redundancy=%0d uncorrectable=%0d reset=%0d",
             n_clean, n_reg1, n_reg2, n_reg3, n_red, n_unc, n_reset);
    checks++;
    if (n_clean == 0 || n_reg1 == 0 || n_reg2 == 0 || n_reg3 == 0 ||
        n_red == 0 || n_unc == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

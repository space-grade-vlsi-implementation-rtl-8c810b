// Test of the codeword memory: reset clears every word, writes to all
// addresses read back, the read result appears exactly one cycle after the
// request, a read and write of the same address in one cycle return the old
// word, and rdata holds while no read is requested.
module ecc2d_memory_tb;
  import ecc2d_pkg::*;

  localparam int unsigned AW = 4;

  logic          clk = 1'b0;
  logic          rst, we, re;
  logic [AW-1:0] addr;
  code_t         wdata, rdata;
  logic          rvalid;
  int            checks = 0;
  int            failures = 0;
  logic [31:0]   model [2**AW];

  ecc2d_memory #(.ADDR_W(AW)) dut (
    .clk, .rst, .we, .re, .addr, .wdata, .rdata, .rvalid
  );

  always #5 clk = ~clk;

  task automatic expect_eq(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s addr=%0d rdata=%h rvalid=%b", what, addr, rdata, rvalid);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; we = 1'b0; re = 1'b0; addr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // After reset every word reads as zero.
    for (int a = 0; a < 2**AW; a++) begin
      re <= 1'b1; addr <= AW'(a);
      @(posedge clk);
      re <= 1'b0;
      #1 expect_eq(rvalid && rdata == 0, "reset clear");
    end
    @(posedge clk);
    #1 expect_eq(!rvalid, "rvalid drops");
    // Fill with random words.
    for (int a = 0; a < 2**AW; a++) begin
      model[a] = $urandom;
      we <= 1'b1; addr <= AW'(a); wdata <= model[a];
      @(posedge clk);
    end
    we <= 1'b0;
    // Read back, checking one-cycle latency.
    for (int a = 2**AW - 1; a >= 0; a--) begin
      re <= 1'b1; addr <= AW'(a);
      @(posedge clk);
      re <= 1'b0;
      #1 expect_eq(rvalid && rdata == model[a], "readback");
    end
    // rdata holds without a read.
    @(posedge clk);
    #1 expect_eq(!rvalid && rdata == model[0], "hold");
    // Read and write of the same address in one cycle: old word returned.
    re <= 1'b1; we <= 1'b1; addr <= 4'd7; wdata <= ~model[7];
    @(posedge clk);
    re <= 1'b1; we <= 1'b0;
    #1 expect_eq(rvalid && rdata == model[7], "read-during-write old");
    model[7] = ~model[7];
    @(posedge clk);
    re <= 1'b0;
    #1 expect_eq(rvalid && rdata == model[7], "new word after write");
    // Reset again clears the array.
    rst <= 1'b1;
    @(posedge clk);
    rst <= 1'b0;
    re <= 1'b1; addr <= 4'd3;
    @(posedge clk);
    re <= 1'b0;
    #1 expect_eq(rvalid && rdata == 0, "second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

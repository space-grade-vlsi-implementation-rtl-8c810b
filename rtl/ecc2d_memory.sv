// Codeword memory of the ECC-protected store: 2**ADDR_W words of 32 bits.
//
// Writes happen on the rising clock edge when we is high. A read with re
// high registers the addressed word into rdata, valid (rvalid high) in the
// following cycle; a read and a write of the same address in one cycle
// return the old word. A synchronous reset clears every word to the
// all-zero codeword (which is a valid codeword of the 2D code) and the read
// register. The default depth of 16 words follows the 4-bit address port of
// the published top-level block; the timing and reset behaviour are this
// design's own choice.
module ecc2d_memory
  import ecc2d_pkg::*;
#(
  parameter int unsigned ADDR_W = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              we,
  input  logic              re,
  input  logic [ADDR_W-1:0] addr,
  input  code_t             wdata,
  output code_t             rdata,
  output logic              rvalid
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  code_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned k = 0; k < DEPTH; k++) mem[k] <= '0;
    end else if (we) begin
      mem[addr] <= wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rdata  <= '0;
      rvalid <= 1'b0;
    end else begin
      rvalid <= re;
      if (re) rdata <= mem[addr];
    end
  end

  // Read timing rule: rvalid is exactly the read request of the previous
  // cycle, outside the cycle after a reset.
  a_rvalid_latency: assert property (
    @(posedge clk) disable iff (rst) !$past(rst) |-> (rvalid == $past(re))
  );

endmodule

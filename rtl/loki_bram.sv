// loki_bram: dual-port block RAM holding one polynomial (DEPTH coefficients
// of WIDTH bits). The accelerator uses four of them: two for the first
// polynomial and the result, two for the second polynomial; within each pair
// one RAM is read while the other is written, and the roles swap after every
// NTT/INTT stage.
//
// Each of the two ports reads or writes one word per cycle. Reads are
// synchronous: the word addressed while en=1 and we=0 appears on rdata in the
// next cycle and is held while the port is not enabled. Writing the same
// address from both ports in one cycle is not allowed (port 1 wins). The
// contents are not reset. The document gives the dual-port organisation and
// the count of four; the read timing and hold behaviour are this design's
// choice.
module loki_bram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 12,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk_i,
  input  logic             en0_i,
  input  logic             we0_i,
  input  logic [AW-1:0]    addr0_i,
  input  logic [WIDTH-1:0] wdata0_i,
  output logic [WIDTH-1:0] rdata0_o,
  input  logic             en1_i,
  input  logic             we1_i,
  input  logic [AW-1:0]    addr1_i,
  input  logic [WIDTH-1:0] wdata1_i,
  output logic [WIDTH-1:0] rdata1_o
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk_i) begin
    if (en0_i) begin
      if (we0_i) mem[addr0_i] <= wdata0_i;
      else       rdata0_o     <= mem[addr0_i];
    end
    if (en1_i) begin
      if (we1_i) mem[addr1_i] <= wdata1_i;
      else       rdata1_o     <= mem[addr1_i];
    end
  end

  // Rule of use: the two ports never write one address in the same cycle.
  always_ff @(posedge clk_i) begin
    assert (!(en0_i && we0_i && en1_i && we1_i && addr0_i == addr1_i))
      else $error("loki_bram: both ports write address %0d", addr0_i);
  end
endmodule

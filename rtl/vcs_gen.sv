// vcs_gen: vertical common subexpression (VCS) generator.
//
// Two coefficients that are vertically adjacent in the coefficient set
// (h(k), h(k+1)) or one apart (h(k), h(k+2)) often have nonzero CSD digits at
// the same bit position. Such a pair of digits multiplies x1[n-k] and
// x1[n-k-1] (or x1[n-k-2]) by the same power of two, so it can be replaced by
// one shifted copy of x1 + x1[-1] (or x1 - x1[-1], x1 + x1[-2], x1 - x1[-2]).
// This block forms those four subexpressions once per input sample, so that
// every tap that needs one reads a delayed copy instead of repeating the add.
//
// Interface: x_in is accepted when in_valid is high. ops[] is combinational
// and belongs to the sample currently on x_in (ops[OP_X1] = x_in); the two
// history registers x1[n-1], x1[n-2] advance on each accepted sample and reset
// to zero. Operands are sign extended to OW = DW + 1 bits, enough for the sum
// or difference of two DW-bit samples.
//
// The four VCS patterns follow the method; the 8-bit default input width is
// the wordlength the method assumes for x1. Reset style is this design's own.
module vcs_gen
  import cpm_pkg::*;
#(
  parameter int unsigned DW = 8,        // input sample width
  parameter int unsigned OW = DW + 1    // operand width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x_in,
  output logic signed [OW-1:0] ops [NOPS]
);

  logic signed [DW-1:0] x_d1, x_d2;  // x1[n-1], x1[n-2]

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_d1 <= '0;
      x_d2 <= '0;
    end else if (in_valid) begin
      x_d1 <= x_in;
      x_d2 <= x_d1;
    end
  end

  logic signed [OW-1:0] x0_e, x1_e, x2_e;
  assign x0_e = OW'(x_in);
  assign x1_e = OW'(x_d1);
  assign x2_e = OW'(x_d2);

  always_comb begin
    ops[OP_X1] = x0_e;
    ops[OP_P1] = x0_e + x1_e;
    ops[OP_M1] = x0_e - x1_e;
    ops[OP_P2] = x0_e + x2_e;
    ops[OP_M2] = x0_e - x2_e;
  end

endmodule

// pe: one processing engine of the PE array.
//
// Three operand channels A, B, C feed an adder (A+B), a subtractor (A-B) and a
// multiplier that multiplies the subtractor's output by C; an output
// selection picks the adder for ADD and the multiplier for MUL and SUB. The
// data distributor makes the single structure serve every operation: B is
// zero for a plain product A*C, C is the fixed-point one for a plain
// difference, and C is a coefficient for a scaled difference (A-B)*C, as the
// LMS error step needs. This structure is the published one; the number
// format (signed, FRAC fraction bits, products shifted back by FRAC and kept
// at AW bits) is this design's choice.
//
// Purely combinational: r follows a, b, c and op in the same cycle.
module pe
  import rfdsp_pkg::*;
#(
  parameter int DW   = 16,
  parameter int AW   = 32,
  parameter int FRAC = 8
) (
  input  opcode_e              op,
  input  logic signed [DW-1:0] a,
  input  logic signed [DW-1:0] b,
  input  logic signed [DW-1:0] c,
  output logic signed [AW-1:0] r
);
  logic signed [DW:0]       sum, diff;
  logic signed [2*DW+1:0]   prod;
  logic signed [2*DW+1:0]   prod_sh;

  always_comb begin
    sum     = (DW+1)'(a) + (DW+1)'(b);
    diff    = (DW+1)'(a) - (DW+1)'(b);
    prod    = (2*DW+2)'(diff) * (2*DW+2)'(c);
    prod_sh = prod >>> FRAC;
    if (op == OP_ADD) r = AW'(sum);
    else              r = AW'(prod_sh);
  end
endmodule

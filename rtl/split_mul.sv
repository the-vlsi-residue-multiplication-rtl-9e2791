// split_mul: 2H x 2H multiplier built from four H x H multipliers and two
// adders, for residue systems whose moduli are twice as wide as the
// multipliers at hand (default: a 32 x 32 multiplier from 16 x 16 parts).
//
// Each operand is split into a high and a low half, X = X1*2^H + X2 and
// Y = Y1*2^H + Y2. The four half products are formed in parallel. The two
// products that do not overlap, X1*Y1*2^2H and X2*Y2, are simply placed side
// by side in one 4H-bit word; the first adder adds X1*Y2*2^H to it and the
// second adder adds X2*Y1*2^H to that sum. Compared with one H x H multiplier
// the delay grows by two additions.
//
// Interface: x[2H], y[2H] in, p[4H] out. Purely combinational.
// The split into halves and the four parallel products follow the reference
// arrangement; which cross product each of the two adders takes is this
// implementation's choice.
module split_mul #(
  parameter int unsigned H = 16
) (
  input  logic [2*H-1:0] x,
  input  logic [2*H-1:0] y,
  output logic [4*H-1:0] p
);

  logic [H-1:0]   x1, x2, y1, y2;
  logic [2*H-1:0] x1y1, x2y2, x1y2, x2y1;
  logic [4*H-1:0] sum1;

  assign {x1, x2} = x;
  assign {y1, y2} = y;

  int_mul #(.WA(H), .WB(H)) u_mul_hh (.a(x1), .b(y1), .p(x1y1));
  int_mul #(.WA(H), .WB(H)) u_mul_ll (.a(x2), .b(y2), .p(x2y2));
  int_mul #(.WA(H), .WB(H)) u_mul_hl (.a(x1), .b(y2), .p(x1y2));
  int_mul #(.WA(H), .WB(H)) u_mul_lh (.a(x2), .b(y1), .p(x2y1));

  // First adder: {X1Y1, X2Y2} + X1Y2 * 2^H.
  always_comb sum1 = {x1y1, x2y2} + ((4*H)'(x1y2) << H);
  // Second adder: + X2Y1 * 2^H.
  always_comb p    = sum1 + ((4*H)'(x2y1) << H);

endmodule

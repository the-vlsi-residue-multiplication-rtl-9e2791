// int_mul: unsigned WA x WB -> WA+WB bit integer multiplier.
//
// This is the binary multiplier used three times in the modulo-m multiplier
// (MULTIPLIER1: residue digits, MULTIPLIER2: product times the reciprocal,
// MULTIPLIER3: quotient estimate times the modulus) and twice in each
// residue-digit converter. The design treats it as a standard part: any
// fast parallel multiplier will do, so it is written here as a single
// combinational product and left to synthesis to map onto an array or tree.
//
// Interface: a[WA], b[WB] in, p[WA+WB] out. Purely combinational, no clock.
module int_mul #(
  parameter int unsigned WA = 8,
  parameter int unsigned WB = 8
) (
  input  logic [WA-1:0]    a,
  input  logic [WB-1:0]    b,
  output logic [WA+WB-1:0] p
);

  always_comb p = (WA+WB)'(a) * (WA+WB)'(b);

endmodule

// residue_digit: binary-to-residue converter for one modulus,
// alpha = x mod MOD.
//
// The positional number x (WX bits, WX = ceil(log2 M) for the residue system
// it belongs to) is reduced with the same reciprocal trick as the modulo-m
// multiplier, without the first multiplier: ROM1 holds t = floor(2^WX/MOD),
// MUL1 forms x*t, the field above bit WX is the quotient estimate kbar,
// ROM2 holds MOD, MUL2 forms kbar*MOD, ADD1 subtracts it from x (on WM+1
// bits), ADD2 subtracts MOD once more and the multiplexer keeps whichever
// difference is in [0, MOD). The ROMs are constants fixed by the parameter.
//
// Timing: PIPE = 0 combinational; PIPE = 1 registers the output of MUL1 and
// MUL2, latency 2 cycles, one conversion per cycle. Also used with MOD = M
// as the final "modulo M+s to modulo M" stage of the reverse converter.
// The structure follows the reference converter; holding the ROM contents as
// elaboration-time constants is this implementation's choice.
module residue_digit #(
  parameter int unsigned   WX   = 40,
  parameter int unsigned   WM   = 8,
  parameter logic [WM-1:0] MOD  = WM'(255),
  parameter bit            PIPE = 1'b0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [WX-1:0] x,
  output logic          out_valid,
  output logic [WM-1:0] alpha,
  output logic          corr
);

  // ROM1 and ROM2.
  localparam logic [WX-1:0] ROM1_T = WX'(rns_pkg::recip(128'(MOD), WX));
  localparam logic [WM-1:0] ROM2_M = MOD;

  mod_reduce #(.WX(WX), .WM(WM), .PIPE(PIPE), .SPLIT(1'b0)) u_reduce (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .x        (x),
    .t        (ROM1_T),
    .m        (ROM2_M),
    .out_valid(out_valid),
    .r        (alpha),
    .corr     (corr)
  );

endmodule

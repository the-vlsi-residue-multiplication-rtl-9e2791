// bin2res: positional-to-residue (direct) converter.
//
// S residue_digit converters work in parallel on the same N-bit binary
// input x, each producing x mod MODULI[i] by reciprocal multiplication and
// one conditional subtraction. x must lie in [0, M), M the product of the
// moduli, for the digits to form a valid residue representation (the
// hardware reduces any N-bit x correctly digit by digit).
//
// Timing: PIPE = 0 combinational; PIPE = 1 latency 2 cycles, one conversion
// per cycle. One digit converter per modulus follows the reference design;
// the valid bit is this implementation's addition.
module bin2res #(
  parameter int unsigned          S      = rns_pkg::S,
  parameter int unsigned          B      = rns_pkg::B,
  parameter int unsigned          N      = rns_pkg::N_BITS,
  parameter logic [S-1:0][B-1:0]  MODULI = rns_pkg::MODULI,
  parameter bit                   PIPE   = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [N-1:0]          x,
  output logic                  out_valid,
  output logic [S-1:0][B-1:0]   alpha,
  output logic [S-1:0]          corr
);

  logic [S-1:0] lane_valid;

  for (genvar i = 0; i < S; i++) begin : g_digit
    residue_digit #(.WX(N), .WM(B), .MOD(MODULI[i]), .PIPE(PIPE)) u_digit (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .x        (x),
      .out_valid(lane_valid[i]),
      .alpha    (alpha[i]),
      .corr     (corr[i])
    );
  end

  assign out_valid = &lane_valid;

endmodule

// rns_mul: residue number system multiplier, S modulo-m_i multipliers side
// by side.
//
// Operands arrive as S residue digits each (digit i modulo MODULI[i]); lane
// i multiplies digit i of both operands modulo MODULI[i] with a modmul. The
// lanes never exchange carries, so the product digits are independent and
// the whole unit is as fast as one lane. With the default moduli
// {255, 254, 253, 251, 247} the unit multiplies integers up to about 10^12.
//
// Each lane's modulus/reciprocal registers can be reloaded through cfg_we[i],
// cfg_m[i], cfg_t[i] (t = floor(2^(2B)/m)); after reset they hold MODULI.
//
// Timing: as modmul. PIPE = 0 combinational; PIPE = 1 latency 3 cycles, one
// operand pair per cycle. out_valid is the AND of the lanes' valid outputs,
// which always agree. The lane structure follows the reference design; the
// per-lane register load port is this implementation's addition.
module rns_mul #(
  parameter int unsigned            S       = rns_pkg::S,
  parameter int unsigned            B       = rns_pkg::B,
  parameter logic [S-1:0][B-1:0]    MODULI  = rns_pkg::MODULI,
  parameter bit                     PIPE    = 1'b0,
  parameter bit                     SPLIT   = 1'b0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [S-1:0][B-1:0]       a,
  input  logic [S-1:0][B-1:0]       b,
  input  logic [S-1:0]              cfg_we,
  input  logic [S-1:0][B-1:0]       cfg_m,
  input  logic [S-1:0][2*B-1:0]     cfg_t,
  output logic                      out_valid,
  output logic [S-1:0][B-1:0]       y,
  output logic [S-1:0]              corr
);

  logic [S-1:0] lane_valid;

  for (genvar i = 0; i < S; i++) begin : g_lane
    modmul #(
      .WA(B), .WB(B), .WM(B), .MOD(MODULI[i]), .PIPE(PIPE), .SPLIT(SPLIT)
    ) u_modmul (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .a        (a[i]),
      .b        (b[i]),
      .cfg_we   (cfg_we[i]),
      .cfg_m    (cfg_m[i]),
      .cfg_t    (cfg_t[i]),
      .out_valid(lane_valid[i]),
      .y        (y[i]),
      .corr     (corr[i])
    );
  end

  assign out_valid = &lane_valid;

endmodule

// res2bin: residue-to-positional (reverse) converter by the Chinese
// remainder theorem, X = | sum_i P_i * alpha_i |_M.
//
// P_i = M_i * |M_i^-1|_{m_i}, with M_i = M/m_i, are constants fixed by the
// moduli (computed at elaboration by rns_pkg::crt_weight). The converter has
// three parts:
//   1. S modulo-M multipliers (modmul with MOD = M), lane i forming
//      |alpha_i * P_i|_M; the P_i act as the lanes' constant second operand,
//   2. an adder tree of ceil(log2 S) levels summing the S terms into
//      N + ceil(log2 S) bits (the sum is below S*M),
//   3. a final reduction modulo M of that sum (residue_digit with MOD = M),
//      the same structure as one digit of the direct converter, only wider.
//
// Interface: alpha[S] residue digits in, x (N bits, in [0, M)) out.
// Timing: PIPE = 0 combinational. PIPE = 1: every multiplier output and
// every adder-tree level is registered; latency 3 + ceil(log2 S) + 2 cycles
// (8 for five moduli), one conversion per cycle.
// The three-part structure follows the reference converter; the weights are
// the standard Chinese-remainder constants, derived here rather than listed,
// and the pipeline registers are this implementation's choice.
module res2bin #(
  parameter int unsigned          S      = rns_pkg::S,
  parameter int unsigned          B      = rns_pkg::B,
  parameter int unsigned          N      = rns_pkg::N_BITS,
  parameter logic [S-1:0][B-1:0]  MODULI = rns_pkg::MODULI,
  parameter bit                   PIPE   = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [S-1:0][B-1:0]   alpha,
  output logic                  out_valid,
  output logic [N-1:0]          x,
  output logic                  corr
);

  localparam int unsigned   LEVELS = (S > 1) ? $clog2(S) : 1;
  localparam int unsigned   WS     = N + LEVELS;
  localparam logic [N-1:0]  M      = N'(rns_pkg::modulus_product(1024'(MODULI), B, S));

  // 1. modulo-M multipliers with the constant CRT weights.
  logic [S-1:0][N-1:0] term;
  logic [S-1:0]        term_valid;
  logic [S-1:0]        term_corr;

  for (genvar i = 0; i < S; i++) begin : g_term
    localparam logic [N-1:0] P = N'(rns_pkg::crt_weight(1024'(MODULI), B, S, i));
    modmul #(
      .WA(B), .WB(N), .WM(N), .MOD(M), .PIPE(PIPE), .SPLIT(1'b0)
    ) u_modmul (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .a        (alpha[i]),
      .b        (P),
      .cfg_we   (1'b0),
      .cfg_m    (M),
      .cfg_t    ('0),
      .out_valid(term_valid[i]),
      .y        (term[i]),
      .corr     (term_corr[i])
    );
  end

  // 2. adder tree.
  logic [WS-1:0] sum;
  logic          sum_valid;
  adder_tree #(.NIN(S), .W(N), .PIPE(PIPE)) u_tree (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (&term_valid),
    .in       (term),
    .out_valid(sum_valid),
    .sum      (sum)
  );

  // 3. modulo (M*S) to modulo M reduction.
  residue_digit #(.WX(WS), .WM(N), .MOD(M), .PIPE(PIPE)) u_final (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (sum_valid),
    .x        (sum),
    .out_valid(out_valid),
    .alpha    (x),
    .corr     (corr)
  );

  // The per-term correction flags are not needed downstream.
  logic unused_term_corr;
  assign unused_term_corr = ^term_corr;

endmodule

// rns_int_multiplier: binary integer multiplier that computes in a residue
// number system: a positional-to-residue converter for each operand, S
// modulo-m_i multipliers, and a residue-to-positional converter in cascade.
//
// Data path (default: five 8-bit moduli {255,254,253,251,247}, M ~ 1.016e12,
// N = 40-bit binary side):
//   x, y --(sign mapping)--> bin2res (x2) --> rns_mul --> res2bin
//        --(sign mapping)--> prod
//
// Unsigned mode (signed_mode = 0): x, y and the product are unsigned; the
// result is (x*y) mod M, i.e. the exact product whenever x*y < M.
// Signed mode (signed_mode = 1): x and y are N-bit two's complement numbers.
// A negative value v enters the residue system as M - |v| (implicit sign);
// at the output a result R >= M/2 stands for R - M, returned as an N-bit
// two's complement number. The product is exact when it lies in
// [-M/2, M/2). signed_mode is sampled with the operands and travels down
// the pipeline with them.
//
// Timing: PIPE = 1 (default) registers every multiplier output and every
// adder-tree level: latency LATENCY = 2 + 3 + 8 = 13 cycles for five moduli,
// one product per cycle. PIPE = 0 is combinational (LATENCY = 0).
// SPLIT = 1 builds each lane's reciprocal multiplier from four half-width
// multipliers and two adders, the arrangement meant for 16-bit moduli.
// The cascade follows the reference design; the sign mapping logic, the
// valid bit and the register placement are this implementation's choices.
module rns_int_multiplier #(
  parameter int unsigned          S      = rns_pkg::S,
  parameter int unsigned          B      = rns_pkg::B,
  parameter int unsigned          N      = rns_pkg::N_BITS,
  parameter logic [S-1:0][B-1:0]  MODULI = rns_pkg::MODULI,
  parameter bit                   PIPE   = 1'b1,
  parameter bit                   SPLIT  = 1'b0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          signed_mode,
  input  logic [N-1:0]  x,
  input  logic [N-1:0]  y,
  output logic          out_valid,
  output logic [N-1:0]  prod
);

  localparam int unsigned  LEVELS  = (S > 1) ? $clog2(S) : 1;
  localparam int unsigned  LATENCY = PIPE ? (2 + 3 + 3 + LEVELS + 2) : 0;
  localparam logic [N-1:0] M       = N'(rns_pkg::modulus_product(1024'(MODULI), B, S));
  localparam logic [N-1:0] HALF_M  = M >> 1;

  // Implicit-sign mapping of the operands into [0, M).
  logic [N-1:0] xs, ys;
  always_comb begin
    xs = (signed_mode && x[N-1]) ? M + x : x;   // M - |x| modulo 2^N
    ys = (signed_mode && y[N-1]) ? M + y : y;
  end

  // Direct conversion of both operands.
  logic [S-1:0][B-1:0] xa, ya;
  logic [S-1:0]        xc, yc;
  logic                xa_valid, ya_valid;
  bin2res #(.S(S), .B(B), .N(N), .MODULI(MODULI), .PIPE(PIPE)) u_conv_x (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(xs),
    .out_valid(xa_valid), .alpha(xa), .corr(xc)
  );
  bin2res #(.S(S), .B(B), .N(N), .MODULI(MODULI), .PIPE(PIPE)) u_conv_y (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(ys),
    .out_valid(ya_valid), .alpha(ya), .corr(yc)
  );

  // Digit-wise modular multiplication. The modulus registers keep their
  // reset values: the converters are built for MODULI.
  logic [S-1:0][B-1:0] pa;
  logic [S-1:0]        pc;
  logic                pa_valid;
  rns_mul #(.S(S), .B(B), .MODULI(MODULI), .PIPE(PIPE), .SPLIT(SPLIT)) u_mul (
    .clk(clk), .rst_n(rst_n), .in_valid(xa_valid & ya_valid),
    .a(xa), .b(ya),
    .cfg_we('0), .cfg_m('0), .cfg_t('0),
    .out_valid(pa_valid), .y(pa), .corr(pc)
  );

  // Reverse conversion.
  logic [N-1:0] r;
  logic         r_corr;
  res2bin #(.S(S), .B(B), .N(N), .MODULI(MODULI), .PIPE(PIPE)) u_rconv (
    .clk(clk), .rst_n(rst_n), .in_valid(pa_valid), .alpha(pa),
    .out_valid(out_valid), .x(r), .corr(r_corr)
  );

  // signed_mode delayed by the pipeline latency.
  logic sgn_out;
  if (LATENCY == 0) begin : g_no_delay
    assign sgn_out = signed_mode;
  end else begin : g_delay
    logic [LATENCY-1:0] sgn_pipe;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) sgn_pipe <= '0;
      else        sgn_pipe <= {sgn_pipe[LATENCY-2:0], signed_mode};
    end
    assign sgn_out = sgn_pipe[LATENCY-1];
  end

  // Implicit-sign decoding of the result.
  always_comb prod = (sgn_out && r >= HALF_M) ? r - M : r;

  // Correction flags are observation points only.
  logic unused_corr;
  assign unused_corr = ^{xc, yc, pc, r_corr};

endmodule

// modmul: modulo-m multiplier, y = (a * b) mod m, for any modulus m.
//
// The residue digits a and b are multiplied by MULTIPLIER1 into p (WA+WB
// bits). p is then reduced modulo m without a division: it is multiplied by
// t = floor(2^WP / m) held in REGISTER T (MULTIPLIER2), the bits of the
// product from position WP upward give a quotient estimate kbar that is
// exact or one too low, kbar*m is formed by MULTIPLIER3 and subtracted from
// p by ADDER1, and ADDER2 with the MULTIPLEXER subtract m once more when the
// difference is still >= m. Only the WM+1 low bits of p and of kbar*m take
// part in the subtraction. The reduction half is the block mod_reduce.
//
// With the default 8-bit digits this is the reference arrangement: an 8x8
// MULTIPLIER1, a 16x16 MULTIPLIER2 and an 8x8 (9x8 here, as the estimate
// field is b+1 bits wide) MULTIPLIER3. SPLIT = 1 builds MULTIPLIER2 from four
// half-size multipliers and two adders, the arrangement proposed for moduli
// twice as wide.
//
// REGISTER M and REGISTER T reset to MOD and floor(2^WP/MOD) and can be
// reloaded through cfg_we/cfg_m/cfg_t, so the same hardware serves any
// modulus; the caller supplies t = floor(2^(WA+WB)/m) with the new m. The
// load port and its reset values are this implementation's choices.
//
// Timing: PIPE = 0 is fully combinational (y follows a, b in the same cycle).
// PIPE = 1 places a register at the output of each of the three multipliers:
// latency 3 clock cycles, a new operand pair every cycle. out_valid follows
// in_valid with the same latency. Reloading the registers while operands are
// in flight affects only operands that enter after the load.
module modmul #(
  parameter int unsigned     WA    = 8,
  parameter int unsigned     WB    = 8,
  parameter int unsigned     WM    = 8,
  parameter logic [WM-1:0]   MOD   = WM'(255),
  parameter bit              PIPE  = 1'b0,
  parameter bit              SPLIT = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WA-1:0]    a,
  input  logic [WB-1:0]    b,
  input  logic             cfg_we,
  input  logic [WM-1:0]    cfg_m,
  input  logic [WA+WB-1:0] cfg_t,
  output logic             out_valid,
  output logic [WM-1:0]    y,
  output logic             corr
);

  localparam int unsigned     WP    = WA + WB;
  localparam logic [WP-1:0]   T_RST = WP'(rns_pkg::recip(128'(MOD), WP));

  // REGISTER M and REGISTER T.
  logic [WM-1:0] m_reg;
  logic [WP-1:0] t_reg;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_reg <= MOD;
      t_reg <= T_RST;
    end else if (cfg_we) begin
      m_reg <= cfg_m;
      t_reg <= cfg_t;
    end
  end

  // MULTIPLIER1.
  logic [WP-1:0] p;
  int_mul #(.WA(WA), .WB(WB)) u_mul1 (.a(a), .b(b), .p(p));

  // Buffer register at the output of MULTIPLIER1 (PIPE only). The modulus
  // and reciprocal travel with the operand.
  logic [WP-1:0] p_q, t_q;
  logic [WM-1:0] m_q;
  logic          v_q;
  if (PIPE) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v_q <= 1'b0;
        p_q <= '0;
        t_q <= '0;
        m_q <= '0;
      end else begin
        v_q <= in_valid;
        p_q <= p;
        t_q <= t_reg;
        m_q <= m_reg;
      end
    end
  end else begin : g_wire
    assign v_q = in_valid;
    assign p_q = p;
    assign t_q = t_reg;
    assign m_q = m_reg;
  end

  // MULTIPLIER2, MULTIPLIER3, ADDER1, ADDER2, MULTIPLEXER.
  mod_reduce #(.WX(WP), .WM(WM), .PIPE(PIPE), .SPLIT(SPLIT)) u_reduce (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v_q),
    .x        (p_q),
    .t        (t_q),
    .m        (m_q),
    .out_valid(out_valid),
    .r        (y),
    .corr     (corr)
  );

endmodule

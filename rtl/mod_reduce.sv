// mod_reduce: r = x mod m by multiplication with a truncated reciprocal.
//
// This is the lower half of the modulo-m multiplier and, on its own, the
// structure that turns a binary number into one residue digit. The quotient
// k = floor(x/m) is replaced by the estimate kbar = floor(x * t / 2^WX), where
// t = floor(2^WX / m) is 1/m truncated to WX fractional bits. Because
// x < 2^WX the estimate is either k or k-1, so D = x - kbar*m lies in [0, 2m):
//
//   MUL_A (x * t)      product R; bits [WX +: WM+1] are kbar mod 2^(WM+1)
//   MUL_B (kbar * m)   correction term C, only its WM+1 low bits are kept
//   ADDER1             D = x - C, worked out on WM+1 bits only (D < 2m)
//   ADDER2             D - m; its sign bit says whether D is already < m
//   MULTIPLEXER        r = D when D - m is negative, else D - m
//
// `corr` is high when the second subtraction was needed (quotient estimate
// one too low). The remaining bits of R and C are not needed and are left
// unread on purpose.
//
// Parameters: WX input width (and the number of fractional bits of t), WM
// modulus width, PIPE adds a register at the output of each multiplier
// (latency 2 cycles, one result per cycle; the x and m bits that bypass a
// multiplier are delayed to stay aligned). With PIPE = 0 the block is
// combinational and clk/rst_n are unused. SPLIT builds MUL_A from four
// half-width multipliers and two adders (split_mul), for wide inputs.
//
// Interface: in_valid/x/t/m in, out_valid/r/corr out. t and m are supplied
// by the instantiating block (register or ROM). Requires 2 <= m <= 2^WM,
// t = floor(2^WX/m) and WX >= WM+1. The structure and the bit fields follow
// the reference design; the valid bit, the register placement for PIPE and
// the assertion on the range of D are this implementation's choices.
module mod_reduce #(
  parameter int unsigned WX    = 16,
  parameter int unsigned WM    = 8,
  parameter bit          PIPE  = 1'b0,
  parameter bit          SPLIT = 1'b0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [WX-1:0] x,
  input  logic [WX-1:0] t,
  input  logic [WM-1:0] m,
  output logic          out_valid,
  output logic [WM-1:0] r,
  output logic          corr
);

  if (WX < WM + 1) begin : g_bad_width
    $error("mod_reduce: WX must be at least WM+1");
  end

  // ---------------- MUL_A: x * t ----------------
  logic [2*WX-1:0] prod_r;
  if (SPLIT && (WX % 2 == 0)) begin : g_split
    split_mul #(.H(WX/2)) u_mul_a (.x(x), .y(t), .p(prod_r));
  end else begin : g_plain
    int_mul #(.WA(WX), .WB(WX)) u_mul_a (.a(x), .b(t), .p(prod_r));
  end

  logic [WM:0] kbar_a, x_lo_a;
  assign kbar_a = prod_r[WX +: WM+1];
  assign x_lo_a = x[WM:0];

  // Stage register after MUL_A.
  logic [WM:0]   kbar_b, x_lo_b;
  logic [WM-1:0] m_b;
  logic          v_b;
  if (PIPE) begin : g_reg1
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v_b    <= 1'b0;
        kbar_b <= '0;
        x_lo_b <= '0;
        m_b    <= '0;
      end else begin
        v_b    <= in_valid;
        kbar_b <= kbar_a;
        x_lo_b <= x_lo_a;
        m_b    <= m;
      end
    end
  end else begin : g_wire1
    assign v_b    = in_valid;
    assign kbar_b = kbar_a;
    assign x_lo_b = x_lo_a;
    assign m_b    = m;
  end

  // ---------------- MUL_B: kbar * m ----------------
  logic [2*WM:0] c_full;
  int_mul #(.WA(WM+1), .WB(WM)) u_mul_b (.a(kbar_b), .b(m_b), .p(c_full));

  // Stage register after MUL_B.
  logic [WM:0]   c_c, x_lo_c;
  logic [WM-1:0] m_c;
  logic          v_c;
  if (PIPE) begin : g_reg2
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v_c    <= 1'b0;
        c_c    <= '0;
        x_lo_c <= '0;
        m_c    <= '0;
      end else begin
        v_c    <= v_b;
        c_c    <= c_full[WM:0];
        x_lo_c <= x_lo_b;
        m_c    <= m_b;
      end
    end
  end else begin : g_wire2
    assign v_c    = v_b;
    assign c_c    = c_full[WM:0];
    assign x_lo_c = x_lo_b;
    assign m_c    = m_b;
  end

  // ---------------- ADDER1, ADDER2, MULTIPLEXER ----------------
  logic [WM:0]   d;      // x - kbar*m, in [0, 2m)
  logic [WM+1:0] e;      // d - m with sign bit e[WM+1]
  always_comb begin
    d = x_lo_c - c_c;
    e = {1'b0, d} - {2'b00, m_c};
  end

  // The estimate is never more than one short, so D < 2m. A violation means
  // t does not match m (for example a wrong reciprocal loaded into REGISTER
  // T of a modmul).
  always_comb begin
    if (rst_n && v_c) begin
      assert (d < {m_c, 1'b0})
        else $error("mod_reduce: D = %0d not below 2m = %0d; t does not match m", d, 2 * m_c);
    end
  end

  assign corr      = ~e[WM+1];
  assign r         = e[WM+1] ? d[WM-1:0] : e[WM-1:0];
  assign out_valid = v_c;

endmodule

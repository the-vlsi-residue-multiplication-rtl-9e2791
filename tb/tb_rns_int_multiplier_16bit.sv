// tb_rns_int_multiplier_16bit: the whole integer multiplier with the digit
// width doubled to 16 bits: moduli {65534, 65521, 65519, 65497, 65479}
// (pairwise coprime, M = 1 206 529 376 670 469 666 616 158, just under
// 2^80), an 80-bit binary side, the reciprocal multipliers built from four
// 16x16 multipliers each (SPLIT) and the default pipeline. Unsigned and
// signed products are streamed one per cycle and checked with 128-bit
// arithmetic in the testbench; each must arrive exactly 13 cycles after its
// operands.
module tb_rns_int_multiplier_16bit;
  int checks = 0, failures = 0;

  localparam logic [127:0] M = 128'd1206529376670469666616158;
  localparam int LATENCY = 13;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid, signed_mode, out_valid;
  logic [79:0] x, y, prod;

  rns_int_multiplier #(
    .B(16), .N(80),
    .MODULI({16'd65479, 16'd65497, 16'd65519, 16'd65521, 16'd65534}),
    .SPLIT(1'b1)
  ) u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .signed_mode(signed_mode),
    .x(x), .y(y), .out_valid(out_valid), .prod(prod));

  initial begin : watchdog
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int due; logic [79:0] p; } exp_t;
  exp_t q[$];
  int cycle = 0;
  always @(negedge clk) if (rst_n) begin
    cycle++;
    if (out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        e = q.pop_front();
        if (e.due != cycle || e.p !== prod) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d (due %0d): got %h expected %h",
                                      cycle, e.due, prod, e.p);
        end
      end
    end else if (q.size() != 0 && q[0].due <= cycle) begin
      checks++; failures++; $display("FAIL missing output"); void'(q.pop_front());
    end
  end

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    int n_neg;
    n_neg = 0;
    in_valid = 1'b0; signed_mode = 1'b0; x = '0; y = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      exp_t e;
      @(negedge clk); #1;
      in_valid = ($urandom % 5) != 0;
      signed_mode = n[0];
      if (!signed_mode) begin
        logic [127:0] xv, yv;
        xv = rnd128() % M;
        yv = (xv == 0) ? 128'd3 : rnd128() % ((M - 1) / xv + 1);
        if (n == 0) begin xv = M - 1; yv = 1; end
        x = 80'(xv); y = 80'(yv);
        e.p = 80'(xv * yv);
      end else begin
        logic signed [127:0] xs, ys;
        logic [31:0]         sgn;
        xs = signed'(128'(rnd128() % (128'd1 << 40)));
        ys = signed'(128'(rnd128() % (128'd1 << 38)));
        sgn = $urandom;
        if (sgn[31]) xs = -xs;
        if (sgn[30]) ys = -ys;
        x = 80'(xs); y = 80'(ys);
        e.p = 80'(xs * ys);
        if (in_valid && (xs[127] != ys[127]) && xs != 0 && ys != 0) n_neg++;
      end
      e.due = cycle + LATENCY;
      if (in_valid) q.push_back(e);
    end
    @(negedge clk); #1; in_valid = 1'b0;
    repeat (LATENCY + 2) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_neg == 0) begin
      failures++; $display("FAIL leftover %0d, negative results %0d", q.size(), n_neg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rns_int_multiplier: end-to-end test of the RNS integer multiplier at
// its default size (five 8-bit moduli, 40-bit binary side, pipelined).
//
// Operand pairs stream in one per cycle (with random idle cycles) in both
// modes: unsigned with x*y < M, and signed (two's complement) with the
// product inside [-M/2, M/2). Every product must come out exactly 13 cycles
// after its operands. The testbench also counts how often each mechanism of
// the design was exercised and fails if one never was:
//   - quotient-estimate correction (second subtraction) in the direct
//     converters, in the modulo-m multipliers and in the final modulo-M
//     reduction of the reverse converter,
//   - signed results below zero (implicit-sign decoding),
//   - back-to-back operands on consecutive cycles.
module tb_rns_int_multiplier;
  int checks = 0, failures = 0;

  localparam longint unsigned M       = 64'd1015933059570;
  localparam int              LATENCY = 13;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid, signed_mode, out_valid;
  logic [39:0] x, y, prod;

  rns_int_multiplier u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .signed_mode(signed_mode),
    .x(x), .y(y), .out_valid(out_valid), .prod(prod));

  task automatic expect_eq(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int n_corr_direct = 0, n_corr_mul = 0, n_corr_final = 0;
  int n_negative = 0, n_back_to_back = 0, n_unsigned = 0, n_signed = 0;

  typedef struct { int due; logic [39:0] p; } exp_t;
  exp_t q[$];
  int cycle = 0;
  always @(negedge clk) if (rst_n) begin
    cycle++;
    if (u_dut.xa_valid && (|u_dut.xc || |u_dut.yc)) n_corr_direct++;
    if (u_dut.pa_valid && |u_dut.pc)                 n_corr_mul++;
    if (u_dut.out_valid && u_dut.r_corr)             n_corr_final++;
    if (out_valid) begin
      exp_t e;
      if (q.size() == 0) begin checks++; failures++; $display("FAIL unexpected output"); end
      else begin
        e = q.pop_front();
        expect_eq("latency", longint'(cycle), longint'(e.due));
        expect_eq("product", prod, e.p);
      end
    end else if (q.size() != 0 && q[0].due <= cycle) begin
      checks++; failures++; $display("FAIL missing output due %0d", q[0].due); void'(q.pop_front());
    end
  end

  // Random signed value with |v| < 2^bits.
  function automatic longint signed rnd_signed(input int bits);
    longint signed v;
    v = longint'($urandom % (1 << bits));
    return ($urandom % 2) ? -v : v;
  endfunction

  initial begin
    bit prev_valid;
    in_valid = 1'b0; signed_mode = 1'b0; x = '0; y = '0;
    prev_valid = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      exp_t e;
      @(negedge clk); #1;
      in_valid = ($urandom % 6) != 0;
      signed_mode = n[0];
      if (!signed_mode) begin
        longint unsigned xv, yv;
        case (n % 10)
          0: begin xv = M - 1; yv = 1; end
          2: begin xv = longint'($urandom % 1000000); yv = longint'($urandom % 1000000); end
          default: begin
            xv = {$urandom, $urandom} & 64'hFF_FFFF_FFFF;
            xv = xv % M;
            yv = (xv == 0) ? 64'd5 : longint'($urandom) % ((M - 1) / xv + 1);
          end
        endcase
        x = 40'(xv); y = 40'(yv);
        e.p = 40'(xv * yv);
      end else begin
        longint signed xs, ys;
        xs = rnd_signed(20); ys = rnd_signed(18);
        if (n % 10 == 1) begin xs = -longint'(M / 2); ys = 1; end
        x = 40'(xs); y = 40'(ys);
        e.p = 40'(xs * ys);
        if (in_valid && xs * ys < 0) n_negative++;
      end
      e.due = cycle + LATENCY;
      if (in_valid) begin
        q.push_back(e);
        if (signed_mode) n_signed++; else n_unsigned++;
        if (prev_valid) n_back_to_back++;
      end
      prev_valid = in_valid;
    end
    @(negedge clk); #1; in_valid = 1'b0;
    repeat (LATENCY + 2) @(negedge clk);
    expect_eq("pipeline drained", q.size(), 0);

    $display("direct-converter corrections %0d, multiplier corrections %0d, final corrections %0d",
             n_corr_direct, n_corr_mul, n_corr_final);
    $display("unsigned %0d, signed %0d, negative results %0d, back-to-back %0d",
             n_unsigned, n_signed, n_negative, n_back_to_back);
    checks++; if (n_corr_direct  == 0) begin failures++; $display("FAIL no direct correction"); end
    checks++; if (n_corr_mul     == 0) begin failures++; $display("FAIL no multiplier correction"); end
    checks++; if (n_corr_final   == 0) begin failures++; $display("FAIL no final correction"); end
    checks++; if (n_negative     == 0) begin failures++; $display("FAIL no negative result"); end
    checks++; if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back operands"); end
    checks++; if (n_unsigned     == 0) begin failures++; $display("FAIL no unsigned operation"); end
    checks++; if (n_signed       == 0) begin failures++; $display("FAIL no signed operation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

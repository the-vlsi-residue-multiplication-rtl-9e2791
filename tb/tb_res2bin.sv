// tb_res2bin: checks the residue-to-positional converter.
//  - default instance (five moduli, combinational): random X in [0, M) and
//    the range ends; the residues are formed here with %, the output must
//    be X again;
//  - pipelined instance: one conversion per cycle, each result exactly
//    8 cycles (3 multiplier + 3 adder-tree + 2 reduction registers) later.
module tb_res2bin;
  int checks = 0, failures = 0;

  localparam longint unsigned M = 64'd1015933059570;
  localparam int unsigned MODS [5] = '{255, 254, 253, 251, 247};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [4:0][7:0] alpha, palpha;
  logic [39:0]     x, px;
  logic            v, c, pin_v, pout_v, pc;

  res2bin u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .alpha(alpha),
    .out_valid(v), .x(x), .corr(c));
  res2bin #(.PIPE(1'b1)) u_pipe (
    .clk(clk), .rst_n(rst_n), .in_valid(pin_v), .alpha(palpha),
    .out_valid(pout_v), .x(px), .corr(pc));

  task automatic expect_eq(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint unsigned rnd_x();
    return ({$urandom, $urandom} & 64'hFF_FFFF_FFFF) % M;
  endfunction

  initial begin : watchdog
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int due; longint unsigned x; } exp_t;
  exp_t q[$];
  int cycle = 0;
  always @(negedge clk) if (rst_n) begin
    cycle++;
    if (pout_v) begin
      exp_t e;
      if (q.size() == 0) begin checks++; failures++; $display("FAIL unexpected output"); end
      else begin
        e = q.pop_front();
        expect_eq("pipelined due cycle", longint'(cycle), longint'(e.due));
        expect_eq("pipelined value", longint'(px), e.x);
      end
    end else if (q.size() != 0 && q[0].due <= cycle) begin
      checks++; failures++; $display("FAIL missing output"); void'(q.pop_front());
    end
  end

  initial begin
    int corr_seen;
    alpha = '0; palpha = '0; pin_v = 1'b0; corr_seen = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      longint unsigned xv;
      xv = rnd_x();
      if (n == 0) xv = M - 1;
      if (n == 1) xv = 0;
      if (n == 2) xv = 1;
      for (int i = 0; i < 5; i++) alpha[i] = 8'(xv % MODS[i]);
      #1;
      expect_eq("reverse conversion", x, xv);
      corr_seen += int'(c);
    end
    for (int n = 0; n < 2000; n++) begin
      exp_t e;
      @(negedge clk); #1;
      e.x = rnd_x();
      for (int i = 0; i < 5; i++) palpha[i] = 8'(e.x % MODS[i]);
      pin_v = ($urandom % 4) != 0;
      e.due = cycle + 8;
      if (pin_v) q.push_back(e);
    end
    @(negedge clk); #1; pin_v = 1'b0;
    repeat (10) @(negedge clk);
    expect_eq("pipeline drained", q.size(), 0);
    checks++;
    if (corr_seen == 0) begin failures++; $display("FAIL final reduction never corrected"); end
    $display("final-reduction corrections: %0d", corr_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_residue_digit: checks the one-digit binary-to-residue converter.
//  - default instance (40-bit input, MOD 255, combinational): random and
//    boundary inputs against x % 255;
//  - pipelined instance (MOD 247): results exactly 2 cycles after the input.
module tb_residue_digit;
  int checks = 0, failures = 0;
  int corr_seen = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [39:0] x, px;
  logic [7:0]  alpha, palpha;
  logic        v, c, pin_v, pout_v, pc;

  residue_digit u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .x(x),
    .out_valid(v), .alpha(alpha), .corr(c));
  residue_digit #(.MOD(8'd247), .PIPE(1'b1)) u_pipe (
    .clk(clk), .rst_n(rst_n), .in_valid(pin_v), .x(px),
    .out_valid(pout_v), .alpha(palpha), .corr(pc));

  task automatic expect_eq(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int due; logic [7:0] a; } exp_t;
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
        expect_eq("pipelined digit", longint'(palpha), longint'(e.a));
      end
    end else if (q.size() != 0 && q[0].due <= cycle) begin
      checks++; failures++; $display("FAIL missing output"); void'(q.pop_front());
    end
  end

  initial begin
    x = '0; px = '0; pin_v = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      longint unsigned xv;
      xv = {$urandom, $urandom} & 64'hFF_FFFF_FFFF;
      if (n == 0) xv = 64'hFF_FFFF_FFFF;
      if (n == 1) xv = 0;
      if (n == 2) xv = 254;
      if (n == 3) xv = 255;
      x = 40'(xv);
      #1;
      expect_eq("digit mod 255", alpha, xv % 255);
      corr_seen += int'(c);
    end
    for (int n = 0; n < 2000; n++) begin
      exp_t e;
      longint unsigned xv;
      @(negedge clk); #1;
      xv = {$urandom, $urandom} & 64'hFF_FFFF_FFFF;
      pin_v = ($urandom % 4) != 0;
      px = 40'(xv);
      e.due = cycle + 2; e.a = 8'(xv % 247);
      if (pin_v) q.push_back(e);
    end
    @(negedge clk); #1; pin_v = 1'b0;
    repeat (4) @(negedge clk);
    expect_eq("pipeline drained", q.size(), 0);
    checks++;
    if (corr_seen == 0) begin failures++; $display("FAIL no correction seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

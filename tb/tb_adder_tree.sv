// tb_adder_tree: checks the five-input, three-level adder tree (40-bit
// words) in both forms: combinational, and pipelined with the sum exactly
// 3 cycles after its inputs, one set of inputs per cycle.
module tb_adder_tree;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [4:0][39:0] in, pin;
  logic [42:0]      sum, psum;
  logic             v, pin_v, pout_v;

  adder_tree u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .in(in), .out_valid(v), .sum(sum));
  adder_tree #(.PIPE(1'b1)) u_pipe (
    .clk(clk), .rst_n(rst_n), .in_valid(pin_v), .in(pin), .out_valid(pout_v), .sum(psum));

  task automatic expect_eq(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int due; longint unsigned s; } exp_t;
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
        expect_eq("pipelined sum", longint'(psum), e.s);
      end
    end else if (q.size() != 0 && q[0].due <= cycle) begin
      checks++; failures++; $display("FAIL missing output"); void'(q.pop_front());
    end
  end

  function automatic longint unsigned rnd40();
    return {$urandom, $urandom} & 64'hFF_FFFF_FFFF;
  endfunction

  initial begin
    in = '0; pin = '0; pin_v = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      longint unsigned s;
      s = 0;
      for (int i = 0; i < 5; i++) begin
        longint unsigned w;
        w = (n == 0) ? 64'hFF_FFFF_FFFF : rnd40();
        in[i] = 40'(w); s += w;
      end
      #1;
      expect_eq("sum", sum, s);
    end
    for (int n = 0; n < 2000; n++) begin
      exp_t e;
      @(negedge clk); #1;
      e.s = 0;
      for (int i = 0; i < 5; i++) begin
        longint unsigned w;
        w = rnd40(); pin[i] = 40'(w); e.s += w;
      end
      pin_v = ($urandom % 4) != 0;
      e.due = cycle + 3;
      if (pin_v) q.push_back(e);
    end
    @(negedge clk); #1; pin_v = 1'b0;
    repeat (5) @(negedge clk);
    expect_eq("pipeline drained", q.size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

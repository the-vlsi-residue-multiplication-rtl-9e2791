// tb_rns_mul_16bit: the residue multiplier with the digit width doubled to
// 16 bits, each lane's reciprocal multiplier built from four 16x16
// multipliers and two adders (SPLIT). Moduli: the five primes 65521, 65519,
// 65497, 65479, 65449. Random digit pairs, combinational and pipelined
// (result 3 cycles after the operands).
module tb_rns_mul_16bit;
  int checks = 0, failures = 0;

  localparam int unsigned MODS [5] = '{65521, 65519, 65497, 65479, 65449};
  localparam logic [4:0][15:0] MODULI = {16'd65449, 16'd65479, 16'd65497, 16'd65519, 16'd65521};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [4:0][15:0] a, b, y, pa, pb, py;
  logic [4:0]       c, pc;
  logic             v, pin_v, pout_v;

  rns_mul #(.B(16), .MODULI(MODULI), .SPLIT(1'b1)) u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .a(a), .b(b),
    .cfg_we('0), .cfg_m('0), .cfg_t('0), .out_valid(v), .y(y), .corr(c));
  rns_mul #(.B(16), .MODULI(MODULI), .SPLIT(1'b1), .PIPE(1'b1)) u_pipe (
    .clk(clk), .rst_n(rst_n), .in_valid(pin_v), .a(pa), .b(pb),
    .cfg_we('0), .cfg_m('0), .cfg_t('0), .out_valid(pout_v), .y(py), .corr(pc));

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

  typedef struct { int due; logic [4:0][15:0] y; } exp_t;
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
        for (int i = 0; i < 5; i++) expect_eq("pipelined digit", py[i], e.y[i]);
      end
    end else if (q.size() != 0 && q[0].due <= cycle) begin
      checks++; failures++; $display("FAIL missing output"); void'(q.pop_front());
    end
  end

  initial begin
    a = '0; b = '0; pa = '0; pb = '0; pin_v = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      longint unsigned da [5], db [5];
      for (int i = 0; i < 5; i++) begin
        da[i] = (n == 0) ? MODS[i] - 1 : $urandom % MODS[i];
        db[i] = (n == 0) ? MODS[i] - 1 : $urandom % MODS[i];
        a[i] = 16'(da[i]); b[i] = 16'(db[i]);
      end
      #1;
      for (int i = 0; i < 5; i++) expect_eq("product digit", y[i], (da[i] * db[i]) % MODS[i]);
    end
    for (int n = 0; n < 2000; n++) begin
      exp_t e;
      @(negedge clk); #1;
      for (int i = 0; i < 5; i++) begin
        longint unsigned da, db;
        da = $urandom % MODS[i]; db = $urandom % MODS[i];
        pa[i] = 16'(da); pb[i] = 16'(db); e.y[i] = 16'((da * db) % MODS[i]);
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

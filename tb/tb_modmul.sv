// tb_modmul: checks the modulo-m multiplier against (a*b) % m computed in
// the testbench.
//  - the worked example of a residue system with moduli 7, 11, 13 (3-, 4-
//    and 4-bit digits): 37 = <2,4,11>, 12 = <5,1,12>, product 444 = <3,4,2>,
//    where only the modulus-13 lane needs the final subtraction;
//  - the default combinational 8-bit multiplier (MOD = 255): all digit
//    pairs, then random pairs after reloading REGISTER M / REGISTER T with
//    other moduli through the cfg port;
//  - a pipelined 8-bit instance: one operand pair per cycle, each result
//    exactly 3 cycles later;
//  - a 16-bit instance whose second multiplier is built from four 16x16
//    multipliers (SPLIT), modulus 65521.
module tb_modmul;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

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

  // ---- worked example: moduli 7, 11, 13 ----
  logic [2:0] ex_a1, ex_b1, ex_y1;
  logic [3:0] ex_a2, ex_b2, ex_y2, ex_a3, ex_b3, ex_y3;
  logic       ex_c1, ex_c2, ex_c3, ex_v1, ex_v2, ex_v3;
  modmul #(.WA(3), .WB(3), .WM(3), .MOD(3'd7)) u_ex7 (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .a(ex_a1), .b(ex_b1),
    .cfg_we(1'b0), .cfg_m('0), .cfg_t('0), .out_valid(ex_v1), .y(ex_y1), .corr(ex_c1));
  modmul #(.WA(4), .WB(4), .WM(4), .MOD(4'd11)) u_ex11 (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .a(ex_a2), .b(ex_b2),
    .cfg_we(1'b0), .cfg_m('0), .cfg_t('0), .out_valid(ex_v2), .y(ex_y2), .corr(ex_c2));
  modmul #(.WA(4), .WB(4), .WM(4), .MOD(4'd13)) u_ex13 (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .a(ex_a3), .b(ex_b3),
    .cfg_we(1'b0), .cfg_m('0), .cfg_t('0), .out_valid(ex_v3), .y(ex_y3), .corr(ex_c3));

  // ---- default instance: 8-bit, MOD 255, combinational ----
  logic [7:0]  a, b, y, cfg_m;
  logic [15:0] cfg_t;
  logic        cfg_we, v, c;
  modmul u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .a(a), .b(b),
    .cfg_we(cfg_we), .cfg_m(cfg_m), .cfg_t(cfg_t), .out_valid(v), .y(y), .corr(c));

  // ---- pipelined instance ----
  logic [7:0] pa, pb, py;
  logic       pin_v, pout_v, pc;
  modmul #(.MOD(8'd247), .PIPE(1'b1)) u_pipe (
    .clk(clk), .rst_n(rst_n), .in_valid(pin_v), .a(pa), .b(pb),
    .cfg_we(1'b0), .cfg_m('0), .cfg_t('0), .out_valid(pout_v), .y(py), .corr(pc));

  // ---- 16-bit instance with a split MULTIPLIER2 ----
  logic [15:0] sa, sb, sy;
  logic        sv, sc;
  modmul #(.WA(16), .WB(16), .WM(16), .MOD(16'd65521), .SPLIT(1'b1)) u_split (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .a(sa), .b(sb),
    .cfg_we(1'b0), .cfg_m('0), .cfg_t('0), .out_valid(sv), .y(sy), .corr(sc));

  // Pipeline scoreboard.
  typedef struct { int due; logic [7:0] y; } exp_t;
  exp_t q[$];
  int cycle = 0;
  bit run_pipe = 1'b0;
  always @(negedge clk) if (rst_n) begin
    cycle++;
    if (pout_v) begin
      exp_t e;
      if (q.size() == 0) begin
        checks++; failures++; $display("FAIL pipelined: unexpected output");
      end else begin
        e = q.pop_front();
        expect_eq("pipelined due cycle", longint'(cycle), longint'(e.due));
        expect_eq("pipelined product", longint'(py), longint'(e.y));
      end
    end else if (q.size() != 0 && q[0].due <= cycle) begin
      checks++; failures++;
      $display("FAIL pipelined: missing output due %0d", q[0].due);
      void'(q.pop_front());
    end
  end

  initial begin
    int unsigned mods [6] = '{254, 253, 251, 200, 3, 2};
    int corr_count;
    cfg_we = 1'b0; cfg_m = '0; cfg_t = '0; a = '0; b = '0;
    pin_v = 1'b0; pa = '0; pb = '0; sa = '0; sb = '0;
    {ex_a1, ex_b1, ex_a2, ex_b2, ex_a3, ex_b3} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // Worked example.
    ex_a1 = 3'd2; ex_a2 = 4'd4; ex_a3 = 4'd11;
    ex_b1 = 3'd5; ex_b2 = 4'd1; ex_b3 = 4'd12;
    #1;
    expect_eq("example pi_1", ex_y1, 3);
    expect_eq("example pi_2", ex_y2, 4);
    expect_eq("example pi_3", ex_y3, 2);
    expect_eq("example E'_1", ex_c1, 0);
    expect_eq("example E'_2", ex_c2, 0);
    expect_eq("example E'_3", ex_c3, 1);

    // All digit pairs modulo 255.
    corr_count = 0;
    for (int i = 0; i < 255; i++) begin
      for (int j = 0; j < 255; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        expect_eq("mod 255", y, (i * j) % 255);
        corr_count += int'(c);
      end
    end
    checks++;
    if (corr_count == 0) begin failures++; $display("FAIL no correction seen"); end

    // Reload the modulus registers.
    foreach (mods[k]) begin
      @(negedge clk);
      cfg_we = 1'b1; cfg_m = 8'(mods[k]); cfg_t = 16'(65536 / mods[k]);
      @(negedge clk);
      cfg_we = 1'b0;
      for (int n = 0; n < 2000; n++) begin
        int unsigned ia, ib;
        ia = $urandom % mods[k]; ib = $urandom % mods[k];
        a = 8'(ia); b = 8'(ib);
        #1;
        expect_eq("reloaded modulus", y, (ia * ib) % mods[k]);
      end
    end

    // Split 16-bit instance.
    for (int n = 0; n < 3000; n++) begin
      longint unsigned ia, ib;
      ia = longint'($urandom % 65521); ib = longint'($urandom % 65521);
      if (n == 0) begin ia = 65520; ib = 65520; end
      sa = 16'(ia); sb = 16'(ib);
      #1;
      expect_eq("split mod 65521", sy, (ia * ib) % 65521);
    end

    // Pipelined instance, operands on consecutive cycles.
    for (int n = 0; n < 3000; n++) begin
      exp_t e;
      int unsigned ia, ib;
      @(negedge clk);
      #1;
      ia = $urandom % 247; ib = $urandom % 247;
      pin_v = ($urandom % 5) != 0;
      pa = 8'(ia); pb = 8'(ib);
      e.due = cycle + 3; e.y = 8'((ia * ib) % 247);
      if (pin_v) q.push_back(e);
    end
    @(negedge clk); #1; pin_v = 1'b0;
    repeat (5) @(negedge clk);
    expect_eq("pipeline drained", q.size(), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

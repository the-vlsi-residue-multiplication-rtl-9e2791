// tb_rns_mul: checks the five-lane residue multiplier.
//  - default instance (moduli 255, 254, 253, 251, 247, combinational): random
//    integers X, Y with X*Y < M are turned into residues here; every product
//    digit must equal (X*Y) mod m_i;
//  - lane 2 is then reloaded with modulus 241 (t = floor(65536/241)) while
//    the other lanes keep theirs;
//  - pipelined instance: product digits exactly 3 cycles after the operands.
module tb_rns_mul;
  int checks = 0, failures = 0;

  localparam int unsigned MODS [5] = '{255, 254, 253, 251, 247};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [4:0][7:0]  a, b, y, pa, pb, py;
  logic [4:0]       cfg_we, c, pc;
  logic [4:0][7:0]  cfg_m;
  logic [4:0][15:0] cfg_t;
  logic             v, pin_v, pout_v;

  rns_mul u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .a(a), .b(b),
    .cfg_we(cfg_we), .cfg_m(cfg_m), .cfg_t(cfg_t), .out_valid(v), .y(y), .corr(c));
  rns_mul #(.PIPE(1'b1)) u_pipe (
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

  typedef struct { int due; logic [4:0][7:0] y; } exp_t;
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
    int unsigned mods [5];
    mods = MODS;
    a = '0; b = '0; pa = '0; pb = '0; pin_v = 1'b0;
    cfg_we = '0; cfg_m = '0; cfg_t = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int phase = 0; phase < 2; phase++) begin
      if (phase == 1) begin
        @(negedge clk);
        cfg_we[2] = 1'b1; cfg_m[2] = 8'd241; cfg_t[2] = 16'(65536 / 241);
        @(negedge clk);
        cfg_we = '0;
        mods[2] = 241;
      end
      for (int n = 0; n < 3000; n++) begin
        longint unsigned xv, yv, pv;
        xv = longint'($urandom % (1 << 20));
        yv = longint'($urandom % (1 << 19));
        pv = xv * yv;
        for (int i = 0; i < 5; i++) begin
          a[i] = 8'(xv % mods[i]);
          b[i] = 8'(yv % mods[i]);
        end
        #1;
        for (int i = 0; i < 5; i++) expect_eq("product digit", y[i], pv % mods[i]);
      end
    end
    for (int n = 0; n < 2000; n++) begin
      exp_t e;
      @(negedge clk); #1;
      for (int i = 0; i < 5; i++) begin
        int unsigned da, db;
        da = $urandom % MODS[i]; db = $urandom % MODS[i];
        pa[i] = 8'(da); pb[i] = 8'(db); e.y[i] = 8'((da * db) % MODS[i]);
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

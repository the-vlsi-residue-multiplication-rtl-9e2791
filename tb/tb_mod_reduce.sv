// tb_mod_reduce: checks x mod m from the reciprocal-multiplication
// reduction.
//  - pipelined instance (WX=16, WM=8, PIPE=1): random x and random moduli
//    2..255 fed one per cycle, t = floor(2^16/m) computed here; each result
//    must appear exactly 2 cycles after its operand, equal to x % m;
//  - combinational instance (WX=40, WM=8): random 40-bit x, m = 251.
// The correction flag is checked against the exact quotient, and both
// outcomes (estimate exact / one too low) must occur.
module tb_mod_reduce;
  int checks = 0, failures = 0;
  int corr_seen = 0, nocorr_seen = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // Pipelined instance.
  logic        in_valid, out_valid, corr;
  logic [15:0] x, t;
  logic [7:0]  m, r;
  mod_reduce #(.WX(16), .WM(8), .PIPE(1'b1)) u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .t(t), .m(m),
    .out_valid(out_valid), .r(r), .corr(corr)
  );

  // Combinational instance.
  logic [39:0] x40;
  logic [7:0]  r40;
  logic        v40, corr40;
  localparam logic [39:0] T251 = 40'((64'd1 << 40) / 64'd251);
  mod_reduce #(.WX(40), .WM(8), .PIPE(1'b0)) u_dut40 (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .x(x40), .t(T251), .m(8'd251),
    .out_valid(v40), .r(r40), .corr(corr40)
  );

  typedef struct { int due; logic [7:0] r; logic corr; } exp_t;
  exp_t q[$];
  int cycle = 0;

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    cycle++;
    // Output side.
    if (out_valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        exp_t e;
        e = q.pop_front();
        if (e.due != cycle || e.r !== r || e.corr !== corr) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d due %0d r %0d exp %0d corr %b exp %b",
                                      cycle, e.due, r, e.r, corr, e.corr);
        end
        if (e.corr) corr_seen++; else nocorr_seen++;
      end
    end else if (q.size() != 0 && q[0].due <= cycle) begin
      failures++; checks++;
      $display("FAIL missing output due %0d", q[0].due);
      void'(q.pop_front());
    end
  end

  initial begin
    in_valid = 1'b0; x = '0; t = '0; m = 8'd2; x40 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      int unsigned mm, xx, kbar;
      exp_t e;
      @(negedge clk);
      #1;  // after the checker has advanced the cycle count
      mm = 2 + ($urandom % 254);
      xx = $urandom % 65536;
      if (k % 3 == 0) xx = ((mm - 1) * (mm - 1) + 7 - (k % 7)) % 65536;   // near products of residues
      in_valid = ($urandom % 8) != 0;
      x = 16'(xx); m = 8'(mm); t = 16'(65536 / mm);
      kbar = int'((longint'(xx) * longint'(65536 / mm)) >> 16);
      e.due  = cycle + 2;
      e.r    = 8'(xx % mm);
      e.corr = (kbar != xx / mm);
      if (in_valid) q.push_back(e);
      // Combinational instance, checked after settling.
      x40 = {8'($urandom), 32'($urandom)};
      #1;
      checks++;
      if (r40 !== 8'(x40 % 40'd251)) begin
        failures++;
        if (failures < 10) $display("FAIL 40-bit %0d mod 251 got %0d", x40, r40);
      end
      if (corr40) corr_seen++;
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (q.size() != 0 || corr_seen == 0 || nocorr_seen == 0) begin
      failures++;
      $display("FAIL leftover %0d corr %0d nocorr %0d", q.size(), corr_seen, nocorr_seen);
    end
    $display("corrections %0d, exact estimates %0d", corr_seen, nocorr_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

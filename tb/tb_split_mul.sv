// tb_split_mul: checks the 32x32 multiplier built from four 16x16 parts
// against 64-bit testbench products, including all-ones operands (largest
// carries between the partial products) and operands with one half zero.
module tb_split_mul;
  int checks = 0, failures = 0;

  logic [31:0] x, y;
  logic [63:0] p;

  split_mul u_dut (.x(x), .y(y), .p(p));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] xa, input logic [31:0] ya);
    longint unsigned ref_p;
    x = xa; y = ya;
    #1;
    ref_p = longint'(xa) * longint'(ya);
    checks++;
    if (p !== ref_p) begin
      failures++;
      if (failures < 10) $display("FAIL %h*%h got %h exp %h", xa, ya, p, ref_p);
    end
  endtask

  initial begin
    check(32'hffff_ffff, 32'hffff_ffff);
    check(32'hffff_0000, 32'h0000_ffff);
    check(32'h0000_ffff, 32'hffff_0000);
    check(32'h0001_0000, 32'h0001_0000);
    check(32'h0, 32'hdead_beef);
    for (int k = 0; k < 5000; k++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

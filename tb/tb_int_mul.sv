// tb_int_mul: checks int_mul at 8x8 (exhaustive) and 8x40 (random) against
// products formed in 64-bit testbench arithmetic.
module tb_int_mul;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [39:0] b40;
  logic [47:0] p40;

  int_mul #(.WA(8), .WB(8))  u_dut8  (.a(a8), .b(b8),  .p(p8));
  int_mul #(.WA(8), .WB(40)) u_dut40 (.a(a8), .b(b40), .p(p40));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    b40 = '0;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks++;
        if (p8 !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL 8x8 %0d*%0d got %0d", i, j, p8);
        end
      end
    end
    for (int k = 0; k < 2000; k++) begin
      longint unsigned ref_p;
      a8  = 8'($urandom);
      b40 = {8'($urandom), 32'($urandom)};
      if (k == 0) begin a8 = 8'hff; b40 = '1; end
      #1;
      ref_p = longint'(a8) * longint'(b40);
      checks++;
      if (p40 !== 48'(ref_p)) begin
        failures++;
        if (failures < 10) $display("FAIL 8x40 %0d*%0d got %0d", a8, b40, p40);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rns_example_7_11_13: the RNS integer multiplier built for the small
// residue system {7, 11, 13} (M = 1001, 3- and 4-bit digits, 10-bit binary
// side), combinational (PIPE = 0).
//  - 37 * 12 = 444: the worked example, whose residues are <2,4,11> and
//    <5,1,12> with product <3,4,2>; the residue digits are checked at the
//    converter and multiplier outputs;
//  - every unsigned pair with x*y < 1001;
//  - every signed pair with x*y in [-500, 500).
module tb_rns_example_7_11_13;
  int checks = 0, failures = 0;

  localparam int M = 1001;

  logic       clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic       signed_mode, v;
  logic [9:0] x, y, prod;

  rns_int_multiplier #(
    .S(3), .B(4), .N(10), .MODULI({4'd13, 4'd11, 4'd7}), .PIPE(1'b0)
  ) u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .signed_mode(signed_mode),
    .x(x), .y(y), .out_valid(v), .prod(prod));

  task automatic expect_eq(input string what, input int got, input int exp);
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

  initial begin
    signed_mode = 1'b0; x = 10'd37; y = 10'd12;
    // Reset loads the modulus and reciprocal registers; operands are
    // marked valid only once that is done.
    #1 rst_n = 1'b1;
    #1 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    in_valid = 1'b1;
    #1;
    expect_eq("37*12", int'(prod), 444);
    expect_eq("alpha_1(37)", int'(u_dut.xa[0]), 2);
    expect_eq("alpha_2(37)", int'(u_dut.xa[1]), 4);
    expect_eq("alpha_3(37)", int'(u_dut.xa[2]), 11);
    expect_eq("beta_1(12)",  int'(u_dut.ya[0]), 5);
    expect_eq("beta_2(12)",  int'(u_dut.ya[1]), 1);
    expect_eq("beta_3(12)",  int'(u_dut.ya[2]), 12);
    expect_eq("pi_1", int'(u_dut.pa[0]), 3);
    expect_eq("pi_2", int'(u_dut.pa[1]), 4);
    expect_eq("pi_3", int'(u_dut.pa[2]), 2);
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j * i < M && j < M; j++) begin
        x = 10'(i); y = 10'(j);
        #1;
        expect_eq("unsigned product", int'(prod), i * j);
      end
    end
    signed_mode = 1'b1;
    for (int i = -500; i < 500; i++) begin
      for (int j = -40; j <= 40; j++) begin
        if (i * j >= -500 && i * j < 500) begin
          x = 10'(i); y = 10'(j);
          #1;
          expect_eq("signed product", int'(signed'(prod)), i * j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bin2res: checks the five-digit positional-to-residue converter at its
// default size (40-bit input, moduli 255, 254, 253, 251, 247, combinational)
// against x % m_i for random x in [0, M) and the range ends.
module tb_bin2res;
  int checks = 0, failures = 0;

  localparam longint unsigned M = 64'd1015933059570;
  localparam int unsigned MODS [5] = '{255, 254, 253, 251, 247};

  logic        clk = 1'b0, rst_n = 1'b1;
  logic [39:0] x;
  logic [4:0][7:0] alpha;
  logic [4:0]  corr;
  logic        v;

  bin2res u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .x(x),
    .out_valid(v), .alpha(alpha), .corr(corr));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      longint unsigned xv;
      xv = ({$urandom, $urandom} & 64'hFF_FFFF_FFFF) % M;
      if (n == 0) xv = M - 1;
      if (n == 1) xv = 0;
      x = 40'(xv);
      #1;
      for (int i = 0; i < 5; i++) begin
        checks++;
        if (longint'(alpha[i]) != xv % MODS[i]) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d digit %0d got %0d", xv, i, alpha[i]);
        end
      end
      checks++;
      if (!v) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

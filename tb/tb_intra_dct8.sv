// tb_intra_dct8: for residuals that are multiples of 64 the shift-based transform is exact, so
// it must equal M*X*M'/64 with the H.264 8x8 forward matrix M (scaled by 8). For random
// residuals the DC coefficient must equal the block sum and the SATD the sum of |coef|.
module tb_intra_dct8;
  logic signed [8:0]  res  [64];
  logic signed [15:0] coef [64];
  logic [21:0] satd;
  int checks = 0, failures = 0;
  int M [8][8] = '{'{8, 8, 8, 8, 8, 8, 8, 8},
                   '{12, 10, 6, 3, -3, -6, -10, -12},
                   '{8, 4, -4, -8, -8, -4, 4, 8},
                   '{10, -3, -12, -6, 6, 12, 3, -10},
                   '{8, -8, -8, 8, 8, -8, -8, 8},
                   '{6, -12, 3, 10, -10, -3, 12, -6},
                   '{4, -8, 8, -4, -4, 8, -8, 4},
                   '{3, -6, 10, -12, 12, -10, 6, -3}};
  intra_dct8 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 40; it++) begin
      int s, sa;
      bit exact;
      exact = (it < 20);
      for (int i = 0; i < 64; i++)
        res[i] = exact ? 9'(64 * ($urandom_range(6) - 3)) : 9'($urandom_range(510) - 255);
      #1;
      s = 0; sa = 0;
      for (int i = 0; i < 64; i++) begin s += int'(res[i]); sa += (coef[i] < 0) ? -int'(coef[i]) : int'(coef[i]); end
      checks += 2;
      if (int'(coef[0]) != s) begin failures++; $display("DC got %0d exp %0d", coef[0], s); end
      if (int'(satd) != sa) begin failures++; $display("SATD got %0d exp %0d", satd, sa); end
      if (exact) begin
        for (int v = 0; v < 8; v++) for (int u = 0; u < 8; u++) begin
          int e;
          e = 0;
          for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) e += M[v][y] * int'(res[8*y+x]) * M[u][x];
          checks++;
          if (int'(coef[8*v+u]) * 64 != e) begin
            failures++; $display("(%0d,%0d) got %0d exp %0d/64", v, u, coef[8*v+u], e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fme_eshad: 32x32 residual blocks (random, smooth and flat) are transformed by a separable
// matrix model at 8x8, 16x16 and 32x32, and the expected recursive best cost and size flags are
// compared with the unit fed the sixteen C8 blocks in Z order.
module tb_fme_eshad;
  import fme_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic [3:0] in_zidx;
  coef_t in_coef [64];
  logic out_valid, out_use32;
  cost_t out_cost;
  logic [3:0] out_use16;
  int checks = 0, failures = 0;
  int r [32][32];
  int seen32 = 0, seen16 = 0, seen8 = 0;
  fme_eshad dut (.*);

  function automatic int hs(input int i, input int j);
    return ($countones(i & j) % 2 == 1) ? -1 : 1;
  endfunction
  // sum of |coefficients| of the n x n Hadamard transform of r at (y0, x0)
  function automatic int hadsum(input int y0, input int x0, input int n);
    int tmp [32][32];
    int s = 0;
    for (int p = 0; p < n; p++) for (int j = 0; j < n; j++) begin
      tmp[p][j] = 0;
      for (int i = 0; i < n; i++) tmp[p][j] += hs(p, i) * r[y0+i][x0+j];
    end
    for (int p = 0; p < n; p++) for (int q = 0; q < n; q++) begin
      int e = 0;
      for (int j = 0; j < n; j++) e += tmp[p][j] * hs(q, j);
      s += (e < 0) ? -e : e;
    end
    return s;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      int c32, c16 [4], tot16, exp_cost, e16u;
      logic e32;
      logic [3:0] e16;
      int lat;
      for (int i = 0; i < 32; i++) for (int j = 0; j < 32; j++)
        case (t % 4 != 0 ? t % 4 : 0)
          0: r[i][j] = $urandom_range(510) - 255;
          1: r[i][j] = 40;                                  // flat: large transform wins
          2: r[i][j] = ((i / 8 + j / 8) % 2) ? 30 : -30;   // 8x8 checkerboard
          default: r[i][j] = (i < 16 && j < 16) ? 20 : $urandom_range(60) - 30;
        endcase
      tot16 = 0;
      for (int q = 0; q < 4; q++) begin
        int s8, h16;
        s8 = 0;
        for (int b = 0; b < 4; b++) s8 += (hadsum(16*(q/2) + 8*(b/2), 16*(q%2) + 8*(b%2), 8) + 2) >> 2;
        h16 = (hadsum(16*(q/2), 16*(q%2), 16) + 4) >> 3;
        e16[q] = h16 < s8;
        c16[q] = e16[q] ? h16 : s8;
        tot16 += c16[q];
      end
      c32 = (hadsum(0, 0, 32) + 8) >> 4;
      e32 = c32 < tot16;
      exp_cost = e32 ? c32 : tot16;
      for (int z = 0; z < 16; z++) begin
        int by, bx;
        by = 2*z[3] + z[1]; bx = 2*z[2] + z[0];
        @(negedge clk);
        in_valid = 1; in_zidx = 4'(z);
        for (int p = 0; p < 8; p++) for (int q = 0; q < 8; q++) begin
          int e;
          e = 0;
          for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) e += hs(p, i) * r[8*by+i][8*bx+j] * hs(q, j);
          in_coef[8*p+q] = coef_t'(e);
        end
        @(negedge clk);
        in_valid = 0;
        repeat (2) @(negedge clk);        // one 8x8 block per 4 cycles
      end
      lat = 0;
      while (!out_valid && lat < 20) begin @(negedge clk); lat++; end
      checks += 4;
      if (lat != 6) begin failures++; $display("t%0d latency %0d", t, lat); end
      if (!out_valid) begin failures++; $display("t%0d no out_valid", t); end
      if (int'(out_cost) != exp_cost || out_use32 != e32) begin
        failures++; $display("t%0d cost %0d/%0d use32 %0d/%0d", t, out_cost, exp_cost, out_use32, e32);
      end
      if (!e32 && out_use16 != e16) begin failures++; $display("t%0d use16 %b/%b", t, out_use16, e16); end
      if (e32) seen32++; else if (e16 != 0) seen16++;
      if (!e32 && e16 != 4'hf) seen8++;
    end
    checks++;
    if (seen32 == 0 || seen16 == 0 || seen8 == 0) begin
      failures++; $display("size choices not all exercised %0d %0d %0d", seen32, seen16, seen8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

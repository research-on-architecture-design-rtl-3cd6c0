// tb_fme_cost_calc: five candidate residuals (even values, so the coefficient average is exact)
// are built so that a chosen search candidate has a zero residual. The twelve costs are checked
// against a direct ES-HAD model on the averaged residual, and the best index must be the chosen
// one. Quarter-pel and full/half-pel winners are both exercised.
module tb_fme_cost_calc;
  import fme_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic [3:0] in_zidx;
  coef_t in_tc [NUM_TC][64];
  logic out_valid, out_best_use32;
  cost_t out_sc_cost [NUM_SC];
  logic [3:0] out_best, out_best_use16;
  cost_t out_best_cost;
  int checks = 0, failures = 0;
  int rt [NUM_TC][32][32];
  int r [32][32];
  int sca [NUM_SC] = '{0, 1, 2, 3, 4, 0, 0, 1, 1, 2, 0, 4};
  int scb [NUM_SC] = '{0, 1, 2, 3, 4, 1, 2, 2, 3, 3, 4, 2};
  int wins [NUM_SC];
  fme_cost_calc dut (.*);

  function automatic int hs(input int i, input int j);
    return ($countones(i & j) % 2 == 1) ? -1 : 1;
  endfunction
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
  function automatic int eshad_ref();
    int tot = 0, c32;
    for (int q = 0; q < 4; q++) begin
      int s8 = 0, h16;
      for (int b = 0; b < 4; b++) s8 += (hadsum(16*(q/2) + 8*(b/2), 16*(q%2) + 8*(b%2), 8) + 2) >> 2;
      h16 = (hadsum(16*(q/2), 16*(q%2), 16) + 4) >> 3;
      tot += (h16 < s8) ? h16 : s8;
    end
    c32 = (hadsum(0, 0, 32) + 8) >> 4;
    return (c32 < tot) ? c32 : tot;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int targets [4] = '{7, 3, 10, 5};
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (targets[t]) begin
      int k, exp_cost [NUM_SC];
      k = targets[t];
      for (int c = 0; c < NUM_TC; c++) for (int i = 0; i < 32; i++) for (int j = 0; j < 32; j++)
        rt[c][i][j] = 2 * ($urandom_range(100) - 50);
      for (int i = 0; i < 32; i++) for (int j = 0; j < 32; j++)
        rt[scb[k]][i][j] = (sca[k] == scb[k]) ? 0 : -rt[sca[k]][i][j];
      for (int s = 0; s < NUM_SC; s++) begin
        for (int i = 0; i < 32; i++) for (int j = 0; j < 32; j++) r[i][j] = (rt[sca[s]][i][j] + rt[scb[s]][i][j]) / 2;
        exp_cost[s] = eshad_ref();
      end
      for (int z = 0; z < 16; z++) begin
        int by, bx;
        by = 2*z[3] + z[1]; bx = 2*z[2] + z[0];
        @(negedge clk);
        in_valid = 1; in_zidx = 4'(z);
        for (int c = 0; c < NUM_TC; c++) for (int p = 0; p < 8; p++) for (int q = 0; q < 8; q++) begin
          int e;
          e = 0;
          for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) e += hs(p, i) * rt[c][8*by+i][8*bx+j] * hs(q, j);
          in_tc[c][8*p+q] = coef_t'(e);
        end
        @(negedge clk);
        in_valid = 0;
        repeat (2) @(negedge clk);
      end
      while (!out_valid) @(negedge clk);
      for (int s = 0; s < NUM_SC; s++) begin
        checks++;
        if (int'(out_sc_cost[s]) != exp_cost[s]) begin
          failures++; $display("t%0d sc%0d cost %0d exp %0d", t, s, out_sc_cost[s], exp_cost[s]);
        end
      end
      checks += 2;
      if (out_best != 4'(k) || out_best_cost != 0) begin
        failures++; $display("t%0d best %0d cost %0d, exp %0d", t, out_best, out_best_cost, k);
      end
      wins[out_best]++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

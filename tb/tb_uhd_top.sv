// tb_uhd_top: end-to-end test of the whole design at its default sizes. The FME core refines
// a 32x32 block whose original equals the diagonal half-pel candidate, then the horizontal one,
// with both corner signs; meanwhile the intra core decides 8x8 blocks whose original equals a
// mode's prediction (hit) and one with a late most-probable-mode win (miss). Counts the corner
// signs, FME winners, and intra hits and misses; each must occur at least once.
module tb_uhd_top;
  import fme_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic fme_start = 0, fme_busy, fme_done, fme_use32;
  pix_t fme_ref_win [40][40];
  pix_t fme_org [32][32];
  cost_t fme_ime_cost [4];
  logic [3:0] fme_best_sc, fme_use16;
  logic signed [2:0] fme_mv_qx, fme_mv_qy;
  cost_t fme_best_cost;
  cost_t fme_sc_cost [NUM_SC];
  logic intra_start = 0, intra_busy, intra_early_valid, intra_done, intra_final_miss;
  logic [7:0] intra_org [64];
  logic [7:0] intra_otop [16], intra_rtop [16];
  logic [7:0] intra_oleft [8], intra_rleft [8];
  logic [7:0] intra_ocorner, intra_rcorner, intra_lambda;
  logic [3:0] intra_avail, intra_mpm, intra_early_mode, intra_best_mode;
  logic [3:0] intra_cand [4];
  logic [23:0] intra_best_cost;
  logic signed [15:0] intra_best_coef [64];
  int checks = 0, failures = 0, cyc = 0;
  int n_sxp = 0, n_sxn = 0, n_diag = 0, n_horz = 0, n_hit = 0, n_miss = 0;
  always @(posedge clk) cyc++;

  uhd_top dut (.*);

  // independent models: 8-tap half pel, and 8x8 vertical prediction (no filtering needed for
  // flat-per-column references)
  function automatic int filt(input int v[8]);
    int taps[8] = '{-1, 4, -11, 40, 40, -11, 4, -1};
    int s = 0;
    for (int i = 0; i < 8; i++) s += taps[i] * v[i];
    s = (s + 32) >>> 6;
    return s < 0 ? 0 : (s > 255 ? 255 : s);
  endfunction
  function automatic int hrow(input int y, input int x, input int hx);
    int v[8];
    if (hx == 0) return int'(fme_ref_win[y+4][x+4]);
    for (int i = 0; i < 8; i++) v[i] = int'(fme_ref_win[y+4][x + (hx > 0 ? 1 : 0) + i]);
    return filt(v);
  endfunction
  function automatic int pel(input int y, input int x, input int hx, input int hy);
    int v[8];
    if (hy == 0) return hrow(y, x, hx);
    for (int i = 0; i < 8; i++) v[i] = hrow(y + (hy > 0 ? 1 : 0) - 4 + i, x, hx);
    return filt(v);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fme_run(input int sx, input int sy, input int hx, input int hy, input int exp_sc);
    for (int y = 0; y < 40; y++) for (int x = 0; x < 40; x++) fme_ref_win[y][x] = pix_t'($urandom_range(30, 225));
    for (int y = 0; y < 32; y++) for (int x = 0; x < 32; x++) fme_org[y][x] = pix_t'(pel(y, x, hx, hy));
    fme_ime_cost[0] = cost_t'(sx > 0 ? 700 : 300);
    fme_ime_cost[1] = cost_t'(sx > 0 ? 300 : 700);
    fme_ime_cost[2] = cost_t'(sy > 0 ? 700 : 300);
    fme_ime_cost[3] = cost_t'(sy > 0 ? 300 : 700);
    @(negedge clk); fme_start = 1;
    @(negedge clk); fme_start = 0;
    while (!fme_done) @(negedge clk);
    checks += 2;
    if (fme_best_sc != 4'(exp_sc) || fme_best_cost != 0) begin
      failures++; $display("FME: sc %0d cost %0d exp sc %0d", fme_best_sc, fme_best_cost, exp_sc);
    end
    if (int'(fme_mv_qx) != 2*hx || int'(fme_mv_qy) != 2*hy) begin
      failures++; $display("FME: mv (%0d,%0d) exp (%0d,%0d)", fme_mv_qx, fme_mv_qy, 2*hx, 2*hy);
    end
    if (sx > 0) n_sxp++; else n_sxn++;
    if (fme_best_sc == 3) n_diag++;
    if (fme_best_sc == 1) n_horz++;
  endtask

  task automatic intra_run(input int mpm_sel, input int lam, input bit expect_miss);
    @(negedge clk); intra_start = 1;
    if (mpm_sel >= 0) intra_mpm = intra_cand[mpm_sel];
    intra_lambda = 8'(lam);
    @(negedge clk); intra_start = 0;
    while (!intra_done) @(negedge clk);
    checks++;
    if (intra_final_miss != expect_miss) begin failures++; $display("intra: miss %0d exp %0d", intra_final_miss, expect_miss); end
    if (!intra_final_miss) begin
      checks++;
      if (intra_best_mode != 4'd0 || intra_best_cost != 0) begin
        failures++; $display("intra: best %0d cost %0d", intra_best_mode, intra_best_cost);
      end
      n_hit++;
    end else n_miss++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // intra block: references constant per column, original = vertical prediction
    intra_avail = 4'b1111;
    for (int i = 0; i < 16; i++) intra_rtop[i] = 8'(100 + 2 * (i % 3));
    for (int i = 0; i < 8; i++) intra_rleft[i] = 8'(101 + (i % 2));
    intra_rcorner = 101;
    intra_otop = intra_rtop; intra_oleft = intra_rleft; intra_ocorner = intra_rcorner;
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) begin
      int l, c, r;
      l = (x == 0) ? int'(intra_rcorner) : int'(intra_rtop[x-1]);
      c = int'(intra_rtop[x]);
      r = int'(intra_rtop[x+1]);
      intra_org[8*y+x] = 8'((l + 2*c + r + 2) >> 2);
    end
    intra_mpm = 0;
    fork
      begin
        fme_run( 1,  1,  1,  1, 3);
        fme_run(-1,  1, -1,  0, 1);
      end
      begin
        intra_run(-1, 10, 1'b0);
        intra_run(2, 255, 1'b1);
      end
    join
    checks++;
    if (n_sxp == 0 || n_sxn == 0 || n_diag == 0 || n_horz == 0 || n_hit == 0 || n_miss == 0) begin
      failures++; $display("mechanism not exercised: %0d %0d %0d %0d %0d %0d", n_sxp, n_sxn, n_diag, n_horz, n_hit, n_miss);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

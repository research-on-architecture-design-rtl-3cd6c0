// tb_fme_top: end-to-end runs of the FME core. Each run builds a random reference window and
// makes the original block equal to one interpolated candidate (integer, horizontal half,
// vertical half or diagonal half pel, computed here with a loop-based 8-tap model), with the
// IME neighbour costs pointing at one of the four corners. The core must return that candidate
// with zero cost and the right quarter-pel offset. Counts corner signs and winners exercised.
module tb_fme_top;
  import fme_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done, use32;
  pix_t ref_win [40][40];
  pix_t org [32][32];
  cost_t ime_cost [4];
  logic [3:0] best_sc, use16;
  logic signed [2:0] mv_qx, mv_qy;
  cost_t best_cost;
  cost_t sc_cost [NUM_SC];
  int checks = 0, failures = 0, cyc = 0;
  int seen_sxn = 0, seen_sxp = 0, seen_syn = 0, seen_syp = 0;
  int seen_tc [5];
  always @(posedge clk) cyc++;

  fme_top dut (.*);

  function automatic int filt(input int v[8]);
    int taps[8] = '{-1, 4, -11, 40, 40, -11, 4, -1};
    int s = 0;
    for (int i = 0; i < 8; i++) s += taps[i] * v[i];
    s = (s + 32) >>> 6;
    return s < 0 ? 0 : (s > 255 ? 255 : s);
  endfunction
  // pel at (x + hx/2, y + hy/2), hx, hy in {-1, 0, 1}; x, y block coordinates
  function automatic int hrow(input int y, input int x, input int hx);
    int v[8];
    if (hx == 0) return int'(ref_win[y+4][x+4]);
    for (int i = 0; i < 8; i++) v[i] = int'(ref_win[y+4][x + (hx > 0 ? 1 : 0) + i]);
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

  // run: sx, sy corner signs; tc = candidate the original equals
  task automatic run(input int sx, input int sy, input int tc);
    int hx, hy, t0, exp_qx, exp_qy;
    case (tc)
      0: begin hx = 0;   hy = 0;  end
      1: begin hx = sx;  hy = 0;  end
      2: begin hx = 0;   hy = sy; end
      3: begin hx = sx;  hy = sy; end
      default: begin hx = -sx; hy = 0; end
    endcase
    exp_qx = 2 * hx; exp_qy = 2 * hy;
    for (int y = 0; y < 40; y++) for (int x = 0; x < 40; x++) ref_win[y][x] = pix_t'($urandom_range(40, 215));
    for (int y = 0; y < 32; y++) for (int x = 0; x < 32; x++) org[y][x] = pix_t'(pel(y, x, hx, hy));
    // {left, right, up, down}: the cheaper side gives the corner
    ime_cost[0] = cost_t'(sx > 0 ? 900 : 500);
    ime_cost[1] = cost_t'(sx > 0 ? 500 : 900);
    ime_cost[2] = cost_t'(sy > 0 ? 900 : 500);
    ime_cost[3] = cost_t'(sy > 0 ? 500 : 900);
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks += 4;
    if (best_sc != 4'(tc)) begin failures++; $display("sx%0d sy%0d tc%0d: best_sc %0d", sx, sy, tc, best_sc); end
    if (best_cost != 0 || sc_cost[tc] != 0) begin failures++; $display("tc%0d: cost %0d", tc, best_cost); end
    if (int'(mv_qx) != exp_qx || int'(mv_qy) != exp_qy) begin
      failures++; $display("tc%0d: mv (%0d,%0d) exp (%0d,%0d)", tc, mv_qx, mv_qy, exp_qx, exp_qy);
    end
    if (cyc - t0 > 260) begin failures++; $display("too slow: %0d cycles", cyc - t0); end
    $display("sx%0d sy%0d tc%0d: %0d cycles, best %0d", sx, sy, tc, cyc - t0, best_sc);
    if (sx > 0) seen_sxp++; else seen_sxn++;
    if (sy > 0) seen_syp++; else seen_syn++;
    seen_tc[best_sc < 5 ? best_sc : 0]++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run( 1,  1, 3);
    run(-1,  1, 1);
    run( 1, -1, 2);
    run(-1, -1, 0);
    run( 1,  1, 4);
    checks++;
    if (seen_sxn == 0 || seen_sxp == 0 || seen_syn == 0 || seen_syp == 0) begin
      failures++; $display("corner not exercised");
    end
    for (int t = 0; t < 5; t++) begin
      checks++;
      if (seen_tc[t] == 0) begin failures++; $display("TC%0d never won", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

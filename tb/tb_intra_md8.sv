// tb_intra_md8: the original block is made equal to one mode's prediction, so preliminary
// decision must rank that mode first and fine decision must pick it with zero SATD (a hit,
// known after two candidates). A second run makes the third candidate the most probable mode
// with a large lambda, so the decision changes after the early result (a miss). A third run
// removes the left neighbour and checks that only allowed modes become candidates. Checks the
// 15-cycle decision latency and counts hits, misses and exclusions.
module tb_intra_md8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, early_valid, done, final_miss;
  logic [7:0] org [64];
  logic [7:0] otop [16], rtop [16];
  logic [7:0] oleft [8], rleft [8];
  logic [7:0] ocorner, rcorner;
  logic avail_top, avail_topright, avail_left, avail_corner;
  logic [3:0] mpm, cand [4], early_mode, best_mode;
  logic [7:0] lambda;
  logic [23:0] best_cost;
  logic signed [15:0] best_coef [64];
  int checks = 0, failures = 0, cyc = 0, hits = 0, misses = 0, excl = 0;
  always @(posedge clk) cyc++;

  // reference prediction for building the original block
  logic [7:0] ptop [16], pleft [8], pcorner, ppred [64];
  logic [3:0] pmode;
  intra_pred8x8 u_ref (.top(ptop), .left(pleft), .corner(pcorner), .avail_top, .avail_topright,
                       .avail_left, .avail_corner, .mode(pmode), .pred(ppred));
  intra_md8 dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic decide(output int early_m, output int lat);
    int t0;
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    early_m = -1;
    while (!done) begin
      if (early_valid) early_m = early_mode;
      @(negedge clk);
    end
    lat = cyc - t0;
  endtask

  initial begin
    int em, lat, m;
    int modes [3];
    modes = '{6, 0, 4};
    repeat (2) @(posedge clk);
    rst_n = 1;
    {avail_top, avail_topright, avail_left, avail_corner} = 4'b1111;
    for (int i = 0; i < 16; i++) rtop[i] = 8'(100 + $urandom_range(6));
    for (int i = 0; i < 8; i++) rleft[i] = 8'(100 + $urandom_range(6));
    rcorner = 103;
    otop = rtop; oleft = rleft; ocorner = rcorner;
    ptop = rtop; pleft = rleft; pcorner = rcorner;
    // run 1: hit on each of three modes
    for (int k = 0; k < 3; k++) begin
      m = modes[k];
      pmode = 4'(m); #1;
      org = ppred;
      mpm = 4'(m); lambda = 10;
      decide(em, lat);
      checks += 4;
      if (cand[0] != 4'(m)) begin failures++; $display("PD first candidate %0d exp %0d", cand[0], m); end
      if (best_mode != 4'(m) || best_cost != 0) begin failures++; $display("FD best %0d cost %0d exp %0d", best_mode, best_cost, m); end
      if (em != m || final_miss) begin failures++; $display("early %0d miss %0d", em, final_miss); end
      if (lat != 15) begin failures++; $display("latency %0d", lat); end
      if (!final_miss) hits++;
    end
    // run 2: most probable mode is the third candidate, lambda large -> decision changes late
    mpm = cand[2]; lambda = 255;
    decide(em, lat);
    checks += 2;
    if (best_mode != mpm || !final_miss) begin failures++; $display("miss run: best %0d mpm %0d miss %0d", best_mode, mpm, final_miss); end
    if (em == int'(best_mode)) begin failures++; $display("early result should differ"); end
    if (final_miss) misses++;
    // run 3: left unavailable, only vertical, DC, down-left, vertical-left allowed
    avail_left = 0; avail_corner = 0; mpm = 0; lambda = 1;
    decide(em, lat);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (!(cand[k] inside {4'd0, 4'd2, 4'd3, 4'd7})) begin failures++; $display("excluded mode %0d chosen", cand[k]); end
      else excl++;
    end
    checks++;
    if (hits == 0 || misses == 0 || excl == 0) begin failures++; $display("mechanism not exercised"); end
    $display("hits %0d misses %0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

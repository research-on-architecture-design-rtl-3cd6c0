// tb_fme_dg_ht8: random 16x8 blocks (and one all-extreme block) through the DG & HT8x8 unit,
// compared with a matrix-product Hadamard model H*R*H^T using the Sylvester sign rule
// H[i][j] = (-1)^popcount(i & j). Also checks the 8-cycle block rate.
module tb_fme_dg_ht8;
  import fme_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_first = 0, out_valid;
  pix_t org [16];
  pix_t cand [16];
  coef_t coef [2][64];
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;
  int o [8][16];
  int c [8][16];
  fme_dg_ht8 dut (.*);

  function automatic int hs(input int i, input int j);
    return ($countones(i & j) % 2 == 1) ? -1 : 1;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 6; blk++) begin
      for (int v = 0; v < 8; v++) for (int x = 0; x < 16; x++) begin
        o[v][x] = $urandom_range(255); c[v][x] = $urandom_range(255);
        if (blk == 2) begin o[v][x] = 255; c[v][x] = 0; end
        if (blk == 3) begin o[v][x] = 0; c[v][x] = 255; end
      end
      for (int v = 0; v < 8; v++) begin
        @(negedge clk);
        if (v == 0) t0 = cyc;
        in_valid = 1; in_first = (v == 0);
        for (int x = 0; x < 16; x++) begin org[x] = pix_t'(o[v][x]); cand[x] = pix_t'(c[v][x]); end
      end
      @(negedge clk);
      in_valid = 0; in_first = 0;
      checks++;
      if (!out_valid || (cyc - t0) != 8) begin failures++; $display("timing: valid=%0d dt=%0d", out_valid, cyc - t0); end
      for (int h = 0; h < 2; h++) for (int p = 0; p < 8; p++) for (int q = 0; q < 8; q++) begin
        int e;
        e = 0;
        for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++)
          e += hs(p, i) * (o[i][8*h+j] - c[i][8*h+j]) * hs(q, j);
        checks++;
        if (int'(coef[h][8*p+q]) != e) begin
          failures++; $display("blk %0d h%0d (%0d,%0d) got %0d exp %0d", blk, h, p, q, coef[h][8*p+q], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

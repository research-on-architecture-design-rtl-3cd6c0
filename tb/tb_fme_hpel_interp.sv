// tb_fme_hpel_interp: feeds 24 random reference rows two per cycle and checks every integer,
// horizontal-half, vertical-half and diagonal-half pel against a loop-based filter model.
module tb_fme_hpel_interp;
  import fme_pkg::*;
  localparam int W = 16, C = 2*W+1, NR = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  pix_t in_row [2][W+8];
  logic out_valid;
  pix_t out_int [2][C];
  pix_t out_half [2][C];
  int checks = 0, failures = 0;
  pix_t img [NR][W+8];

  fme_hpel_interp #(.W(W)) dut (.*);

  function automatic int filt(input int v[8]);
    int taps[8] = '{-1, 4, -11, 40, 40, -11, 4, -1};
    int s = 0;
    for (int i = 0; i < 8; i++) s += taps[i] * v[i];
    s = (s + 32) >>> 6;
    return s < 0 ? 0 : (s > 255 ? 255 : s);
  endfunction
  function automatic int rowcol(input int r, input int c);   // 33-column processed row
    int v[8];
    if (c < W) return img[r][c+4];
    for (int i = 0; i < 8; i++) v[i] = img[r][c-W+i];
    return filt(v);
  endfunction
  function automatic int halfabove(input int r, input int c);
    int v[8];
    for (int i = 0; i < 8; i++) v[i] = rowcol(r-4+i, c);
    return filt(v);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < NR; r++) for (int x = 0; x < W+8; x++) img[r][x] = pix_t'($urandom);
    // a few extreme rows to exercise clipping
    for (int x = 0; x < W+8; x++) img[5][x] = (x % 2) ? 8'hff : 8'h00;
    for (int x = 0; x < W+8; x++) img[12][x] = (x % 3) ? 8'h00 : 8'hff;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NR/2; k++) begin
      @(negedge clk);
      in_valid = 1;
      in_row[0] = img[2*k];
      in_row[1] = img[2*k+1];
      @(posedge clk); #1;
      in_valid = 0;
      if (!out_valid) begin failures++; $display("out_valid missing"); end
      if (2*k+1 >= 8) begin
        for (int j = 0; j < 2; j++) begin
          int r;
          r = 2*k+1-4+j;
          for (int c = 0; c < C; c++) begin
            checks += 2;
            if (out_int[j][c] != rowcol(r, c)) begin
              failures++; $display("int r=%0d c=%0d got %0d exp %0d", r, c, out_int[j][c], rowcol(r,c));
            end
            if (out_half[j][c] != halfabove(r, c)) begin
              failures++; $display("half r=%0d c=%0d got %0d exp %0d", r, c, out_half[j][c], halfabove(r,c));
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// fme_dg_ht8: difference generation and 8x8 Hadamard transform for one transformed candidate.
//
// Every valid cycle takes one 16-pel row of a 16x8 block: the original pels and the candidate
// (interpolated) pels. The residual row is split into two 8-pel halves and each half gets an
// 8-point Hadamard transform at once (the row pass). Rows 0..7 are kept; when row 7 arrives the
// column pass runs on all eight rows and the two 8x8 coefficient blocks (left and right) are
// registered. 16 pels per cycle, so a 16x8 block takes 8 cycles, matching the interpolator.
//
// Interface: in_valid with in_first on row 0 of a block; out_valid pulses one cycle after row 7;
// coef[b][8*v+u] (b = 0 left, 1 right; v row, u column) stays valid until the next block ends.
// The transform is the unnormalised Hadamard matrix in natural (Sylvester) order,
// H2N = [[HN, HN], [HN, -HN]], the order in which larger transforms are built from smaller ones
// (see fme_ht_merge). A residual of +-255 gives at most 64*255 = 16320, so 15 bits suffice.
module fme_dg_ht8
  import fme_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,
  input  pix_t  org  [16],
  input  pix_t  cand [16],
  output logic  out_valid,
  output coef_t coef [2][64]
);
  typedef logic signed [COEF_W-1:0] acc_t;

  // 8-point Hadamard, natural order: three butterfly layers with stride 4, 2, 1
  function automatic void ht8(input acc_t x [8], output acc_t y [8]);
    acc_t a [8];
    acc_t b [8];
    for (int i = 0; i < 4; i++) begin a[i] = x[i] + x[i+4]; a[i+4] = x[i] - x[i+4]; end
    for (int h = 0; h < 2; h++) for (int i = 0; i < 2; i++) begin
      b[4*h+i] = a[4*h+i] + a[4*h+i+2]; b[4*h+i+2] = a[4*h+i] - a[4*h+i+2];
    end
    for (int i = 0; i < 4; i++) begin y[2*i] = b[2*i] + b[2*i+1]; y[2*i+1] = b[2*i] - b[2*i+1]; end
  endfunction

  acc_t rows [2][8][8];          // row-transformed residuals, [half][row][col]
  acc_t rt   [2][8];             // row pass of the incoming row
  logic [2:0] rcnt;
  logic [2:0] ridx;

  assign ridx = in_first ? 3'd0 : rcnt;

  always_comb begin
    acc_t d [8];
    acc_t t [8];
    for (int h = 0; h < 2; h++) begin
      for (int i = 0; i < 8; i++) d[i] = acc_t'(signed'({1'b0, org[8*h+i]})) - acc_t'(signed'({1'b0, cand[8*h+i]}));
      ht8(d, t);
      rt[h] = t;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rcnt      <= '0;
      out_valid <= 1'b0;
      for (int h = 0; h < 2; h++) for (int v = 0; v < 8; v++) for (int u = 0; u < 8; u++) begin
        rows[h][v][u] <= '0;
        coef[h][8*v+u] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        rcnt <= ridx + 3'd1;
        for (int h = 0; h < 2; h++) rows[h][ridx] <= rt[h];
        if (ridx == 3'd7) begin
          out_valid <= 1'b1;
          for (int h = 0; h < 2; h++) begin
            for (int u = 0; u < 8; u++) begin
              acc_t col [8];
              acc_t ct  [8];
              for (int v = 0; v < 7; v++) col[v] = rows[h][v][u];
              col[7] = rt[h][u];
              ht8(col, ct);
              for (int v = 0; v < 8; v++) coef[h][8*v+u] <= ct[v];
            end
          end
        end
      end
    end
  end
endmodule

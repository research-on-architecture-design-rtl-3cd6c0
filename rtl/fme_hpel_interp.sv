// fme_hpel_interp: half-pel interpolation for the HEVC FME core, two reference rows per cycle.
//
// Two horizontal units each take one reference row of 24 integer pels (x = -4..19 around a
// 16-pel wide strip) and produce the 16 integer pels x = 0..15 plus 17 horizontal half pels
// at x = -0.5..15.5 with the 8-tap HEVC half-sample filter. The 33 columns of each row are
// pushed into a 10-row window. 33 vertical units, each holding two 8-tap filters, then produce
// two vertical half rows per cycle: vertical half pels over the integer columns and diagonal
// (horizontal+vertical) half pels over the half columns. A 16x8 block therefore needs 16
// reference rows, fed in 8 cycles, as in the document.
//
// Output: for the newest row r in the window, out_int[0]/out_int[1] are rows r-4 and r-3
// (33 columns: 16 integer then 17 horizontal half pels) and out_half[j] is the half row just
// above out_int[j] (33 columns: 16 vertical half then 17 diagonal half pels). Outputs are
// registered one cycle after in_valid; out_valid follows in_valid by one cycle. Rows older than
// the start of a block are whatever was fed before; the caller discards them.
//
// Own choices: the diagonal half pels filter the rounded, clipped 8-bit horizontal half pels
// (the HEVC reference keeps a wider intermediate), and each filter output is rounded with
// (+32)>>6 and clipped to 8 bit.
module fme_hpel_interp
  import fme_pkg::*;
#(
  parameter int W = 16                 // integer pels per row of the strip
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  pix_t  in_row   [2][W+8],     // in_row[0] is the older of the two rows
  output logic  out_valid,
  output pix_t  out_int  [2][2*W+1],
  output pix_t  out_half [2][2*W+1]
);
  localparam int C = 2*W + 1;          // columns per processed row
  localparam int D = 10;               // window depth in rows

  pix_t hrow [2][C];
  pix_t win  [D][C];                    // win[D-1] newest

  // horizontal units
  always_comb begin
    for (int j = 0; j < 2; j++) begin
      for (int x = 0; x < W; x++) hrow[j][x] = in_row[j][x+4];
      for (int k = 0; k <= W; k++)
        hrow[j][W+k] = hpel8(in_row[j][k], in_row[j][k+1], in_row[j][k+2], in_row[j][k+3],
                             in_row[j][k+4], in_row[j][k+5], in_row[j][k+6], in_row[j][k+7]);
    end
  end

  pix_t nwin [D][C];
  always_comb begin
    for (int d = 0; d < D-2; d++) nwin[d] = win[d+2];
    nwin[D-2] = hrow[0];
    nwin[D-1] = hrow[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int d = 0; d < D; d++) for (int c = 0; c < C; c++) win[d][c] <= '0;
      for (int j = 0; j < 2; j++) for (int c = 0; c < C; c++) begin
        out_int[j][c]  <= '0;
        out_half[j][c] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        win <= nwin;
        // vertical units: half above row r-4 uses rows r-8..r-1, above r-3 uses r-7..r
        for (int j = 0; j < 2; j++) begin
          out_int[j] <= nwin[5+j];
          for (int c = 0; c < C; c++)
            out_half[j][c] <= hpel8(nwin[1+j][c], nwin[2+j][c], nwin[3+j][c], nwin[4+j][c],
                                    nwin[5+j][c], nwin[6+j][c], nwin[7+j][c], nwin[8+j][c]);
        end
      end
    end
  end
endmodule

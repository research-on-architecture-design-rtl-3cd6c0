// uhd_top: the two UHD encoder cores side by side.
//
// fme: HEVC fractional motion estimation for 32x32 blocks (fme_top): 8-tap half-pel
//      interpolation, corner decision, five DG & HT8x8 units, coefficient SRAMs and twelve
//      exhaustive-size HAD cost units, returning the best quarter-pel refinement.
// intra: the mode-decision core of the H.264 8k intra predictor for one 8x8 luma block
//      (intra_md8): SAD preliminary decision on original pels, DCT-SATD fine decision on
//      reconstructed pels, early result for probability-based reconstruction.
// The two cores share only the clock and reset; every port of each is brought out with an
// fme_ or intra_ prefix. Reconstruction (Q/IQ/IDCT), the 16x16 and chroma paths and the buffers
// of the intra core are not part of this RTL, so its reconstructed references are inputs.
module uhd_top
  import fme_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // FME core
  input  logic        fme_start,
  input  pix_t        fme_ref_win [40][40],
  input  pix_t        fme_org     [32][32],
  input  cost_t       fme_ime_cost [4],
  output logic        fme_busy,
  output logic        fme_done,
  output logic [3:0]  fme_best_sc,
  output logic signed [2:0] fme_mv_qx,
  output logic signed [2:0] fme_mv_qy,
  output cost_t       fme_best_cost,
  output logic        fme_use32,
  output logic [3:0]  fme_use16,
  output cost_t       fme_sc_cost [NUM_SC],
  // intra mode-decision core
  input  logic        intra_start,
  input  logic [7:0]  intra_org     [64],
  input  logic [7:0]  intra_otop    [16],
  input  logic [7:0]  intra_oleft   [8],
  input  logic [7:0]  intra_ocorner,
  input  logic [7:0]  intra_rtop    [16],
  input  logic [7:0]  intra_rleft   [8],
  input  logic [7:0]  intra_rcorner,
  input  logic [3:0]  intra_avail,           // {top, topright, left, corner}
  input  logic [3:0]  intra_mpm,
  input  logic [7:0]  intra_lambda,
  output logic        intra_busy,
  output logic [3:0]  intra_cand [4],
  output logic        intra_early_valid,
  output logic [3:0]  intra_early_mode,
  output logic        intra_done,
  output logic [3:0]  intra_best_mode,
  output logic [23:0] intra_best_cost,
  output logic        intra_final_miss,
  output logic signed [15:0] intra_best_coef [64]
);
  fme_top u_fme (
    .clk, .rst_n, .start(fme_start), .ref_win(fme_ref_win), .org(fme_org),
    .ime_cost(fme_ime_cost), .busy(fme_busy), .done(fme_done), .best_sc(fme_best_sc),
    .mv_qx(fme_mv_qx), .mv_qy(fme_mv_qy), .best_cost(fme_best_cost), .use32(fme_use32),
    .use16(fme_use16), .sc_cost(fme_sc_cost));

  intra_md8 u_intra (
    .clk, .rst_n, .start(intra_start), .org(intra_org), .otop(intra_otop), .oleft(intra_oleft),
    .ocorner(intra_ocorner), .rtop(intra_rtop), .rleft(intra_rleft), .rcorner(intra_rcorner),
    .avail_top(intra_avail[3]), .avail_topright(intra_avail[2]), .avail_left(intra_avail[1]),
    .avail_corner(intra_avail[0]), .mpm(intra_mpm), .lambda(intra_lambda), .busy(intra_busy),
    .cand(intra_cand), .early_valid(intra_early_valid), .early_mode(intra_early_mode),
    .done(intra_done), .best_mode(intra_best_mode), .best_cost(intra_best_cost),
    .final_miss(intra_final_miss), .best_coef(intra_best_coef));
endmodule

// fme_cost_calc: cost calculation module of the FME core, twelve search-candidate (SC) units.
//
// The five transformed candidates (TCs) of the 5T12S pattern arrive as HT8x8 coefficient
// blocks, one 8x8 block position per beat for all five, in Z order over a 32x32 block. Each of
// the twelve SC units takes either one TC's coefficients directly or, for a quarter-pel
// candidate, the bilinear average of two TCs' coefficients, (Ca + Cb) >>> 1. Because the
// difference and the Hadamard transform are linear, this equals transforming the residual of
// the bilinear quarter pel, so quarter candidates need no interpolation and no transform of
// their own. Each unit computes the exhaustive-size HAD (fme_eshad). When all twelve costs are
// ready, the cheapest candidate is selected (lowest index on a tie) and registered.
//
// Candidate table (offsets in quarter pels, signs given by the chosen corner sx, sy):
//   TC0 (0,0)  TC1 (2,0)  TC2 (0,2)  TC3 (2,2)  TC4 (-2,0)
//   SC0..SC4 = TC0..TC4; SC5 (1,0) = TC0+TC1; SC6 (0,1) = TC0+TC2; SC7 (1,1) = TC1+TC2;
//   SC8 (2,1) = TC1+TC3; SC9 (1,2) = TC2+TC3; SC10 (-1,0) = TC0+TC4; SC11 (-1,1) = TC4+TC2.
// The document gives five TCs, twelve SCs, a corner decided from integer-search results and
// bilinear quarter pels; the exact positions above are this design's own choice.
//
// Interface: in_valid/in_zidx/in_tc as for fme_eshad (one beat per 4 cycles at most). out_valid
// pulses one cycle after the SC units finish, with all twelve costs, the best SC index, its
// cost and its transform-size decision.
// Lint reports rst_n as used both synchronously and asynchronously; that comes from the
// rate assertion in fme_eshad, whose disable condition is the reset.
module fme_cost_calc
  import fme_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [3:0]  in_zidx,
  input  coef_t       in_tc [NUM_TC][64],
  output logic        out_valid,
  output cost_t       out_sc_cost [NUM_SC],
  output logic [3:0]  out_best,
  output cost_t       out_best_cost,
  output logic        out_best_use32,
  output logic [3:0]  out_best_use16
);
  // SC -> (TC a, TC b); a == b means the TC itself
  localparam int SC_A [NUM_SC] = '{0, 1, 2, 3, 4, 0, 0, 1, 1, 2, 0, 4};
  localparam int SC_B [NUM_SC] = '{0, 1, 2, 3, 4, 1, 2, 2, 3, 3, 4, 2};

  logic       sc_valid [NUM_SC];
  cost_t      sc_cost  [NUM_SC];
  logic       sc_use32 [NUM_SC];
  logic [3:0] sc_use16 [NUM_SC];

  for (genvar k = 0; k < NUM_SC; k++) begin : g_sc
    coef_t q [64];
    always_comb begin
      for (int i = 0; i < 64; i++) begin
        logic signed [COEF_W:0] s;
        s = in_tc[SC_A[k]][i] + in_tc[SC_B[k]][i];
        q[i] = coef_t'(s >>> 1);
      end
    end
    fme_eshad u_eshad (
      .clk, .rst_n, .in_valid, .in_zidx, .in_coef(q),
      .out_valid(sc_valid[k]), .out_cost(sc_cost[k]),
      .out_use32(sc_use32[k]), .out_use16(sc_use16[k]));
  end

  logic [3:0] best;
  always_comb begin
    best = '0;
    for (int k = 1; k < NUM_SC; k++)
      if (sc_cost[k] < sc_cost[best]) best = 4'(k);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid      <= 1'b0;
      out_best       <= '0;
      out_best_cost  <= '0;
      out_best_use32 <= 1'b0;
      out_best_use16 <= '0;
      for (int k = 0; k < NUM_SC; k++) out_sc_cost[k] <= '0;
    end else begin
      out_valid <= sc_valid[0];
      if (sc_valid[0]) begin
        out_sc_cost    <= sc_cost;
        out_best       <= best;
        out_best_cost  <= sc_cost[best];
        out_best_use32 <= sc_use32[best];
        out_best_use16 <= sc_use16[best];
      end
    end
  end
endmodule

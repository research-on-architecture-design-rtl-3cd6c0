// fme_eshad: exhaustive-size Hadamard cost (ES-HAD) of one search candidate over a 32x32 block.
//
// The unit receives the sixteen 8x8 Hadamard coefficient blocks (C8) of a 32x32 residual in
// Z order, one block per valid beat. For each block it forms HAD8. Every fourth block it builds
// the 16x16 transform of that quadrant from the four C8 blocks (fme_ht_merge, two adder layers),
// forms HAD16 and keeps the cheaper of HAD16 and the sum of the four HAD8. After the sixteenth
// block it builds the 32x32 transform from the four C16 blocks, forms HAD32 and compares it
// with the sum of the four quadrant costs. So each region gets the transform size that costs
// least, 8x8, 16x16 or 32x32, chosen recursively.
//
// HAD is the sum of absolute coefficients scaled to the 8x8 HAD of the HEVC reference encoder:
// HAD8 = (S+2)>>2, and, as this design's own extension of that scale to the larger unnormalised
// transforms, HAD16 = (S+4)>>3 and HAD32 = (S+8)>>4.
//
// The 16x16 merge runs in the cycle the fourth block of a quadrant arrives. The 32x32 merge is
// spread over 8 cycles after the last block, 32 coefficient positions (128 C32 coefficients) per
// cycle, reading the four stored C16 blocks.
//
// Interface: in_valid, in_zidx (0..15, Z order) and in_coef[8*v+u]. Nine cycles after the beat
// with in_zidx = 15, out_valid pulses with out_cost (best ES-HAD cost), out_use32 (32x32 chosen) and
// out_use16[q] (quadrant q takes 16x16 rather than four 8x8; meaningful when out_use32 = 0).
// Blocks must arrive in Z order. The next 32x32 block may start at once, provided no quadrant
// of it completes during those 8 cycles (true at the design's rate of one 8x8 block per 4 cycles).
// Lint reports rst_n as used both synchronously and asynchronously: the synchronous use is
// only the disable condition of the rate assertion below, not logic.
module fme_eshad
  import fme_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [3:0]  in_zidx,
  input  coef_t       in_coef [64],
  output logic        out_valid,
  output cost_t       out_cost,
  output logic        out_use32,
  output logic [3:0]  out_use16
);
  typedef logic signed [COEF_W+1:0] c16_t;
  typedef logic signed [COEF_W+3:0] c32_t;
  localparam int P = 32;                 // C16 positions merged per finishing cycle

  coef_t c8_reg  [3][64];
  c16_t  c16_reg [4][256];
  coef_t c8q  [4][64];                   // C8 blocks of the current quadrant (slot 3 is live)
  c16_t  c16n [256];
  logic [31:0] sum8q, sum16q, had8, had16, sum8_all, cost16;
  logic [31:0] acc32, part32;
  logic [3:0]  use16;
  logic        fin;
  c32_t        m32 [P][4];
  logic [2:0]  fcnt;

  always_comb begin
    for (int q = 0; q < 3; q++) c8q[q] = c8_reg[q];
    c8q[3] = in_coef;
  end

  fme_ht_merge #(.N(8), .IW(COEF_W)) u_m16 (.t(c8q), .y(c16n));

  // 32x32 level: P single-coefficient merges per cycle over 256/P finishing cycles
  for (genvar g = 0; g < P; g++) begin : g_m32
    c16_t in4 [4][1];
    always_comb for (int q = 0; q < 4; q++) in4[q][0] = c16_reg[q][P*int'(fcnt) + g];
    fme_ht_merge #(.N(1), .IW(COEF_W+2)) u_m (.t(in4), .y(m32[g]));
  end

  always_comb begin
    logic [31:0] s;
    s = 0;
    for (int i = 0; i < 64; i++) s += (in_coef[i] < 0) ? 32'(-in_coef[i]) : 32'(in_coef[i]);
    had8 = (s + 32'd2) >> 2;
    s = 0;
    for (int i = 0; i < 256; i++) s += (c16n[i] < 0) ? 32'(-c16n[i]) : 32'(c16n[i]);
    had16 = (s + 32'd4) >> 3;
    sum8_all = sum8q + had8;
    cost16 = (had16 < sum8_all) ? had16 : sum8_all;
  end

  always_comb begin
    part32 = acc32;
    for (int g = 0; g < P; g++)
      for (int k = 0; k < 4; k++)
        part32 += (m32[g][k] < 0) ? 32'(-m32[g][k]) : 32'(m32[g][k]);
  end

  logic [31:0] had32;
  assign had32 = (part32 + 32'd8) >> 4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_cost  <= '0;
      out_use32 <= 1'b0;
      out_use16 <= '0;
      sum8q     <= '0;
      sum16q    <= '0;
      use16     <= '0;
      fin       <= 1'b0;
      fcnt      <= '0;
      acc32     <= '0;
      for (int q = 0; q < 3; q++) for (int i = 0; i < 64; i++) c8_reg[q][i] <= '0;
      for (int q = 0; q < 4; q++) for (int i = 0; i < 256; i++) c16_reg[q][i] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (in_zidx[1:0] != 2'd3) begin
          c8_reg[in_zidx[1:0]] <= in_coef;
          sum8q <= (in_zidx[1:0] == 2'd0) ? had8 : sum8_all;
        end else begin
          // quadrant complete: choose 16x16 or four 8x8
          c16_reg[in_zidx[3:2]] <= c16n;
          use16[in_zidx[3:2]]   <= (had16 < sum8_all);
          sum16q <= (in_zidx[3:2] == 2'd0) ? cost16 : sum16q + cost16;
          if (in_zidx[3:2] == 2'd3) begin
            fin   <= 1'b1;
            fcnt  <= '0;
            acc32 <= '0;
          end
        end
      end
      if (fin) begin
        acc32 <= part32;
        fcnt  <= fcnt + 3'd1;
        if (fcnt == 3'd7) begin
          fin       <= 1'b0;
          out_valid <= 1'b1;
          out_use32 <= (had32 < sum16q);
          out_cost  <= cost_t'((had32 < sum16q) ? had32 : sum16q);
          out_use16 <= use16;
        end
      end
    end
  end

  // blocks of the next 32x32 must not complete a quadrant while the 32x32 merge is running
  assert property (@(posedge clk) disable iff (!rst_n)
                   fin |-> !(in_valid && in_zidx[1:0] == 2'd3))
    else $error("fme_eshad: quadrant completed during the 32x32 finishing phase");
endmodule

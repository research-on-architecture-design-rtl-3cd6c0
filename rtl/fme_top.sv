// fme_top: HEVC fractional motion estimation core for one 32x32 prediction block.
//
// Given the integer motion vector found by integer motion estimation (IME), the core refines it
// to quarter-pel accuracy. It works the way the document's FME chip does:
//   1. Corner decision: the IME costs of the four integer neighbours pick the quadrant
//      (sx, sy) where the fractional best most likely lies.
//   2. Half-pel interpolation (fme_hpel_interp), 16x8 block by 16x8 block, two reference rows
//      per cycle, into a half-pel buffer.
//   3. Five DG & HT8x8 units (fme_dg_ht8) transform the residuals of the five transformed
//      candidates (TCs) of the 5T12S pattern, 16 pels per cycle.
//   4. The 8x8 coefficients (C8) go to five two-port SRAMs (fme_c8_sram), one per TC, at the
//      address of their Z-order position; the SRAM half used alternates between blocks.
//   5. The C8 blocks are read back in Z order, four words per 8x8 block, and the cost
//      calculation module (fme_cost_calc) evaluates the twelve search candidates with the
//      exhaustive-size HAD, forming quarter-pel coefficients by averaging TC coefficients.
//
// Interface: pulse start with ref_win, org and ime_cost stable until done. ref_win[y][x] is the
// integer reference at offset (x-4, y-4) from the block origin at the integer motion vector,
// so it covers the 8-tap filter support of the 32x32 block. org is the original block.
// ime_cost = {left, right, up, down} integer costs. done pulses with the best SC, its quarter-pel
// offset (mv_qx, mv_qy, range -2..2), its ES-HAD cost and the transform-size decision.
//
// Timing: each 16x8 block takes 8 cycles of interpolation then 8 cycles of DG & HT, and the
// coefficient write-back of one block overlaps the interpolation of the next; the read-back
// takes 4 cycles per 8x8 block. A 32x32 block is done 228 cycles after start. The
// document runs interpolation, transform and cost calculation fully overlapped at 8 cycles
// per 16x8 block; this version runs the phases back to back (see README).
// Lint reports rst_n as used both synchronously and asynchronously; that comes from the
// rate assertion in fme_eshad, whose disable condition is the reset.
module fme_top
  import fme_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  pix_t        ref_win [40][40],
  input  pix_t        org     [32][32],
  input  cost_t       ime_cost [4],
  output logic        busy,
  output logic        done,
  output logic [3:0]  best_sc,
  output logic signed [2:0] mv_qx,
  output logic signed [2:0] mv_qy,
  output cost_t       best_cost,
  output logic        use32,
  output logic [3:0]  use16,
  output cost_t       sc_cost [NUM_SC]
);
  typedef enum logic [2:0] {S_IDLE, S_INTERP, S_DG, S_WB, S_READ, S_COST} state_t;
  state_t state;

  logic       sxp, syp;          // corner: +x / +y quadrant
  logic [2:0] blk;               // 16x8 block: strip = blk[2], row group = blk[1:0]
  logic [3:0] cnt;
  logic [2:0] wcnt;              // write-back word of the previous block
  logic       wb_act;
  logic [2:0] wb_blk;
  logic       bank;
  logic [5:0] rcnt;              // read word counter (z*4 + row pair)
  logic       rd_v;
  logic [5:0] rd_w;

  // ---------------- interpolation ----------------
  logic in_valid;
  pix_t in_row [2][24];
  logic iv;
  pix_t oi [2][33];
  pix_t oh [2][33];
  pix_t buf_int  [9][33];
  pix_t buf_half [9][33];
  int   y0, x0;

  assign y0 = 8 * int'(blk[1:0]);
  assign x0 = 16 * int'(blk[2]);
  assign in_valid = (state == S_INTERP) && (cnt < 4'd8);
  always_comb begin
    for (int j = 0; j < 2; j++)
      for (int x = 0; x < 24; x++)
        in_row[j][x] = ref_win[(y0 + 2*int'(cnt[2:0]) + j) % 40][x0 + x];
  end

  fme_hpel_interp #(.W(16)) u_interp (
    .clk, .rst_n, .in_valid, .in_row, .out_valid(iv), .out_int(oi), .out_half(oh));

  // ---------------- DG & HT8x8 ----------------
  logic dg_valid, dg_first;
  pix_t org_row [16];
  pix_t cand [NUM_TC][16];
  logic dg_ov [NUM_TC];
  coef_t dg_coef [NUM_TC][2][64];
  int v;

  assign v = int'(cnt[2:0]);
  assign dg_valid = (state == S_DG);
  assign dg_first = dg_valid && (cnt == 4'd0);
  always_comb begin
    for (int x = 0; x < 16; x++) begin
      org_row[x] = org[y0 + v][x0 + x];
      cand[0][x] = buf_int[v][x];
      cand[1][x] = buf_int[v][16 + x + (sxp ? 1 : 0)];
      cand[2][x] = syp ? buf_half[v + 1][x] : buf_half[v][x];
      cand[3][x] = syp ? buf_half[v + 1][16 + x + (sxp ? 1 : 0)] : buf_half[v][16 + x + (sxp ? 1 : 0)];
      cand[4][x] = buf_int[v][16 + x + (sxp ? 0 : 1)];
    end
  end

  for (genvar t = 0; t < NUM_TC; t++) begin : g_dg
    fme_dg_ht8 u_dg (.clk, .rst_n, .in_valid(dg_valid), .in_first(dg_first), .org(org_row),
                     .cand(cand[t]), .out_valid(dg_ov[t]), .coef(dg_coef[t]));
  end

  // ---------------- C8 SRAMs ----------------
  logic         we;
  logic [6:0]   waddr, raddr;
  logic [239:0] wdata [NUM_TC];
  logic [239:0] rdata [NUM_TC];
  logic [3:0]   wz;
  logic [2:0]   wbx, wby;

  assign wbx = {1'b0, wb_blk[2], wcnt[2]};       // 8x8 column 0..3
  assign wby = {1'b0, wb_blk[1:0]};              // 8x8 row 0..3
  assign wz  = {wby[1], wbx[1], wby[0], wbx[0]};
  assign we    = wb_act;
  assign waddr = {bank, wz, wcnt[1:0]};
  assign raddr = {bank, rcnt};
  always_comb begin
    for (int t = 0; t < NUM_TC; t++)
      for (int i = 0; i < 16; i++)
        wdata[t][15*i +: 15] = dg_coef[t][wcnt[2]][16*int'(wcnt[1:0]) + i];
  end

  for (genvar t = 0; t < NUM_TC; t++) begin : g_sram
    fme_c8_sram u_sram (.clk, .we, .waddr, .wdata(wdata[t]), .re(state == S_READ), .raddr,
                        .rdata(rdata[t]));
  end

  // ---------------- read-back and cost calculation ----------------
  coef_t acc_blk [NUM_TC][64];
  coef_t cc_tc   [NUM_TC][64];
  logic  cc_valid;
  logic [3:0] cc_zidx;
  logic  cc_ov;
  logic [3:0] cc_best;
  cost_t cc_best_cost;
  logic  cc_use32;
  logic [3:0] cc_use16;
  cost_t cc_cost [NUM_SC];

  always_comb begin
    for (int t = 0; t < NUM_TC; t++) begin
      cc_tc[t] = acc_blk[t];
      for (int i = 0; i < 16; i++) cc_tc[t][48 + i] = coef_t'(rdata[t][15*i +: 15]);
    end
  end
  assign cc_valid = rd_v && (rd_w[1:0] == 2'd3);
  assign cc_zidx  = rd_w[5:2];

  fme_cost_calc u_cost (
    .clk, .rst_n, .in_valid(cc_valid), .in_zidx(cc_zidx), .in_tc(cc_tc),
    .out_valid(cc_ov), .out_sc_cost(cc_cost), .out_best(cc_best), .out_best_cost(cc_best_cost),
    .out_best_use32(cc_use32), .out_best_use16(cc_use16));

  // SC index -> quarter-pel offset (unsigned pattern, then the corner signs)
  localparam int SC_QX [NUM_SC] = '{0, 2, 0, 2, -2, 1, 0, 1, 2, 1, -1, -1};
  localparam int SC_QY [NUM_SC] = '{0, 0, 2, 2,  0, 0, 1, 1, 1, 2,  0,  1};

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      sxp     <= 1'b0;
      syp     <= 1'b0;
      blk     <= '0;
      cnt     <= '0;
      wcnt    <= '0;
      wb_act  <= 1'b0;
      wb_blk  <= '0;
      bank    <= 1'b0;
      rcnt    <= '0;
      rd_v    <= 1'b0;
      rd_w    <= '0;
      done    <= 1'b0;
      best_sc <= '0;
      mv_qx   <= '0;
      mv_qy   <= '0;
      best_cost <= '0;
      use32   <= 1'b0;
      use16   <= '0;
      for (int k = 0; k < NUM_SC; k++) sc_cost[k] <= '0;
      for (int a = 0; a < 9; a++) for (int c = 0; c < 33; c++) begin
        buf_int[a][c] <= '0; buf_half[a][c] <= '0;
      end
      for (int t = 0; t < NUM_TC; t++) for (int i = 0; i < 64; i++) acc_blk[t][i] <= '0;
    end else begin
      done <= 1'b0;
      // capture interpolator output rows y0-7+2i+j for feeds i = 3..7 (rows 0..8 of the block)
      if (iv && state == S_INTERP && cnt >= 4'd4) begin
        for (int j = 0; j < 2; j++) begin
          int a;
          a = 2 * (int'(cnt) - 1) - 7 + j;
          if (a >= 0 && a <= 8) begin
            buf_int[a]  <= oi[j];
            buf_half[a] <= oh[j];
          end
        end
      end
      // coefficient write-back of the previous 16x8 block
      if (wb_act) begin
        wcnt <= wcnt + 3'd1;
        if (wcnt == 3'd7) wb_act <= 1'b0;
      end
      // read pipeline bookkeeping
      rd_v <= (state == S_READ);
      rd_w <= rcnt;
      if (rd_v) for (int t = 0; t < NUM_TC; t++)
        for (int i = 0; i < 16; i++) acc_blk[t][16*int'(rd_w[1:0]) + i] <= coef_t'(rdata[t][15*i +: 15]);

      case (state)
        S_IDLE: if (start) begin
          sxp   <= (ime_cost[1] <= ime_cost[0]);
          syp   <= (ime_cost[3] <= ime_cost[2]);
          blk   <= '0;
          cnt   <= '0;
          state <= S_INTERP;
        end
        S_INTERP: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd8) begin cnt <= '0; state <= S_DG; end
        end
        S_DG: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd7) begin
            cnt    <= '0;
            state  <= S_WB;
          end
        end
        S_WB: begin
          // DG results are registered now: start their write-back, move on
          wb_act <= 1'b1;
          wcnt   <= '0;
          wb_blk <= blk;
          blk    <= blk + 3'd1;
          state  <= (blk == 3'd7) ? S_READ : S_INTERP;
          rcnt   <= '0;
        end
        S_READ: begin
          // wait for the last write-back to drain before reading
          if (!wb_act) begin
            rcnt <= rcnt + 6'd1;
            if (rcnt == 6'd63) state <= S_COST;
          end
        end
        S_COST: if (cc_ov) begin
          done      <= 1'b1;
          best_sc   <= cc_best;
          mv_qx     <= 3'(sxp ? SC_QX[cc_best] : -SC_QX[cc_best]);
          mv_qy     <= 3'(syp ? SC_QY[cc_best] : -SC_QY[cc_best]);
          best_cost <= cc_best_cost;
          use32     <= cc_use32;
          use16     <= cc_use16;
          sc_cost   <= cc_cost;
          bank      <= ~bank;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

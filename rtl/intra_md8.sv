// intra_md8: preliminary and fine mode decision for one 8x8 luma block of the 8k intra core.
//
// Preliminary decision (PD): the nine 8x8 modes are predicted from ORIGINAL neighbouring pels,
// which carry no dependency on reconstruction, and scored by SAD. The four cheapest allowed
// modes become the candidates, in ascending SAD order. Fine decision (FD): the candidates are
// predicted again from RECONSTRUCTED neighbours and scored by the DCT-based SATD plus the mode
// cost of the document's equation: Cost = SATD + lambda * R, R = 0 for the most probable mode
// and 4 otherwise. Because the candidates come in ascending SAD order, the best of the first two
// is reported early (early_valid) so reconstruction can start on it; if a later candidate wins,
// final_miss tells the reconstruction to restart with the new mode (probability-based
// reconstruction). One prediction generator is shared by PD and FD, as in the document's fine
// decision module sharing.
//
// Timing: start at cycle 0; PD evaluates one mode per cycle (cycles 1..9), candidate selection
// takes one cycle, FD evaluates one candidate per cycle. early_valid pulses after the second
// candidate, done after the fourth, 15 cycles after start. The document's pipelines evaluate
// PD modes in interlaced 2-cycle slots with 64-pel parallelism and FD modes every 2 cycles; this
// version takes one whole 8x8 mode per cycle and has no 16x16 partition decision (see README).
//
// Interface: inputs stable from start to done. Modes needing an unavailable neighbour are
// excluded (vertical, down-left, vertical-left need the upper row; horizontal, horizontal-up the
// left column; the other diagonals both and the corner).
module intra_md8 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [7:0]  org       [64],
  input  logic [7:0]  otop      [16],  // original-pel references (PD)
  input  logic [7:0]  oleft     [8],
  input  logic [7:0]  ocorner,
  input  logic [7:0]  rtop      [16],  // reconstructed references (FD)
  input  logic [7:0]  rleft     [8],
  input  logic [7:0]  rcorner,
  input  logic        avail_top,
  input  logic        avail_topright,
  input  logic        avail_left,
  input  logic        avail_corner,
  input  logic [3:0]  mpm,              // most probable mode
  input  logic [7:0]  lambda,
  output logic        busy,
  output logic [3:0]  cand      [4],    // PD candidates, ascending SAD
  output logic        early_valid,
  output logic [3:0]  early_mode,
  output logic        done,
  output logic [3:0]  best_mode,
  output logic [23:0] best_cost,
  output logic        final_miss,       // best is candidate 2 or 3
  output logic signed [15:0] best_coef [64]
);
  typedef enum logic [1:0] {S_IDLE, S_PD, S_SEL, S_FD} state_t;
  state_t state;
  logic [3:0] cnt;

  // shared prediction generator
  logic [7:0] ptop [16];
  logic [7:0] pleft [8];
  logic [7:0] pcorner;
  logic [3:0] pmode;
  logic [7:0] pred [64];
  always_comb begin
    ptop    = (state == S_FD) ? rtop : otop;
    pleft   = (state == S_FD) ? rleft : oleft;
    pcorner = (state == S_FD) ? rcorner : ocorner;
    pmode   = (state == S_FD) ? cand[cnt[1:0]] : cnt;
  end
  intra_pred8x8 u_pg (.top(ptop), .left(pleft), .corner(pcorner), .avail_top, .avail_topright,
                      .avail_left, .avail_corner, .mode(pmode), .pred);

  // residual, SAD and DCT-based SATD
  logic signed [8:0]  res [64];
  logic signed [15:0] coef [64];
  logic [21:0] satd;
  logic [13:0] sad;
  always_comb begin
    sad = '0;
    for (int i = 0; i < 64; i++) begin
      res[i] = 9'(signed'({1'b0, org[i]})) - 9'(signed'({1'b0, pred[i]}));
      sad += (res[i] < 0) ? 14'(-res[i]) : 14'(res[i]);
    end
  end
  intra_dct8 u_dct (.res, .coef, .satd);

  function automatic logic allowed(input logic [3:0] m, input logic t, l, c);
    case (m)
      4'd0, 4'd3, 4'd7: return t;
      4'd1, 4'd8:       return l;
      4'd2:             return 1'b1;
      default:          return t && l && c;
    endcase
  endfunction

  // PD costs and ascending selection of four candidates
  logic [14:0] pd_cost [9];
  logic [3:0]  sel [4];
  always_comb begin
    logic [8:0] taken;
    taken = '0;
    for (int k = 0; k < 4; k++) begin
      logic [3:0] bi;
      logic [14:0] bc;
      bi = 4'd2; bc = 15'h7fff;
      for (int m = 0; m < 9; m++)
        if (!taken[m] && pd_cost[m] < bc) begin bc = pd_cost[m]; bi = 4'(m); end
      if (bc == 15'h7fff) bi = 4'd2;   // fewer than four allowed modes: repeat DC
      sel[k] = bi;
      taken[bi] = 1'b1;
    end
  end

  logic [23:0] fd_cost;
  assign fd_cost = 24'(satd) + ((pmode == mpm) ? 24'd0 : 24'(lambda) * 24'd4);

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt <= '0;
      for (int m = 0; m < 9; m++) pd_cost[m] <= '1;
      for (int k = 0; k < 4; k++) cand[k] <= '0;
      for (int i = 0; i < 64; i++) best_coef[i] <= '0;
      early_valid <= 1'b0;
      early_mode <= '0;
      done <= 1'b0;
      best_mode <= '0;
      best_cost <= '0;
      final_miss <= 1'b0;
    end else begin
      early_valid <= 1'b0;
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin state <= S_PD; cnt <= '0; end
        S_PD: begin
          pd_cost[cnt] <= allowed(cnt, avail_top, avail_left, avail_corner) ? {1'b0, sad} : 15'h7fff;
          cnt <= cnt + 4'd1;
          if (cnt == 4'd8) state <= S_SEL;
        end
        S_SEL: begin
          cand <= sel;
          cnt <= '0;
          state <= S_FD;
        end
        S_FD: begin
          if (cnt == 4'd0 || fd_cost < best_cost) begin
            best_cost <= fd_cost;
            best_mode <= pmode;
            best_coef <= coef;
            final_miss <= (cnt >= 4'd2);
          end
          if (cnt == 4'd1) begin
            early_valid <= 1'b1;
            early_mode <= (fd_cost < best_cost) ? pmode : best_mode;
          end
          cnt <= cnt + 4'd1;
          if (cnt == 4'd3) begin
            done <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

// intra_pred8x8: H.264 8x8 luma intra prediction generator, one whole 8x8 block per cycle.
//
// From the 16 upper (and upper-right), 8 left and the corner reference pels it first applies
// the standard [1 2 1] reference smoothing of 8x8 intra prediction (with the edge and
// availability rules of the standard: a missing upper-right half repeats pel 7, a missing corner
// changes the end taps), then produces all 64 predicted pels of the selected mode: 0 vertical,
// 1 horizontal, 2 DC, 3 diagonal down-left, 4 diagonal down-right, 5 vertical-right,
// 6 horizontal-down, 7 vertical-left, 8 horizontal-up. The document's generators predict a
// whole block per cycle (64-pel parallelism) and observe that at most 22 distinct values occur
// in a block, so 22 processing elements suffice; here the pel equations are written directly
// and sharing of equal terms is left to synthesis.
//
// Interface: combinational; the caller registers pred. Directional modes that need a missing
// neighbour are the caller's to avoid (the encoder only evaluates allowed modes).
module intra_pred8x8 (
  input  logic [7:0] top    [16],   // p[x,-1], x = 0..15
  input  logic [7:0] left   [8],    // p[-1,y]
  input  logic [7:0] corner,        // p[-1,-1]
  input  logic       avail_top,
  input  logic       avail_topright,
  input  logic       avail_left,
  input  logic       avail_corner,
  input  logic [3:0] mode,
  output logic [7:0] pred   [64]    // pred[8*y+x]
);
  logic [9:0] t [16];   // raw top with upper-right substitution
  logic [9:0] ft [16];  // filtered
  logic [9:0] fl [8];
  logic [9:0] fc;

  function automatic logic [7:0] f3(input logic [9:0] a, b, c);
    logic [11:0] s;
    s = 12'(a) + 12'(2 * b) + 12'(c) + 12'd2;
    return 8'(s >> 2);
  endfunction
  function automatic logic [7:0] f2(input logic [9:0] a, b);
    logic [10:0] s;
    s = 11'(a) + 11'(b) + 11'd1;
    return 8'(s >> 1);
  endfunction

  always_comb begin
    for (int x = 0; x < 16; x++) t[x] = 10'((x < 8 || avail_topright) ? top[x] : top[7]);
    ft[0] = avail_corner ? 10'(f3(10'(corner), t[0], t[1])) : 10'(f3(t[0], t[0], t[1]) );
    for (int x = 1; x < 15; x++) ft[x] = 10'(f3(t[x-1], t[x], t[x+1]));
    ft[15] = 10'(f3(t[14], t[15], t[15]));
    fl[0] = avail_corner ? 10'(f3(10'(corner), 10'(left[0]), 10'(left[1])))
                         : 10'(f3(10'(left[0]), 10'(left[0]), 10'(left[1])));
    for (int y = 1; y < 7; y++) fl[y] = 10'(f3(10'(left[y-1]), 10'(left[y]), 10'(left[y+1])));
    fl[7] = 10'(f3(10'(left[6]), 10'(left[7]), 10'(left[7])));
    if (avail_top && avail_left) fc = 10'(f3(t[0], 10'(corner), 10'(left[0])));
    else if (avail_top)          fc = 10'(f3(10'(corner), 10'(corner), t[0]));
    else                         fc = 10'(f3(10'(corner), 10'(corner), 10'(left[0])));
  end

  // filtered top / left with index -1 meaning the corner
  function automatic logic [9:0] T(input int i);
    return (i < 0) ? fc : ft[(i > 15) ? 15 : i];
  endfunction
  function automatic logic [9:0] L(input int j);
    return (j < 0) ? fc : fl[(j > 7) ? 7 : j];
  endfunction

  logic [7:0] dc;
  always_comb begin
    logic [13:0] st, sl;
    st = 0; sl = 0;
    for (int i = 0; i < 8; i++) begin st += 14'(ft[i]); sl += 14'(fl[i]); end
    if (avail_top && avail_left) dc = 8'((st + sl + 14'd8) >> 4);
    else if (avail_top)          dc = 8'((st + 14'd4) >> 3);
    else if (avail_left)         dc = 8'((sl + 14'd4) >> 3);
    else                         dc = 8'd128;
  end

  always_comb begin
    for (int y = 0; y < 8; y++) begin
      for (int x = 0; x < 8; x++) begin
        int z;
        logic [7:0] p;
        p = '0;
        z = 0;
        case (mode)
          4'd0: p = 8'(ft[x]);
          4'd1: p = 8'(fl[y]);
          4'd2: p = dc;
          4'd3: p = (x == 7 && y == 7) ? f3(T(14), T(15), T(15)) : f3(T(x+y), T(x+y+1), T(x+y+2));
          4'd4: begin
            if (x > y)      p = f3(T(x-y-2), T(x-y-1), T(x-y));
            else if (x < y) p = f3(L(y-x-2), L(y-x-1), L(y-x));
            else            p = f3(T(0), fc, L(0));
          end
          4'd5: begin
            z = 2*x - y;
            if (z >= 0 && z % 2 == 0) p = f2(T(x-(y>>1)-1), T(x-(y>>1)));
            else if (z >= 0)          p = f3(T(x-(y>>1)-2), T(x-(y>>1)-1), T(x-(y>>1)));
            else if (z == -1)         p = f3(L(0), fc, T(0));
            else                      p = f3(L(y-2*x-1), L(y-2*x-2), L(y-2*x-3));
          end
          4'd6: begin
            z = 2*y - x;
            if (z >= 0 && z % 2 == 0) p = f2(L(y-(x>>1)-1), L(y-(x>>1)));
            else if (z >= 0)          p = f3(L(y-(x>>1)-2), L(y-(x>>1)-1), L(y-(x>>1)));
            else if (z == -1)         p = f3(L(0), fc, T(0));
            else                      p = f3(T(x-2*y-1), T(x-2*y-2), T(x-2*y-3));
          end
          4'd7: begin
            if (y % 2 == 0) p = f2(T(x+(y>>1)), T(x+(y>>1)+1));
            else            p = f3(T(x+(y>>1)), T(x+(y>>1)+1), T(x+(y>>1)+2));
          end
          4'd8: begin
            z = x + 2*y;
            if (z < 13 && z % 2 == 0) p = f2(L(y+(x>>1)), L(y+(x>>1)+1));
            else if (z < 13)          p = f3(L(y+(x>>1)), L(y+(x>>1)+1), L(y+(x>>1)+2));
            else if (z == 13)         p = f3(L(6), L(7), L(7));
            else                      p = 8'(fl[7]);
          end
          default: p = dc;
        endcase
        pred[8*y+x] = p;
      end
    end
  end
endmodule

// fme_ht_merge: builds a 2Nx2N Hadamard transform from the transforms of its four NxN quadrants.
//
// With H2N = [[HN, HN], [HN, -HN]] and the residual split into quadrants A11 A12 / A21 A22
// whose NxN transforms are T11 T12 T21 T22, the 2Nx2N transform is
//   top-left  T11+T12+T21+T22    top-right    T11-T12+T21-T22
//   bottom-left T11+T12-T21-T22  bottom-right T11-T12-T21+T22
// taken coefficient by coefficient. Two butterfly adder layers replace the 2, and 4, extra
// layers a separate HT16x16 and HT32x32 would need; this is the data reuse of the exhaustive
// size HAD. Purely combinational.
//
// Interface: t[q][N*v+u] is coefficient (v,u) of quadrant q (0 = top-left, 1 = top-right,
// 2 = bottom-left, 3 = bottom-right); y[2N*v+u] is coefficient (v,u) of the result. The result is
// two bits wider than the inputs.
module fme_ht_merge #(
  parameter int N  = 8,
  parameter int IW = 15
) (
  input  logic signed [IW-1:0]   t [4][N*N],
  output logic signed [IW+1:0]   y [4*N*N]
);
  always_comb begin
    for (int v = 0; v < N; v++) begin
      for (int u = 0; u < N; u++) begin
        logic signed [IW:0] s1, d1, s2, d2;
        s1 = t[0][N*v+u] + t[1][N*v+u];
        d1 = t[0][N*v+u] - t[1][N*v+u];
        s2 = t[2][N*v+u] + t[3][N*v+u];
        d2 = t[2][N*v+u] - t[3][N*v+u];
        y[2*N*v     + u    ] = s1 + s2;
        y[2*N*v     + u + N] = d1 + d2;
        y[2*N*(v+N) + u    ] = s1 - s2;
        y[2*N*(v+N) + u + N] = d1 - d2;
      end
    end
  end
endmodule

// tb_fme_ht_merge: a random 16x16 residual is transformed per 8x8 quadrant by a matrix model,
// merged by the unit, and compared with the direct 16x16 Hadamard product of the whole block.
module tb_fme_ht_merge;
  localparam int N = 8, IW = 15;
  logic signed [IW-1:0] t [4][N*N];
  logic signed [IW+1:0] y [4*N*N];
  int checks = 0, failures = 0;
  int r [2*N][2*N];
  fme_ht_merge #(.N(N), .IW(IW)) dut (.*);

  function automatic int hs(input int i, input int j);
    return ($countones(i & j) % 2 == 1) ? -1 : 1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 4; it++) begin
      for (int i = 0; i < 2*N; i++) for (int j = 0; j < 2*N; j++)
        r[i][j] = (it == 0) ? 255 : (it == 1) ? -255 : $urandom_range(510) - 255;
      for (int q = 0; q < 4; q++) for (int p = 0; p < N; p++) for (int s = 0; s < N; s++) begin
        int e;
        e = 0;
        for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
          e += hs(p, i) * r[N*(q/2)+i][N*(q%2)+j] * hs(s, j);
        t[q][N*p+s] = IW'(e);
      end
      #1;
      for (int p = 0; p < 2*N; p++) for (int s = 0; s < 2*N; s++) begin
        int e;
        e = 0;
        for (int i = 0; i < 2*N; i++) for (int j = 0; j < 2*N; j++) e += hs(p, i) * r[i][j] * hs(s, j);
        checks++;
        if (int'(y[2*N*p+s]) != e) begin
          failures++; $display("it %0d (%0d,%0d) got %0d exp %0d", it, p, s, y[2*N*p+s], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

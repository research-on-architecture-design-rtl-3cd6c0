// tb_intra_pred8x8: checks the 8x8 prediction generator with (1) flat references, where every
// mode must predict the flat value, (2) hand-worked values on a linear ramp, (3) DC with known
// sums and missing neighbours, and (4) transposition symmetry on random references: swapping the
// upper row and left column must turn horizontal into vertical, horizontal-down into
// vertical-right, and must mirror diagonal down-right.
module tb_intra_pred8x8;
  logic [7:0] top [16];
  logic [7:0] left [8];
  logic [7:0] corner;
  logic avail_top, avail_topright, avail_left, avail_corner;
  logic [3:0] mode;
  logic [7:0] pred [64];
  logic [7:0] keep [64];
  int checks = 0, failures = 0;
  intra_pred8x8 dut (.*);

  task automatic expect_pel(input int x, input int y, input int v, input string what);
    checks++;
    if (pred[8*y+x] != 8'(v)) begin
      failures++; $display("%s (%0d,%0d): got %0d exp %0d", what, x, y, pred[8*y+x], v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // (1) flat
    for (int i = 0; i < 16; i++) top[i] = 100;
    for (int i = 0; i < 8; i++) left[i] = 100;
    corner = 100;
    {avail_top, avail_topright, avail_left, avail_corner} = 4'b1111;
    for (int m = 0; m < 9; m++) begin
      mode = 4'(m); #1;
      for (int i = 0; i < 64; i++) expect_pel(i % 8, i / 8, 100, $sformatf("flat m%0d", m));
    end
    // (2) ramp: top = 10 + 4x, corner 6, left = 200
    for (int i = 0; i < 16; i++) top[i] = 8'(10 + 4*i);
    corner = 6;
    mode = 0; #1;
    expect_pel(0, 3, 10, "V ramp");
    expect_pel(5, 6, 30, "V ramp");
    mode = 3; #1;
    expect_pel(2, 1, 10 + 4*4, "DDL ramp");
    expect_pel(7, 7, 68, "DDL corner pel");
    // upper-right missing: pels 8..15 repeat pel 7 (38)
    avail_topright = 0; mode = 3; #1;
    expect_pel(7, 7, 38, "DDL no upper-right");
    avail_topright = 1;
    // (3) DC: only top available -> mean of filtered top 0..7 (10,14..38 -> 10+14+..+38 = 192)
    avail_left = 0; avail_corner = 0; mode = 2; #1;
    // filtered top without corner: ft0 = (3*10+14+2)>>2 = 11, others equal to the ramp
    expect_pel(3, 3, (11 + 14 + 18 + 22 + 26 + 30 + 34 + 38 + 4) >> 3, "DC top only");
    avail_top = 0; #1;
    expect_pel(0, 0, 128, "DC none");
    // (4) transposition symmetry on random refs
    for (int it = 0; it < 20; it++) begin
      logic [7:0] t8 [8];
      for (int i = 0; i < 16; i++) top[i] = 8'($urandom);
      for (int i = 0; i < 8; i++) left[i] = 8'($urandom);
      corner = 8'($urandom);
      {avail_top, avail_topright, avail_left, avail_corner} = 4'b1111;
      foreach (t8[i]) t8[i] = top[i];
      // pairs (mode on original refs, mode on swapped refs, transpose?)
      for (int pr = 0; pr < 3; pr++) begin
        int ma, mb;
        ma = (pr == 0) ? 1 : (pr == 1) ? 6 : 4;
        mb = (pr == 0) ? 0 : (pr == 1) ? 5 : 4;
        for (int i = 0; i < 8; i++) top[i] = t8[i];
        for (int i = 0; i < 16; i++) if (i >= 8) top[i] = t8[7];   // keep upper-right neutral
        avail_topright = 0;
        mode = 4'(ma); #1;
        keep = pred;
        for (int i = 0; i < 8; i++) begin top[i] = left[i]; left[i] = t8[i]; end
        for (int i = 8; i < 16; i++) top[i] = top[7];
        mode = 4'(mb); #1;
        for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) begin
          checks++;
          if (pred[8*x+y] != keep[8*y+x]) begin
            failures++; $display("symmetry m%0d/m%0d (%0d,%0d): %0d vs %0d", ma, mb, x, y, pred[8*x+y], keep[8*y+x]);
          end
        end
        for (int i = 0; i < 8; i++) begin left[i] = top[i]; end
        for (int i = 0; i < 8; i++) top[i] = t8[i];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

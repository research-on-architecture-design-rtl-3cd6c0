// tb_fme_c8_sram: fills both ping-pong halves with distinct patterns, reads them back while
// the other half is rewritten, and checks the one-cycle read latency against a shadow array.
module tb_fme_c8_sram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, re = 0;
  logic [6:0] waddr, raddr;
  logic [239:0] wdata, rdata;
  logic [239:0] shadow [128];
  int checks = 0, failures = 0;
  fme_c8_sram dut (.*);

  function automatic logic [239:0] pat(input int a, input int pass);
    logic [239:0] v;
    for (int i = 0; i < 8; i++) v[30*i +: 30] = 30'($urandom) ^ 30'(a * 7 + pass);
    return v;
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill all 128 words
    for (int a = 0; a < 128; a++) begin
      @(negedge clk); we = 1; waddr = 7'(a); wdata = pat(a, 0); shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    // read bank 0 while rewriting bank 1 (ping-pong), then the other way round
    for (int pass = 1; pass < 3; pass++) begin
      for (int i = 0; i < 64; i++) begin
        int rb;
        rb = (pass == 1) ? 0 : 64;
        @(negedge clk);
        re = 1; raddr = 7'(rb + i);
        we = 1; waddr = 7'((rb ^ 64) + i); wdata = pat(i, pass);
        @(posedge clk); #1;
        shadow[(rb ^ 64) + i] = wdata;
        checks++;
        if (rdata !== shadow[rb + i]) begin failures++; $display("addr %0d mismatch", rb + i); end
      end
    end
    @(negedge clk); we = 0; re = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

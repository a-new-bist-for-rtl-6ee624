// tb_misr: self-checking test of the signature register. A reference MISR
// is modelled bit by bit in the testbench (shift up, feedback from bits
// 15, 13, 12, 10 into bit 0, data XORed into the low bits) and compared
// every cycle under random data, enable and clear. A single flipped input
// bit in a stream must change the final signature.
module tb_misr;
  localparam int unsigned W = 16, IW = 8;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [IW-1:0] din = '0;
  logic [W-1:0] sig, ref_s;
  int checks = 0, failures = 0;

  misr #(.W(W), .IW(IW)) dut (.clk, .rst_n, .clr, .en, .din, .sig);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] step(logic [W-1:0] s, logic [IW-1:0] d);
    logic [W-1:0] n;
    n[0] = s[15] ^ s[13] ^ s[12] ^ s[10];
    for (int i = 1; i < W; i++) n[i] = s[i-1];
    for (int i = 0; i < IW; i++) n[i] ^= d[i];
    return n;
  endfunction

  logic [W-1:0] sig_a;
  logic [IW-1:0] stream [64];

  initial begin
    ref_s = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (sig !== ref_s) begin failures++; $display("FAIL t=%0d sig=%h ref=%h", t, sig, ref_s); end
      clr = ($urandom % 50) == 0;
      en = ($urandom % 4) != 0;
      din = IW'($urandom);
      if (clr) ref_s = '0;
      else if (en) ref_s = step(ref_s, din);
    end
    // aliasing check for a single-bit error
    for (int i = 0; i < 64; i++) stream[i] = IW'($urandom);
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk); clr = 1; en = 0;
      for (int i = 0; i < 64; i++) begin
        @(negedge clk); clr = 0; en = 1;
        din = stream[i] ^ ((pass == 1 && i == 17) ? IW'(4) : IW'(0));
      end
      @(negedge clk); en = 0;
      if (pass == 0) sig_a = sig;
    end
    checks++;
    if (sig == sig_a) begin failures++; $display("FAIL single-bit error not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mdag: self-checking test of the masked row address counter. Random
// reset / set / up / down commands; C and the block-row address are
// compared each cycle with a reference count modulo 2^(BW+1), where set
// loads C = 0 and the address all ones. Also checks that C rises exactly
// after 2^BW up steps from reset and 2^BW down steps from set.
module tb_mdag;
  localparam int unsigned BW = 3;
  logic clk = 0, rst_n = 0, up = 0, dn = 0, set = 0, reset = 0;
  logic c;
  logic [BW-1:0] raddr;
  int unsigned ref_q = 0;
  int checks = 0, failures = 0;

  mdag #(.BW(BW)) dut (.clk, .rst_n, .up, .dn, .set, .reset, .c, .raddr);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned r, n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // group length, upward and downward
    for (int dir = 0; dir < 2; dir++) begin
      @(negedge clk); reset = !dir; set = dir; up = 0; dn = 0;
      @(negedge clk); reset = 0; set = 0; up = !dir; dn = dir; n = 0;
      while (!c && n < 100) begin @(negedge clk); n++; end
      checks++;
      if (n != (1 << BW)) begin failures++; $display("FAIL dir=%0d group length %0d", dir, n); end
      up = 0; dn = 0;
    end
    @(negedge clk); reset = 1;
    @(negedge clk); reset = 0; ref_q = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      checks++;
      if ({c, raddr} !== (BW+1)'(ref_q)) begin
        failures++;
        $display("FAIL t=%0d got %b exp %b", t, {c, raddr}, (BW+1)'(ref_q));
      end
      r = $urandom % 100;
      reset = (r < 3); set = (r >= 3 && r < 6);
      up = (r >= 6 && r < 55); dn = (r >= 55);
      if (reset) ref_q = 0;
      else if (set) ref_q = (1 << BW) - 1;
      else if (up) ref_q = (ref_q + 1) % (1 << (BW+1));
      else if (dn) ref_q = (ref_q + (1 << (BW+1)) - 1) % (1 << (BW+1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

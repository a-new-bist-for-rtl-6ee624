// tb_bmbag: self-checking test of the block address counter. A random
// sequence of reset / set / up / down commands is applied and the outputs
// U/D, A, B and the address are compared every cycle with a reference
// count kept in the testbench (modulo 2^(AW+3)).
module tb_bmbag;
  localparam int unsigned AW = 4;
  logic clk = 0, rst_n = 0, up = 0, dn = 0, set = 0, reset = 0;
  logic ud, a, b;
  logic [AW-1:0] addr;
  int unsigned ref_q = 0;
  int checks = 0, failures = 0;

  bmbag #(.AW(AW)) dut (.clk, .rst_n, .up, .dn, .set, .reset, .ud, .a, .b, .addr);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned r;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      checks++;
      if ({ud, a, b, addr} !== (AW+3)'(ref_q)) begin
        failures++;
        $display("FAIL t=%0d got %b exp %b", t, {ud, a, b, addr}, (AW+3)'(ref_q));
      end
      r = $urandom % 100;
      reset = (r < 2); set = (r >= 2 && r < 4);
      up = (r >= 4 && r < 60) || (r >= 95);
      dn = (r >= 60);
      if (reset) ref_q = 0;
      else if (set) ref_q = (1 << (AW+3)) - 1;
      else if (up) ref_q = (ref_q + 1) % (1 << (AW+3));
      else if (dn) ref_q = (ref_q + (1 << (AW+3)) - 1) % (1 << (AW+3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

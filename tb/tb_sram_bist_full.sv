// tb_sram_bist_full: one complete non-transparent self test of the SRAM at
// its default size (2048 x 2048 cells, 64 blocks of 64 Kbit), with one
// stuck-at-0 cell. Checks that the test ends after exactly
// 1 + k + 5k(sqrt(N/k)+1) + 2 cycles plus 3 per located fault, that the
// cell is located in the two elements reading 1 (M3 and M5) and in no
// other, and that a few cells read 0 through the normal port afterwards.
module tb_sram_bist_full;
  import bist_pkg::*;
  localparam int unsigned RB = 11, CB = 11, BB = 3;
  localparam longint unsigned K = 1 << (RB + CB - 2*BB), R = 1 << BB;

  logic clk = 0, rst_n = 0;
  logic [RB+CB-1:0] addr = '0;
  logic we = 0, din = 0, dout;
  logic tm = 0, transparent = 0;
  logic done, fail, fault_valid, sig_fail, error_flag_n, diag;
  logic [RB+CB-1:0] fault_addr;
  logic [15:0] fault_count, signature;
  march_el_e el;
  logic saf_en = 1, saf_val = 0;
  logic [RB-1:0] saf_row = 11'd1500;
  logic [CB-1:0] saf_col = 11'd777;

  sram_bist_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  int nf = 0, bad = 0;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  initial begin
    bit rv;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); tm = 1;
    while (!done) begin
      @(posedge clk); #1;
      if (fault_valid) begin
        nf++;
        if (fault_addr != {saf_row, saf_col}) bad++;
      end
      @(negedge clk);
      cyc++;
    end
    $display("cycles=%0d faults=%0d", cyc, nf);
    checks++; if (cyc != 1 + K + 5*K*(R+1) + 2 + 2*BB) begin failures++; $display("FAIL cycles %0d", cyc); end
    checks++; if (nf != 2 || bad != 0 || !fail || fault_count != 16'd2) begin
      failures++; $display("FAIL reports=%0d wrong=%0d", nf, bad); end
    @(negedge clk); tm = 0;
    for (int i = 0; i < 64; i++) begin
      addr = (RB+CB)'($urandom);
      if (addr == {saf_row, saf_col}) addr = addr + 1'b1;
      #1; rv = dout;
      checks++; if (rv != 1'b0) begin failures++; $display("FAIL cell %h reads 1", addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

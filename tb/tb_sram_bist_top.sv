// tb_sram_bist_top: end-to-end test of the SRAM with its BIST, at a
// reduced size (64 x 64 cells, 8 x 8 blocks of 64 cells) unless the
// parameters below are changed.
//   1. normal mode: single-cell writes and reads through the memory port;
//   2. non-transparent test, fault-free: done after exactly
//      1 + k + 5k(sqrt(N/k)+1) + 2 cycles, no fault, every cell 0 after;
//   3. non-transparent test with a stuck-at-1 cell: the cell is located
//      in M2, M4 and M6 and reported by address;
//   4. transparent test on random contents: no failure, contents kept;
//   5. transparent test with a stuck-at cell: sig_fail.
// It counts how often each mechanism happened (parallel write, parallel
// read, Error Flag, fault location step, counter set stage, dummy read,
// signature prediction pass, transparent write-back, signature mismatch,
// normal access) and counts a failure for any that never did.
module tb_sram_bist_top;
  import bist_pkg::*;
  localparam int unsigned RB = 6, CB = 6, BB = 3;
  localparam int unsigned ROWS = 1 << RB, COLS = 1 << CB;
  localparam int unsigned K = 1 << (RB + CB - 2*BB), R = 1 << BB, N = ROWS * COLS;

  logic clk = 0, rst_n = 0;
  logic [RB+CB-1:0] addr = '0;
  logic we = 0, din = 0, dout;
  logic tm = 0, transparent = 0;
  logic done, fail, fault_valid, sig_fail, error_flag_n, diag;
  logic [RB+CB-1:0] fault_addr;
  logic [15:0] fault_count, signature;
  march_el_e el;
  logic saf_en = 0, saf_val = 0;
  logic [RB-1:0] saf_row = '0;
  logic [CB-1:0] saf_col = '0;

  sram_bist_top #(.ROW_BITS(RB), .COL_BITS(CB), .BLK_BITS(BB)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_par_write = 0, n_par_read = 0, n_err_flag = 0, n_diag = 0, n_set_stage = 0;
  int n_dummy = 0, n_sig_pass = 0, n_wb = 0, n_sig_fail = 0, n_normal = 0;

  always @(posedge clk) if (tm && rst_n) begin
    if (dut.t_we && dut.t_row_mask != '0) n_par_write++;
    if (!dut.t_we && !transparent && dut.t_col_mask != '0 && el inside {EL_M2, EL_M3, EL_M4, EL_M5, EL_M6}) n_par_read++;
    if (!error_flag_n) n_err_flag++;
    if (diag) n_diag++;
    if (el == EL_RESET_STAGE && !done && !diag && dut.u_bist.state_q == 2'd1) n_set_stage++;
    if (el == EL_M6 && !transparent && dut.u_bist.c) n_dummy++;
    if (transparent && dut.u_bist.sig_phase_q && dut.u_bist.misr_en) n_sig_pass++;
    if (transparent && dut.t_we) n_wb++;
  end

  task automatic mem_write(int a, bit d);
    @(negedge clk); addr = (RB+CB)'(a); din = d; we = 1;
    @(negedge clk); we = 0;
    n_normal++;
  endtask

  task automatic mem_read(int a, output bit v);
    addr = (RB+CB)'(a);
    #1;
    v = dout;
  endtask

  task automatic run_test(bit t, output int cyc, output int nf, output int bad_loc);
    @(negedge clk); tm = 0; transparent = t;
    @(negedge clk); tm = 1;
    cyc = 0; nf = 0; bad_loc = 0;
    while (!done && cyc < 300000) begin
      @(posedge clk); #1;
      if (fault_valid) begin
        nf++;
        if (fault_addr != {saf_row, saf_col}) bad_loc++;
      end
      @(negedge clk);
      cyc++;
    end
  endtask

  bit img [N];

  initial begin
    int cyc, nf, bl, a;
    bit ok, rv;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1. normal mode
    for (int i = 0; i < 200; i++) begin
      a = $urandom % N;
      img[a] = 1'($urandom);
      mem_write(a, img[a]);
      mem_read(a, rv);
      checks++; if (rv != img[a]) begin failures++; $display("FAIL normal rd %0d", a); end
    end

    // 2. non-transparent, fault-free
    run_test(0, cyc, nf, bl);
    checks++; if (cyc != 1 + K + 5*K*(R+1) + 2) begin failures++; $display("FAIL nt cycles %0d", cyc); end
    checks++; if (fail || nf != 0) begin failures++; $display("FAIL nt false alarm"); end
    @(negedge clk); tm = 0;
    ok = 1;
    for (int i = 0; i < N; i++) begin mem_read(i, rv); if (rv != 0) ok = 0; end
    checks++; if (!ok) begin failures++; $display("FAIL nt final contents"); end

    // 3. non-transparent with a stuck-at-1 cell
    saf_en = 1; saf_val = 1; saf_row = 6'd37; saf_col = 6'd20;
    run_test(0, cyc, nf, bl);
    checks++; if (nf != 3 || bl != 0 || !fail) begin failures++; $display("FAIL nt SA1 reports=%0d wrong=%0d", nf, bl); end
    checks++; if (cyc != 1 + K + 5*K*(R+1) + 2 + 3*BB) begin failures++; $display("FAIL nt SA1 cycles %0d", cyc); end
    saf_en = 0;

    // 4. transparent on random contents
    @(negedge clk); tm = 0;
    for (int i = 0; i < N; i++) begin img[i] = 1'($urandom); mem_write(i, img[i]); end
    run_test(1, cyc, nf, bl);
    checks++; if (sig_fail || fail) begin failures++; $display("FAIL tr false alarm"); end
    checks++; if (cyc != 1 + 5*K*(N/K+1) + 2 + 4*K*(2*N/K+1) + K*(N/K+1) + 2) begin
      failures++; $display("FAIL tr cycles %0d", cyc); end
    @(negedge clk); tm = 0;
    ok = 1;
    for (int i = 0; i < N; i++) begin mem_read(i, rv); if (rv != img[i]) ok = 0; end
    checks++; if (!ok) begin failures++; $display("FAIL tr contents changed"); end

    // 5. transparent with a stuck-at cell holding the complement of its content
    saf_en = 1; saf_row = 6'd5; saf_col = 6'd58; saf_val = !img[5*COLS+58];
    run_test(1, cyc, nf, bl);
    checks++; if (!sig_fail) begin failures++; $display("FAIL tr stuck-at missed"); end
    else n_sig_fail++;
    saf_en = 0;

    // mechanisms
    $display("mechanisms: par_write=%0d par_read=%0d err_flag=%0d diag=%0d set_stage=%0d dummy=%0d sig_pass=%0d writeback=%0d sig_fail=%0d normal=%0d",
             n_par_write, n_par_read, n_err_flag, n_diag, n_set_stage, n_dummy, n_sig_pass, n_wb, n_sig_fail, n_normal);
    checks++; if (n_par_write == 0) failures++;
    checks++; if (n_par_read == 0) failures++;
    checks++; if (n_err_flag == 0) failures++;
    checks++; if (n_diag == 0) failures++;
    checks++; if (n_set_stage == 0) failures++;
    checks++; if (n_dummy == 0) failures++;
    checks++; if (n_sig_pass == 0) failures++;
    checks++; if (n_wb == 0) failures++;
    checks++; if (n_sig_fail == 0) failures++;
    checks++; if (n_normal == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

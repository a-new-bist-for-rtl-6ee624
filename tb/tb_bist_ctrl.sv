// tb_bist_ctrl: self-checking test of the BIST control logic on a small
// array (16 x 16 cells, 4 x 4 blocks of k = 16 cells) modelled in the
// testbench, so the controller is checked on its own.
//  1. Non-transparent test, fault-free memory: every cycle's memory command
//     (write enable, data, unmasked row and column bits, masks) is compared
//     with a March C- trace generated here by plain loops, and done must
//     rise exactly after 1 + k + 5k(sqrt(N/k)+1) + 2 cycles.
//  2. Non-transparent test with a stuck-at-1 and then a stuck-at-0 cell:
//     every located fault must be that cell, found in each element that
//     reads the opposite value (3 and 2 times), each costing log2 of the
//     number of block columns extra cycles.
//  3. Transparent test on random contents: contents unchanged afterwards,
//     sig_fail low, exact cycle count; with a stuck-at cell sig_fail high.
module tb_bist_ctrl;
  import bist_pkg::*;
  localparam int unsigned RB = 4, CB = 4, BB = 2;
  localparam int unsigned RIB = RB - BB, CIB = CB - BB;
  localparam int unsigned ROWS = 1 << RB, COLS = 1 << CB, NB = 1 << BB;
  localparam int unsigned K = 1 << (RIB + CIB);      // cells per block
  localparam int unsigned R = NB;                    // sqrt(N/k)
  localparam int unsigned N = ROWS * COLS;

  logic clk = 0, rst_n = 0, tm = 0, transparent = 0;
  logic [NB-1:0] grp_data;
  logic error_flag_n;
  logic mem_we, mem_din, cmp_ref_en, cmp_ref_val;
  logic [RB-1:0] row_addr, row_mask;
  logic [CB-1:0] col_addr, col_mask;
  march_el_e el;
  logic diag, done, fail, fault_valid, sig_fail;
  logic [RB+CB-1:0] fault_addr;
  logic [15:0] fault_count;
  logic [15:0] signature;

  bist_ctrl #(.ROW_BITS(RB), .COL_BITS(CB), .BLK_BITS(BB)) dut (.*);

  // ---------------- memory model ----------------
  logic [COLS-1:0] m [ROWS];
  logic saf_en = 0, saf_val = 0;
  int   saf_r = 0, saf_c = 0;

  function automatic logic cell_val(int r, int c);
    if (saf_en && r == saf_r && c == saf_c) return saf_val;
    return m[r][c];
  endfunction

  function automatic bit hit(int v, int a, int msk);
    return ((v ^ a) & ~msk) == 0;
  endfunction

  always_comb begin
    bit s0, s1, bad;
    s0 = 0; s1 = 0; bad = 0;
    for (int c = 0; c < COLS; c++) if (hit(c, col_addr, col_mask)) begin
      if (cell_val(row_addr, c)) s1 = 1; else s0 = 1;
      if (cell_val(row_addr, c) != cmp_ref_val) bad = 1;
    end
    error_flag_n = !(!mem_we && (cmp_ref_en ? bad : (s0 && s1)));
    for (int g = 0; g < NB; g++) grp_data[g] = cell_val(row_addr, g * (1 << CIB) + (col_addr % (1 << CIB)));
  end

  int writes = 0;
  always @(posedge clk) if (mem_we && tm) begin
    writes++;
    for (int r = 0; r < ROWS; r++) if (hit(r, row_addr, row_mask))
      for (int c = 0; c < COLS; c++) if (hit(c, col_addr, col_mask)) m[r][c] <= mem_din;
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // ---------------- expected non-transparent trace ----------------
  typedef struct packed {
    bit dc; bit we; bit din; bit [RB-1:0] row; bit [RB-1:0] rmask; bit [CB-1:0] col; bit [CB-1:0] cmask;
  } op_t;
  op_t q[$];

  localparam bit [RB-1:0] RBLK = {{BB{1'b1}}, {RIB{1'b0}}};
  localparam bit [CB-1:0] CBLK = {{BB{1'b1}}, {CIB{1'b0}}};

  function automatic op_t wr_op(int p, bit d);
    op_t o;
    o = '0; o.we = 1; o.din = d;
    o.row = RB'(p / (1 << CIB)); o.rmask = RBLK;
    o.col = CB'(p % (1 << CIB)); o.cmask = CBLK;
    return o;
  endfunction

  function automatic op_t rd_op(int p, int rb);
    op_t o;
    o = '0;
    o.row = RB'(rb * (1 << RIB) + p / (1 << CIB)); o.rmask = '0;
    o.col = CB'(p % (1 << CIB)); o.cmask = CBLK;
    return o;
  endfunction

  function automatic op_t dc_op();
    op_t o;
    o = '0; o.dc = 1;
    return o;
  endfunction

  task automatic build_trace();
    q.delete();
    q.push_back(dc_op());                                      // IDLE -> RUN
    for (int p = 0; p < K; p++) q.push_back(wr_op(p, 0));      // M1
    for (int e = 0; e < 2; e++)                                // M2, M3
      for (int p = 0; p < K; p++) begin
        for (int rb = 0; rb < R; rb++) q.push_back(rd_op(p, rb));
        q.push_back(wr_op(p, e == 0));
      end
    q.push_back(dc_op());                                      // counter set stage
    for (int e = 0; e < 3; e++)                                // M4, M5, M6
      for (int p = K - 1; p >= 0; p--) begin
        for (int rb = R - 1; rb >= 0; rb--) q.push_back(rd_op(p, rb));
        q.push_back(e == 2 ? dc_op() : wr_op(p, e == 0));
      end
    q.push_back(dc_op());                                      // end
  endtask

  task automatic start(bit t);
    @(negedge clk); tm = 0; transparent = t;
    @(negedge clk); tm = 1;
  endtask

  // run until done, return cycle count; optionally compare with the trace
  task automatic run(bit cmp, output int cyc, output int nf, output int bad_loc);
    op_t o;
    cyc = 0; nf = 0; bad_loc = 0;
    while (!done && cyc < 100000) begin
      if (cmp && q.size() > 0) begin
        o = q.pop_front();
        if (!o.dc) begin
          checks++;
          if (mem_we != o.we || (o.we && mem_din != o.din) || row_mask != o.rmask ||
              col_mask != o.cmask || (row_addr & ~row_mask) != o.row ||
              (col_addr & ~col_mask) != o.col) begin
            failures++;
            if (failures < 10)
              $display("FAIL cycle %0d: we=%b d=%b row=%h/%h col=%h/%h exp we=%b d=%b row=%h/%h col=%h/%h",
                       cyc, mem_we, mem_din, row_addr, row_mask, col_addr, col_mask,
                       o.we, o.din, o.row, o.rmask, o.col, o.cmask);
          end
        end
      end
      @(posedge clk); #1;
      if (fault_valid) begin
        nf++;
        if (fault_addr != (RB+CB)'(saf_r * COLS + saf_c)) bad_loc++;
      end
      @(negedge clk);
      cyc++;
    end
  endtask

  logic [COLS-1:0] init [ROWS];

  initial begin
    int cyc, nf, bl, exp;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1. fault-free non-transparent run with trace compare
    build_trace();
    exp = q.size();
    start(0);
    run(1, cyc, nf, bl);
    checks++; if (cyc != exp) begin failures++; $display("FAIL nt cycles %0d exp %0d", cyc, exp); end
    checks++; if (fail || nf != 0) begin failures++; $display("FAIL nt fault-free reported fault"); end
    checks++; if (exp != 1 + K + 5*K*(R+1) + 2) failures++;

    // 2. stuck-at cells
    for (int v = 0; v < 2; v++) begin
      saf_en = 1; saf_val = v[0]; saf_r = 9; saf_c = 6 + 5 * v;
      start(0);
      run(0, cyc, nf, bl);
      checks++; if (nf != (v ? 3 : 2) || bl != 0 || !fail || fault_count != 16'(nf)) begin
        failures++; $display("FAIL SA%0d: reports=%0d wrong=%0d", v, nf, bl);
      end
      checks++; if (cyc != exp + nf * BB) begin failures++; $display("FAIL SA%0d cycles %0d", v, cyc); end
    end
    saf_en = 0;

    // 3. transparent test
    for (int r = 0; r < ROWS; r++) begin m[r] = COLS'($urandom); init[r] = m[r]; end
    writes = 0;
    start(1);
    run(0, cyc, nf, bl);
    exp = 1 + 5*K*(N/K+1) + 2 + 4*K*(2*N/K+1) + K*(N/K+1) + 2;
    checks++; if (cyc != exp) begin failures++; $display("FAIL tr cycles %0d exp %0d", cyc, exp); end
    checks++; if (sig_fail || fail) begin failures++; $display("FAIL tr false alarm"); end
    checks++; if (writes != 4 * N) begin failures++; $display("FAIL tr writes %0d", writes); end
    for (int r = 0; r < ROWS; r++) begin
      checks++; if (m[r] != init[r]) begin failures++; $display("FAIL tr row %0d changed", r); end
    end
    saf_en = 1; saf_r = 3; saf_c = 12; saf_val = !m[3][12];
    start(1);
    run(0, cyc, nf, bl);
    checks++; if (!sig_fail) begin failures++; $display("FAIL tr stuck-at not seen"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

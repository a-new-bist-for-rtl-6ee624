// tb_parallel_comparator: self-checking test of the parallel comparator.
// Random sense/select patterns in both compare modes and both W/R values;
// the expected flag is worked out from the selected bits one by one.
module tb_parallel_comparator;
  localparam int unsigned W = 32;
  logic [W-1:0] sense, sel;
  logic wr_n, ref_en, ref_val, error_flag_n;
  int checks = 0, failures = 0;

  parallel_comparator #(.WIDTH(W)) dut (.sense, .sel, .wr_n, .ref_en, .ref_val, .error_flag_n);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen0, seen1, bad, exp;
    for (int t = 0; t < 2000; t++) begin
      sel = W'($urandom);
      if (t % 4 == 0) sense = '0;
      else if (t % 4 == 1) sense = '1;
      else if (t % 4 == 2) sense = (t % 8 == 2) ? ~(W'(1) << (t % W)) : (W'(1) << (t % W));
      else sense = W'($urandom);
      wr_n = (t % 7) != 0;
      ref_en = (t % 3) == 0;
      ref_val = t[4];
      #1;
      seen0 = 0; seen1 = 0; bad = 0;
      for (int i = 0; i < W; i++) if (sel[i]) begin
        if (sense[i]) seen1 = 1; else seen0 = 1;
        if (sense[i] != ref_val) bad = 1;
      end
      exp = !(wr_n && (ref_en ? bad : (seen0 && seen1)));
      checks++;
      if (error_flag_n !== exp) begin
        failures++;
        $display("FAIL t=%0d sense=%h sel=%h wr_n=%b ref_en=%b flag=%b", t, sense, sel, wr_n, ref_en, error_flag_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

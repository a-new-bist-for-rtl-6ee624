// tb_mask_decoder: self-checking test of the masked address decoder.
// For random address / mask pairs (and the all-zero and all-one masks) each
// output is checked against a reference written bit by bit: output i is high
// iff every unmasked address bit equals bit n of i. The number of active
// outputs must also be 2^(number of mask bits set).
module tb_mask_decoder;
  localparam int unsigned AW = 6;
  logic [AW-1:0] addr, mask;
  logic [(1<<AW)-1:0] sel;
  int checks = 0, failures = 0;

  mask_decoder #(.AW(AW)) dut (.addr, .mask, .sel);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    bit exp;
    int ones;
    ones = 0;
    for (int i = 0; i < (1 << AW); i++) begin
      exp = 1'b1;
      for (int n = 0; n < AW; n++)
        if (!mask[n] && (addr[n] != i[n])) exp = 1'b0;
      checks++;
      if (sel[i] !== exp) begin
        failures++;
        $display("FAIL addr=%b mask=%b out %0d = %b", addr, mask, i, sel[i]);
      end
      ones += int'(sel[i]);
    end
    checks++;
    if (ones != (1 << $countones(mask))) failures++;
  endtask

  initial begin
    for (int t = 0; t < 300; t++) begin
      addr = AW'($urandom);
      case (t % 3)
        0: mask = '0;
        1: mask = AW'($urandom);
        default: mask = (t % 2) ? '1 : AW'(1 << (t % AW));
      endcase
      #1;
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

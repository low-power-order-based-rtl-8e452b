// tb_baugh_wooley_mult: exhaustive check of the 9 x 9 signed Baugh-Wooley
// multiplier against the simulator's signed multiplication, plus a 4 x 6
// instance to cover unequal operand widths.
module tb_baugh_wooley_mult;
  int checks = 0, failures = 0;
  logic [8:0]  a, b;
  logic [17:0] p;
  logic [3:0]  a2;
  logic [5:0]  b2;
  logic [9:0]  p2;

  baugh_wooley_mult #(.AW(9), .BW(9)) dut  (.a(a),  .b(b),  .p(p));
  baugh_wooley_mult #(.AW(4), .BW(6)) dut2 (.a(a2), .b(b2), .p(p2));

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      for (int j = 0; j < 512; j++) begin
        logic signed [17:0] exp_p;
        a = 9'(i); b = 9'(j);
        #1;
        exp_p = 18'(signed'(a)) * 18'(signed'(b));
        checks++;
        if (p !== exp_p) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d, got %0d",
                                      signed'(a), signed'(b), exp_p, signed'(p));
        end
      end
    end
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 64; j++) begin
        logic signed [9:0] exp_p2;
        a2 = 4'(i); b2 = 6'(j);
        #1;
        exp_p2 = 10'(signed'(a2)) * 10'(signed'(b2));
        checks++;
        if (p2 !== exp_p2) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

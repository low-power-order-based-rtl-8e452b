// tb_mac_unit: drives random coefficients, pixels, enables and sum starts
// into the multiply-accumulate unit and compares the accumulator each cycle
// with a reference sum, including full-scale operands (|E| = 256, D = 255).
module tb_mac_unit;
  int checks = 0, failures = 0;
  logic clk = 0, rst, en, first;
  logic signed [8:0]  coeff;
  logic        [7:0]  pixel;
  logic signed [20:0] acc;
  longint model;

  mac_unit dut (.clk(clk), .rst(rst), .en(en), .first(first), .coeff(coeff),
                .pixel(pixel), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; first = 0; coeff = 0; pixel = 0;
    #12 rst = 0;
    model = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en    = ($urandom % 8) != 0;
      first = (n % 8 == 0);
      if (n < 16) begin coeff = -9'sd256; pixel = 8'd255; end
      else begin coeff = 9'($urandom); pixel = 8'($urandom); end
      @(posedge clk); #1;
      if (en) model = (first ? 0 : model) + longint'(coeff) * longint'(pixel);
      checks++;
      if (longint'(acc) != model) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d acc=%0d expected %0d", n, acc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

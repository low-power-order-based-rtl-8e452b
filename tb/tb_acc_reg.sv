// tb_acc_reg: checks reset, load with enable and hold of the accumulator
// register against a reference model.
module tb_acc_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst, en;
  logic [20:0] d, q, model;

  acc_reg #(.W(21)) dut (.clk(clk), .rst(rst), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; d = '1;
    #12;
    checks++; if (q !== '0) failures++;
    rst = 0;
    model = '0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      en = 1'($urandom); d = 21'($urandom);
      @(posedge clk); #1;
      if (en) model = d;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d q=%h expected %h", n, q, model);
      end
    end
    rst = 1; #1;
    checks++; if (q !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

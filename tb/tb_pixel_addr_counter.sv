// tb_pixel_addr_counter: checks counting, wrap from 7 to 0, the wrap flag and
// the synchronous clear of the 3-bit pixel address counter.
module tb_pixel_addr_counter;
  int checks = 0, failures = 0, wraps = 0;
  logic clk = 0, rst, clr, inc, wrap;
  logic [2:0] count;
  int model;

  pixel_addr_counter #(.W(3)) dut (.clk(clk), .rst(rst), .clr(clr), .inc(inc),
                                   .count(count), .wrap(wrap));

  always #5 clk = ~clk;

  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; clr = 0; inc = 0;
    #12 rst = 0;
    model = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      clr = ($urandom % 16) == 0;
      inc = 1'($urandom);
      #1;
      checks++;
      if (wrap !== (inc && model == 7)) failures++;
      if (wrap) wraps++;
      @(posedge clk); #1;
      if (clr) model = 0;
      else if (inc) model = (model + 1) % 8;
      checks++;
      if (count !== 3'(model)) begin
        failures++;
        $display("FAIL count=%0d expected %0d", count, model);
      end
    end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pixel_mem: fills the 64-entry pixel memory with random pixels, then
// checks random asynchronous reads and read-after-write against a model.
module tb_pixel_mem;
  int checks = 0, failures = 0;
  logic clk = 0, we;
  logic [5:0] waddr, raddr;
  logic [7:0] wdata, rdata;
  logic [7:0] model [64];

  pixel_mem #(.LOG2N(3), .PW(8)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                                      .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      if (n % 5 == 0) begin
        we = 1; waddr = 6'($urandom); wdata = 8'($urandom);
        @(posedge clk); #1; we = 0; model[waddr] = wdata;
      end
      raddr = 6'($urandom);
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("FAIL addr %0d read %h expected %h", raddr, rdata, model[raddr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

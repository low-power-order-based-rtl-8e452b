// tb_brent_kung_adder: checks the Brent-Kung adder at the accumulator width
// (21 bits, random and corner operands) and exhaustively at 8 bits and at a
// non-power-of-two width of 5 bits, against the simulator's addition.
module tb_brent_kung_adder;
  int checks = 0, failures = 0;
  logic [20:0] a, b, s;
  logic        ci, co;
  logic [7:0]  a8, b8, s8;
  logic        ci8, co8;
  logic [4:0]  a5, b5, s5;
  logic        ci5, co5;

  brent_kung_adder #(.W(21)) dut   (.a(a),  .b(b),  .cin(ci),  .sum(s),  .cout(co));
  brent_kung_adder #(.W(8))  dut8  (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));
  brent_kung_adder #(.W(5))  dut5  (.a(a5), .b(b5), .cin(ci5), .sum(s5), .cout(co5));

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check21(input logic [20:0] x, input logic [20:0] y, input logic c);
    logic [21:0] e;
    a = x; b = y; ci = c;
    #1;
    e = {1'b0, x} + {1'b0, y} + 22'(c);
    checks++;
    if ({co, s} !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %0d = %h got %h", x, y, c, e, {co, s});
    end
  endtask

  initial begin
    check21('1, 21'd1, 1'b0);
    check21('1, '1, 1'b1);
    check21('0, '0, 1'b1);
    check21(21'h0AAAAA, 21'h155555, 1'b1);
    for (int n = 0; n < 20000; n++) check21(21'($urandom), 21'($urandom), 1'($urandom));
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(i); b8 = 8'(j); ci8 = 1'(c);
          #1;
          checks++;
          if ({co8, s8} !== 9'(i + j + c)) failures++;
        end
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++)
        for (int c = 0; c < 2; c++) begin
          a5 = 5'(i); b5 = 5'(j); ci5 = 1'(c);
          #1;
          checks++;
          if ({co5, s5} !== 6'(i + j + c)) failures++;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

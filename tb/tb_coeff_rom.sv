// tb_coeff_rom: checks the cosine coefficient ROM and its three images.
//
// For every row of every image: the tags are a permutation of 0..7, each
// value equals the reference cosine entry of the column its tag names, and
// the order obeys the image's rule (unchanged; ascending value; greedy
// minimum Hamming distance from column 0, lowest column on a tie). Also
// checks the one-cycle registered read and that data holds while en is low.
module tb_coeff_rom;
  import tb_dct_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, en;
  logic [5:0] addr;
  logic [11:0] d_conv, d_asc, d_ham;

  coeff_rom #(.INIT_FILE("rtl/coeff_conventional.hex")) u_conv (.clk(clk), .en(en), .addr(addr), .data(d_conv));
  coeff_rom #(.INIT_FILE("rtl/coeff_ascending.hex"))    u_asc  (.clk(clk), .en(en), .addr(addr), .data(d_asc));
  coeff_rom #(.INIT_FILE("rtl/coeff_hamming.hex"))      u_ham  (.clk(clk), .en(en), .addr(addr), .data(d_ham));

  always #5 clk = ~clk;

  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int tag [3][8][8];
  int val [3][8][8];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    en = 0; addr = 0;
    for (int x = 0; x < 8; x++)
      for (int i = 0; i < 8; i++) begin
        @(negedge clk); en = 1; addr = 6'(x * 8 + i);
        @(posedge clk); #1;
        tag[0][x][i] = int'(d_conv[11:9]); val[0][x][i] = int'(signed'(d_conv[8:0]));
        tag[1][x][i] = int'(d_asc[11:9]);  val[1][x][i] = int'(signed'(d_asc[8:0]));
        tag[2][x][i] = int'(d_ham[11:9]);  val[2][x][i] = int'(signed'(d_ham[8:0]));
      end
    // Hold while en is low.
    @(negedge clk); en = 0; addr = 6'd0;
    @(posedge clk); #1;
    check(d_conv == {3'd7, 9'(cos_coeff(7, 7, 8))}, "data must hold while en is low");
    for (int s = 0; s < 3; s++)
      for (int x = 0; x < 8; x++) begin
        automatic bit [7:0] seen = 8'h00;
        for (int i = 0; i < 8; i++) begin
          seen[tag[s][x][i]] = 1'b1;
          check(val[s][x][i] == cos_coeff(x, tag[s][x][i], 8),
                $sformatf("image %0d row %0d pos %0d value %0d", s, x, i, val[s][x][i]));
        end
        check(seen == 8'hFF, $sformatf("image %0d row %0d tags not a permutation", s, x));
        for (int i = 0; i < 8; i++) begin
          if (s == 0) check(tag[s][x][i] == i, "conventional order changed");
          if (s == 1 && i > 0)
            check(val[s][x][i-1] < val[s][x][i] ||
                  (val[s][x][i-1] == val[s][x][i] && tag[s][x][i-1] < tag[s][x][i]),
                  $sformatf("ascending row %0d pos %0d", x, i));
          if (s == 2) begin
            if (i == 0) check(tag[s][x][0] == 0, "hamming row must start at column 0");
            else begin
              // The chosen column is the nearest of those not yet used.
              automatic int best_d = 99, best_c = -1;
              for (int c = 0; c < 8; c++) begin
                automatic bit used = 0;
                for (int j = 0; j < i; j++) if (tag[s][x][j] == c) used = 1;
                if (!used && hamming9(val[s][x][i-1], cos_coeff(x, c, 8)) < best_d) begin
                  best_d = hamming9(val[s][x][i-1], cos_coeff(x, c, 8));
                  best_c = c;
                end
              end
              check(tag[s][x][i] == best_c, $sformatf("hamming row %0d pos %0d", x, i));
            end
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dct_workloads: runs the image types the design is evaluated on through
// the processor with each of the three coefficient orders, and reports the
// switching activity at the multiplier inputs.
//
// Four processors share the pixel load and start: conventional order,
// ascending order, minimum-Hamming order (all column-outer) and the Hamming
// order with the column-inner loop. For every block all four must produce
// the reference coefficients (checked by row/column index, as output order
// differs). The images are synthetic 8 x 8-block scenes: checkerboard,
// vertical stripes, horizontal stripes and a smooth gradient with noise as a
// stand-in for a photograph. Per image and order the testbench counts bit
// toggles on the cosine-value input of the multiplier, on its pixel input,
// on the product and on the pixel memory read address, and checks that the Hamming order toggles the cosine input
// less than the conventional one.
//
// A fifth, 4-point processor holds the ordered 4 x 4 example matrix
//   row 0: 64 64 64 64;  row 1: 84 35 -35 -84;
//   row 2: 64 -64 -64 64; row 3: 35 -84 84 -35,
// with rows 1..3 reordered to (0,2,3,1), (0,3,1,2) and (0,2,3,1). With pixel
// column (35, 32, 29, 26) it must compute 7808, 861, 0, 63 and apply row 1's
// products in the order 84*35, -35*29, -84*26, 35*32.
module tb_dct_workloads;
  import dct_pkg::*;
  import tb_dct_ref_pkg::*;
  int checks = 0, failures = 0;

  localparam int NS = 4;
  logic clock = 0, reset, pixel_we, start;
  logic [5:0] pixel_waddr;
  logic [7:0] pixel;
  logic busy [NS], done [NS], dct_valid [NS];
  logic [2:0] dct_row [NS], dct_col [NS];
  logic signed [20:0] dct_out [NS];

  dct_processor #(.COEFF_FILE("rtl/coeff_conventional.hex")) u_conv (
    .clock, .reset, .pixel_we, .pixel_waddr, .pixel, .start, .busy(busy[0]), .done(done[0]),
    .dct_valid(dct_valid[0]), .dct_row(dct_row[0]), .dct_col(dct_col[0]), .dct_out(dct_out[0]));
  dct_processor #(.COEFF_FILE("rtl/coeff_ascending.hex")) u_asc (
    .clock, .reset, .pixel_we, .pixel_waddr, .pixel, .start, .busy(busy[1]), .done(done[1]),
    .dct_valid(dct_valid[1]), .dct_row(dct_row[1]), .dct_col(dct_col[1]), .dct_out(dct_out[1]));
  dct_processor #(.COEFF_FILE("rtl/coeff_hamming.hex")) u_ham (
    .clock, .reset, .pixel_we, .pixel_waddr, .pixel, .start, .busy(busy[2]), .done(done[2]),
    .dct_valid(dct_valid[2]), .dct_row(dct_row[2]), .dct_col(dct_col[2]), .dct_out(dct_out[2]));
  dct_processor #(.COEFF_FILE("rtl/coeff_hamming.hex"), .LOOP_ORDER(LOOP_COL_INNER)) u_inner (
    .clock, .reset, .pixel_we, .pixel_waddr, .pixel, .start, .busy(busy[3]), .done(done[3]),
    .dct_valid(dct_valid[3]), .dct_row(dct_row[3]), .dct_col(dct_col[3]), .dct_out(dct_out[3]));

  // 4-point example processor.
  logic f_we, f_busy, f_done, f_valid;
  logic [3:0] f_waddr;
  logic [7:0] f_pixel;
  logic [1:0] f_row, f_col;
  logic signed [20:0] f_out;
  dct_processor #(.LOG2N(2), .COEFF_FILE("tb/coeff_fig3.hex")) u_fig3 (
    .clock, .reset, .pixel_we(f_we), .pixel_waddr(f_waddr), .pixel(f_pixel), .start,
    .busy(f_busy), .done(f_done), .dct_valid(f_valid), .dct_row(f_row), .dct_col(f_col),
    .dct_out(f_out));

  always #5 clock = ~clock;

  initial begin
    #20ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  int D [8][8];
  int E [8][8];
  int img = 0;
  // Toggle counters [image][order]: cosine input, pixel input, product.
  longint tog_c [4][NS], tog_p [4][NS], tog_m [4][NS], tog_a [4][NS];
  logic [8:0]  prev_c [NS];
  logic [7:0]  prev_p [NS];
  logic [17:0] prev_m [NS];
  logic [5:0]  prev_a [NS];
  int outs [NS];

  logic [8:0]  cur_c [NS];
  logic [7:0]  cur_p [NS];
  logic [17:0] cur_m [NS];
  logic        cur_en [NS];
  logic [5:0]  cur_a [NS];
  assign cur_a[0] = u_conv.u_pixel_mem.raddr;
  assign cur_a[1] = u_asc.u_pixel_mem.raddr;
  assign cur_a[2] = u_ham.u_pixel_mem.raddr;
  assign cur_a[3] = u_inner.u_pixel_mem.raddr;
  assign cur_c[0] = u_conv.u_mac.coeff;  assign cur_p[0] = u_conv.u_mac.pixel;
  assign cur_m[0] = u_conv.u_mac.prod;   assign cur_en[0] = u_conv.u_mac.en;
  assign cur_c[1] = u_asc.u_mac.coeff;   assign cur_p[1] = u_asc.u_mac.pixel;
  assign cur_m[1] = u_asc.u_mac.prod;    assign cur_en[1] = u_asc.u_mac.en;
  assign cur_c[2] = u_ham.u_mac.coeff;   assign cur_p[2] = u_ham.u_mac.pixel;
  assign cur_m[2] = u_ham.u_mac.prod;    assign cur_en[2] = u_ham.u_mac.en;
  assign cur_c[3] = u_inner.u_mac.coeff; assign cur_p[3] = u_inner.u_mac.pixel;
  assign cur_m[3] = u_inner.u_mac.prod;  assign cur_en[3] = u_inner.u_mac.en;

  always @(negedge clock) begin
    if (!reset) begin
      for (int s = 0; s < NS; s++) begin
        if (cur_en[s]) begin
          tog_c[img][s] += $countones(cur_c[s] ^ prev_c[s]);
          tog_p[img][s] += $countones(cur_p[s] ^ prev_p[s]);
          tog_m[img][s] += $countones(cur_m[s] ^ prev_m[s]);
          tog_a[img][s] += $countones(cur_a[s] ^ prev_a[s]);
          prev_a[s] = cur_a[s];
          prev_c[s] = cur_c[s]; prev_p[s] = cur_p[s]; prev_m[s] = cur_m[s];
        end
        if (dct_valid[s]) begin
          automatic int x = int'(dct_row[s]), k = int'(dct_col[s]);
          automatic longint e = 0;
          for (int c = 0; c < 8; c++) e += longint'(E[x][c]) * D[c][k];
          check(longint'(dct_out[s]) == e,
                $sformatf("order %0d image %0d C[%0d][%0d]=%0d expected %0d", s, img, x, k, dct_out[s], e));
          outs[s]++;
        end
      end
    end
  end

  // Example processor: expected results and row-1 product order.
  int f_expect [4] = '{7808, 861, 0, 63};
  int f_row1_c [4] = '{84, -35, -84, 35};
  int f_row1_d [4] = '{35, 29, 26, 32};
  int f_mac = 0, f_outs = 0;
  always @(negedge clock) begin
    if (!reset) begin
      if (u_fig3.u_mac.en) begin
        if (f_mac >= 4 && f_mac < 8)
          check(int'(u_fig3.u_mac.coeff) == f_row1_c[f_mac-4] &&
                int'(u_fig3.u_mac.pixel) == f_row1_d[f_mac-4],
                $sformatf("example row 1 product %0d is %0d*%0d", f_mac - 4,
                          u_fig3.u_mac.coeff, u_fig3.u_mac.pixel));
        f_mac++;
      end
      if (f_valid && f_col == 2'd0) begin
        check(int'(f_out) == f_expect[f_row],
              $sformatf("example C[%0d] = %0d, expected %0d", f_row, f_out, f_expect[f_row]));
        f_outs++;
      end
    end
  end

  function automatic int scene(int kind, int blk, int n, int k);
    case (kind)
      0: return ((n + k) % 2 != 0) ? 255 : 0;               // checked
      1: return (k % 2 != 0) ? 255 : 0;                     // vertical stripes
      2: return (n % 2 != 0) ? 255 : 0;                     // horizontal stripes
      default: begin                                     // smooth scene with noise
        int v = 60 + 12 * n + 9 * k + 17 * blk + int'($urandom % 9) - 4;
        return (v < 0) ? 0 : (v > 255) ? 255 : v;
      end
    endcase
  endfunction

  localparam int BLOCKS = 4;
  string names [4] = '{"checked", "vertical stripes", "horizontal stripes", "smooth+noise"};
  string onames [NS] = '{"conventional", "ascending", "Hamming", "Hamming/col-inner"};

  initial begin
    reset = 1; pixel_we = 0; start = 0; pixel_waddr = 0; pixel = 0;
    f_we = 0; f_waddr = 0; f_pixel = 0;
    for (int s = 0; s < NS; s++) begin
      prev_c[s] = 0; prev_p[s] = 0; prev_m[s] = 0; prev_a[s] = 0; outs[s] = 0;
      for (int i = 0; i < 4; i++) begin tog_c[i][s] = 0; tog_p[i][s] = 0; tog_m[i][s] = 0; tog_a[i][s] = 0; end
    end
    for (int x = 0; x < 8; x++)
      for (int c = 0; c < 8; c++) E[x][c] = cos_coeff(x, c, 8);
    repeat (3) @(negedge clock);
    reset = 0;
    // Example block: column 0 = (35, 32, 29, 26), other columns arbitrary.
    for (int a = 0; a < 16; a++) begin
      @(negedge clock);
      f_we = 1; f_waddr = 4'(a);
      f_pixel = (a < 4) ? 8'(35 - 3 * a) : 8'($urandom);
    end
    @(negedge clock); f_we = 0;
    for (int im = 0; im < 4; im++) begin
      img = im;
      for (int b = 0; b < BLOCKS; b++) begin
        for (int n = 0; n < 8; n++)
          for (int k = 0; k < 8; k++) D[n][k] = scene(im, b, n, k);
        for (int a = 0; a < 64; a++) begin
          @(negedge clock);
          pixel_we = 1; pixel_waddr = 6'(a); pixel = 8'(D[a % 8][a / 8]);
        end
        @(negedge clock); pixel_we = 0;
        @(negedge clock); start = 1;
        @(negedge clock); start = 0;
        while (!(done[0] && done[1] && done[2] && done[3])) @(negedge clock);
        @(negedge clock);
      end
    end
    for (int s = 0; s < NS; s++)
      check(outs[s] == 4 * BLOCKS * 64, $sformatf("order %0d produced %0d coefficients", s, outs[s]));
    check(f_outs == 4 * 4 * BLOCKS, $sformatf("example produced %0d column-0 results", f_outs));
    $display("toggles per image, %0d blocks each (cosine input / pixel input / product / pixel address):", BLOCKS);
    for (int im = 0; im < 4; im++)
      for (int s = 0; s < NS; s++)
        $display("  %-18s %-18s %6d %6d %6d %6d", names[im], onames[s],
                 tog_c[im][s], tog_p[im][s], tog_m[im][s], tog_a[im][s]);
    for (int im = 0; im < 4; im++)
      check(tog_c[im][2] < tog_c[im][0],
            $sformatf("%s: Hamming order must toggle the cosine input less", names[im]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

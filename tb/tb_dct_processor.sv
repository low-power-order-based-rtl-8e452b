// tb_dct_processor: end-to-end test of the DCT processor at its default
// parameters (8 x 8 blocks, Hamming-ordered ROM, column-outer loop order).
//
// Loads a series of pixel blocks (random, all-white, all-black, horizontal
// stripes, vertical stripes, checkerboard), transforms each and compares all
// 64 coefficients, with their row/column indices, against
//   C[x][k] = sum_c E[x][c] * D[c][k]
// computed from the reference cosine matrix. Also checks the block time
// (last coefficient N**3 + 1 cycles after start), one coefficient per N
// cycles, and a back-to-back start given during the previous block's tail.
// Counted mechanisms, each of which must occur: reordered pixel fetches (tag
// differs from the entry's position), accumulator restarts, pixel address
// counter steps, and back-to-back blocks.
module tb_dct_processor;
  import tb_dct_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clock = 0, reset, pixel_we, start;
  logic [5:0] pixel_waddr;
  logic [7:0] pixel;
  logic busy, done, dct_valid;
  logic [2:0] dct_row, dct_col;
  logic signed [20:0] dct_out;

  dct_processor dut (
    .clock(clock), .reset(reset), .pixel_we(pixel_we), .pixel_waddr(pixel_waddr),
    .pixel(pixel), .start(start), .busy(busy), .done(done), .dct_valid(dct_valid),
    .dct_row(dct_row), .dct_col(dct_col), .dct_out(dct_out));

  always #5 clock = ~clock;

  initial begin
    #2ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int D [8][8];            // D[n][k]: row n, column k
  int E [8][8];
  int n_reordered = 0, n_restart = 0, n_col_step = 0, n_back_to_back = 0;
  int n_out = 0, last_out_cycle = -1, cycle = 0, mac_pos = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Monitor: outputs, spacing and mechanisms, sampled before each edge.
  always @(negedge clock) begin
    cycle++;
    if (!reset) begin
      if (dut.mac_en) begin
        if (int'(dut.loc_tag) != mac_pos % 8) n_reordered++;
        if (dut.acc_first) n_restart++;
        mac_pos++;
      end
      if (dut.u_control.k_inc) n_col_step++;
      if (dct_valid) begin
        automatic int x = int'(dct_row), k = int'(dct_col);
        automatic longint exp_c = 0;
        for (int c = 0; c < 8; c++) exp_c += longint'(E[x][c]) * D[c][k];
        check(longint'(dct_out) == exp_c,
              $sformatf("C[%0d][%0d] = %0d, expected %0d", x, k, dct_out, exp_c));
        check(x == (n_out % 64) % 8 && k == (n_out % 64) / 8,
              $sformatf("output %0d has index %0d,%0d", n_out, x, k));
        if (last_out_cycle >= 0 && (n_out % 64) != 0)
          check(cycle - last_out_cycle == 8, "one coefficient per 8 cycles");
        last_out_cycle = cycle;
        n_out++;
      end
    end
  end

  task automatic load_block(input int kind);
    for (int n = 0; n < 8; n++)
      for (int k = 0; k < 8; k++)
        case (kind)
          0: D[n][k] = int'($urandom % 256);
          1: D[n][k] = 255;
          2: D[n][k] = 0;
          3: D[n][k] = (n % 2 != 0) ? 255 : 0;       // horizontal stripes
          4: D[n][k] = (k % 2 != 0) ? 255 : 0;       // vertical stripes
          default: D[n][k] = ((n + k) % 2 != 0) ? 230 : 20; // checkerboard
        endcase
    for (int a = 0; a < 64; a++) begin
      @(negedge clock);
      pixel_we = 1; pixel_waddr = 6'(a); pixel = 8'(D[a % 8][a / 8]);
    end
    @(negedge clock); pixel_we = 0;
  endtask

  task automatic run_block(input bit back_to_back);
    int t0, outs0;
    outs0 = n_out;
    @(negedge clock); start = 1;
    t0 = cycle;
    @(negedge clock); start = 0;
    if (back_to_back) begin
      // Restart on the same block while the tail of this one is in flight.
      while (dut.u_control.running) @(negedge clock);
      check(busy && !done, "back-to-back start lands in the tail");
      start = 1; @(negedge clock); start = 0;
      n_back_to_back++;
      while (!done) @(negedge clock);
      @(negedge clock);
    end
    while (!done) @(negedge clock);
    // done is visible after the (N**3 + 1)-th clock edge following the edge
    // that samples start; the monitor counts one more falling edge.
    if (!back_to_back)
      check(cycle - t0 == 514, $sformatf("block took %0d cycles after start, expected 514", cycle - t0));
    else
      // The second block is issued without a gap after the first.
      check(cycle - t0 == 2 * 512 + 3, $sformatf("two blocks took %0d cycles", cycle - t0));
    @(negedge clock);
    check(n_out - outs0 == (back_to_back ? 128 : 64), "64 coefficients per block");
    check(!busy, "busy falls after done");
  endtask

  initial begin
    reset = 1; pixel_we = 0; start = 0; pixel_waddr = 0; pixel = 0;
    for (int x = 0; x < 8; x++)
      for (int c = 0; c < 8; c++) E[x][c] = cos_coeff(x, c, 8);
    repeat (3) @(negedge clock);
    reset = 0;
    for (int b = 0; b < 8; b++) begin
      load_block(b < 6 ? b : 0);
      run_block(b == 6);
    end
    check(n_reordered > 0, "reordered pixel fetches must occur");
    check(n_restart == n_out, "one accumulator restart per coefficient");
    check(n_col_step == n_out / 8, "pixel column counter steps once per 8 coefficients");
    check(n_back_to_back > 0, "back-to-back block must occur");
    $display("mechanisms: reordered fetches=%0d accumulator restarts=%0d column steps=%0d back-to-back=%0d coefficients=%0d",
             n_reordered, n_restart, n_col_step, n_back_to_back, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

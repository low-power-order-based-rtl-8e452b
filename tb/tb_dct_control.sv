// tb_dct_control: checks the sequencer in both loop orders.
//
// For each order one block is run and, cycle by cycle, the issued ROM
// address {x, i} and the column k (seen one cycle later on pix_col) are
// compared with the loop nest of that order; acc_first must mark i = 0,
// out_valid must follow the last entry of every row by two cycles with the
// right row and column, done must come with the last one, and the block must
// take exactly N**3 issue cycles. A second start given during the two-cycle
// tail checks back-to-back blocks.
module tb_dct_control;
  import dct_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, start;
  logic busy [2], rom_en [2], mac_en [2], acc_first [2], out_valid [2], done [2];
  logic [5:0] rom_addr [2];
  logic [2:0] pix_col [2], out_row [2], out_col [2];

  dct_control #(.LOOP_ORDER(LOOP_COL_OUTER)) u_outer (
    .clk(clk), .rst(rst), .start(start), .busy(busy[0]), .rom_en(rom_en[0]),
    .rom_addr(rom_addr[0]), .pix_col(pix_col[0]), .mac_en(mac_en[0]),
    .acc_first(acc_first[0]), .out_valid(out_valid[0]), .out_row(out_row[0]),
    .out_col(out_col[0]), .done(done[0]));
  dct_control #(.LOOP_ORDER(LOOP_COL_INNER)) u_inner (
    .clk(clk), .rst(rst), .start(start), .busy(busy[1]), .rom_en(rom_en[1]),
    .rom_addr(rom_addr[1]), .pix_col(pix_col[1]), .mac_en(mac_en[1]),
    .acc_first(acc_first[1]), .out_valid(out_valid[1]), .out_row(out_row[1]),
    .out_col(out_col[1]), .done(done[1]));

  always #5 clk = ~clk;

  initial begin
    #200us; failures++;
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

  // Expected schedule: issue number t -> (k, x, i) for order o.
  function automatic void sched(int o, int t, output int k, output int x, output int i);
    i = t % 8;
    if (o == 0) begin x = (t / 8) % 8; k = t / 64; end
    else        begin k = (t / 8) % 8; x = t / 64; end
  endfunction

  int issued [2], outs [2], dones [2], cyc;
  int exp_k_q [2][$], exp_first_q [2][$];
  int out_exp_q [2][$];

  initial begin
    rst = 1; start = 0;
    issued = '{0, 0}; outs = '{0, 0}; dones = '{0, 0};
    #22 rst = 0;
    @(negedge clk) start = 1;
    cyc = 0;
    // Run two blocks; the second start comes right after the last issue.
    while ((dones[0] < 2 || dones[1] < 2) && cyc < 2000) begin
      @(negedge clk);
      cyc++;
      for (int o = 0; o < 2; o++) begin

        // MAC stage of the previous issue.
        if (mac_en[o]) begin
          check(exp_k_q[o].size() > 0, "mac_en without issue");
          if (exp_k_q[o].size() > 0) begin
            check(int'(pix_col[o]) == exp_k_q[o][0], $sformatf("order %0d pix_col", o));
            check(int'(acc_first[o]) == exp_first_q[o][0], $sformatf("order %0d acc_first", o));
            void'(exp_k_q[o].pop_front()); void'(exp_first_q[o].pop_front());
          end
        end
        if (out_valid[o]) begin
          check(out_exp_q[o].size() > 0, "out_valid without row end");
          if (out_exp_q[o].size() > 0) begin
            check({out_row[o], out_col[o]} == 6'(out_exp_q[o][0]),
                  $sformatf("order %0d out index %0d%0d", o, out_row[o], out_col[o]));
            void'(out_exp_q[o].pop_front());
          end
          outs[o]++;
        end
        if (done[o]) begin
          dones[o]++;
          check(outs[o] == 64 * dones[o], $sformatf("order %0d done after %0d outputs", o, outs[o]));
        end
      end
      // Issue stage of this cycle.
      for (int o = 0; o < 2; o++) begin
        if (rom_en[o]) begin
          automatic int k, x, i;
          sched(o, issued[o] % 512, k, x, i);
          check(rom_addr[o] == 6'(x * 8 + i), $sformatf("order %0d issue %0d address %0d", o, issued[o], rom_addr[o]));
          exp_k_q[o].push_back(k);
          exp_first_q[o].push_back(int'(i == 0));
          if (i == 7) out_exp_q[o].push_back(x * 8 + k);
          issued[o]++;
        end
      end
      start = (issued[0] == 512 && dones[0] == 0 && !rom_en[0]) ? 1'b1 : 1'b0;
    end
    check(issued[0] == 1024 && issued[1] == 1024, $sformatf("issue count %0d %0d", issued[0], issued[1]));
    check(dones[0] == 2 && dones[1] == 2, "two blocks must complete");
    @(negedge clk);
    check(!busy[0] && !busy[1], "busy must fall after done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// dct_control: sequencer of the order-based DCT processor.
//
// Runs the three loops of the algorithm for one N x N block: entry i of the
// current cosine-matrix row (innermost), cosine row x, and pixel column k.
// With LOOP_ORDER = LOOP_COL_OUTER (default) k is the outermost loop, as in
// the algorithm's flowchart: for every column of the pixel block all N
// cosine rows are applied, and the pixel address counter steps after every
// N*N accesses. With LOOP_COL_INNER the column steps after every N accesses
// (the behaviour described for the scheme's counter) and x is the outer
// loop. The result is the same matrix in a different output order.
//
// Pipeline (one multiply-accumulate per clock):
//   issue cycle : rom_en = 1, rom_addr = {x, i}; the ROM registers the word.
//   MAC cycle   : mac_en = 1; pix_col = k, acc_first = (i == 0) belong to the
//                 ROM word now on the ROM output; the MAC register loads.
//   out cycle   : out_valid = 1 after the last entry of a row, with out_row,
//                 out_col; done = 1 with the last coefficient of the block.
// A block takes N**3 issue cycles; out_valid for a row comes two cycles after
// the issue of its last entry, and done is visible after the (N**3 + 1)-th
// clock edge following the edge that samples start. start is accepted when no issue is in progress
// (a new block may overlap the two-cycle tail of the previous one). busy is
// high from the cycle after start until the done cycle. Reset is
// asynchronous, active high.
module dct_control
  import dct_pkg::*;
#(
  parameter int unsigned LOG2N      = 3,
  parameter loop_order_e LOOP_ORDER = LOOP_COL_OUTER
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  output logic               busy,
  output logic               rom_en,
  output logic [2*LOG2N-1:0] rom_addr,
  output logic [LOG2N-1:0]   pix_col,
  output logic               mac_en,
  output logic               acc_first,
  output logic               out_valid,
  output logic [LOG2N-1:0]   out_row,
  output logic [LOG2N-1:0]   out_col,
  output logic               done
);

  localparam logic [LOG2N-1:0] LAST = '1;

  logic             running;
  logic [LOG2N-1:0] ent_i, row_x, col_k;
  logic             k_inc, k_wrap, row_end, final_issue;

  // MAC-stage copies of the issue-cycle indices.
  logic             last_m, final_m;
  logic [LOG2N-1:0] row_m;

  assign rom_en   = running;
  assign rom_addr = {row_x, ent_i};
  assign row_end  = (ent_i == LAST);

  assign k_inc = running && row_end &&
                 ((LOOP_ORDER == LOOP_COL_INNER) || (row_x == LAST));
  assign final_issue = running && row_end && (row_x == LAST) && (col_k == LAST);

  pixel_addr_counter #(.W(LOG2N)) u_col_counter (
    .clk   (clk),
    .rst   (rst),
    .clr   (start && !running),
    .inc   (k_inc),
    .count (col_k),
    .wrap  (k_wrap)
  );

  // Loop counters i and x.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      running <= 1'b0;
      ent_i   <= '0;
      row_x   <= '0;
    end else if (!running) begin
      if (start) begin
        running <= 1'b1;
        ent_i   <= '0;
        row_x   <= '0;
      end
    end else begin
      ent_i <= ent_i + LOG2N'(1);
      if (row_end) begin
        if (LOOP_ORDER == LOOP_COL_OUTER) row_x <= row_x + LOG2N'(1);
        else if (k_wrap)                  row_x <= row_x + LOG2N'(1);
      end
      if (final_issue) running <= 1'b0;
    end
  end

  // MAC stage and output stage.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      mac_en    <= 1'b0;
      acc_first <= 1'b0;
      pix_col   <= '0;
      last_m    <= 1'b0;
      final_m   <= 1'b0;
      row_m     <= '0;
      out_valid <= 1'b0;
      out_row   <= '0;
      out_col   <= '0;
      done      <= 1'b0;
    end else begin
      mac_en    <= running;
      if (running) begin
        acc_first <= (ent_i == '0);
        pix_col   <= col_k;
        last_m    <= row_end;
        final_m   <= final_issue;
        row_m     <= row_x;
      end
      out_valid <= mac_en && last_m;
      done      <= mac_en && final_m;
      if (mac_en && last_m) begin
        out_row <= row_m;
        out_col <= pix_col;
      end
    end
  end

  assign busy = running || mac_en || out_valid;

endmodule : dct_control

// dct_processor: order-based low-power DCT processor (one-dimensional N-point
// DCT of the columns of an N x N pixel block, N = 8 by default).
//
// It computes C[x][k] = sum_c E[x][c] * D[c][k]. The entries of each row of
// the cosine matrix E are stored in the cosine ROM in an order chosen offline
// to reduce bit toggling at the multiplier input (minimum Hamming distance
// between successive coefficients by default), and each ROM word carries the
// coefficient's original column n as a tag. The tag is used directly as the
// low address bits of the pixel memory, and the 3-bit pixel address counter
// (the pixel column k) supplies the high bits, so the datapath is that of a
// conventional DCT and only the ROM contents differ. Any order of the row
// entries gives the same sums; only the switching activity changes.
//
// Datapath: coeff_rom -> {counter, tag} -> pixel_mem -> mac_unit (Baugh-Wooley
// mult, Brent-Kung add, reg) -> dct_out. dct_control sequences the loops.
//
// Interface:
//   pixel_we / pixel_waddr / pixel : load the block; address {k, n} holds
//                                    D[n][k] (column k, row n); write only
//                                    while busy is low.
//   start  : begin a block (accepted when no block is being issued).
//   busy   : high from the cycle after start through the done cycle.
//   dct_valid, dct_row (x), dct_col (k), dct_out : one finished coefficient
//            per N cycles; done marks the last coefficient of the block.
// Timing: one multiply-accumulate per clock; N**3 clocks per block; done and
// the last coefficient are visible after the (N**3 + 1)-th clock edge
// following the edge that samples start. A new start may be given as soon
// as the previous block's last entry has been issued.
// LOOP_ORDER selects the output order (see dct_control). The loading port,
// handshake, widths and reset (asynchronous, active high) are this design's
// choices.
module dct_processor
  import dct_pkg::*;
#(
  parameter int unsigned LOG2N      = 3,
  parameter string       COEFF_FILE = "rtl/coeff_hamming.hex",
  parameter loop_order_e LOOP_ORDER = LOOP_COL_OUTER
) (
  input  logic                    clock,
  input  logic                    reset,
  input  logic                    pixel_we,
  input  logic [2*LOG2N-1:0]      pixel_waddr,
  input  logic [PIXEL_W-1:0]      pixel,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output logic                    dct_valid,
  output logic [LOG2N-1:0]        dct_row,
  output logic [LOG2N-1:0]        dct_col,
  output logic signed [ACC_W-1:0] dct_out
);

  logic                     rom_en;
  logic [2*LOG2N-1:0]       rom_addr;
  logic [LOG2N+COEFF_W-1:0] rom_word;
  logic [LOG2N-1:0]         pix_col;
  logic [LOG2N-1:0]         loc_tag;
  logic signed [COEFF_W-1:0] coeff;
  logic [PIXEL_W-1:0]       pix_rd;
  logic                     mac_en, acc_first;

  dct_control #(.LOG2N(LOG2N), .LOOP_ORDER(LOOP_ORDER)) u_control (
    .clk       (clock),
    .rst       (reset),
    .start     (start),
    .busy      (busy),
    .rom_en    (rom_en),
    .rom_addr  (rom_addr),
    .pix_col   (pix_col),
    .mac_en    (mac_en),
    .acc_first (acc_first),
    .out_valid (dct_valid),
    .out_row   (dct_row),
    .out_col   (dct_col),
    .done      (done)
  );

  coeff_rom #(.LOG2N(LOG2N), .CW(COEFF_W), .INIT_FILE(COEFF_FILE)) u_cosine_rom (
    .clk  (clock),
    .en   (rom_en),
    .addr (rom_addr),
    .data (rom_word)
  );

  // Split of the cosine word: location tag above, coefficient below.
  assign loc_tag = rom_word[LOG2N+COEFF_W-1:COEFF_W];
  assign coeff   = signed'(rom_word[COEFF_W-1:0]);

  pixel_mem #(.LOG2N(LOG2N), .PW(PIXEL_W)) u_pixel_mem (
    .clk   (clock),
    .we    (pixel_we),
    .waddr (pixel_waddr),
    .wdata (pixel),
    .raddr ({pix_col, loc_tag}),
    .rdata (pix_rd)
  );

  mac_unit #(.CW(COEFF_W), .PW(PIXEL_W), .ACC_W(ACC_W)) u_mac (
    .clk   (clock),
    .rst   (reset),
    .en    (mac_en),
    .first (acc_first),
    .coeff (coeff),
    .pixel (pix_rd),
    .acc   (dct_out)
  );

  // The block being transformed must not be overwritten.
  a_no_write_while_busy : assert property (
    @(posedge clock) disable iff (reset) pixel_we |-> !busy
  ) else $error("pixel memory written while a block is in progress");

endmodule : dct_processor

// mac_unit: the multiply-accumulate section (mult, add, reg).
//
// Each enabled cycle it forms coeff * pixel with the Baugh-Wooley multiplier
// (the pixel is taken as unsigned and given a zero sign bit), sign-extends the
// product to ACC_W bits and adds it with the Brent-Kung adder to the value
// held in the accumulator register. When first is high the register feedback
// into the adder is forced to zero, so that product starts a new sum; this is
// how "clear the accumulator" is done without a lost cycle (this design's
// choice). The same MAC serves any coefficient order.
//
// Timing: coeff, pixel, en and first are sampled at the clock edge; acc shows
// the updated sum after it. acc is the processor's dct_out.
module mac_unit #(
  parameter int unsigned CW    = dct_pkg::COEFF_W,
  parameter int unsigned PW    = dct_pkg::PIXEL_W,
  parameter int unsigned ACC_W = dct_pkg::ACC_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic                    first,
  input  logic signed [CW-1:0]    coeff,
  input  logic        [PW-1:0]    pixel,
  output logic signed [ACC_W-1:0] acc
);

  localparam int unsigned BW = PW + 1;

  logic [CW+BW-1:0] prod;
  logic [ACC_W-1:0] prod_ext, feedback, sum;
  logic             cout_unused;

  baugh_wooley_mult #(.AW(CW), .BW(BW)) u_mult (
    .a (coeff),
    .b ({1'b0, pixel}),
    .p (prod)
  );

  assign prod_ext = ACC_W'(signed'(prod));
  assign feedback = first ? '0 : acc;

  brent_kung_adder #(.W(ACC_W)) u_add (
    .a    (prod_ext),
    .b    (feedback),
    .cin  (1'b0),
    .sum  (sum),
    .cout (cout_unused)
  );

  acc_reg #(.W(ACC_W)) u_reg (
    .clk (clk),
    .rst (rst),
    .en  (en),
    .d   (sum),
    .q   (acc)
  );

endmodule : mac_unit

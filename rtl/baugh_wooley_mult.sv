// baugh_wooley_mult: signed AW x BW multiplier using the Baugh-Wooley scheme.
//
// Two's-complement operands a (AW bits) and b (BW bits) give the exact
// AW+BW-bit signed product p. Baugh-Wooley avoids sign-extended partial
// products: every partial-product bit a[j]&b[i] that holds exactly one sign
// bit (j = AW-1 xor i = BW-1) is inverted, the bit a[AW-1]&b[BW-1] keeps its
// positive weight, and the constant 2**(AW-1) + 2**(BW-1) + 2**(AW+BW-1) is
// added, all modulo 2**(AW+BW). The matrix of positive bits is then summed
// row by row. The Baugh-Wooley multiplier is part of the scheme; the summation
// structure (a ripple of row additions written with '+', left to the
// synthesis tool to map) is this design's choice.
//
// Purely combinational.
module baugh_wooley_mult #(
  parameter int unsigned AW = dct_pkg::COEFF_W,
  parameter int unsigned BW = dct_pkg::PIXOP_W
) (
  input  logic [AW-1:0]    a,
  input  logic [BW-1:0]    b,
  output logic [AW+BW-1:0] p
);

  localparam int unsigned PWID = AW + BW;

  // Correction constant of the Baugh-Wooley form.
  localparam logic [PWID-1:0] BW_CONST =
      (PWID'(1) << (AW - 1)) + (PWID'(1) << (BW - 1)) + (PWID'(1) << (PWID - 1));

  logic [PWID-1:0] row [BW];

  always_comb begin
    for (int i = 0; i < BW; i++) begin
      row[i] = '0;
      for (int j = 0; j < AW; j++) begin
        logic sign_a, sign_b;
        sign_a = (j == AW - 1);
        sign_b = (i == BW - 1);
        if (sign_a ^ sign_b) row[i][i+j] = ~(a[j] & b[i]);
        else                 row[i][i+j] =   a[j] & b[i];
      end
    end
  end

  always_comb begin
    p = BW_CONST;
    for (int i = 0; i < BW; i++) p = p + row[i];
  end

endmodule : baugh_wooley_mult

// acc_reg: the 'reg' of the multiply-accumulate section.
//
// Holds the running sum C of the current DCT coefficient; its output feeds
// back into the adder and is the processor's dct_out. Loads d at the clock
// edge when en is high and holds otherwise. Asynchronous active-high reset to
// zero (the reset polarity is this design's choice).
module acc_reg #(
  parameter int unsigned W = dct_pkg::ACC_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     q <= '0;
    else if (en) q <= d;
  end

endmodule : acc_reg

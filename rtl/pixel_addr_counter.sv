// pixel_addr_counter: the W-bit (3-bit) counter that forms the most
// significant bits of the pixel memory address, i.e. the pixel column k.
//
// The least significant address bits come from the location tag of the cosine
// word, so this small counter replaces the 6-bit pixel address counter of a
// conventional design. It counts up by one when inc is high and wraps from
// 2**W-1 to 0; wrap is high in a cycle where inc is high at the terminal
// count. clr (synchronous) and rst (asynchronous, active high) set it to 0;
// clr wins over inc.
module pixel_addr_counter #(
  parameter int unsigned W = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clr,
  input  logic         inc,
  output logic [W-1:0] count,
  output logic         wrap
);

  assign wrap = inc && (count == W'((1 << W) - 1));

  always_ff @(posedge clk or posedge rst) begin
    if (rst)      count <= '0;
    else if (clr) count <= '0;
    else if (inc) count <= count + W'(1);
  end

endmodule : pixel_addr_counter

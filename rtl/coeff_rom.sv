// coeff_rom: cosine coefficient memory of the order-based DCT processor.
//
// Holds the N*N cosine coefficients, row by row, with the entries of every
// row already put in their processing order. Word layout (N = 8):
//   data[11:9] = n, the column the coefficient had in the original cosine
//                matrix; it selects the pixel to multiply with;
//   data[8:0]  = E, the signed two's-complement coefficient.
// The reordering and the tag are computed before the ROM is programmed;
// INIT_FILE names the image (one hex word per line, row-major). The images
// provided hold round(512 * a(x) * cos((2c+1) x pi / 16)), a(0) = sqrt(1/8),
// a(x>0) = 1/2, in three orders: conventional (unchanged), ascending value,
// and greedy minimum Hamming distance starting from column 0.
//
// Interface: addr = {row x, position i}. Timing: synchronous read, data is
// valid the cycle after en is high at a clock edge; it holds otherwise.
module coeff_rom #(
  parameter int unsigned LOG2N     = 3,
  parameter int unsigned CW        = dct_pkg::COEFF_W,
  parameter string       INIT_FILE = "rtl/coeff_hamming.hex"
) (
  input  logic                    clk,
  input  logic                    en,
  input  logic [2*LOG2N-1:0]      addr,
  output logic [LOG2N+CW-1:0]     data
);

  localparam int unsigned DEPTH = 1 << (2 * LOG2N);

  logic [LOG2N+CW-1:0] mem [DEPTH];

  initial begin
    $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (en) data <= mem[addr];
  end

endmodule : coeff_rom

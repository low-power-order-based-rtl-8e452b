// pixel_mem: pixel memory of one N x N image block (64 x 8 bits for N = 8).
//
// Entry {k, n} holds pixel D[n][k] (row n, column k of the block). The read
// address is formed outside as {pixel address counter, location tag of the
// current cosine word}, so one read port serves the whole block.
//
// Interface and timing: one synchronous write port (we, waddr, wdata written
// at the clock edge) and one asynchronous read port (rdata follows raddr in
// the same cycle), so the pixel meets the cosine value, which comes out of a
// registered ROM, in the same cycle. The depth and the address split follow
// the scheme; the port structure is this design's choice.
module pixel_mem #(
  parameter int unsigned LOG2N = 3,
  parameter int unsigned PW    = dct_pkg::PIXEL_W
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [2*LOG2N-1:0]   waddr,
  input  logic [PW-1:0]        wdata,
  input  logic [2*LOG2N-1:0]   raddr,
  output logic [PW-1:0]        rdata
);

  localparam int unsigned DEPTH = 1 << (2 * LOG2N);

  logic [PW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule : pixel_mem

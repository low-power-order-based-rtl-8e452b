// brent_kung_adder: W-bit adder with a Brent-Kung parallel-prefix carry tree.
//
// Generate g = a & b and propagate p = a ^ b per bit; the carry in is folded
// into bit 0 (g0 | p0 & cin). The prefix operator
//   (G, P) o (G', P') = (G | P & G', P & P')
// is applied in the Brent-Kung pattern: an up-sweep of log2(W) levels that
// combines spans of 2, 4, 8 ... bits at indices 2**(l+1)-1 (mod 2**(l+1)),
// then a down-sweep that fills in the remaining positions from the nearest
// finished span. Afterwards G[i] is the carry out of bit i, so
// sum[i] = p[i] ^ carry into bit i. About 2*W prefix cells, depth
// 2*log2(W)-1. The Brent-Kung adder is part of the scheme; this is the standard
// form of it.
//
// Purely combinational.
module brent_kung_adder #(
  parameter int unsigned W = dct_pkg::ACC_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] gen, prop;   // per-bit generate and propagate
  logic [W-1:0] gg, pp;      // prefix (group) generate and propagate

  always_comb begin
    gen  = a & b;
    prop = a ^ b;
    gg   = gen;
    pp   = prop;
    gg[0] = gen[0] | (prop[0] & cin);
    // Up-sweep.
    for (int l = 0; l < LEVELS; l++) begin
      for (int i = 0; i < W; i++) begin
        if ((((i + 1) % (2 << l)) == 0) && (i >= (1 << l))) begin
          gg[i] = gg[i] | (pp[i] & gg[i-(1<<l)]);
          pp[i] = pp[i] & pp[i-(1<<l)];
        end
      end
    end
    // Down-sweep.
    for (int l = LEVELS - 2; l >= 0; l--) begin
      for (int i = 0; i < W; i++) begin
        if ((((i + 1) % (2 << l)) == (1 << l)) && (i >= (2 << l))) begin
          gg[i] = gg[i] | (pp[i] & gg[i-(1<<l)]);
          pp[i] = pp[i] & pp[i-(1<<l)];
        end
      end
    end
    sum[0] = prop[0] ^ cin;
    for (int i = 1; i < W; i++) sum[i] = prop[i] ^ gg[i-1];
    cout = gg[W-1];
  end

endmodule : brent_kung_adder

// cla_adder: W-bit carry look-ahead adder, the final adder of the multiplier.
//
// Bits are grouped in blocks of four. Inside a block every carry is formed
// directly from the bit generate/propagate terms and the block's carry-in
// (two-level look-ahead); each block also forms a group generate and group
// propagate, and the block carries are chained through those group terms.
// The sum is taken modulo 2^W; cout is the carry out of the top bit.
// Purely combinational.
// A carry look-ahead final adder is named by the published design; the 4-bit
// block organisation is this design's own. When W is not a multiple of 4 the
// last block carry is unused: the carry-out is then taken inside the block.
module cla_adder #(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int NB = (W + 3) / 4;
  localparam int WP = 4 * NB;

  logic [WP-1:0] g, p, c;
  logic [NB:0]   bc;       // carry into each block
  logic [NB-1:0] gg, gp;   // group generate / propagate

  assign g = WP'(a) & WP'(b);
  assign p = WP'(a) ^ WP'(b);
  assign bc[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    logic [3:0] gk, pk;
    assign gk = g[4*k +: 4];
    assign pk = p[4*k +: 4];
    assign c[4*k]   = bc[k];
    assign c[4*k+1] = gk[0] | (pk[0] & bc[k]);
    assign c[4*k+2] = gk[1] | (pk[1] & gk[0]) | (pk[1] & pk[0] & bc[k]);
    assign c[4*k+3] = gk[2] | (pk[2] & gk[1]) | (pk[2] & pk[1] & gk[0]) |
                      (pk[2] & pk[1] & pk[0] & bc[k]);
    assign gg[k] = gk[3] | (pk[3] & gk[2]) | (pk[3] & pk[2] & gk[1]) |
                   (pk[3] & pk[2] & pk[1] & gk[0]);
    assign gp[k] = &pk;
    assign bc[k+1] = gg[k] | (gp[k] & bc[k]);
  end

  assign s = p[W-1:0] ^ c[W-1:0];

  if (W == WP) begin : g_cout_blk
    assign cout = bc[NB];
  end else begin : g_cout_bit
    assign cout = g[W-1] | (p[W-1] & c[W-1]);
  end

endmodule

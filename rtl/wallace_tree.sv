// wallace_tree: carry-save (Wallace) reduction of ROWS addends to two.
//
// Every level groups the rows in threes and replaces each group by a row of
// full-adder sums and a row of full-adder carries shifted one place left;
// the one or two rows left over pass to the next level unchanged. A level
// turns r rows into 2*(r/3) + r%3, so the depth grows with log1.5(ROWS).
// All arithmetic is modulo 2^W (carries out of the top bit are dropped), so
// two's-complement rows sign-extended to W bits sum correctly. The two rows
// left at the end go to a carry-propagate adder. Purely combinational.
// A Wallace tree is what the published multiplier names; the grouping is the
// usual one and this design's own.
module wallace_tree #(
  parameter int ROWS = 8,
  parameter int W    = 32
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  function automatic int rows_after(int levels);
    int r = ROWS;
    for (int l = 0; l < levels; l++) r = 2 * (r / 3) + r % 3;
    return r;
  endfunction

  function automatic int depth();
    int r = ROWS;
    int n = 0;
    while (r > 2) begin
      r = 2 * (r / 3) + r % 3;
      n++;
    end
    return n;
  endfunction

  localparam int DEPTH = depth();

  for (genvar l = 0; l <= DEPTH; l++) begin : g_lvl
    localparam int R = rows_after(l);
    logic [W-1:0] r [R];

    if (l == 0) begin : g_in
      assign r = rows;
    end else begin : g_csa
      localparam int RP = rows_after(l - 1);
      localparam int G  = RP / 3;
      for (genvar g = 0; g < G; g++) begin : g_fa
        logic [W-1:0] a, b, c;
        assign a = g_lvl[l-1].r[3*g];
        assign b = g_lvl[l-1].r[3*g+1];
        assign c = g_lvl[l-1].r[3*g+2];
        assign r[2*g]   = a ^ b ^ c;
        assign r[2*g+1] = {((a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) |
                            (b[W-2:0] & c[W-2:0])), 1'b0};
      end
      for (genvar k = 0; k < RP % 3; k++) begin : g_pass
        assign r[2*G+k] = g_lvl[l-1].r[3*G+k];
      end
    end
  end

  if (rows_after(DEPTH) == 2) begin : g_two
    assign sum   = g_lvl[DEPTH].r[0];
    assign carry = g_lvl[DEPTH].r[1];
  end else begin : g_one
    assign sum   = g_lvl[DEPTH].r[0];
    assign carry = '0;
  end

endmodule

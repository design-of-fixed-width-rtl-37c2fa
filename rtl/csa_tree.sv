// csa_tree: carry-save adder tree (Wallace-style 3:2 reduction).
//
// It reduces ROWS addends of W bits to two rows, sum_o and carry_o. Their
// sum equals the sum of all inputs modulo 2^W. Each level takes the rows
// three at a time through a row of full adders: the sum bits stay in place
// and the carry bits move one column left. Rows left over pass straight to
// the next level. The level count is the usual 3:2 series, for example 6 -> 4 -> 3 -> 2.
// Column W-1 has no carry out (a three-input XOR replaces its full adder),
// which is exact modulo 2^W.
// Full adders whose third input is a constant zero reduce to half adders in
// synthesis.
//
// Combinational, with no handshake. The tree shape is this design's choice;
// the published architecture only says it is made of full and half adders.
module csa_tree #(
  parameter int unsigned ROWS = 6,
  parameter int unsigned W    = 9
) (
  input  logic [ROWS-1:0][W-1:0] rows_i,
  output logic [W-1:0]           sum_o,
  output logic [W-1:0]           carry_o
);
  // Rows remaining after one 3:2 level.
  function automatic int unsigned next_rows(input int unsigned n);
    return (n / 3) * 2 + (n % 3);
  endfunction

  // Rows remaining after k levels.
  function automatic int unsigned rows_at(input int unsigned n, input int unsigned k);
    int unsigned r = n;
    for (int unsigned j = 0; j < k; j++) r = next_rows(r);
    return r;
  endfunction

  // Number of levels needed to reach two rows.
  function automatic int unsigned num_levels(input int unsigned n);
    int unsigned r = n;
    int unsigned k = 0;
    while (r > 2) begin
      r = next_rows(r);
      k++;
    end
    return k;
  endfunction

  localparam int unsigned NLEV = num_levels(ROWS);

  if (ROWS < 1 || W < 2) begin : g_bad
    $error("csa_tree: ROWS must be at least 1 and W at least 2");
  end

  for (genvar k = 0; k <= NLEV; k++) begin : g_lev
    localparam int unsigned N = rows_at(ROWS, k);
    logic [N-1:0][W-1:0] r;

    if (k == 0) begin : g_in
      assign r = rows_i;
    end else begin : g_red
      localparam int unsigned NP = rows_at(ROWS, k - 1);  // rows of the level above
      localparam int unsigned NG = NP / 3;                 // full-adder groups
      for (genvar g = 0; g < NG; g++) begin : g_grp
        logic [W-1:0] s;
        logic [W-2:0] c;
        for (genvar b = 0; b < W - 1; b++) begin : g_bit
          full_adder fa (
            .a (g_lev[k-1].r[3*g][b]),
            .b (g_lev[k-1].r[3*g+1][b]),
            .ci(g_lev[k-1].r[3*g+2][b]),
            .s (s[b]),
            .co(c[b])
          );
        end
        // top column: its carry would leave the W-bit word, so only the sum
        assign s[W-1] = g_lev[k-1].r[3*g][W-1] ^ g_lev[k-1].r[3*g+1][W-1]
                      ^ g_lev[k-1].r[3*g+2][W-1];
        assign r[2*g]   = s;
        assign r[2*g+1] = {c, 1'b0};
      end
      for (genvar p = 3 * NG; p < NP; p++) begin : g_pass
        assign r[2*NG + p - 3*NG] = g_lev[k-1].r[p];
      end
    end
  end

  if (rows_at(ROWS, NLEV) == 1) begin : g_one
    assign sum_o   = g_lev[NLEV].r[0];
    assign carry_o = '0;
  end else begin : g_two
    assign sum_o   = g_lev[NLEV].r[0];
    assign carry_o = g_lev[NLEV].r[1];
  end
endmodule

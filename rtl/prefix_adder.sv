// prefix_adder: W-bit parallel-prefix (Kogge-Stone) carry-propagate adder.
//
// Each bit first forms generate g = a & b and propagate p = a ^ b. The
// carry-in is folded into bit 0's generate. There are ceil(log2 W) prefix
// levels. Level s combines each (G, P) pair with the one 2^(s-1) columns
// to its right, using G = G_hi | P_hi & G_lo and P = P_hi & P_lo. After the
// last level, G[i] is the carry into bit i+1. The last level computes only
// G. So sum = p ^ {carry[W-2:0], cin} and cout = carry[W-1].
//
// Combinational. The published architecture puts a parallel-prefix adder
// after the CSA tree. The Kogge-Stone network is this design's choice among the
// prefix structures.
module prefix_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NLEV = (W > 1) ? $clog2(W) : 1;

  if (W < 2) begin : g_bad
    $error("prefix_adder: W must be at least 2");
  end

  logic [W-1:0] p0;
  assign p0 = a ^ b;

  // Levels 0 .. NLEV-1 carry (G, P); the last level needs only G.
  for (genvar s = 0; s < NLEV; s++) begin : g_lev
    logic [W-1:0] G, P;
    if (s == 0) begin : g_init
      assign G = (a & b) | {{(W-1){1'b0}}, p0[0] & cin};
      assign P = p0;
    end else begin : g_step
      localparam int unsigned D = 1 << (s - 1);
      for (genvar i = 0; i < W; i++) begin : g_bit
        if (i >= D) begin : g_comb
          assign G[i] = g_lev[s-1].G[i] | (g_lev[s-1].P[i] & g_lev[s-1].G[i-D]);
          assign P[i] = g_lev[s-1].P[i] & g_lev[s-1].P[i-D];
        end else begin : g_keep
          assign G[i] = g_lev[s-1].G[i];
          assign P[i] = g_lev[s-1].P[i];
        end
      end
    end
  end

  // Last level: carries only.
  localparam int unsigned DL = 1 << (NLEV - 1);
  logic [W-1:0] carry;  // carry[i] = carry out of bit i

  for (genvar i = 0; i < W; i++) begin : g_last
    if (i >= DL) begin : g_comb
      assign carry[i] = g_lev[NLEV-1].G[i] | (g_lev[NLEV-1].P[i] & g_lev[NLEV-1].G[i-DL]);
    end else begin : g_keep
      assign carry[i] = g_lev[NLEV-1].G[i];
    end
  end

  // Propagate bits below DL of the last (G, P) level are not needed by the
  // last level; they are collected here so that lint sees them consumed.
  logic unused_p;
  assign unused_p = ^g_lev[NLEV-1].P[DL-1:0];

  assign sum  = p0 ^ {carry[W-2:0], cin};
  assign cout = carry[W-1];
endmodule

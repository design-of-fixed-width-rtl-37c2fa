// fwbm: low-error fixed-width radix-4 Booth multiplier core.
//
// It multiplies two L-bit two's-complement numbers and returns only the
// upper L bits of the 2L-bit product, pd = Pd_{2L-1..L}. The partial-product
// bit matrix is split at column L-1:
//   MP    columns L..2L-1   kept in full
//   TP_ma column  L-1       kept: its carry into column L is computed exactly
//   TP_mi columns 0..L-2    never built, replaced by a constant estimate
// The rows added by the CSA tree, over columns L-1..2L-1, are:
//   - the L/2 Booth rows from booth_encoder, each with its top bit inverted
//     (the inverted-sign form of sign extension);
//   - one row holding the negation bits neg_i that land in columns >= L-1,
//     plus the data-scaling bit ds in column L-1;
//   - one constant row: the sign-extension correction -sum(2^(L+2i)),
//     plus trunc_bias(L) * 2^(L-1), which estimates TP_mi and rounds.
// Column L-1 of the two CSA rows only yields a carry into column L. An
// L-bit parallel-prefix adder then adds columns L..2L-1 to give pd.
//
// ds: when the multiplicand was doubled by dst_scaler, the result is shifted
// right by one afterwards. To round that shift instead of truncating it, the
// bias grows by one more 2^(L-1) in this case.
//
// Combinational, no clock, one product per input change. The split into MP,
// TP_ma and TP_mi and the encoder / CSA tree / prefix adder chain follow the
// published DST-FWBM architecture. That architecture lets this core be any
// of several published low-error compensation schemes but does not specify
// one. The constant-bias estimator
// and the ds rounding bit are this design's own.
module fwbm
  import fwbm_pkg::*;
#(
  parameter int unsigned L = 8
) (
  input  logic [L-1:0] xd,  // multiplicand (after data scaling)
  input  logic [L-1:0] y,   // multiplier
  input  logic         ds,  // data scaling active
  output logic [L-1:0] pd   // Pd_{2L-1..L}
);
  localparam int unsigned NPP  = L / 2;
  localparam int unsigned W    = L + 1;    // columns L-1 .. 2L-1
  localparam int unsigned LO   = L - 1;    // lowest kept column
  localparam int unsigned ROWS = NPP + 2;

  // Sign-extension correction plus truncation/rounding bias, 2L bits.
  function automatic logic [2*L-1:0] const_word();
    logic [2*L-1:0] k;
    k = '0;
    for (int unsigned i = 0; i < NPP; i++) k = k - ((2*L)'(1) << (L + 2*i));
    k = k + ((2*L)'(trunc_bias(L)) << LO);
    return k;
  endfunction

  localparam logic [2*L-1:0] KCONST = const_word();

  logic [NPP-1:0][L:0] pp;
  logic [NPP-1:0]      neg;

  booth_encoder #(.L(L)) u_enc (
    .xd (xd),
    .y  (y),
    .pp (pp),
    .neg(neg)
  );

  // Kept part of the partial-product matrix, in tree columns t = c - (L-1).
  logic [ROWS-1:0][W-1:0] rows;

  always_comb begin
    rows = '0;
    for (int unsigned i = 0; i < NPP; i++) begin
      for (int unsigned t = 0; t < W; t++) begin
        // bit j of row i sits at column 2i + j
        if (t + LO >= 2*i && t + LO - 2*i <= L) begin
          if (t + LO - 2*i == L) rows[i][t] = ~pp[i][L];
          else                   rows[i][t] =  pp[i][t + LO - 2*i];
        end
      end
    end
    // negation bits (even columns) and the scaling round bit (column L-1, odd)
    rows[NPP][0] = ds;
    for (int unsigned i = 0; i < NPP; i++) begin
      if (2*i >= LO) rows[NPP][2*i - LO] = neg[i];
    end
    rows[NPP+1] = KCONST[2*L-1:LO];
  end

  logic [W-1:0] s_row, c_row;
  logic         cin_lo, cout_hi;

  csa_tree #(.ROWS(ROWS), .W(W)) u_csa (
    .rows_i (rows),
    .sum_o  (s_row),
    .carry_o(c_row)
  );

  // Column L-1 only produces the carry into column L; its sum bit is dropped.
  assign cin_lo = s_row[0] & c_row[0];

  prefix_adder #(.W(L)) u_add (
    .a   (s_row[W-1:1]),
    .b   (c_row[W-1:1]),
    .cin (cin_lo),
    .sum (pd),
    .cout(cout_hi)
  );

  // The product is taken modulo 2^2L; the final carry out has no weight.
  logic unused_cout;
  assign unused_cout = cout_hi;
endmodule

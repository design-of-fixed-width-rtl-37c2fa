// booth_encoder: radix-4 Booth encoder and partial-product generator.
//
// It recodes the L-bit two's-complement multiplier y into L/2 digits in
// {-2..+2} (see fwbm_pkg::booth_select), with y[-1] = 0. For each digit it
// forms an (L+1)-bit row from the (possibly scaled) multiplicand xd: xd
// sign-extended for |d| = 1, xd shifted left for |d| = 2, zero for d = 0.
// The row is inverted when the digit is negative.
// The row value is therefore (d_i * xd - neg_i) in (L+1)-bit two's complement.
// The missing +1 of the negation is returned as neg[i]. It belongs at the
// row's lowest column, which is weight 4^i, and the CSA tree adds it there.
// Sign extension is not done here: the core inverts each row's top bit and
// adds one constant instead.
//
// Combinational. L must be even. The radix-4 recoding is this design's choice.
// The published architecture names a Booth encoder feeding a CSA tree and
// explains Booth's rule in its radix-2 form, inspecting (Q0, Q-1) pairs.
// Radix 4 applies that rule to overlapping bit pairs.
module booth_encoder
  import fwbm_pkg::*;
#(
  parameter int unsigned L = 8
) (
  input  logic [L-1:0]            xd,   // multiplicand (after data scaling)
  input  logic [L-1:0]            y,    // multiplier
  output logic [L/2-1:0][L:0]     pp,   // partial-product rows, d_i*xd - neg_i
  output logic [L/2-1:0]          neg   // +1 to add at column 2i of row i
);
  localparam int unsigned NPP = L / 2;

  if (L < 4 || (L % 2) != 0) begin : g_bad_l
    $error("booth_encoder: L must be even and at least 4");
  end

  logic [L:0] y_ext;      // {y, y[-1]=0}
  logic [L:0] x1, x2;     // 1x and 2x multiples, L+1 bits

  assign y_ext = {y, 1'b0};
  assign x1    = {xd[L-1], xd};
  assign x2    = {xd, 1'b0};

  for (genvar i = 0; i < NPP; i++) begin : g_row
    booth_sel_t sel;
    logic [L:0] mag;

    assign sel = booth_select(y_ext[2*i +: 3]);

    always_comb begin
      mag = '0;
      if (sel.one) mag = x1;
      if (sel.two) mag = x2;
    end

    assign pp[i]  = mag ^ {(L+1){sel.neg}};
    assign neg[i] = sel.neg;
  end
endmodule

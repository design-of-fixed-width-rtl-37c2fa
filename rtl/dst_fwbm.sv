// dst_fwbm: fixed-width Booth multiplier with one-bit data scaling (DST-FWBM).
//
// It computes an L-bit approximation of the upper half of x * y, for L-bit
// two's-complement x (multiplicand) and y (multiplier). pq is about
// round(x*y / 2^L). A fixed-width multiplier drops the low half of the
// partial products, and that truncation is its main source of error. The
// data-scaling circuit reduces it for free whenever x has a redundant sign
// bit (its two top bits are equal). x is then doubled before the multiply
// (dst_scaler), so one more significant bit of the product lands in the
// kept columns. The result is halved afterwards (dst_rescaler).
//
//   x --> dst_scaler --xd--> fwbm (Booth encoder, CSA tree, prefix adder) --pd-->
//              |ds                 ^ ds (rounding bit)                        |
//              +-------------------+-----------------------> dst_rescaler ----+--> pq
//
// Purely combinational, with no clock or handshake. A new product is valid
// after the combinational delay.
// L defaults to 8, the operand width of the published FPGA implementation.
// At that width the error stays within 1.5 output LSBs. The mean square
// error over all operand pairs is about 0.146 LSB^2, against 0.183 for the
// same core without scaling.
module dst_fwbm #(
  parameter int unsigned L = 8
) (
  input  logic [L-1:0] x,   // multiplicand, two's complement
  input  logic [L-1:0] y,   // multiplier, two's complement
  output logic [L-1:0] pq   // fixed-width product Pq_{2L-1..L}
);
  logic [L-1:0] xd, pd;
  logic         ds;

  dst_scaler #(.L(L)) u_dst_in (
    .x (x),
    .xd(xd),
    .ds(ds)
  );

  fwbm #(.L(L)) u_fwbm (
    .xd(xd),
    .y (y),
    .ds(ds),
    .pd(pd)
  );

  dst_rescaler #(.L(L)) u_dst_out (
    .pd(pd),
    .ds(ds),
    .pq(pq)
  );
endmodule

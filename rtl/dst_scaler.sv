// dst_scaler: input half of the data-scaling circuit (DST, one bit of scaling).
//
// A two's-complement multiplicand whose two top bits are equal carries a
// redundant sign bit. It can be doubled without overflow. ds flags that
// case. A row of L 2-to-1 muxes then forms xd = 2*x: mux k passes x[k-1]
// when ds is set and x[k] otherwise, and mux 0 passes 0 when ds is set.
// Otherwise xd = x. Doubling the multiplicand moves one more significant bit
// of the product above the truncation line. The output half (dst_rescaler)
// undoes the doubling.
//
// Combinational. The mux row and its inputs (x_{k}, x_{k-1}; x_0, 0) follow
// the published DST-FWBM architecture. That architecture shows a two-input
// gate fed from the top bits but does not name it. Deriving ds as "top two bits
// equal" is this design's reading of "uses the redundant bits of the
// multiplicand".
module dst_scaler #(
  parameter int unsigned L = 8
) (
  input  logic [L-1:0] x,   // multiplicand
  output logic [L-1:0] xd,  // scaled multiplicand
  output logic         ds   // 1: xd = 2*x, 0: xd = x
);
  if (L < 2) begin : g_bad
    $error("dst_scaler: L must be at least 2");
  end

  assign ds = ~(x[L-1] ^ x[L-2]);

  for (genvar k = 0; k < L; k++) begin : g_mux
    if (k == 0) begin : g_lsb
      assign xd[k] = ds ? 1'b0 : x[0];
    end else begin : g_bit
      assign xd[k] = ds ? x[k-1] : x[k];
    end
  end
endmodule

// dst_rescaler: output half of the data-scaling circuit (DST, one bit).
//
// pd holds the upper L bits Pd_{2L-1..L} of the fixed-width product of the
// scaled multiplicand. When ds is set that product is twice the wanted one,
// so the result shifts right by one, arithmetically. A row of L-1 2-to-1
// muxes does it: Pq_{L+k} takes Pd_{L+k+1} when ds is set and Pd_{L+k}
// otherwise, for k = 0..L-2. The sign bit Pq_{2L-1} is wired straight from
// Pd_{2L-1}. Together with the L muxes of dst_scaler, this makes the 2L-1
// multiplexers of one-bit scaling.
//
// Combinational. The mux wiring follows the published DST-FWBM architecture.
// The half-LSB lost to this shift is restored by a rounding bit inside the
// FWBM core (see fwbm).
module dst_rescaler #(
  parameter int unsigned L = 8
) (
  input  logic [L-1:0] pd,  // Pd_{2L-1..L}
  input  logic         ds,  // scaling select from dst_scaler
  output logic [L-1:0] pq   // Pq_{2L-1..L}
);
  assign pq[L-1] = pd[L-1];

  for (genvar k = 0; k < L - 1; k++) begin : g_mux
    assign pq[k] = ds ? pd[k+1] : pd[k];
  end
endmodule

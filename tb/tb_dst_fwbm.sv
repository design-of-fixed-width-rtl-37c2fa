// tb_dst_fwbm: end-to-end test of the DST fixed-width Booth multiplier.
//
// The top is used at its default width, L = 8. Its parameters are not
// overridden.
//  1. The operand pairs of the reference simulation: 14*23, -23*23, -32*13,
//     -31*14, -25*75, -35*75 and -45*95. The exact products are 322, -529,
//     -416, -434, -1875, -2625 and -4275. The expected fixed-width results
//     are 1, -2, -2, -2, -7, -10 and -17.
//  2. All 65536 operand pairs. The result must match the integer model
//     fwbm_ref_pkg::dst_ref and lie within 1.5 LSB of x*y/256. The mean
//     error must be within 0.05 LSB of zero. The mean square error must be
//     below that of the same core with scaling disabled, the baseline
//     instance 'plain'.
//  3. Mechanisms: both the scaled path (redundant sign bit, ds = 1) and the
//     unscaled path must occur; each count is reported.
module tb_dst_fwbm;
  import fwbm_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_scaled = 0, n_plain = 0;

  logic [7:0]  x, y, pq, pq_plain;

  dst_fwbm dut (.x(x), .y(y), .pq(pq));

  // Baseline: same fixed-width core, no data scaling.
  fwbm plain (.xd(x), .y(y), .ds(1'b0), .pd(pq_plain));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  // Operands, printed exact products and expected fixed-width results.
  localparam int FX[7] = '{14, -23, -32, -31, -25, -35, -45};
  localparam int FY[7] = '{23,  23,  13,  14,  75,  75,  95};
  localparam int FP[7] = '{322, -529, -416, -434, -1875, -2625, -4275};
  localparam int FQ[7] = '{1, -2, -2, -2, -7, -10, -17};

  real sum_e, sq_e, sq_plain, max_e;
  bit  sc;

  initial begin
    sum_e = 0.0; sq_e = 0.0; sq_plain = 0.0; max_e = 0.0;

    // 1. reference simulation vectors
    for (int i = 0; i < 7; i++) begin
      x = 8'(FX[i]);
      y = 8'(FY[i]);
      #1;
      expect_eq("printed product", longint'(FX[i] * FY[i]), longint'(FP[i]));
      expect_eq($sformatf("pq(%0d*%0d)", FX[i], FY[i]), longint'($signed(pq)), longint'(FQ[i]));
    end

    // 2. exhaustive
    for (int v = 0; v < 65536; v++) begin
      longint want;
      real e, ep, exact;
      {x, y} = 16'(v);
      #1;
      want = dst_ref(longint'($signed(x)), longint'($signed(y)), 8, sc);
      if (sc) n_scaled++; else n_plain++;
      expect_eq("exhaustive", longint'($signed(pq)), want);
      exact = real'($signed(x)) * real'($signed(y)) / 256.0;
      e  = real'($signed(pq)) - exact;
      ep = real'($signed(pq_plain)) - exact;
      sum_e += e; sq_e += e * e; sq_plain += ep * ep;
      if (e > max_e) max_e = e;
      if (-e > max_e) max_e = -e;
      checks++;
      if (e > 1.5 || e < -1.5) begin
        failures++;
        if (failures < 10) $display("FAIL error %f x=%0d y=%0d", e, $signed(x), $signed(y));
      end
    end

    $display("scaled=%0d unscaled=%0d mean_err=%f mse=%f mse_no_dst=%f max_err=%f",
             n_scaled, n_plain, sum_e / 65536.0, sq_e / 65536.0, sq_plain / 65536.0, max_e);
    checks++;
    if (n_scaled == 0 || n_plain == 0) begin
      failures++;
      $display("FAIL a data path never ran: scaled=%0d unscaled=%0d", n_scaled, n_plain);
    end
    checks++;
    if (sum_e / 65536.0 > 0.05 || sum_e / 65536.0 < -0.05) begin
      failures++;
      $display("FAIL mean error %f", sum_e / 65536.0);
    end
    checks++;
    if (!(sq_e < sq_plain)) begin
      failures++;
      $display("FAIL scaling did not lower the mean square error");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

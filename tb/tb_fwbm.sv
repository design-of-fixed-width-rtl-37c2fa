// tb_fwbm: check of the fixed-width Booth core without the scaling muxes.
//
// L = 8: all (xd, y, ds) combinations are applied. pd must match the
// integer model fwbm_ref_pkg::fw_ref bit for bit. The result must also stay
// within 2 LSBs of the exact xd*y / 2^L; with ds set, the extra rounding
// bias is allowed for. L = 12: random operands against the same model.
module tb_fwbm;
  import fwbm_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  xd8, y8, pd8;   logic ds8;
  logic [11:0] xd12, y12, pd12; logic ds12;

  fwbm           dut8  (.xd(xd8),  .y(y8),  .ds(ds8),  .pd(pd8));
  fwbm #(.L(12)) dut12 (.xd(xd12), .y(y12), .ds(ds12), .pd(pd12));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      longint want;
      real err;
      {ds8, xd8, y8} = 17'(v);
      xd12 = 12'($urandom); y12 = 12'($urandom); ds12 = 1'($urandom);
      #1;
      want = fw_ref(longint'($signed(xd8)), longint'(y8), ds8, 8);
      checks++;
      if (longint'(pd8) != want) begin
        failures++;
        if (failures < 10) $display("FAIL L8 xd=%0d y=%0d ds=%0b pd=%0h want %0h",
                                    $signed(xd8), $signed(y8), ds8, pd8, want);
      end
      err = real'($signed(pd8)) - (real'($signed(xd8)) * real'($signed(y8)) / 256.0 + (ds8 ? 0.5 : 0.0));
      checks++;
      if (err > 2.0 || err < -2.0) begin
        failures++;
        if (failures < 10) $display("FAIL L8 error %f xd=%0d y=%0d", err, $signed(xd8), $signed(y8));
      end
      if (v % 4 == 0) begin
        want = fw_ref(longint'($signed(xd12)), longint'(y12), ds12, 12);
        checks++;
        if (longint'(pd12) != want) begin
          failures++;
          if (failures < 10) $display("FAIL L12 xd=%0d y=%0d pd=%0h want %0h",
                                      $signed(xd12), $signed(y12), pd12, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

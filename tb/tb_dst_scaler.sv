// tb_dst_scaler: exhaustive check of the DST input stage, L = 8 and L = 4.
//
// ds must be set exactly when 2*x still fits in L signed bits. xd must then
// equal 2*x, and x otherwise.
module tb_dst_scaler;
  int checks = 0, failures = 0;
  int n_scaled = 0, n_plain = 0;

  logic [7:0] x8, xd8; logic ds8;
  logic [3:0] x4, xd4; logic ds4;

  dst_scaler          dut8 (.x(x8), .xd(xd8), .ds(ds8));
  dst_scaler #(.L(4)) dut4 (.x(x4), .xd(xd4), .ds(ds4));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int xs, xs4;
      bit want, want4;
      x8 = 8'(v);
      x4 = 4'(v);
      #1;
      xs  = int'($signed(x8));
      xs4 = int'($signed(x4));
      want  = (2 * xs  >= -128) && (2 * xs  <= 127);
      want4 = (2 * xs4 >= -8)   && (2 * xs4 <= 7);
      if (want) n_scaled++; else n_plain++;
      checks++;
      if (ds8 != want || int'($signed(xd8)) != (want ? 2 * xs : xs)) begin
        failures++;
        $display("FAIL L8 x=%0d ds=%0b xd=%0d", xs, ds8, $signed(xd8));
      end
      checks++;
      if (ds4 != want4 || int'($signed(xd4)) != (want4 ? 2 * xs4 : xs4)) begin
        failures++;
        $display("FAIL L4 x=%0d ds=%0b xd=%0d", xs4, ds4, $signed(xd4));
      end
    end
    checks++;
    if (n_scaled != 128 || n_plain != 128) begin
      failures++;
      $display("FAIL scaled count %0d / %0d", n_scaled, n_plain);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

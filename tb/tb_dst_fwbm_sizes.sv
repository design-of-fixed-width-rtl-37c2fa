// tb_dst_fwbm_sizes: the DST fixed-width multiplier at other word lengths.
//
// L = 4 is checked over all 256 operand pairs against the integer model; the
// example 7 * 3 = 21 must give round(21/16) = 1.
// 12-bit and 16-bit instances get random operands (plus the extreme values).
// Each result must match the integer model fwbm_ref_pkg::dst_ref bit for bit
// and stay within 2.5 output LSBs of x*y / 2^L. For each width the mean
// square error must be below that of the same core without scaling. Both
// the scaled and the unscaled path must occur.
module tb_dst_fwbm_sizes;
  import fwbm_ref_pkg::*;

  localparam int N = 40000;

  int checks = 0, failures = 0;
  int n_scaled = 0, n_plain = 0;

  logic [3:0]  x4, y4, pq4;
  logic [11:0] x12, y12, pq12, pn12;
  logic [15:0] x16, y16, pq16, pn16;

  dst_fwbm #(.L(4))  dut4    (.x(x4), .y(y4), .pq(pq4));
  dst_fwbm #(.L(12)) dut12   (.x(x12), .y(y12), .pq(pq12));
  fwbm     #(.L(12)) plain12 (.xd(x12), .y(y12), .ds(1'b0), .pd(pn12));
  dst_fwbm #(.L(16)) dut16   (.x(x16), .y(y16), .pq(pq16));
  fwbm     #(.L(16)) plain16 (.xd(x16), .y(y16), .ds(1'b0), .pd(pn16));

  real sq12, sqp12, sq16, sqp16;
  bit  sc;

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input int l, input longint xs, input longint ys,
                           input longint got, input longint got_plain,
                           ref real sq, ref real sqp);
    longint want;
    real exact, e, ep;
    want = dst_ref(xs, ys, l, sc);
    if (sc) n_scaled++; else n_plain++;
    exact = real'(xs) * real'(ys) / real'(longint'(1) << l);
    e  = real'(got) - exact;
    ep = real'(got_plain) - exact;
    sq += e * e;
    sqp += ep * ep;
    checks++;
    if (got != want || e > 2.5 || e < -2.5) begin
      failures++;
      if (failures < 10) $display("FAIL L%0d %0d*%0d: got %0d want %0d (err %f)", l, xs, ys, got, want, e);
    end
  endtask

  initial begin
    sq12 = 0.0; sqp12 = 0.0; sq16 = 0.0; sqp16 = 0.0;
    x4 = 4'd7; y4 = 4'd3;
    #1;
    checks++;
    if (pq4 != 4'd1) begin
      failures++;
      $display("FAIL L4 7*3: got %0d", $signed(pq4));
    end
    for (int v = 0; v < 256; v++) begin
      longint want;
      {x4, y4} = 8'(v);
      #1;
      want = dst_ref(longint'($signed(x4)), longint'($signed(y4)), 4, sc);
      checks++;
      if (longint'($signed(pq4)) != want) begin
        failures++;
        if (failures < 10) $display("FAIL L4 %0d*%0d: got %0d want %0d", $signed(x4), $signed(y4), $signed(pq4), want);
      end
    end
    for (int n = 0; n < N; n++) begin
      case (n)
        0: begin x12 = 12'h800; y12 = 12'h800; x16 = 16'h8000; y16 = 16'h8000; end
        1: begin x12 = 12'h7ff; y12 = 12'h800; x16 = 16'h7fff; y16 = 16'h8000; end
        2: begin x12 = 12'h7ff; y12 = 12'h7ff; x16 = 16'h7fff; y16 = 16'h7fff; end
        default: begin
          x12 = 12'($urandom); y12 = 12'($urandom);
          x16 = 16'($urandom); y16 = 16'($urandom);
        end
      endcase
      #1;
      check_one(12, longint'($signed(x12)), longint'($signed(y12)),
                longint'($signed(pq12)), longint'($signed(pn12)), sq12, sqp12);
      check_one(16, longint'($signed(x16)), longint'($signed(y16)),
                longint'($signed(pq16)), longint'($signed(pn16)), sq16, sqp16);
    end
    $display("L12 mse=%f (no scaling %f)  L16 mse=%f (no scaling %f)  scaled=%0d unscaled=%0d",
             sq12 / N, sqp12 / N, sq16 / N, sqp16 / N, n_scaled, n_plain);
    checks++;
    if (!(sq12 < sqp12) || !(sq16 < sqp16)) begin
      failures++;
      $display("FAIL scaling did not lower the mean square error");
    end
    checks++;
    if (n_scaled == 0 || n_plain == 0) begin
      failures++;
      $display("FAIL a data path never ran");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

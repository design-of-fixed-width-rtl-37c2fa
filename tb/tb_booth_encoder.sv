// tb_booth_encoder: exhaustive check of the radix-4 Booth encoder, L = 8.
//
// For every (xd, y) pair: each row, read as an (L+1)-bit signed number plus
// its neg bit, must equal d_i * xd, where d_i is the Booth digit of y worked
// out arithmetically. The weighted sum of the rows must equal xd * y.
// A 4-bit instance checks the textbook example M = 0111 (7) times Q = 0011
// (3), whose product 0001_0101 (21) the radix-2 Booth procedure reaches in
// four add/subtract-and-shift steps. The instance is then checked over all
// 4-bit operand pairs.
module tb_booth_encoder;
  localparam int L = 8;
  localparam int NPP = L / 2;

  logic [L-1:0]        xd, y;
  logic [NPP-1:0][L:0] pp;
  logic [NPP-1:0]      neg;
  int checks = 0, failures = 0;

  booth_encoder #(.L(L)) dut (.xd(xd), .y(y), .pp(pp), .neg(neg));

  logic [3:0]      xd4, y4;
  logic [1:0][4:0] pp4;
  logic [1:0]      neg4;

  booth_encoder #(.L(4)) dut4 (.xd(xd4), .y(y4), .pp(pp4), .neg(neg4));

  function automatic int sum4();
    return (int'($signed(pp4[0])) + int'(neg4[0])) + 4 * (int'($signed(pp4[1])) + int'(neg4[1]));
  endfunction

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked example: 7 * 3 = 21 (0001_0101)
    xd4 = 4'b0111;
    y4  = 4'b0011;
    #1;
    checks++;
    if (sum4() != 21) begin
      failures++;
      $display("FAIL example 7*3: got %0d", sum4());
    end
    for (int v = 0; v < 256; v++) begin
      {xd4, y4} = 8'(v);
      #1;
      checks++;
      if (sum4() != int'($signed(xd4)) * int'($signed(y4))) begin
        failures++;
        if (failures < 10) $display("FAIL L4 %0d*%0d: got %0d", $signed(xd4), $signed(y4), sum4());
      end
    end

    for (int xv = 0; xv < (1 << L); xv++) begin
      for (int yv = 0; yv < (1 << L); yv++) begin
        longint total, xs, ys;
        xd = L'(xv);
        y  = L'(yv);
        #1;
        xs = longint'($signed(xd));
        ys = longint'($signed(y));
        total = 0;
        for (int i = 0; i < NPP; i++) begin
          int d;
          longint rowv;
          d = ((i == 0) ? 0 : int'(y[2*i-1])) + int'(y[2*i]) - 2 * int'(y[2*i+1]);
          rowv = longint'($signed(pp[i])) + longint'(neg[i]);
          checks++;
          if (rowv != longint'(d) * xs || neg[i] != (d < 0)) begin
            failures++;
            if (failures < 10)
              $display("FAIL xd=%0d y=%0d row %0d: got %0d neg=%0b want %0d", xs, ys, i, rowv, neg[i], d * xs);
          end
          total += rowv <<< (2 * i);
        end
        checks++;
        if (total != xs * ys) begin
          failures++;
          if (failures < 10) $display("FAIL xd=%0d y=%0d sum %0d", xs, ys, total);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_prefix_adder: check of the Kogge-Stone adder.
//
// The default 8-bit instance, the width used by the L = 8 core, is checked
// exhaustively over a, b and cin. A 16-bit and a 5-bit instance get random
// operands. {cout, sum} must equal a + b + cin.
module tb_prefix_adder;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;    logic c8i, c8o;
  logic [15:0] a16, b16, s16; logic c16i, c16o;
  logic [4:0]  a5, b5, s5;    logic c5i, c5o;

  prefix_adder           dut8  (.a(a8),  .b(b8),  .cin(c8i),  .sum(s8),  .cout(c8o));
  prefix_adder #(.W(16)) dut16 (.a(a16), .b(b16), .cin(c16i), .sum(s16), .cout(c16o));
  prefix_adder #(.W(5))  dut5  (.a(a5),  .b(b5),  .cin(c5i),  .sum(s5),  .cout(c5o));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      {c8i, a8, b8} = 17'(v);
      a16 = 16'($urandom); b16 = 16'($urandom); c16i = 1'($urandom);
      a5  = 5'($urandom);  b5  = 5'($urandom);  c5i  = 1'($urandom);
      #1;
      checks++;
      if ({c8o, s8} != 9'(a8 + b8 + c8i)) begin
        failures++;
        if (failures < 10) $display("FAIL W8 %0d+%0d+%0d = %0d", a8, b8, c8i, {c8o, s8});
      end
      checks++;
      if ({c16o, s16} != 17'(a16 + b16 + c16i)) begin
        failures++;
        if (failures < 10) $display("FAIL W16 %0d+%0d+%0d = %0d", a16, b16, c16i, {c16o, s16});
      end
      checks++;
      if ({c5o, s5} != 6'(a5 + b5 + c5i)) begin
        failures++;
        if (failures < 10) $display("FAIL W5 %0d+%0d+%0d = %0d", a5, b5, c5i, {c5o, s5});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

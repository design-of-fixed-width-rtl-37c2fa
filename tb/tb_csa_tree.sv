// tb_csa_tree: random check of the carry-save tree in four shapes.
//
// For each shape (6x9, the default; 9x12; 2x8; 1x5) random rows are
// applied. sum_o + carry_o must equal the sum of all rows modulo 2^W. The
// two all-ones and all-zero corner cases are applied first.
module tb_csa_tree;
  int checks = 0, failures = 0;

  logic [5:0][8:0]  a_rows;  logic [8:0]  a_s, a_c;
  logic [8:0][11:0] b_rows;  logic [11:0] b_s, b_c;
  logic [1:0][7:0]  c_rows;  logic [7:0]  c_s, c_c;
  logic [0:0][4:0]  d_rows;  logic [4:0]  d_s, d_c;

  csa_tree                    dut_a (.rows_i(a_rows), .sum_o(a_s), .carry_o(a_c));
  csa_tree #(.ROWS(9), .W(12)) dut_b (.rows_i(b_rows), .sum_o(b_s), .carry_o(b_c));
  csa_tree #(.ROWS(2), .W(8))  dut_c (.rows_i(c_rows), .sum_o(c_s), .carry_o(c_c));
  csa_tree #(.ROWS(1), .W(5))  dut_d (.rows_i(d_rows), .sum_o(d_s), .carry_o(d_c));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned lsum(input longint unsigned v[], input int w);
    longint unsigned t = 0;
    foreach (v[i]) t += v[i];
    return t & ((longint'(1) << w) - 1);
  endfunction

  task automatic check(input string nm, input longint unsigned got, input longint unsigned want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h want %0h", nm, got, want);
    end
  endtask

  initial begin
    for (int n = 0; n < 5000; n++) begin
      longint unsigned va[], vb[], vc[], vd[];
      va = new[6]; vb = new[9]; vc = new[2]; vd = new[1];
      foreach (va[i]) begin
        va[i] = (n == 0) ? 0 : (n == 1) ? 9'h1ff : 9'($urandom);
        a_rows[i] = 9'(va[i]);
      end
      foreach (vb[i]) begin
        vb[i] = (n == 0) ? 0 : (n == 1) ? 12'hfff : 12'($urandom);
        b_rows[i] = 12'(vb[i]);
      end
      foreach (vc[i]) begin
        vc[i] = 8'($urandom);
        c_rows[i] = 8'(vc[i]);
      end
      vd[0] = 5'($urandom);
      d_rows[0] = 5'(vd[0]);
      #1;
      check("6x9",  (a_s + a_c) & 9'h1ff,  lsum(va, 9));
      check("9x12", (b_s + b_c) & 12'hfff, lsum(vb, 12));
      check("2x8",  8'(c_s + c_c),         lsum(vc, 8));
      check("1x5",  5'(d_s + d_c),         lsum(vd, 5));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

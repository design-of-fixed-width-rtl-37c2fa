// tb_dst_rescaler: exhaustive check of the DST output stage, L = 8.
//
// pq must equal pd when ds is clear, and pd shifted right by one
// arithmetically (floor of pd/2) when ds is set.
module tb_dst_rescaler;
  int checks = 0, failures = 0;

  logic [7:0] pd, pq;
  logic       ds;

  dst_rescaler dut (.pd(pd), .ds(ds), .pq(pq));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int ps, want;
      {ds, pd} = 9'(v);
      #1;
      ps = int'($signed(pd));
      want = ds ? int'($floor(real'(ps) / 2.0)) : ps;
      checks++;
      if (int'($signed(pq)) != want) begin
        failures++;
        $display("FAIL pd=%0d ds=%0b pq=%0d want %0d", ps, ds, $signed(pq), want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

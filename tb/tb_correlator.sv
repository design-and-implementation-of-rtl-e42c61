// tb_correlator: drives random samples and +1/-1 code values into one
// correlator and compares the sum with c0*y0 + c1*y1 + c2*y2 + c3*y3
// computed here, including the extreme sample values.
module tb_correlator;
  localparam int DW = 14;

  logic signed [DW-1:0]  y [4];
  logic signed [1:0]     c [4];
  logic signed [DW+3:0]  sum;

  correlator #(.DW(DW), .CW(2)) dut (.y, .c, .sum);

  int checks = 0, failures = 0;
  int expect_v;

  initial begin
    for (int t = 0; t < 500; t++) begin
      expect_v = 0;
      for (int k = 0; k < 4; k++) begin
        if (t < 4) y[k] = (t[0]) ? -(1 <<< (DW-1)) : (1 <<< (DW-1)) - 1;
        else       y[k] = DW'($urandom);
        c[k] = ($urandom_range(1) == 1) ? 2'sb11 : 2'sb01;
        if (t < 4) c[k] = t[1] ? 2'sb11 : 2'sb01;
        expect_v += int'(y[k]) * int'(c[k]);
      end
      #1;
      checks++;
      if (int'(sum) != expect_v) begin
        failures++;
        $display("FAIL t=%0d sum=%0d expected=%0d", t, sum, expect_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

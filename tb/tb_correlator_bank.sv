// tb_correlator_bank: a bank of 4 correlators per stream (16-sample window)
// is fed a new random window every cycle, with gaps. Each of the 4 partial
// sums per stream is compared, one cycle later, with the sum over its four
// lanes of sample * (code bit ? -1 : +1) computed here; out_valid must
// follow in_valid by exactly one cycle.
module tb_correlator_bank;
  localparam int N  = 4;
  localparam int DW = 14;
  localparam int L  = 4 * N;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 in_valid = 0, out_valid;
  logic [L-1:0]         code;
  logic signed [DW-1:0] yi [L];
  logic signed [DW-1:0] yq [L];
  logic signed [DW+3:0] si [N];
  logic signed [DW+3:0] sq [N];

  correlator_bank #(.N_CORR(N), .DW(DW)) dut (
    .clk, .rst_n, .in_valid, .code, .yi, .yq, .out_valid, .sum_i(si), .sum_q(sq)
  );

  int checks = 0, failures = 0;
  int ei [N], eq [N];
  bit pend = 0;

  initial begin
    for (int k = 0; k < L; k++) begin yi[k] = '0; yq[k] = '0; end
    code = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      // check the previous cycle's window
      checks++;
      if (out_valid != pend) begin
        failures++;
        $display("FAIL t=%0d out_valid=%0d expected %0d", t, out_valid, pend);
      end
      if (pend)
        for (int g = 0; g < N; g++) begin
          checks++;
          if (int'(si[g]) != ei[g] || int'(sq[g]) != eq[g]) begin
            failures++;
            $display("FAIL t=%0d g=%0d i=%0d/%0d q=%0d/%0d", t, g, si[g], ei[g], sq[g], eq[g]);
          end
        end
      // new window
      in_valid = ($urandom_range(3) != 0);
      code = L'({$urandom, $urandom});
      for (int k = 0; k < L; k++) begin
        yi[k] = DW'($urandom);
        yq[k] = DW'($urandom);
      end
      pend = in_valid;
      if (in_valid)
        for (int g = 0; g < N; g++) begin
          ei[g] = 0; eq[g] = 0;
          for (int j = 4 * g; j < 4 * g + 4; j++) begin
            ei[g] += code[j] ? -int'(yi[j]) : int'(yi[j]);
            eq[g] += code[j] ? -int'(yq[j]) : int'(yq[j]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

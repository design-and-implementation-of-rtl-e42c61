// tb_cordic_rotation: streams random vectors and angles (all four
// quadrants, plus the paper-style case y = 0) through the pipelined CORDIC,
// one per cycle, and compares each output with the exact rotation
// x*cos(z) - y*sin(z), x*sin(z) + y*cos(z) computed in floating point
// (tolerance 3 LSB). The output must appear exactly ITER + 2 = 18 cycles
// after its input.
module tb_cordic_rotation;
  localparam int IN_W = 12, OUT_W = 14, ANG_W = 24, LAT = 18, NV = 1000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                    in_valid = 0, out_valid;
  logic signed [IN_W-1:0]  x_in = '0, y_in = '0;
  logic signed [ANG_W-1:0] z_in = '0;
  logic signed [OUT_W-1:0] x_out, y_out;

  cordic_rotation dut (.*);

  int checks = 0, failures = 0;
  real ex [NV], ey [NV];
  int  tin [NV];
  int  nin = 0, nout = 0, cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (rabs($itor(x_out) - ex[nout]) > 3.0 || rabs($itor(y_out) - ey[nout]) > 3.0 ||
        cyc - tin[nout] != LAT) begin
      failures++;
      $display("FAIL v=%0d got (%0d,%0d) exp (%f,%f) latency %0d", nout, x_out, y_out,
               ex[nout], ey[nout], cyc - tin[nout]);
    end
    nout++;
  end

  real ang;
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int v = 0; v < NV; v++) begin
      @(negedge clk);
      in_valid = 1;
      x_in = IN_W'($urandom_range(4000) - 2000);
      y_in = (v % 3 == 0) ? '0 : IN_W'($urandom_range(4000) - 2000);
      z_in = ANG_W'($urandom);
      if (v < 8) z_in = ANG_W'(v) <<< (ANG_W - 3);   // multiples of 45 degrees
      ang  = 2.0 * 3.14159265358979 * $itor(z_in) / $itor(1 << ANG_W);
      ex[v] = x_in * $cos(ang) - y_in * $sin(ang);
      ey[v] = x_in * $sin(ang) + y_in * $cos(ang);
      tin[v] = cyc;
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (nout != NV) begin
      failures++;
      $display("FAIL: %0d outputs for %0d inputs", nout, NV);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

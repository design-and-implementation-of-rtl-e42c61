// tb_code_generator: two generators, one at the default 4092 samples per
// code (4 samples per chip, 64-sample window) and one at 2500 samples per
// code (a non-integer 2.44 samples per chip, 16-sample window), are loaded
// with random chip patterns. `done` must rise NS + 1 cycles after the `load` cycle; then
// windows at random starts, including starts that wrap past the end of the
// code period, are compared with replica[(start + k) mod NS] where sample n
// carries chip floor(n * 1023 / NS).
module tb_code_generator;
  localparam int NA = 4092, LA = 64;
  localparam int NB = 2500, LB = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic load = 0;
  logic [1022:0] chips;
  logic busy_a, done_a, busy_b, done_b;
  logic [$clog2(NA)-1:0] st_a = '0;
  logic [$clog2(NB)-1:0] st_b = '0;
  logic [LA-1:0] win_a;
  logic [LB-1:0] win_b;

  code_generator #(.NS(NA), .LANES(LA)) dut_a (
    .clk, .rst_n, .load, .chips, .busy(busy_a), .done(done_a), .win_start(st_a), .win(win_a));
  code_generator #(.NS(NB), .LANES(LB)) dut_b (
    .clk, .rst_n, .load, .chips, .busy(busy_b), .done(done_b), .win_start(st_b), .win(win_b));

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit rep(input int n, input int ns);
    return chips[(longint'(n % ns) * 1023) / ns];
  endfunction

  int cyc, s;
  bit ok;
  initial begin
    chips = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int k = 0; k < 1023; k++) chips[k] = 1'($urandom);
      @(negedge clk) load = 1;
      @(negedge clk) load = 0;
      cyc = 1;
      while (!done_a || !done_b) begin
        @(negedge clk); cyc++;
        if (cyc == NB + 1) chk(done_b, "generator b done after NS cycles");
      end
      chk(cyc == NA + 1, $sformatf("generator a done after %0d cycles", cyc));
      for (int t = 0; t < 300; t++) begin
        s = (t < 10) ? NA - 1 - t * 7 : $urandom_range(NA - 1);
        st_a = $clog2(NA)'(s);
        st_b = $clog2(NB)'(s % NB);
        if (t < 10) st_b = $clog2(NB)'(NB - 1 - t);
        #1;
        ok = 1;
        for (int k = 0; k < LA; k++) if (win_a[k] != rep(s + k, NA)) ok = 0;
        chk(ok, $sformatf("window a at %0d", s));
        ok = 1;
        for (int k = 0; k < LB; k++) if (win_b[k] != rep(int'(st_b) + k, NB)) ok = 0;
        chk(ok, $sformatf("window b at %0d", st_b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

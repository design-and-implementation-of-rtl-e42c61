// tb_peak_finder: 300 code shifts per bin, batches of 16 (18 full batches
// and a partial one of 12), exclusion of 2 shifts either side. For each of
// 12 bins a low random background is laid down with a main peak and its two
// neighbours on each side (larger than the true second peak, so they must
// be excluded) and a second peak at least 5 shifts away. Peaks are placed
// at random, next to batch boundaries and next to the wrap point. Values
// arrive every 3 to 5 cycles, so searches overlap filling. res_valid must
// pulse once per bin, after the last value, with the exact maximum, its
// index and the exact largest value outside the exclusion range.
module tb_peak_finder;
  localparam int NS = 300, NC = 16, EXCL = 2, PW = 40;
  localparam int AW = $clog2(NS);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear = 0, in_valid = 0, in_last = 0, busy, res_valid;
  logic [PW-1:0] in_pow = '0, res_max, res_second;
  logic [AW-1:0] in_idx = '0, res_idx;

  peak_finder #(.NS(NS), .NC(NC), .EXCL(EXCL), .POW_W(PW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint v [NS];
  int nres = 0;
  always @(posedge clk) if (res_valid) nres++;

  function automatic int cd(input int a, input int b);
    int d;
    d = (a > b) ? a - b : b - a;
    return (d > NS / 2) ? NS - d : d;
  endfunction

  task automatic bin(input int pm, input int ps);
    longint emax, esec;
    int eidx, r0;
    for (int n = 0; n < NS; n++) v[n] = $urandom_range(1000);
    v[pm] = 100000;
    v[(pm + 1) % NS] = 70000; v[(pm + NS - 1) % NS] = 65000;
    v[(pm + 2) % NS] = 60000; v[(pm + NS - 2) % NS] = 55000;
    v[ps] = 40000 + $urandom_range(5000);
    v[(ps + 1) % NS] = 20000;
    emax = 0; eidx = 0;
    for (int n = 0; n < NS; n++) if (v[n] > emax) begin emax = v[n]; eidx = n; end
    esec = 0;
    for (int n = 0; n < NS; n++) if (cd(n, eidx) > EXCL && v[n] > esec) esec = v[n];

    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    r0 = nres;
    for (int n = 0; n < NS; n++) begin
      in_valid = 1; in_pow = PW'(v[n]); in_idx = AW'(n); in_last = (n == NS - 1);
      @(negedge clk);
      in_valid = 0; in_last = 0;
      repeat ($urandom_range(2, 4)) @(negedge clk);
      if (n < NS - 1) chk(nres == r0, "no result before the last value");
    end
    while (nres == r0) @(negedge clk);
    chk(res_max == PW'(emax) && int'(res_idx) == eidx && res_second == PW'(esec),
        $sformatf("peaks at %0d/%0d: got %0d@%0d, %0d; expected %0d@%0d, %0d",
                  pm, ps, res_max, res_idx, res_second, emax, eidx, esec));
    repeat (3) @(negedge clk);
    chk(nres == r0 + 1, "one result per bin");
    chk(!busy, "idle after bin");
  endtask

  int pm, ps;
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    bin(150, 20);
    bin(16, 200);      // main peak at a batch start
    bin(15, 100);      // main peak at a batch end
    bin(0, 150);       // next to the wrap point
    bin(299, 5);
    bin(100, 107);     // second peak just outside the exclusion range
    for (int t = 0; t < 6; t++) begin
      pm = $urandom_range(NS - 1);
      ps = (pm + 5 + $urandom_range(NS - 11)) % NS;
      bin(pm, ps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_irnss_acq_multisat: the acquisition workload of a receiver cold start.
// One millisecond record holds four GPS satellites at once (PRN 3, 11, 22
// and 30, with different code phases, Dopplers across a +/-5 kHz range and
// amplitudes down to 60 % of the strongest) plus uniform noise. The block,
// at 2.046 MHz sampling with a +/-5 kHz coarse search (21 bins), searches
// the same record for each of them and for two satellites that are absent
// (PRN 1 and 17). Each present satellite must be acquired at its own code
// phase despite the other three, with a fine Doppler no worse than the
// coarse one and within 125 Hz (with one millisecond of coherent
// integration the power falls only about 3 % at 100 Hz off, so noise and the
// other satellites decide the last 100 Hz for the weaker signals); each
// absent one must be rejected by the ratio test.
module tb_irnss_acq_multisat;
  import acq_pkg::*;
  import gnss_code_model::*;

  localparam int FS = 2_046_000, NSAMP = 2046, DMAX = 5000;
  localparam int AW = $clog2(NSAMP);
  localparam int NSAT = 4;
  localparam int  SAT_PRN  [NSAT] = '{3, 11, 22, 30};
  localparam int  SAT_TAU  [NSAT] = '{100, 1500, 900, 2040};
  localparam real SAT_FD   [NSAT] = '{4300.0, -2800.0, 650.0, -4950.0};
  localparam real SAT_AMP  [NSAT] = '{200.0, 150.0, 120.0, 200.0};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic capture = 0, in_valid = 0, start = 0;
  logic signed [SAMPLE_W-1:0] in_i = '0, in_q = '0;
  gnss_sys_e sys = SYS_GPS;
  logic [5:0] prn = 6'd1;
  logic [9:0] g2_init = '1;
  logic [7:0] threshold = 8'd40;      // 2.5
  logic warm = 1'b0;                  // cold starts only
  logic [7:0] hint_bin = '0;
  logic data_ready, busy, done, acquired;
  logic [AW-1:0] code_phase;
  logic signed [31:0] coarse_doppler_hz, doppler_hz;
  logic [POW_W-1:0] peak, second;

  irnss_acq_top #(
    .FS(FS), .NSAMP(NSAMP), .NCORR(8), .NBATCH(64), .DMAX_HZ(DMAX),
    .COARSE_HZ(500), .FINE_HZ(50), .NFINE(11)
  ) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  real acc_i [NSAMP], acc_q [NSAMP];
  int  code [1023];

  function automatic int clip(input real v);
    int r;
    r = $rtoi(v >= 0 ? v + 0.5 : v - 0.5);
    if (r > 2047) r = 2047;
    if (r < -2048) r = -2048;
    return r;
  endfunction

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic search(input int p);
    sys <= SYS_GPS; prn <= 6'(p); start <= 1'b1;
    @(posedge clk); start <= 1'b0;
    while (!done) @(posedge clk);
    $display("PRN %0d: acq=%0d tau=%0d coarse=%0d fine=%0d ratio=%0.2f", p, acquired,
             code_phase, coarse_doppler_hz, doppler_hz, $itor(peak) / $itor(second));
  endtask

  real a, c;
  int ni, nq;
  initial begin
    for (int n = 0; n < NSAMP; n++) begin acc_i[n] = 0.0; acc_q[n] = 0.0; end
    for (int s = 0; s < NSAT; s++) begin
      gold(0, SAT_PRN[s], '0, code);
      for (int n = 0; n < NSAMP; n++) begin
        a = 2.0 * 3.14159265358979 * SAT_FD[s] * n / FS + 0.9 * s;
        c = SAT_AMP[s] * replica(code, (n - SAT_TAU[s] + NSAMP) % NSAMP, NSAMP);
        acc_i[n] += c * $cos(a);
        acc_q[n] += c * $sin(a);
      end
    end

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); capture <= 1'b1;
    @(posedge clk); capture <= 1'b0;
    for (int n = 0; n < NSAMP; n++) begin
      ni = $urandom_range(600);
      nq = $urandom_range(600);
      in_valid <= 1'b1;
      in_i <= SAMPLE_W'(clip(acc_i[n] + $itor(ni - 300)));
      in_q <= SAMPLE_W'(clip(acc_q[n] + $itor(nq - 300)));
      @(posedge clk);
    end
    in_valid <= 1'b0;
    @(posedge clk);
    check(data_ready, "record captured");

    for (int s = 0; s < NSAT; s++) begin
      search(SAT_PRN[s]);
      check(acquired, $sformatf("PRN %0d acquired", SAT_PRN[s]));
      check(int'(code_phase) == SAT_TAU[s], $sformatf("PRN %0d code phase", SAT_PRN[s]));
      check(rabs($itor(doppler_hz) - SAT_FD[s]) <= 125.0,
            $sformatf("PRN %0d fine Doppler", SAT_PRN[s]));
      check(rabs($itor(doppler_hz) - SAT_FD[s]) <= rabs($itor(coarse_doppler_hz) - SAT_FD[s]),
            $sformatf("PRN %0d fine search no worse than coarse", SAT_PRN[s]));
    end
    search(1);
    check(!acquired, "PRN 1 rejected");
    search(17);
    check(!acquired, "PRN 17 rejected");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

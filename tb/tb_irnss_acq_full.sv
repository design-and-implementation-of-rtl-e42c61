// tb_irnss_acq_full: one complete acquisition with the block at its default
// size: 4.092 MHz sampling (4092 samples per code), 16 correlators per bank
// (64 samples per cycle), +/-10 kHz coarse search in 500 Hz steps (41 bins)
// and an 11-step, 50 Hz fine search.
//
// A one-millisecond record of GPS PRN 13 with code phase 2500 samples,
// -6220 Hz Doppler and uniform noise is built from an independent code
// model. The block must acquire it at the right code phase, with the coarse
// Doppler in the nearest 500 Hz bin or its neighbour, the fine Doppler
// within 50 Hz, the peak power within 2 % of a floating-point correlation,
// and the run length equal to the schedule of the design. The same record
// is then searched again as a warm start with the approximate Doppler in
// bin 8 (-6000 Hz): only bins 7..9 may be searched, with the same result.
module tb_irnss_acq_full;
  import acq_pkg::*;
  import gnss_code_model::*;

  localparam int AW    = $clog2(NS);
  localparam int LANES = 4 * N_CORR;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic capture = 0, in_valid = 0, start = 0;
  logic signed [SAMPLE_W-1:0] in_i = '0, in_q = '0;
  gnss_sys_e sys = SYS_GPS;
  logic [5:0] prn = 6'd13;
  logic [9:0] g2_init = '1;
  logic [7:0] threshold = 8'd40;      // 2.5
  logic warm = 1'b0;
  logic [7:0] hint_bin = '0;
  logic data_ready, busy, done, acquired;
  logic [AW-1:0] code_phase;
  logic signed [31:0] coarse_doppler_hz, doppler_hz;
  logic [POW_W-1:0] peak, second;

  irnss_acq_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam int  TAU0 = 2500;
  localparam real FD   = -6220.0;

  int rec_i [NS];
  int rec_q [NS];
  int code [1023];

  function automatic int clip(input real v);
    int r;
    r = $rtoi(v >= 0 ? v + 0.5 : v - 0.5);
    if (r > 2047) r = 2047;
    if (r < -2048) r = -2048;
    return r;
  endfunction

  function automatic real ref_power(input int tau, input real f);
    real si, sq, a, c;
    si = 0.0; sq = 0.0;
    for (int n = 0; n < NS; n++) begin
      a = -2.0 * 3.14159265358979 * f * n / FS_HZ;
      c = replica(code, (n - tau + NS) % NS, NS);
      si += c * (rec_i[n] * $cos(a) - rec_q[n] * $sin(a));
      sq += c * (rec_i[n] * $sin(a) + rec_q[n] * $cos(a));
    end
    return si * si + sq * sq;
  endfunction

  int cyc, words, expect_cyc, ni, nq, n_bins = 0;
  always @(posedge clk) if (rst_n && dut.coarse_mode && dut.corr_start) n_bins++;
  real a, c, rp;
  initial begin
    gold(0, 13, '0, code);
    for (int n = 0; n < NS; n++) begin
      a  = 2.0 * 3.14159265358979 * FD * n / FS_HZ + 1.1;
      c  = 250.0 * replica(code, (n - TAU0 + NS) % NS, NS);
      ni = $urandom_range(800);
      nq = $urandom_range(800);
      rec_i[n] = clip(c * $cos(a) + $itor(ni - 400));
      rec_q[n] = clip(c * $sin(a) + $itor(nq - 400));
    end

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); capture <= 1'b1;
    @(posedge clk); capture <= 1'b0;
    for (int n = 0; n < NS; n++) begin
      in_valid <= 1'b1; in_i <= rec_i[n][SAMPLE_W-1:0]; in_q <= rec_q[n][SAMPLE_W-1:0];
      @(posedge clk);
    end
    in_valid <= 1'b0;
    @(posedge clk);
    check(data_ready, "record captured");

    n_bins = 0;
    start <= 1'b1;
    @(posedge clk); start <= 1'b0;
    cyc = 0;
    while (!done) begin
      @(posedge clk);
      cyc++;
    end
    $display("acq=%0d tau=%0d coarse=%0d fine=%0d peak=%0d second=%0d cycles=%0d",
             acquired, code_phase, coarse_doppler_hz, doppler_hz, peak, second, cyc);
    check(acquired, "acquired");
    check(code_phase == AW'(TAU0), "code phase");
    check(coarse_doppler_hz == -6000 || coarse_doppler_hz == -6500, "coarse Doppler");
    check(doppler_hz >= -6270 && doppler_hz <= -6170, "fine Doppler");
    rp = ref_power(TAU0, real'(coarse_doppler_hz));
    check($itor(peak) > 0.98 * rp && $itor(peak) < 1.02 * rp, "peak power vs reference");
    words = (NS + LANES - 1) / LANES;
    expect_cyc = CHIPS + NS + (2 * DOPPLER_MAX_HZ / COARSE_STEP_HZ + 1) * (NS + NS * words)
                 + FINE_BINS * (NS + words);
    // Each bin adds a pipeline drain of under 200 cycles (CORDIC, bank,
    // last peak batch).
    check(cyc >= expect_cyc && cyc <= expect_cyc + 200 * (41 + FINE_BINS), "cycle count");
    check(n_bins == 2 * DOPPLER_MAX_HZ / COARSE_STEP_HZ + 1, "cold start searches every bin");

    // Warm start around bin 8.
    n_bins = 0;
    start <= 1'b1; warm <= 1'b1; hint_bin <= 8'd8;
    @(posedge clk); start <= 1'b0; warm <= 1'b0; hint_bin <= '0;
    cyc = 0;
    while (!done) begin
      @(posedge clk);
      cyc++;
    end
    $display("warm: acq=%0d tau=%0d coarse=%0d fine=%0d bins=%0d cycles=%0d",
             acquired, code_phase, coarse_doppler_hz, doppler_hz, n_bins, cyc);
    check(acquired && code_phase == AW'(TAU0), "warm start: acquired at the code phase");
    check(doppler_hz >= -6270 && doppler_hz <= -6170, "warm start: fine Doppler");
    check(n_bins == 3, "warm start searches three bins");
    expect_cyc = CHIPS + NS + 3 * (NS + NS * words) + FINE_BINS * (NS + words);
    check(cyc >= expect_cyc && cyc <= expect_cyc + 200 * (3 + FINE_BINS), "warm start cycle count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (22_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

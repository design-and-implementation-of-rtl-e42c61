// tb_irnss_acq_top: end-to-end test of the acquisition block at a reduced
// size (2.046 MHz sampling, 2046 samples per code, 8 correlators per bank,
// +/-2 kHz coarse search in 500 Hz steps, 50 Hz fine steps).
//
// Three searches run on synthetic one-millisecond records built here from
// an independent code model: a sampled Gold code with a chosen code phase,
// Doppler and carrier phase, plus uniform noise.
//  1. GPS PRN 5 present, searched for PRN 5: must be acquired at the right
//     code phase, with the coarse and fine Doppler near the true one and the
//     peak power within 2 % of a floating-point correlation.
//  2. The same record searched for PRN 7: must be rejected.
//  3. An IRNSS code (G2 start state given) with negative Doppler and a code
//     phase next to the wrap point: must be acquired.
//  4. The record of run 3 searched again as a warm start with the Doppler
//     hint in bin 1: only bins 0..2 may be searched, with the same result.
// The test also counts the mechanisms of the design and fails if one never
// happens: CORDIC quadrant pre-rotation, replica window wrap, zero-padded
// last buffer word, peak search overlapping correlation, partial last
// batch, exclusion-range skips, a warm start, a running maximum being replaced inside a
// bin and across bins, the fine search, and both outcomes of the ratio test.
module tb_irnss_acq_top;
  import acq_pkg::*;
  import gnss_code_model::*;

  localparam int FS     = 2_046_000;
  localparam int NSAMP  = 2046;
  localparam int NCORR  = 8;
  localparam int DMAX   = 2000;
  localparam int CSTEP  = 500;
  localparam int FSTEP  = 50;
  localparam int NFINE  = 11;
  localparam int AW     = $clog2(NSAMP);
  localparam int LANES  = 4 * NCORR;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic capture = 0, in_valid = 0, start = 0;
  logic signed [SAMPLE_W-1:0] in_i = '0, in_q = '0;
  gnss_sys_e sys = SYS_GPS;
  logic [5:0] prn = 6'd1;
  logic [9:0] g2_init = '1;
  logic [7:0] threshold = 8'd40;      // 2.5
  logic warm = 1'b0;
  logic [7:0] hint_bin = '0;
  logic data_ready, busy, done, acquired;
  logic [AW-1:0] code_phase;
  logic signed [31:0] coarse_doppler_hz, doppler_hz;
  logic [POW_W-1:0] peak, second;

  irnss_acq_top #(
    .FS(FS), .NSAMP(NSAMP), .NCORR(NCORR), .NBATCH(64), .DMAX_HZ(DMAX),
    .COARSE_HZ(CSTEP), .FINE_HZ(FSTEP), .NFINE(NFINE)
  ) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_prerot = 0, n_wrap = 0, n_pad = 0, n_overlap = 0, n_partial = 0;
  int n_excl = 0, n_newmax_bin = 0, n_newmax_global = 0, n_fine = 0;
  int n_acq = 0, n_rej = 0, n_bins = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_cordic.in_valid && (dut.u_cordic.z_in[ANG_W-1 -: 2] inside {2'b01, 2'b10}))
      n_prerot++;
    if (dut.u_acquire_bank.run && (int'(dut.code_start) + LANES > NSAMP)) n_wrap++;
    if (dut.u_acquire_bank.run && dut.u_acquire_bank.w == 6'(63)) n_pad++;
    if (dut.u_peak_finder.in_valid && dut.u_peak_finder.ps != 0) n_overlap++;
    if (dut.u_peak_finder.ps == 3 && dut.u_peak_finder.cnt[dut.u_peak_finder.psel] != 64)
      n_partial++;
    if (dut.u_peak_finder.ps == 2 &&
        dut.u_peak_finder.cdist(dut.u_peak_finder.cur.idx, dut.u_peak_finder.bmax.idx) <= 2)
      n_excl++;
    if (dut.u_peak_finder.ps == 3 && dut.u_peak_finder.have &&
        dut.u_peak_finder.bmax.pow > dut.u_peak_finder.rmax)
      n_newmax_bin++;
    if (dut.pf_valid && dut.u_control.got_any && dut.pf_max > dut.peak)
      n_newmax_global++;
    if (!dut.coarse_mode && dut.pow_valid) n_fine++;
    if (dut.coarse_mode && dut.corr_start) n_bins++;
  end

  // ---------------- stimulus ----------------
  int rec_i [NSAMP];
  int rec_q [NSAMP];

  function automatic int clip(input real v);
    int r;
    r = $rtoi(v >= 0 ? v + 0.5 : v - 0.5);
    if (r > 2047) r = 2047;
    if (r < -2048) r = -2048;
    return r;
  endfunction

  task automatic make_record(input bit irnss, input int p, input bit [9:0] init,
                             input int tau0, input real fd, input real ph0,
                             input real amp, input int noise);
    int code [1023];
    real a, c;
    int ni, nq;
    gold(irnss, p, init, code);
    for (int n = 0; n < NSAMP; n++) begin
      a  = 2.0 * 3.14159265358979 * fd * n / FS + ph0;
      c  = amp * replica(code, (n - tau0 + NSAMP) % NSAMP, NSAMP);
      ni = $urandom_range(2 * noise);
      nq = $urandom_range(2 * noise);
      rec_i[n] = clip(c * $cos(a) + $itor(ni - noise));
      rec_q[n] = clip(c * $sin(a) + $itor(nq - noise));
    end
  endtask

  // Floating-point power at code phase tau and frequency f for a PRN.
  function automatic real ref_power(input bit irnss, input int p, input bit [9:0] init,
                                    input int tau, input real f);
    int code [1023];
    real si, sq, a, c;
    gold(irnss, p, init, code);
    si = 0.0; sq = 0.0;
    for (int n = 0; n < NSAMP; n++) begin
      a = -2.0 * 3.14159265358979 * f * n / FS;
      c = replica(code, (n - tau + NSAMP) % NSAMP, NSAMP);
      si += c * (rec_i[n] * $cos(a) - rec_q[n] * $sin(a));
      sq += c * (rec_i[n] * $sin(a) + rec_q[n] * $cos(a));
    end
    return si * si + sq * sq;
  endfunction

  task automatic load_record();
    @(posedge clk); capture <= 1'b1;
    @(posedge clk); capture <= 1'b0;
    for (int n = 0; n < NSAMP; n++) begin
      in_valid <= 1'b1; in_i <= rec_i[n][SAMPLE_W-1:0]; in_q <= rec_q[n][SAMPLE_W-1:0];
      @(posedge clk);
      if (n % 7 == 3) begin   // gaps in the stream
        in_valid <= 1'b0;
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    @(posedge clk);
  endtask

  task automatic search(input gnss_sys_e s, input int p, input bit [9:0] init,
                        output int cycles, input bit w = 0, input int hint = 0);
    sys <= s; prn <= 6'(p); g2_init <= init; start <= 1'b1;
    warm <= w; hint_bin <= 8'(hint);
    @(posedge clk); start <= 1'b0; warm <= 1'b0; hint_bin <= '0;
    cycles = 0;
    n_bins = 0;
    while (!done) begin
      @(posedge clk);
      cycles++;
    end
    if (acquired) n_acq++; else n_rej++;
  endtask

  // Expected cycle count of one search (this design's schedule).
  function automatic int expected_cycles(input bit acq, input int nbin = 2 * DMAX / CSTEP + 1);
    int words;
    words = (NSAMP + LANES - 1) / LANES;
    return 1023 + NSAMP + nbin * (NSAMP + NSAMP * words)
           + (acq ? NFINE * (NSAMP + words) : 0);
  endfunction

  int cyc;
  real rp;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // 1. GPS PRN 5, tau 777, +1234 Hz.
    make_record(0, 5, '0, 777, 1234.0, 0.7, 300.0, 400);
    load_record();
    check(data_ready, "record captured");
    search(SYS_GPS, 5, '0, cyc);
    $display("run1: acq=%0d tau=%0d coarse=%0d fine=%0d peak=%0d second=%0d cycles=%0d",
             acquired, code_phase, coarse_doppler_hz, doppler_hz, peak, second, cyc);
    check(acquired, "run1 acquired");
    check(code_phase == AW'(777), "run1 code phase");
    check(coarse_doppler_hz == 1000 || coarse_doppler_hz == 1500, "run1 coarse Doppler");
    check(doppler_hz >= 1234 - 50 && doppler_hz <= 1234 + 50, "run1 fine Doppler");
    rp = ref_power(0, 5, '0, 777, real'(coarse_doppler_hz));
    check($itor(peak) > 0.98 * rp && $itor(peak) < 1.02 * rp, "run1 peak power vs reference");
    check(cyc >= expected_cycles(1) && cyc <= expected_cycles(1) + 2000, "run1 cycle count");

    // 2. Same record, wrong PRN.
    search(SYS_GPS, 7, '0, cyc);
    $display("run2: acq=%0d tau=%0d coarse=%0d peak=%0d second=%0d cycles=%0d",
             acquired, code_phase, coarse_doppler_hz, peak, second, cyc);
    check(!acquired, "run2 rejected");
    check(cyc >= expected_cycles(0) && cyc <= expected_cycles(0) + 2000, "run2 cycle count");

    // 3. IRNSS-style code from a G2 start state, -1730 Hz, tau next to wrap.
    make_record(1, 0, 10'b1110100111, NSAMP - 1, -1730.0, 2.5, 300.0, 400);
    load_record();
    search(SYS_IRNSS, 0, 10'b1110100111, cyc);
    $display("run3: acq=%0d tau=%0d coarse=%0d fine=%0d peak=%0d second=%0d cycles=%0d",
             acquired, code_phase, coarse_doppler_hz, doppler_hz, peak, second, cyc);
    check(acquired, "run3 acquired");
    check(code_phase == AW'(NSAMP - 1), "run3 code phase");
    check(doppler_hz >= -1730 - 50 && doppler_hz <= -1730 + 50, "run3 fine Doppler");
    check(n_bins == 2 * DMAX / CSTEP + 1, "run3 cold start searches every bin");

    // 4. Warm start on the same record, hint in bin 1 (-1500 Hz).
    search(SYS_IRNSS, 0, 10'b1110100111, cyc, 1, 1);
    $display("run4: acq=%0d tau=%0d coarse=%0d fine=%0d bins=%0d cycles=%0d",
             acquired, code_phase, coarse_doppler_hz, doppler_hz, n_bins, cyc);
    check(acquired, "run4 acquired");
    check(code_phase == AW'(NSAMP - 1), "run4 code phase");
    check(doppler_hz >= -1730 - 50 && doppler_hz <= -1730 + 50, "run4 fine Doppler");
    check(n_bins == 3, "run4 warm start searches three bins");
    check(cyc >= expected_cycles(1, 3) && cyc <= expected_cycles(1, 3) + 2000, "run4 cycle count");

    $display("mechanisms: prerot=%0d wrap=%0d pad=%0d overlap=%0d partial=%0d excl=%0d newmax_bin=%0d newmax_global=%0d fine=%0d acq=%0d rej=%0d",
             n_prerot, n_wrap, n_pad, n_overlap, n_partial, n_excl, n_newmax_bin,
             n_newmax_global, n_fine, n_acq, n_rej);
    check(n_prerot > 0, "CORDIC pre-rotation seen");
    check(n_wrap > 0, "replica window wrap seen");
    check(n_pad > 0, "padded last word seen");
    check(n_overlap > 0, "peak search overlapping correlation seen");
    check(n_partial > 0, "partial last batch seen");
    check(n_excl > 0, "exclusion range seen");
    check(n_newmax_bin > 0, "running maximum replaced within a bin");
    check(n_newmax_global > 0, "global maximum replaced across bins");
    check(n_fine > 0, "fine search seen");
    check(n_acq > 0 && n_rej > 0, "both ratio-test outcomes seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

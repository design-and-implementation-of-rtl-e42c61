// tb_acquisition_control: the sequencer alone, with 64 samples per code at
// 64 kHz sampling, a +/-2 kHz coarse search in 1 kHz steps (5 bins) and a
// 5-step, 100 Hz fine search. Small responders stand in for its
// neighbours: the PRN and code generators answer after a delay, the sample
// memory returns I = address, Q = -address, a 6-cycle delay line stands in
// for the CORDIC, and scripted per-bin results stand in for the
// correlation bank and peak finder. The test checks the order of the
// handshakes, that each bin streams every sample once with the Doppler
// angle -2*pi*f*n/fs (within 2 LSB, computed here in floating point), that
// every wiped sample is written back in order, that coarse and fine runs
// ask for the right code shifts, that the best bin and its own second peak
// are kept, the ratio test (acquired and rejected), and the fine frequency.
// Warm starts (approximate Doppler known) must search only the hint bin and
// one bin either side, clipped at both ends of the grid.
module tb_acquisition_control;
  import acq_pkg::*;

  localparam int NSP = 64, FSP = 64000, DMAX = 2000, CST = 1000, FST = 100, NF = 5;
  localparam int NB = 2 * DMAX / CST + 1;
  localparam int AW = $clog2(NSP);
  localparam int PW = 57;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, data_ready = 0, prn_start, prn_done = 0, cg_load, cg_done = 0;
  logic [7:0] threshold = 8'd40;
  logic warm = 0;
  logic [7:0] hint_bin = '0;
  logic [AW-1:0] rd_addr, wr_addr, tau_first, pf_idx = '0, code_phase;
  logic signed [11:0] rd_i = '0, rd_q = '0, rot_x, rot_y;
  logic rot_valid, rot_out_valid, wr_en, corr_start, pow_valid = 0;
  logic signed [ANG_W-1:0] rot_z;
  logic [AW:0] tau_count;
  logic [PW-1:0] pow = '0, pf_max = '0, pf_second = '0, peak, second;
  logic coarse_mode, pf_clear, pf_valid = 0, busy, done, acquired;
  logic signed [31:0] coarse_doppler_hz, doppler_hz;

  acquisition_control #(
    .NS_P(NSP), .FS_P(FSP), .DMAX_HZ(DMAX), .COARSE_HZ(CST), .FINE_HZ(FST),
    .NFINE(NF), .SW(12), .POW_W_P(PW)
  ) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Sample memory: one-cycle read.
  always @(posedge clk) begin
    rd_i <= 12'(rd_addr);
    rd_q <= -12'(rd_addr);
  end

  // CORDIC stand-in: delay line of valid; checks each input.
  logic [5:0] dl = '0;
  always @(posedge clk) dl <= {dl[4:0], rot_valid};
  assign rot_out_valid = dl[5];

  int  n_in = 0, n_wr = 0, bad_z = 0, bad_x = 0, bad_wr = 0;
  real f_cur = 0.0;
  always @(posedge clk) if (rst_n) begin
    if (rot_valid) begin
      real ang, ez, d;
      ang = -$itor(n_in) * f_cur / $itor(FSP);         // turns
      ang = ang - $floor(ang + 0.5);
      ez  = ang * $itor(1 << ANG_W);
      d   = $itor(rot_z) - ez;
      if (d > $itor(1 << (ANG_W - 1))) d -= $itor(1 << ANG_W);
      if (d < -$itor(1 << (ANG_W - 1))) d += $itor(1 << ANG_W);
      if (d > 2.0 || d < -2.0) bad_z++;
      if (int'(rot_x) != n_in || int'(rot_y) != -n_in) bad_x++;
      n_in++;
    end
    if (wr_en) begin
      if (int'(wr_addr) != n_wr) bad_wr++;
      n_wr++;
    end
  end

  // Scripted results.
  longint bmax [NB], bsec [NB], fpow [NF];
  int     bidx [NB];

  task automatic run(input int best, input longint ratio16, input int fbest,
                     input bit expect_acq, input bit w = 0, input int hint = 0);
    int fine_runs, coarse_runs, wait_c, lo, hi, nrun;
    lo = w ? ((hint > 1) ? hint - 1 : 0) : 0;
    hi = w ? ((hint + 1 < NB) ? hint + 1 : NB - 1) : NB - 1;
    nrun = hi - lo + 1;
    for (int b = 0; b < NB; b++) begin
      bmax[b] = 1000 + b * 10;
      bsec[b] = 900;
      bidx[b] = b * 3;
    end
    bmax[best] = 100000;
    bsec[best] = (100000 * 16) / ratio16;
    bidx[best] = 41;
    bsec[(best + 1) % NB] = 99000;    // a big second elsewhere must not count
    for (int j = 0; j < NF; j++) fpow[j] = 5000 + j;
    fpow[fbest] = 9000;

    n_in = 0; n_wr = 0;
    @(negedge clk) begin start = 1; warm = w; hint_bin = 8'(hint); end
    @(negedge clk) begin start = 0; warm = 0; hint_bin = '0; end
    repeat (5) @(negedge clk);
    chk(!prn_start, "waits for data");
    data_ready = 1;
    while (!prn_start) @(negedge clk);
    repeat (20) @(negedge clk);
    chk(!cg_load, "waits for the PRN code");
    prn_done = 1;
    while (!cg_load) @(negedge clk);
    repeat (20) @(negedge clk);
    chk(n_in == 0, "no samples before the replica is ready");
    cg_done = 1;
    coarse_runs = 0; fine_runs = 0;
    for (int k = 0; k < nrun + (expect_acq ? NF : 0); k++) begin
      bit fine;
      int b;
      fine  = (k >= nrun);
      b     = fine ? k - nrun : lo + k;
      f_cur = fine ? $itor(-DMAX + best * CST - ((NF - 1) / 2) * FST + b * FST)
                   : $itor(-DMAX + b * CST);
      n_in = 0; n_wr = 0;
      wait_c = 0;
      while (!corr_start && wait_c < 1000) begin @(negedge clk); wait_c++; end
      chk(n_in == NSP && n_wr == NSP, $sformatf("bin %0d: %0d samples in, %0d written", b, n_in, n_wr));
      chk(coarse_mode == !fine, "coarse_mode");
      if (!fine) begin
        chk(tau_first == '0 && tau_count == (AW+1)'(NSP), "coarse run covers all shifts");
        coarse_runs++;
        repeat (30) @(negedge clk);
        pf_valid = 1; pf_max = PW'(bmax[b]); pf_second = PW'(bsec[b]); pf_idx = AW'(bidx[b]);
        @(negedge clk) pf_valid = 0;
      end else begin
        chk(int'(tau_first) == 41 && tau_count == (AW+1)'(1), "fine run at the found code phase");
        fine_runs++;
        repeat (8) @(negedge clk);
        pow_valid = 1; pow = PW'(fpow[b]);
        @(negedge clk) pow_valid = 0;
      end
    end
    wait_c = 0;
    while (!done && wait_c < 100) begin @(negedge clk); wait_c++; end
    chk(done, "done");
    chk(coarse_runs == nrun, $sformatf("%0d coarse bins searched, %0d expected", coarse_runs, nrun));
    chk(bad_z == 0 && bad_x == 0 && bad_wr == 0,
        $sformatf("streams: %0d bad angles, %0d bad samples, %0d bad writes", bad_z, bad_x, bad_wr));
    chk(acquired == expect_acq, $sformatf("acquired=%0d", acquired));
    chk(peak == PW'(bmax[best]) && second == PW'(bsec[best]) && int'(code_phase) == 41,
        "best bin kept with its own second peak");
    chk(coarse_doppler_hz == -DMAX + best * CST, $sformatf("coarse Doppler %0d", coarse_doppler_hz));
    if (expect_acq)
      chk(doppler_hz == -DMAX + best * CST - ((NF - 1) / 2) * FST + fbest * FST,
          $sformatf("fine Doppler %0d", doppler_hz));
    else
      chk(doppler_hz == coarse_doppler_hz && fine_runs == 0, "no fine search when rejected");
    chk(!busy, "idle after done");
    data_ready = 0; prn_done = 0; cg_done = 0;
    bad_z = 0; bad_x = 0; bad_wr = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run(3, 48, 4, 1);     // ratio 3.0 >= 2.5: acquired, fine search
    run(1, 36, 0, 0);     // ratio 2.25 < 2.5: rejected
    run(0, 41, 1, 1);     // ratio 2.56, best bin at the range edge
    run(2, 48, 2, 1, 1, 2);   // warm start, bins 1..3
    run(0, 48, 3, 1, 1, 0);   // warm start at the low edge: bins 0..1
    run(4, 20, 0, 0, 1, 4);   // warm start at the high edge, rejected: bins 3..4
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// irnss_acq_top: GPS/IRNSS signal acquisition block.
//
// From one millisecond (one code period) of complex baseband samples from
// an I/Q front end, the block decides whether a chosen satellite is present
// and, if so, estimates its code phase (in samples) and Doppler frequency.
// It searches a grid of NS code shifts by NBINS coarse Doppler bins:
//   write_data          captures NS samples of I and Q;
//   prn_finder          generates the 1023-chip Gold code (GPS or IRNSS);
//   code_generator      expands it to NS samples and serves shifted windows;
//   cordic_rotation     removes the Doppler phase of the current bin;
//   acquire_bank        correlates the wiped samples with the replica for
//                       every code shift (correlator_bank, correlator) and
//                       returns I^2 + Q^2;
//   peak_finder         keeps the highest and second-highest (outside one
//                       chip) power per bin, overlapping with correlation;
//   acquisition_control sequences coarse search, ratio test and fine search.
// The front end, the tracking loops and the navigation processor are
// outside; the sample stream enters and the results leave through ports.
//
// Usage: pulse `capture`, supply NS samples with in_valid, pulse `start`
// (sys, prn, g2_init, threshold, warm and hint_bin are sampled on the way),
// wait for `done`. With warm = 0 all coarse bins are searched (cold start);
// with warm = 1 only bin hint_bin and WARM_SPAN bins either side, for when an
// approximate Doppler is already known. Bin k is at
// IF_HZ - DMAX_HZ + k * COARSE_HZ.
// threshold is the minimum ratio peak/second in units of 1/16.
// Assertions at the end check that the sequencer only starts an idle unit
// and that capture is not re-armed during a search.
module irnss_acq_top
  import acq_pkg::*;
#(
  parameter int          FS       = int'(acq_pkg::FS_HZ),
  parameter int unsigned NSAMP    = acq_pkg::NS,
  parameter int unsigned NCORR    = acq_pkg::N_CORR,
  parameter int unsigned NBATCH   = acq_pkg::NC,
  parameter int          IF_HZ    = 0,
  parameter int          DMAX_HZ  = acq_pkg::DOPPLER_MAX_HZ,
  parameter int          COARSE_HZ = acq_pkg::COARSE_STEP_HZ,
  parameter int          FINE_HZ  = acq_pkg::FINE_STEP_HZ,
  parameter int          NFINE    = acq_pkg::FINE_BINS,
  parameter int          WARM_SPAN = 1,
  localparam int unsigned AW      = $clog2(NSAMP),
  localparam int unsigned LANES   = 4 * NCORR
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // front-end sample stream
  input  logic                       capture,
  input  logic                       in_valid,
  input  logic signed [SAMPLE_W-1:0] in_i,
  input  logic signed [SAMPLE_W-1:0] in_q,
  output logic                       data_ready,
  // search request
  input  logic                       start,
  input  gnss_sys_e                  sys,
  input  logic [5:0]                 prn,
  input  logic [9:0]                 g2_init,
  input  logic [7:0]                 threshold,
  input  logic                       warm,       // approximate Doppler known
  input  logic [7:0]                 hint_bin,   // its coarse bin
  // results (to the tracking stage)
  output logic                       busy,
  output logic                       done,
  output logic                       acquired,
  output logic [AW-1:0]              code_phase,
  output logic signed [31:0]         coarse_doppler_hz,
  output logic signed [31:0]         doppler_hz,
  output logic [POW_W-1:0]           peak,
  output logic [POW_W-1:0]           second
);

  // write_data
  logic                       wd_busy;
  logic [AW-1:0]              rd_addr;
  logic signed [SAMPLE_W-1:0] rd_i, rd_q;

  write_data #(.NS(NSAMP), .SAMPLE_W(SAMPLE_W)) u_write_data (
    .clk, .rst_n, .capture, .in_valid, .in_i, .in_q,
    .busy(wd_busy), .ready(data_ready),
    .rd_addr, .rd_i, .rd_q
  );

  // prn_finder
  logic             prn_start, prn_busy, prn_done;
  logic [CHIPS-1:0] chips;
  gnss_sys_e        sys_q;
  logic [5:0]       prn_q;
  logic [9:0]       g2_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sys_q <= SYS_GPS; prn_q <= 6'd1; g2_q <= '1;
    end else if (start) begin
      sys_q <= sys; prn_q <= prn; g2_q <= g2_init;
    end

  prn_finder u_prn_finder (
    .clk, .rst_n, .start(prn_start), .sys(sys_q), .prn(prn_q),
    .g2_init(g2_q), .busy(prn_busy), .done(prn_done), .chips
  );

  // code_generator
  logic             cg_load, cg_busy, cg_done;
  logic [AW-1:0]    code_start;
  logic [LANES-1:0] code_win;

  code_generator #(.NS(NSAMP), .LANES(LANES)) u_code_generator (
    .clk, .rst_n, .load(cg_load), .chips, .busy(cg_busy), .done(cg_done),
    .win_start(code_start), .win(code_win)
  );

  // cordic_rotation
  logic                       rot_valid, rot_out_valid;
  logic signed [SAMPLE_W-1:0] rot_x, rot_y;
  logic signed [ANG_W-1:0]    rot_z;
  logic signed [WIPE_W-1:0]   wipe_i, wipe_q;

  cordic_rotation #(.IN_W(SAMPLE_W), .OUT_W(WIPE_W), .ANG_W(ANG_W),
                    .ITER(CORDIC_ITER)) u_cordic (
    .clk, .rst_n, .in_valid(rot_valid), .x_in(rot_x), .y_in(rot_y),
    .z_in(rot_z), .out_valid(rot_out_valid), .x_out(wipe_i), .y_out(wipe_q)
  );

  // acquire_bank
  logic             wr_en, corr_start, ab_busy, pow_valid, pow_last;
  logic [AW-1:0]    wr_addr, tau_first, pow_tau;
  logic [AW:0]      tau_count;
  logic [POW_W-1:0] pow;

  acquire_bank #(.NS(NSAMP), .N_CORR(NCORR), .DW(WIPE_W), .ACC_W(ACC_W)) u_acquire_bank (
    .clk, .rst_n,
    .wr_en, .wr_addr, .wr_i(wipe_i), .wr_q(wipe_q),
    .start(corr_start), .tau_first, .tau_count, .busy(ab_busy),
    .code_start, .code_win,
    .pow_valid, .pow, .pow_tau, .pow_last
  );

  // peak_finder
  logic             coarse_mode, pf_clear, pf_busy, pf_valid;
  logic [POW_W-1:0] pf_max, pf_second;
  logic [AW-1:0]    pf_idx;

  peak_finder #(.NS(NSAMP), .NC(NBATCH), .EXCL(excl_samples(FS)),
                .POW_W(POW_W)) u_peak_finder (
    .clk, .rst_n, .clear(pf_clear),
    .in_valid(pow_valid && coarse_mode), .in_pow(pow), .in_idx(pow_tau),
    .in_last(pow_last), .busy(pf_busy),
    .res_valid(pf_valid), .res_max(pf_max), .res_idx(pf_idx),
    .res_second(pf_second)
  );

  // acquisition_control
  acquisition_control #(
    .NS_P(NSAMP), .FS_P(FS), .IF_HZ(IF_HZ), .DMAX_HZ(DMAX_HZ),
    .COARSE_HZ(COARSE_HZ), .FINE_HZ(FINE_HZ), .NFINE(NFINE), .WARM_SPAN(WARM_SPAN),
    .SW(SAMPLE_W), .POW_W_P(POW_W)
  ) u_control (
    .clk, .rst_n, .start, .threshold, .warm, .hint_bin, .data_ready,
    .prn_start, .prn_done, .cg_load, .cg_done,
    .rd_addr, .rd_i, .rd_q,
    .rot_valid, .rot_x, .rot_y, .rot_z, .rot_out_valid,
    .wr_en, .wr_addr, .corr_start, .tau_first, .tau_count,
    .pow_valid, .pow,
    .coarse_mode, .pf_clear, .pf_valid, .pf_max, .pf_idx, .pf_second,
    .busy, .done, .acquired, .code_phase, .coarse_doppler_hz, .doppler_hz,
    .peak, .second
  );

  // Handshake rules between the sequencer and the units it starts: a unit
  // is only started when it is idle.
  property p_start_idle(logic go, logic unit_busy);
    @(posedge clk) disable iff (!rst_n) go |-> !unit_busy;
  endproperty
  assert property (p_start_idle(prn_start, prn_busy))
    else $error("PRN generator started while busy");
  assert property (p_start_idle(cg_load, cg_busy))
    else $error("code generator loaded while busy");
  assert property (p_start_idle(corr_start, ab_busy))
    else $error("correlation started while the bank is busy");
  assert property (p_start_idle(pf_clear, pf_busy))
    else $error("peak finder cleared while searching");
  assert property (@(posedge clk) disable iff (!rst_n) !(capture && busy))
    else $error("capture re-armed during a search");
  assert property (@(posedge clk) disable iff (!rst_n) !(data_ready && wd_busy))
    else $error("sample record both complete and being captured");

endmodule

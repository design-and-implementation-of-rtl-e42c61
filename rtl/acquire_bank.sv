// acquire_bank: runs the correlator bank over a whole code period for a
// range of code shifts and returns one power value I^2 + Q^2 per shift.
//
// It holds the Doppler-wiped samples of one code period in a buffer of
// WORDS = ceil(NS / LANES) words of LANES = 4*N_CORR samples (I and Q),
// written one sample at a time through the write port. For each code shift
// tau it sends the words to the correlator bank one per cycle, together
// with the replica window that starts at (w*LANES - tau) mod NS, adds the
// bank's N_CORR partial sums of each stream and accumulates them over the
// WORDS windows. The I and Q sums are then squared and added. Buffer slots
// past the end of the code period read as zero.
//
// The design gives this module's job (feeding parts of the data to the two
// correlator banks until the whole code is covered); the pipeline below,
// the zero padding and the correlation sign convention
// sum_n y[n] * replica[(n - tau) mod NS] are this design's own.
//
// Interface: pulse `start` with tau_first and tau_count (1..NS); `busy`
// stays high until the last power is out. One code shift takes WORDS
// cycles and shifts follow back to back: the first power appears WORDS + 4
// cycles after the start cycle and each further one WORDS cycles later.
// pow_last marks the final shift of a run. The code window is
// fetched from code_generator through code_start/code_win (combinational).
module acquire_bank #(
  parameter int unsigned NS     = acq_pkg::NS,
  parameter int unsigned N_CORR = acq_pkg::N_CORR,
  parameter int unsigned DW     = acq_pkg::WIPE_W,
  parameter int unsigned ACC_W  = acq_pkg::ACC_W,
  localparam int unsigned LANES = 4 * N_CORR,
  localparam int unsigned WORDS = (NS + LANES - 1) / LANES,
  localparam int unsigned AW    = $clog2(NS),
  localparam int unsigned WW    = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned LW    = (LANES > 1) ? $clog2(LANES) : 1,
  localparam int unsigned POW_W = 2 * ACC_W + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // wiped-sample write port
  input  logic                 wr_en,
  input  logic [AW-1:0]        wr_addr,
  input  logic signed [DW-1:0] wr_i,
  input  logic signed [DW-1:0] wr_q,
  // run control
  input  logic                 start,
  input  logic [AW-1:0]        tau_first,
  input  logic [AW:0]          tau_count,
  output logic                 busy,
  // replica window
  output logic [AW-1:0]        code_start,
  input  logic [LANES-1:0]     code_win,
  // results
  output logic                 pow_valid,
  output logic [POW_W-1:0]     pow,
  output logic [AW-1:0]        pow_tau,
  output logic                 pow_last
);

  localparam int unsigned SW   = DW + 4;                 // correlator sum
  localparam int unsigned TW   = SW + $clog2(N_CORR) + 1; // bank total
  localparam int unsigned LAST_LANES = NS - (WORDS - 1) * LANES;

  // Wiped-sample buffer.
  logic signed [DW-1:0] mem_i [WORDS][LANES];
  logic signed [DW-1:0] mem_q [WORDS][LANES];

  always_ff @(posedge clk)
    if (wr_en) begin
      mem_i[WW'(wr_addr / AW'(LANES))][LW'(wr_addr % AW'(LANES))] <= wr_i;
      mem_q[WW'(wr_addr / AW'(LANES))][LW'(wr_addr % AW'(LANES))] <= wr_q;
    end

  // Stage 0: issue counters.
  logic          run;
  logic [WW-1:0] w;
  logic [AW-1:0] tau, ptr;
  logic [AW:0]   left;             // shifts still to issue, this one included

  function automatic logic [AW-1:0] wrap_add(logic [AW-1:0] a, logic [AW:0] b);
    logic [AW:0] s;
    s = {1'b0, a} + b;
    if (s >= (AW+1)'(NS)) s = s - (AW+1)'(NS);
    return AW'(s);
  endfunction

  function automatic logic [AW-1:0] neg_mod(logic [AW-1:0] t);
    return (t == '0) ? '0 : AW'(NS) - t;
  endfunction

  assign code_start = ptr;

  logic          s1_v, s1_first, s1_last, s1_runlast;
  logic [AW-1:0] s1_tau;
  logic [LANES-1:0] s1_code;
  logic signed [DW-1:0] s1_i [LANES];
  logic signed [DW-1:0] s1_q [LANES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; w <= '0; tau <= '0; ptr <= '0; left <= '0;
    end else if (start && !run) begin
      run  <= 1'b1;
      w    <= '0;
      tau  <= tau_first;
      ptr  <= neg_mod(tau_first);
      left <= tau_count;
    end else if (run) begin
      if (w == WW'(WORDS - 1)) begin
        w <= '0;
        if (left == (AW+1)'(1)) begin
          run <= 1'b0;
        end else begin
          tau  <= wrap_add(tau, (AW+1)'(1));
          ptr  <= neg_mod(wrap_add(tau, (AW+1)'(1)));
        end
        left <= left - 1'b1;
      end else begin
        w   <= w + 1'b1;
        ptr <= wrap_add(ptr, (AW+1)'(LANES));
      end
    end
  end

  // Stage 1: buffer read (zero past the code period) and replica window.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_first <= 1'b0; s1_last <= 1'b0; s1_runlast <= 1'b0;
      s1_tau <= '0; s1_code <= '0;
    end else begin
      s1_v       <= run;
      s1_first   <= (w == '0);
      s1_last    <= (w == WW'(WORDS - 1));
      s1_runlast <= (left == (AW+1)'(1));
      s1_tau     <= tau;
      s1_code    <= code_win;
    end
  end

  always_ff @(posedge clk)
    for (int k = 0; k < LANES; k++) begin
      if (w == WW'(WORDS - 1) && k >= LAST_LANES) begin
        s1_i[k] <= '0;
        s1_q[k] <= '0;
      end else begin
        s1_i[k] <= mem_i[w][k];
        s1_q[k] <= mem_q[w][k];
      end
    end

  // Stage 2: correlator bank (registered inside).
  logic                 s2_v, s2_first, s2_last, s2_runlast;
  logic [AW-1:0]        s2_tau;
  logic signed [SW-1:0] ps_i [N_CORR];
  logic signed [SW-1:0] ps_q [N_CORR];

  correlator_bank #(.N_CORR(N_CORR), .DW(DW)) u_bank (
    .clk, .rst_n,
    .in_valid (s1_v),
    .code     (s1_code),
    .yi       (s1_i),
    .yq       (s1_q),
    .out_valid(s2_v),
    .sum_i    (ps_i),
    .sum_q    (ps_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_first <= 1'b0; s2_last <= 1'b0; s2_runlast <= 1'b0; s2_tau <= '0;
    end else begin
      s2_first <= s1_first; s2_last <= s1_last;
      s2_runlast <= s1_runlast; s2_tau <= s1_tau;
    end
  end

  // Stage 3: add the partial sums and accumulate over the code period.
  logic signed [TW-1:0]    tot_i, tot_q;
  logic signed [ACC_W-1:0] acc_i, acc_q;
  logic                    s3_v, s3_runlast;
  logic [AW-1:0]           s3_tau;

  always_comb begin
    tot_i = '0;
    tot_q = '0;
    for (int g = 0; g < N_CORR; g++) begin
      tot_i = tot_i + TW'(ps_i[g]);
      tot_q = tot_q + TW'(ps_q[g]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_i <= '0; acc_q <= '0; s3_v <= 1'b0; s3_runlast <= 1'b0; s3_tau <= '0;
    end else begin
      s3_v <= s2_v && s2_last;
      if (s2_v) begin
        acc_i <= (s2_first ? '0 : acc_i) + ACC_W'(tot_i);
        acc_q <= (s2_first ? '0 : acc_q) + ACC_W'(tot_q);
        s3_runlast <= s2_runlast;
        s3_tau     <= s2_tau;
      end
    end
  end

  // Stage 4: power.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pow_valid <= 1'b0; pow <= '0; pow_tau <= '0; pow_last <= 1'b0;
    end else begin
      pow_valid <= s3_v;
      if (s3_v) begin
        pow      <= POW_W'(acc_i * acc_i) + POW_W'(acc_q * acc_q);
        pow_tau  <= s3_tau;
        pow_last <= s3_runlast;
      end
    end
  end

  // Busy from start until the last power value has left.
  logic pend;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      pend <= 1'b0;
    else if (start && !run)          pend <= 1'b1;
    else if (s3_v && s3_runlast)     pend <= 1'b0;
  end
  assign busy = run || pend;

endmodule

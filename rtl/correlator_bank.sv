// correlator_bank: N_CORR correlators for the in-phase stream and N_CORR for
// the quadrature stream, working on one window of LANES = 4*N_CORR samples.
//
// Each correlator takes four consecutive samples of the window and the four
// matching code replica chips, so the bank performs 2*4*N_CORR
// multiplications per cycle and returns N_CORR partial sums per stream. The
// caller adds the partial sums and accumulates them over the windows of one
// code period. Code chips arrive as bits and are mapped to +1 (bit 0) and
// -1 (bit 1), the usual GNSS convention; this mapping is this design's
// choice.
//
// Timing: one window per cycle; outputs are registered, so sum_i/sum_q and
// out_valid appear one cycle after in_valid. The bank has no stall.
module correlator_bank #(
  parameter int unsigned N_CORR = acq_pkg::N_CORR,
  parameter int unsigned DW     = acq_pkg::WIPE_W,
  localparam int unsigned LANES = 4 * N_CORR,
  localparam int unsigned SW    = DW + 4           // correlator sum width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [LANES-1:0]     code,               // bit k: chip for lane k
  input  logic signed [DW-1:0] yi [LANES],
  input  logic signed [DW-1:0] yq [LANES],
  output logic                 out_valid,
  output logic signed [SW-1:0] sum_i [N_CORR],
  output logic signed [SW-1:0] sum_q [N_CORR]
);

  logic signed [1:0]    cval [LANES];
  logic signed [SW-1:0] ci   [N_CORR];
  logic signed [SW-1:0] cq   [N_CORR];

  always_comb
    for (int k = 0; k < LANES; k++) cval[k] = code[k] ? -2'sd1 : 2'sd1;

  for (genvar g = 0; g < N_CORR; g++) begin : g_corr
    correlator #(.DW(DW), .CW(2)) u_i (
      .y  ('{yi[4*g], yi[4*g+1], yi[4*g+2], yi[4*g+3]}),
      .c  ('{cval[4*g], cval[4*g+1], cval[4*g+2], cval[4*g+3]}),
      .sum(ci[g])
    );
    correlator #(.DW(DW), .CW(2)) u_q (
      .y  ('{yq[4*g], yq[4*g+1], yq[4*g+2], yq[4*g+3]}),
      .c  ('{cval[4*g], cval[4*g+1], cval[4*g+2], cval[4*g+3]}),
      .sum(cq[g])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int g = 0; g < N_CORR; g++) begin
        sum_i[g] <= '0;
        sum_q[g] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sum_i <= ci;
        sum_q <= cq;
      end
    end
  end

endmodule

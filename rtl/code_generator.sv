// code_generator: expands the 1023-chip PRN code to the NS samples of one
// code period and serves windows of the expanded replica.
//
// Sample n of the replica carries chip floor(n * CHIPS / NS). The expansion
// runs one sample per cycle with an exact rational phase counter
// (acc += CHIPS; when acc reaches NS, subtract NS and step to the next
// chip), so any sampling rate with at least one sample per chip works with
// no rounding drift.
//
// The expanded code is stored once, with no rotated copies: a code shift is
// a read that starts at another offset. The window port returns the
// LANES replica samples starting at win_start, wrapping around the end of
// the code period (win[k] = replica[(win_start + k) mod NS]). Storing the
// replica as a register vector read through a wrap-around window is this
// design's choice.
//
// Timing: pulse `load` with `chips` valid; the NS cycles after the load
// cycle write the replica and `done` is high from the (NS+1)th cycle after
// it until the next load. The window port is combinational.
module code_generator #(
  parameter int unsigned NS    = acq_pkg::NS,
  parameter int unsigned LANES = 4 * acq_pkg::N_CORR,
  localparam int unsigned CHIPS = acq_pkg::CHIPS,
  localparam int unsigned AW    = $clog2(NS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [CHIPS-1:0] chips,
  output logic             busy,
  output logic             done,
  input  logic [AW-1:0]    win_start,   // 0 .. NS-1
  output logic [LANES-1:0] win
);

  logic [NS-1:0]        rep;
  logic [AW-1:0]        n;
  logic [AW:0]          acc;
  logic [$clog2(CHIPS)-1:0] chip;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rep  <= '0;
      n    <= '0;
      acc  <= '0;
      chip <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else if (load) begin
      n    <= '0;
      acc  <= '0;
      chip <= '0;
      busy <= 1'b1;
      done <= 1'b0;
    end else if (busy) begin
      rep[n] <= chips[chip];
      if (acc + (AW+1)'(CHIPS) >= (AW+1)'(NS)) begin
        acc  <= acc + (AW+1)'(CHIPS) - (AW+1)'(NS);
        chip <= chip + 1'b1;
      end else begin
        acc  <= acc + (AW+1)'(CHIPS);
      end
      n <= n + 1'b1;
      if (n == AW'(NS - 1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  // Wrap-around window over two back-to-back copies of the replica.
  logic [2*NS-1:0] rep2;
  always_comb begin
    rep2 = {rep, rep};
    win  = rep2[{1'b0, win_start} +: LANES];
  end

endmodule

// prn_finder: produces the 1023-chip Gold code of the selected satellite.
//
// Both GPS C/A and IRNSS SPS codes come from the same pair of 10-stage
// linear feedback shift registers, G1 = 1 + x^3 + x^10 and
// G2 = 1 + x^2 + x^3 + x^6 + x^8 + x^9 + x^10, started each code period
// with G1 all ones. For GPS (sys = SYS_GPS) G2 also starts all ones and
// the satellite is selected by XOR-ing two G2 stages (the phase selector
// table below, PRN 1..32). For IRNSS (sys = SYS_IRNSS) the satellite is
// selected by the initial G2 state, given on g2_init (bit k loads stage
// k+1), and the G2 output is its last stage. The generator structure and
// tables are the published signal definitions; the acquisition design only
// states that this unit returns the Gold code for a PRN index.
//
// Timing: pulse `start`; one chip per cycle is shifted into `chips`
// (bit k = chip k, logic 1 meaning a -1 chip) during the 1023 cycles after
// the start cycle; `done` is high from the 1024th cycle after it until the
// next start.
module prn_finder
  import acq_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  gnss_sys_e        sys,
  input  logic [5:0]       prn,       // GPS PRN 1..32
  input  logic [9:0]       g2_init,   // IRNSS initial G2 state
  output logic             busy,
  output logic             done,
  output logic [CHIPS-1:0] chips
);

  // GPS C/A G2 phase-selector taps (stage numbers 1..10), PRN 1..32.
  localparam logic [3:0] TAP_A [32] = '{
    4'd2, 4'd3, 4'd4, 4'd5, 4'd1, 4'd2, 4'd1, 4'd2, 4'd3, 4'd2, 4'd3,
    4'd5, 4'd6, 4'd7, 4'd8, 4'd9, 4'd1, 4'd2, 4'd3, 4'd4, 4'd5, 4'd6,
    4'd1, 4'd4, 4'd5, 4'd6, 4'd7, 4'd8, 4'd1, 4'd2, 4'd3, 4'd4
  };
  localparam logic [3:0] TAP_B [32] = '{
    4'd6, 4'd7, 4'd8, 4'd9, 4'd9, 4'd10, 4'd8, 4'd9, 4'd10, 4'd3, 4'd4,
    4'd6, 4'd7, 4'd8, 4'd9, 4'd10, 4'd4, 4'd5, 4'd6, 4'd7, 4'd8, 4'd9,
    4'd3, 4'd6, 4'd7, 4'd8, 4'd9, 4'd10, 4'd6, 4'd7, 4'd8, 4'd9
  };

  logic [10:1] g1, g2;          // stage numbering as in the signal definition
  logic [9:0]  cnt;
  logic [3:0]  ta, tb;
  logic        chip;
  gnss_sys_e   sys_q;

  always_comb begin
    ta   = TAP_A[5'(prn - 6'd1)];
    tb   = TAP_B[5'(prn - 6'd1)];
    if (sys_q == SYS_GPS) chip = g1[10] ^ g2[ta] ^ g2[tb];
    else                  chip = g1[10] ^ g2[10];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g1    <= '1;
      g2    <= '1;
      cnt   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      chips <= '0;
      sys_q <= SYS_GPS;
    end else if (start) begin
      g1    <= '1;
      g2    <= (sys == SYS_GPS) ? 10'h3FF : g2_init;
      sys_q <= sys;
      cnt   <= '0;
      busy  <= 1'b1;
      done  <= 1'b0;
    end else if (busy) begin
      chips <= {chip, chips[CHIPS-1:1]};
      g1    <= {g1[9:1], g1[3] ^ g1[10]};
      g2    <= {g2[9:1], g2[2] ^ g2[3] ^ g2[6] ^ g2[8] ^ g2[9] ^ g2[10]};
      cnt   <= cnt + 1'b1;
      if (cnt == 10'(CHIPS - 1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

endmodule

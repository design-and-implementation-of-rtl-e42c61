// acquisition_control: the sequencer of the acquisition block.
//
// The search is either a cold start over the whole Doppler range or, when an
// approximate Doppler is already known (`warm` with its coarse bin on
// hint_bin, sampled at start), a warm start over the hint bin and WARM_SPAN
// bins either side. Both modes come from the original description; the
// bin-index form of the hint and the span are this design's choice.
//
// After `start` (and once a code period of samples has been captured) it
//  1. has prn_finder generate the Gold code and code_generator expand it;
//  2. for each coarse Doppler bin f = IF_HZ - DOPPLER_MAX_HZ + k*COARSE_STEP_HZ,
//     k = 0..NBINS-1 (or the warm-start range): streams the stored samples
//     through the CORDIC with the angle -2*pi*f*n/FS_HZ from a phase accumulator (Doppler wipe-off),
//     writes the wiped samples to acquire_bank, runs all NS code shifts and
//     waits for peak_finder's result for the bin, keeping the bin with the
//     highest peak together with that bin's second peak;
//  3. tests peak >= threshold * second (threshold in 1/16 units);
//  4. if acquired, repeats wipe-off and correlation at the found code phase
//     only for FINE_BINS frequencies FINE_STEP_HZ apart centred on the coarse
//     estimate, and reports the frequency with the highest power.
// The flow (coarse grid, global peak with the second peak of its own bin,
// ratio test, fine search at a fixed code phase) follows the design; the
// step sizes, the fixed-point threshold and the handshakes are this design's.
//
// rot_x/rot_y are the sample memory outputs passed straight to the CORDIC
// and wr_en is the CORDIC's out_valid: these ports only make the wiring
// explicit.
//
// Interface: level `data_ready` from write_data; `start` pulse; `done` pulses
// with the results, which stay valid until the next start. Per coarse bin
// the block takes about NS (wipe) + NS*ceil(NS/(4*N_CORR)) (correlation)
// cycles; each fine bin about NS + ceil(NS/(4*N_CORR)).
module acquisition_control
  import acq_pkg::*;
#(
  parameter int unsigned NS_P        = acq_pkg::NS,
  parameter int          FS_P        = int'(acq_pkg::FS_HZ),
  parameter int          IF_HZ       = 0,
  parameter int          DMAX_HZ     = acq_pkg::DOPPLER_MAX_HZ,
  parameter int          COARSE_HZ   = acq_pkg::COARSE_STEP_HZ,
  parameter int          FINE_HZ     = acq_pkg::FINE_STEP_HZ,
  parameter int          NFINE       = acq_pkg::FINE_BINS,
  parameter int          WARM_SPAN   = 1,  // warm start: bins each side of the hint
  parameter int unsigned SW          = acq_pkg::SAMPLE_W,
  parameter int unsigned POW_W_P     = acq_pkg::POW_W,
  localparam int unsigned AW         = $clog2(NS_P),
  localparam int          NBINS      = 2 * DMAX_HZ / COARSE_HZ + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [7:0]         threshold,      // unsigned, 4 fraction bits
  input  logic               warm,           // approximate Doppler known
  input  logic [7:0]         hint_bin,       // its coarse bin, 0..NBINS-1
  input  logic               data_ready,
  // PRN and code generation
  output logic               prn_start,
  input  logic               prn_done,
  output logic               cg_load,
  input  logic               cg_done,
  // sample memory read
  output logic [AW-1:0]      rd_addr,
  input  logic signed [SW-1:0] rd_i,
  input  logic signed [SW-1:0] rd_q,
  // CORDIC
  output logic               rot_valid,
  output logic signed [SW-1:0] rot_x,
  output logic signed [SW-1:0] rot_y,
  output logic signed [ANG_W-1:0] rot_z,
  input  logic               rot_out_valid,
  // acquire_bank
  output logic               wr_en,          // wiped sample = CORDIC output
  output logic [AW-1:0]      wr_addr,
  output logic               corr_start,
  output logic [AW-1:0]      tau_first,
  output logic [AW:0]        tau_count,
  input  logic               pow_valid,
  input  logic [POW_W_P-1:0] pow,
  // peak_finder
  output logic               coarse_mode,    // powers go to peak_finder
  output logic               pf_clear,
  input  logic               pf_valid,
  input  logic [POW_W_P-1:0] pf_max,
  input  logic [AW-1:0]      pf_idx,
  input  logic [POW_W_P-1:0] pf_second,
  // results
  output logic               busy,
  output logic               done,
  output logic               acquired,
  output logic [AW-1:0]      code_phase,
  output logic signed [31:0] coarse_doppler_hz,
  output logic signed [31:0] doppler_hz,
  output logic [POW_W_P-1:0] peak,
  output logic [POW_W_P-1:0] second
);

  localparam logic [PHASE_W-1:0] INC_FIRST  = phase_inc(longint'(IF_HZ) - longint'(DMAX_HZ), longint'(FS_P));
  localparam logic [PHASE_W-1:0] INC_COARSE = phase_inc(longint'(COARSE_HZ), longint'(FS_P));
  localparam logic [PHASE_W-1:0] INC_FINE   = phase_inc(longint'(FINE_HZ), longint'(FS_P));
  localparam logic [PHASE_W-1:0] INC_FOFF   = phase_inc(-((longint'(NFINE) - 1) / 2) * longint'(FINE_HZ), longint'(FS_P));

  typedef enum logic [3:0] {
    S_IDLE, S_WAIT_DATA, S_PRN, S_EXPAND, S_WIPE, S_CORR, S_BIN_DONE,
    S_DECIDE, S_FINE_WIPE, S_FINE_CORR, S_FINE_NEXT, S_DONE
  } state_e;

  state_e            st;
  logic              fine;          // wipe belongs to the fine search
  logic [AW:0]       issued;        // samples sent to the CORDIC
  logic [AW:0]       written;       // wiped samples written back
  logic              rd_v;          // rd_addr issued last cycle
  logic [PHASE_W-1:0] phase, inc, coarse_inc;
  logic signed [ANG_W-1:0] z_q, z_rot;   // z_rot lines up with rd_i/rd_q
  logic [7:0]        bin;           // coarse or fine bin counter
  logic signed [31:0] freq;         // frequency of the current bin
  logic              got_any;
  logic [POW_W_P-1:0] fine_best;
  logic [7:0]        thr_q;
  logic [7:0]        bin_lo, bin_hi;  // coarse bins to search

  // Coarse bins of a search: all of them on a cold start, the hint and
  // WARM_SPAN bins either side (clipped to the grid) on a warm start.
  function automatic logic [7:0] first_bin(logic w, logic [7:0] h);
    if (!w)                    return '0;
    if (int'(h) >= NBINS)      return 8'(NBINS - 1);
    if (int'(h) <= WARM_SPAN)  return '0;
    return h - 8'(WARM_SPAN);
  endfunction

  function automatic logic [7:0] last_bin(logic w, logic [7:0] h);
    if (!w || int'(h) + WARM_SPAN >= NBINS) return 8'(NBINS - 1);
    return h + 8'(WARM_SPAN);
  endfunction

  // Ratio test: peak * 16 >= threshold * second.
  logic [POW_W_P+8:0] lhs, rhs;
  assign lhs = (POW_W_P+9)'({peak, 4'b0});
  assign rhs = (POW_W_P+9)'(second) * thr_q;

  assign rot_x = rd_i;
  assign rot_y = rd_q;
  assign rot_z = z_rot;
  assign wr_en = rot_out_valid;
  assign coarse_mode = !fine;
  assign busy = (st != S_IDLE) && (st != S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; fine <= 1'b0; issued <= '0; written <= '0; rd_v <= 1'b0;
      rd_addr <= '0; phase <= '0; inc <= '0; coarse_inc <= '0; z_q <= '0;
      bin <= '0; freq <= '0; got_any <= 1'b0; fine_best <= '0;
      thr_q <= '0; z_rot <= '0; bin_lo <= '0; bin_hi <= '0;
      prn_start <= 1'b0; cg_load <= 1'b0; rot_valid <= 1'b0;
      wr_addr <= '0; corr_start <= 1'b0; tau_first <= '0;
      tau_count <= '0; pf_clear <= 1'b0;
      done <= 1'b0; acquired <= 1'b0; code_phase <= '0;
      coarse_doppler_hz <= '0; doppler_hz <= '0; peak <= '0; second <= '0;
    end else begin
      prn_start  <= 1'b0;
      cg_load    <= 1'b0;
      corr_start <= 1'b0;
      pf_clear   <= 1'b0;
      done       <= 1'b0;

      // Sample read -> CORDIC (the memory answers one cycle after rd_addr).
      rot_valid <= rd_v;
      rd_v      <= 1'b0;

      // CORDIC output -> acquire_bank write port.
      z_rot <= z_q;
      if (rot_out_valid) begin
        wr_addr <= wr_addr + 1'b1;
        written <= written + 1'b1;
      end

      unique case (st)
        S_IDLE:
          if (start) begin
            thr_q <= threshold;
            bin_lo <= first_bin(warm, hint_bin);
            bin_hi <= last_bin(warm, hint_bin);
            st    <= S_WAIT_DATA;
          end
        S_WAIT_DATA:
          if (data_ready) begin
            prn_start <= 1'b1;
            st        <= S_PRN;
          end
        S_PRN:
          if (prn_done && !prn_start) begin
            cg_load <= 1'b1;
            st      <= S_EXPAND;
          end
        S_EXPAND:
          if (cg_done && !cg_load) begin
            fine     <= 1'b0;
            bin      <= bin_lo;
            freq     <= IF_HZ - DMAX_HZ + int'(bin_lo) * COARSE_HZ;
            inc      <= INC_FIRST + PHASE_W'(bin_lo) * INC_COARSE;
            got_any  <= 1'b0;
            issued   <= '0;
            written  <= '0;
            wr_addr  <= '0;
            phase    <= '0;
            st       <= S_WIPE;
          end
        S_WIPE, S_FINE_WIPE: begin
          if (issued != (AW+1)'(NS_P)) begin
            rd_addr <= AW'(issued);
            rd_v    <= 1'b1;
            z_q     <= -$signed(phase[PHASE_W-1 -: ANG_W]);
            phase   <= phase + inc;
            issued  <= issued + 1'b1;
          end else if (written == (AW+1)'(NS_P)) begin
            corr_start  <= 1'b1;
            if (st == S_WIPE) begin
              tau_first <= '0;
              tau_count <= (AW+1)'(NS_P);
              pf_clear  <= 1'b1;
              st        <= S_CORR;
            end else begin
              tau_first <= code_phase;
              tau_count <= (AW+1)'(1);
              st        <= S_FINE_CORR;
            end
          end
        end
        S_CORR:
          if (pf_valid) begin
            if (!got_any || pf_max > peak) begin
              peak       <= pf_max;
              second     <= pf_second;
              code_phase <= pf_idx;
              coarse_doppler_hz <= freq;
              coarse_inc <= inc;
            end
            got_any <= 1'b1;
            st      <= S_BIN_DONE;
          end
        S_BIN_DONE: begin
          issued  <= '0;
          written <= '0;
          wr_addr <= '0;
          phase   <= '0;
          if (bin == bin_hi) begin
            st <= S_DECIDE;
          end else begin
            bin  <= bin + 1'b1;
            freq <= freq + COARSE_HZ;
            inc  <= inc + INC_COARSE;
            st   <= S_WIPE;
          end
        end
        S_DECIDE: begin
          acquired   <= (lhs >= rhs) && (peak != '0);
          doppler_hz <= coarse_doppler_hz;
          if ((lhs >= rhs) && (peak != '0)) begin
            fine      <= 1'b1;
            bin       <= '0;
            freq      <= coarse_doppler_hz - ((NFINE - 1) / 2) * FINE_HZ;
            inc       <= coarse_inc + INC_FOFF;
            fine_best <= '0;
            st        <= S_FINE_WIPE;
          end else begin
            done <= 1'b1;
            st   <= S_DONE;
          end
        end
        S_FINE_CORR:
          if (pow_valid) begin
            if (bin == '0 || pow > fine_best) begin
              fine_best  <= pow;
              doppler_hz <= freq;
            end
            st <= S_FINE_NEXT;
          end
        S_FINE_NEXT: begin
          issued  <= '0;
          written <= '0;
          wr_addr <= '0;
          phase   <= '0;
          if (bin == 8'(NFINE - 1)) begin
            done <= 1'b1;
            st   <= S_DONE;
          end else begin
            bin  <= bin + 1'b1;
            freq <= freq + FINE_HZ;
            inc  <= inc + INC_FINE;
            st   <= S_FINE_WIPE;
          end
        end
        S_DONE:
          if (start) begin
            thr_q <= threshold;
            bin_lo <= first_bin(warm, hint_bin);
            bin_hi <= last_bin(warm, hint_bin);
            st    <= S_WAIT_DATA;
          end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule

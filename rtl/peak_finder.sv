// peak_finder: finds, for one Doppler bin, the highest correlation power and
// the highest power outside one chip either side of it.
//
// Power values arrive one per code shift, tagged with the shift index. They
// are collected in batches of NC. Each full batch (or the final, possibly
// shorter, batch of the bin, marked by in_last) is searched in two passes:
// the first finds the batch maximum and its index; the second finds the
// largest value whose circular distance (modulo NS) from that index is
// more than EXCL samples, i.e. outside the one-chip exclusion range. The
// batch result is then merged into the running maximum and second maximum
// of the bin. Two batch buffers alternate, so a batch is searched while the
// next one is being filled and the search overlaps correlation.
//
// The batch-wise two-pass search, the one-chip exclusion range and the
// running maximum and second maximum follow the design. The merge rule is
// this design's: a new maximum demotes the old one to second place only
// when the old one lies outside the new one's exclusion range; otherwise the
// larger of the old second and the batch second is kept.
//
// Interface: pulse `clear` before the first value of a bin. res_valid pulses
// once after the batch holding the in_last value has been merged, with
// res_max, res_idx and res_second. A batch takes 2*count + 1 cycles, so the
// producer must not deliver NC values in less than that (the acquisition
// bank delivers one value every NS/(4*N_CORR) cycles).
module peak_finder #(
  parameter int unsigned NS    = acq_pkg::NS,
  parameter int unsigned NC    = acq_pkg::NC,
  parameter int unsigned EXCL  = acq_pkg::excl_samples(acq_pkg::FS_HZ),
  parameter int unsigned POW_W = acq_pkg::POW_W,
  localparam int unsigned AW   = $clog2(NS),
  localparam int unsigned CW   = $clog2(NC + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  input  logic [POW_W-1:0] in_pow,
  input  logic [AW-1:0]    in_idx,
  input  logic             in_last,
  output logic             busy,
  output logic             res_valid,
  output logic [POW_W-1:0] res_max,
  output logic [AW-1:0]    res_idx,
  output logic [POW_W-1:0] res_second
);

  typedef struct packed {
    logic [POW_W-1:0] pow;
    logic [AW-1:0]    idx;
  } entry_t;

  typedef enum logic [1:0] {P_IDLE, P_MAX, P_SECOND, P_MERGE} pstate_e;

  entry_t        buffer [2][NC];
  logic [CW-1:0] fill_cnt;
  logic          fill_sel;
  logic [1:0]    full;             // batch waiting or being searched
  logic [CW-1:0] cnt   [2];
  logic [1:0]    blast;            // batch ends the bin

  pstate_e       ps;
  logic          psel;
  logic [CW-1:0] k;
  entry_t        bmax;
  logic [POW_W-1:0] bsec;
  logic          have;             // running result valid for this bin
  logic [POW_W-1:0] rmax, rsec;
  logic [AW-1:0] ridx;

  function automatic logic [AW-1:0] cdist(logic [AW-1:0] a, logic [AW-1:0] b);
    logic [AW-1:0] d;
    d = (a > b) ? a - b : b - a;
    return (d > AW'(NS / 2)) ? AW'(NS) - d : d;
  endfunction

  entry_t cur;
  assign cur = buffer[psel][k[$clog2(NC)-1:0]];

  always_ff @(posedge clk)
    if (in_valid && !clear)
      buffer[fill_sel][fill_cnt[$clog2(NC)-1:0]] <= '{pow: in_pow, idx: in_idx};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_cnt <= '0; fill_sel <= 1'b0; full <= '0; blast <= '0;
      cnt[0] <= '0; cnt[1] <= '0;
      ps <= P_IDLE; psel <= 1'b0; k <= '0;
      bmax <= '0; bsec <= '0;
      have <= 1'b0; rmax <= '0; rsec <= '0; ridx <= '0;
      res_valid <= 1'b0; res_max <= '0; res_idx <= '0; res_second <= '0;
    end else begin
      res_valid <= 1'b0;

      // Fill side.
      if (clear) begin
        fill_cnt <= '0;
        have     <= 1'b0;
      end else if (in_valid) begin
        if (fill_cnt == CW'(NC - 1) || in_last) begin
          full[fill_sel]  <= 1'b1;
          cnt[fill_sel]   <= fill_cnt + 1'b1;
          blast[fill_sel] <= in_last;
          fill_sel        <= !fill_sel;
          fill_cnt        <= '0;
        end else begin
          fill_cnt <= fill_cnt + 1'b1;
        end
      end

      // Search side.
      unique case (ps)
        P_IDLE:
          if (full[psel]) begin
            ps   <= P_MAX;
            k    <= '0;
            bmax <= '0;
            bsec <= '0;
          end
        P_MAX: begin
          if (k == '0 || cur.pow > bmax.pow) bmax <= cur;
          if (k == cnt[psel] - 1'b1) begin
            ps <= P_SECOND;
            k  <= '0;
          end else k <= k + 1'b1;
        end
        P_SECOND: begin
          if (cdist(cur.idx, bmax.idx) > AW'(EXCL) && cur.pow > bsec)
            bsec <= cur.pow;
          if (k == cnt[psel] - 1'b1) ps <= P_MERGE;
          else k <= k + 1'b1;
        end
        P_MERGE: begin
          if (!have) begin
            rmax <= bmax.pow; ridx <= bmax.idx; rsec <= bsec;
          end else if (bmax.pow > rmax) begin
            rmax <= bmax.pow; ridx <= bmax.idx;
            if (cdist(ridx, bmax.idx) > AW'(EXCL))
              rsec <= (rmax > bsec) ? rmax : bsec;
            else
              rsec <= (rsec > bsec) ? rsec : bsec;
          end else begin
            if (cdist(bmax.idx, ridx) > AW'(EXCL)) begin
              if (bmax.pow > rsec) rsec <= bmax.pow;
            end else if (bsec > rsec) begin
              rsec <= bsec;
            end
          end
          have       <= !blast[psel];
          full[psel] <= 1'b0;
          psel       <= !psel;
          ps         <= P_IDLE;
          if (blast[psel]) begin
            res_valid  <= 1'b1;
            if (!have) begin
              res_max <= bmax.pow; res_idx <= bmax.idx; res_second <= bsec;
            end else if (bmax.pow > rmax) begin
              res_max <= bmax.pow; res_idx <= bmax.idx;
              res_second <= cdist(ridx, bmax.idx) > AW'(EXCL)
                            ? ((rmax > bsec) ? rmax : bsec)
                            : ((rsec > bsec) ? rsec : bsec);
            end else begin
              res_max <= rmax; res_idx <= ridx;
              if (cdist(bmax.idx, ridx) > AW'(EXCL))
                res_second <= (bmax.pow > rsec) ? bmax.pow : rsec;
              else
                res_second <= (bsec > rsec) ? bsec : rsec;
            end
          end
        end
        default: ps <= P_IDLE;
      endcase
    end
  end

  assign busy = (full != '0) || (ps != P_IDLE);

  // A value must never arrive for a buffer that is still being searched.
  property p_no_overrun;
    @(posedge clk) disable iff (!rst_n) in_valid && !clear |-> !full[fill_sel];
  endproperty
  assert property (p_no_overrun) else $error("peak_finder: batch buffer overrun");

endmodule

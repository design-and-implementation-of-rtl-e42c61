// cordic_rotation: pipelined CORDIC in rotation mode, used for Doppler
// wipe-off of the received I/Q samples.
//
// The input vector (x, y) is rotated counter-clockwise by the angle z:
//   x_out = x*cos(z) - y*sin(z),  y_out = x*sin(z) + y*cos(z).
// As in the design, the input is first multiplied by the CORDIC gain
// compensation K = prod cos(atan(2^-i)) = 0.607253, and ITER = 16
// iterations of x' = x - d*y*2^-i, y' = y + d*x*2^-i, z' = z - d*atan(2^-i)
// follow, with d the sign of z. With y = 0 the outputs are x*cos(z) and
// x*sin(z), the two products the design asks for; with a full complex sample
// the same rotation removes a Doppler phase from I and Q together.
//
// This design's own choices: a quadrant pre-rotation by +/-90 degrees so that
// any angle converges (the plain iterations only reach about +/-99.7
// degrees), the binary angle format (2^ANG_W is one full turn, z read as
// two's complement), four guard fraction bits, rounding and saturation at
// the output.
//
// Timing: fully pipelined, one sample per cycle, latency ITER + 2 cycles
// from in_valid to out_valid. No stall.
module cordic_rotation #(
  parameter int unsigned IN_W  = acq_pkg::SAMPLE_W,
  parameter int unsigned OUT_W = acq_pkg::WIPE_W,
  parameter int unsigned ANG_W = acq_pkg::ANG_W,
  parameter int unsigned ITER  = acq_pkg::CORDIC_ITER,
  localparam int unsigned LATENCY = ITER + 2   // in_valid to out_valid
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x_in,
  input  logic signed [IN_W-1:0]  y_in,
  input  logic signed [ANG_W-1:0] z_in,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] x_out,
  output logic signed [OUT_W-1:0] y_out
);

  localparam int unsigned FRAC = 4;                 // guard fraction bits
  localparam int unsigned IW   = IN_W + FRAC + 2;   // internal width
  localparam logic [16:0] K_Q16 = 17'd39797;        // round(K * 2^16)

  // atan(2^-i) in units of 2^-24 turn: round(atan(2^-i) / (2*pi) * 2^24).
  localparam logic [23:0] ATAN24 [16] = '{
    24'd2097152, 24'd1238021, 24'd654136, 24'd332050,
    24'd166669,  24'd83416,   24'd41718,  24'd20860,
    24'd10430,   24'd5215,    24'd2608,   24'd1304,
    24'd652,     24'd326,     24'd163,    24'd81
  };

  function automatic logic signed [ANG_W-1:0] atan_ang(logic [3:0] i);
    logic [47:0] a;
    a = {24'd0, ATAN24[i]};
    if (ANG_W >= 24) return ANG_W'(a << (ANG_W - 24));
    else             return ANG_W'((a + (48'd1 << (23 - ANG_W))) >> (24 - ANG_W));
  endfunction

  logic                    v [ITER+1];
  logic signed [IW-1:0]    xs [ITER+1];
  logic signed [IW-1:0]    ys [ITER+1];
  logic signed [ANG_W-1:0] zs [ITER+1];

  // Stage 0: gain compensation and quadrant pre-rotation.
  logic signed [IW+17:0] xk, yk;
  logic signed [IW-1:0]  xg, yg;
  always_comb begin
    xk = ((IW+18)'(x_in) <<< FRAC) * $signed({1'b0, K_Q16});
    yk = ((IW+18)'(y_in) <<< FRAC) * $signed({1'b0, K_Q16});
    xg = IW'((xk + (IW+18)'(1 <<< 15)) >>> 16);
    yg = IW'((yk + (IW+18)'(1 <<< 15)) >>> 16);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v[0] <= 1'b0; xs[0] <= '0; ys[0] <= '0; zs[0] <= '0;
    end else begin
      v[0] <= in_valid;
      unique case (z_in[ANG_W-1 -: 2])
        2'b01: begin  // [90, 180) degrees: rotate by +90 first
          xs[0] <= -yg; ys[0] <= xg;
          zs[0] <= z_in - (ANG_W'(1) <<< (ANG_W - 2));
        end
        2'b10: begin  // [-180, -90) degrees: rotate by -90 first
          xs[0] <= yg;  ys[0] <= -xg;
          zs[0] <= z_in + (ANG_W'(1) <<< (ANG_W - 2));
        end
        default: begin
          xs[0] <= xg;  ys[0] <= yg;  zs[0] <= z_in;
        end
      endcase
    end
  end

  // Stages 1..ITER: one micro-rotation each.
  for (genvar i = 0; i < ITER; i++) begin : g_iter
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v[i+1] <= 1'b0; xs[i+1] <= '0; ys[i+1] <= '0; zs[i+1] <= '0;
      end else begin
        v[i+1] <= v[i];
        if (!zs[i][ANG_W-1]) begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - atan_ang(4'(i));
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + atan_ang(4'(i));
        end
      end
    end
  end

  // Output: round away the guard bits and saturate.
  function automatic logic signed [OUT_W-1:0] round_sat(logic signed [IW-1:0] a);
    logic signed [IW:0] r;
    r = ((IW+1)'(a) + (IW+1)'(1 <<< (FRAC - 1))) >>> FRAC;
    if (r > (IW+1)'((1 <<< (OUT_W - 1)) - 1))  return {1'b0, {(OUT_W-1){1'b1}}};
    if (r < -(IW+1)'(1 <<< (OUT_W - 1)))       return {1'b1, {(OUT_W-1){1'b0}}};
    return OUT_W'(r);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; x_out <= '0; y_out <= '0;
    end else begin
      out_valid <= v[ITER];
      x_out     <= round_sat(xs[ITER]);
      y_out     <= round_sat(ys[ITER]);
    end
  end

endmodule

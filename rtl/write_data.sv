// write_data: the first stage of the acquisition block. It captures one code
// period (NS samples) of the front end's separate in-phase and quadrature
// streams into a sample memory, which the rest of the block then reads as
// often as the Doppler search needs.
//
// The design names this stage and its job; the memory organisation is this
// design's own: one word per sample holding {I, Q}, a write counter and a
// synchronous read port (data one cycle after the address).
//
// Interface: pulse `capture` to arm; the next NS cycles with in_valid high
// are stored at addresses 0..NS-1; `ready` then stays high until the next
// `capture`. While armed (`busy`), reads return stale data.
module write_data #(
  parameter int unsigned NS       = acq_pkg::NS,
  parameter int unsigned SAMPLE_W = acq_pkg::SAMPLE_W,
  localparam int unsigned AW      = $clog2(NS)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       capture,
  input  logic                       in_valid,
  input  logic signed [SAMPLE_W-1:0] in_i,
  input  logic signed [SAMPLE_W-1:0] in_q,
  output logic                       busy,
  output logic                       ready,
  input  logic [AW-1:0]              rd_addr,
  output logic signed [SAMPLE_W-1:0] rd_i,
  output logic signed [SAMPLE_W-1:0] rd_q
);

  logic [2*SAMPLE_W-1:0] mem [NS];
  logic [AW-1:0]         wr_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      ready   <= 1'b0;
      wr_addr <= '0;
    end else if (capture) begin
      busy    <= 1'b1;
      ready   <= 1'b0;
      wr_addr <= '0;
    end else if (busy && in_valid) begin
      if (wr_addr == AW'(NS - 1)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end
      wr_addr <= wr_addr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (busy && in_valid && !capture) mem[wr_addr] <= {in_i, in_q};
    {rd_i, rd_q} <= mem[rd_addr];
  end

endmodule

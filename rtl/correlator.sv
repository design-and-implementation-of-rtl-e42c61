// correlator: the elementary correlation unit of the acquisition block.
//
// Four signal samples are multiplied by four code replica values and the
// four products are summed: sum = c0*y0 + c1*y1 + c2*y2 + c3*y3. The unit
// follows the four-multiplier, four-input-adder structure of the design; the
// sample and code widths are this design's parameters. Code values are
// signed (+1/-1 with the default CW = 2), so a synthesis tool reduces each
// multiplier to a conditional negation.
//
// Interface: purely combinational, y and c in, sum out in the same cycle.
// The enclosing correlator bank registers the result.
module correlator #(
  parameter int unsigned DW = acq_pkg::WIPE_W,  // signal sample width
  parameter int unsigned CW = 2                 // code value width
) (
  input  logic signed [DW-1:0]    y [4],
  input  logic signed [CW-1:0]    c [4],
  output logic signed [DW+CW+1:0] sum
);

  logic signed [DW+CW-1:0] prod [4];

  always_comb begin
    sum = '0;
    for (int k = 0; k < 4; k++) begin
      prod[k] = y[k] * c[k];
      sum     = sum + (DW+CW+2)'(prod[k]);
    end
  end

endmodule

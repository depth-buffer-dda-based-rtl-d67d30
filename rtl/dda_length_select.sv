// dda_length_select: comparator and multiplexer that choose the line length.
//
// The comparator tests |dy| > |dx|; the multiplexer then passes the larger of
// the two magnitudes as Length, the number of unit steps along the major axis.
// On a tie |dx| is chosen, as in the design's algorithm ("if abs(y2-y1) >
// Length then Length = abs(y2-y1)"). y_major_o reports the comparator result.
// Purely combinational.
module dda_length_select #(
  parameter int unsigned W = 17
) (
  input  logic [W-1:0] abs_dx_i,
  input  logic [W-1:0] abs_dy_i,
  output logic [W-1:0] length_o,
  output logic         y_major_o
);

  always_comb begin
    y_major_o = (abs_dy_i > abs_dx_i);
    length_o  = y_major_o ? abs_dy_i : abs_dx_i;
  end

endmodule

// dda_round: the rounding operation of the line increment part.
//
// Rounds an unsigned fixed-point coordinate (INT_W.FRAC_W, 8.8 by default) to
// the nearest integer, halves rounding up: the integer part plus the most
// significant fraction bit. So 01.a5h (1.644) gives 2, 00.80h (0.5) gives 1 and
// 00.49h (0.285) gives 0, as in the design's worked examples. A coordinate of
// 255.5 or more wraps to 0; such positions lie outside the 128x128 screen and
// the address generator drops them. Purely combinational.
module dda_round #(
  parameter int unsigned INT_W  = 8,
  parameter int unsigned FRAC_W = 8
) (
  input  logic [INT_W+FRAC_W-1:0] value_i,   // fixed-point coordinate
  output logic [INT_W-1:0]        round_o    // nearest integer
);

  always_comb begin
    round_o = value_i[INT_W+FRAC_W-1:FRAC_W] + INT_W'(value_i[FRAC_W-1]);
  end

endmodule

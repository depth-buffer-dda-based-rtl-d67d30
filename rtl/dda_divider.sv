// dda_divider: increment divider of the 3D-DDA (one of three, for x, y, z).
//
// Computes inc = d / Length as a signed fixed-point number with FRAC_W fraction
// bits, where d is a signed coordinate difference and Length the unsigned
// larger of |dx| and |dy|. Both inputs share the same scaling (8.8), so the
// quotient is |d| * 2^FRAC_W / Length. It is rounded to nearest (the design's
// examples give 9/14 as 00.a5h, i.e. 0.6445, not the truncated 00.a4h) by adding
// Length/2 to the dividend, and the sign of d is applied to the magnitude.
// The result is kept modulo 2^Q_W: for z, whose difference may exceed Length,
// the wrap is harmless because the coordinate accumulators wrap the same way.
// A Length of zero gives an increment of zero (a one-pixel line).
//
// The divider is a combinational restoring divider, so the increments are
// ready one clock after the differences are registered.
module dda_divider #(
  parameter int unsigned D_W    = 17,  // signed difference width
  parameter int unsigned FRAC_W = 8,   // fraction bits added to the quotient
  parameter int unsigned Q_W    = 16   // signed increment width
) (
  input  logic signed [D_W-1:0] diff_i,     // signed difference d
  input  logic        [D_W-1:0] length_i,   // unsigned Length
  output logic signed [Q_W-1:0] inc_o       // round(d / Length), signed
);

  localparam int unsigned N_W = D_W + FRAC_W + 1;   // dividend width

  logic [D_W-1:0] mag;
  logic [N_W-1:0] dividend;
  logic [N_W-1:0] quot;
  logic [D_W:0]   rem;

  always_comb begin
    mag      = diff_i[D_W-1] ? D_W'(-diff_i) : D_W'(diff_i);
    dividend = (N_W'(mag) << FRAC_W) + N_W'(length_i >> 1);
    rem      = '0;
    quot     = '0;
    // restoring division, one quotient bit per row
    for (int i = N_W - 1; i >= 0; i--) begin
      rem = {rem[D_W-1:0], dividend[i]};
      if (rem >= {1'b0, length_i}) begin
        rem     = rem - {1'b0, length_i};
        quot[i] = 1'b1;
      end
    end
    if (length_i == '0)
      inc_o = '0;
    else if (diff_i[D_W-1])
      inc_o = Q_W'(-quot);
    else
      inc_o = Q_W'(quot);
  end

endmodule

// dda_line_increment: the line increment part of the 3D-DDA.
//
// Holds the current unrounded position (xs, ys, zs) and the three increments.
// load_i copies the first vertex and the divider results into the registers.
// Each cycle with enable_i high the current position is rounded (three
// dda_round instances) and registered as the pixel (xo, yo, zo) with
// pix_valid_o, and the three adders step the position by (xinc, yinc, zinc).
// The first pixel is therefore the first vertex itself, and one pixel leaves
// per enabled cycle, one clock after the position it was rounded from, as in
// the simulation traces of the design (xo follows xs by one clock).
//
// Adders and accumulators are COORD_W bits wide and wrap modulo 2^COORD_W;
// signed increments are added in two's complement, so ff.00h steps by -1.0.
module dda_line_increment
  import dda_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load_i,        // load start vertex and increments
  input  logic    enable_i,      // emit one pixel and step
  input  vertex_t v1_i,          // first vertex (Xc, Yc, Zc start values)
  input  inc_t    xinc_i,
  input  inc_t    yinc_i,
  input  inc_t    zinc_i,
  output coord_t  xs_o,          // current coordinates before rounding
  output coord_t  ys_o,
  output coord_t  zs_o,
  output logic    pix_valid_o,   // a pixel is on xo/yo/zo this cycle
  output pix_t    xo_o,          // rounded coordinates of that pixel
  output pix_t    yo_o,
  output pix_t    zo_o
);

  coord_t xs, ys, zs;
  inc_t   xinc, yinc, zinc;
  pix_t   xr, yr, zr;

  dda_round #(.INT_W(INT_W), .FRAC_W(FRAC_W)) u_round_x (.value_i(xs), .round_o(xr));
  dda_round #(.INT_W(INT_W), .FRAC_W(FRAC_W)) u_round_y (.value_i(ys), .round_o(yr));
  dda_round #(.INT_W(INT_W), .FRAC_W(FRAC_W)) u_round_z (.value_i(zs), .round_o(zr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs <= '0; ys <= '0; zs <= '0;
      xinc <= '0; yinc <= '0; zinc <= '0;
      pix_valid_o <= 1'b0;
      xo_o <= '0; yo_o <= '0; zo_o <= '0;
    end else begin
      pix_valid_o <= enable_i & ~load_i;
      if (load_i) begin
        xs   <= v1_i.x;
        ys   <= v1_i.y;
        zs   <= v1_i.z;
        xinc <= xinc_i;
        yinc <= yinc_i;
        zinc <= zinc_i;
      end else if (enable_i) begin
        xo_o <= xr;
        yo_o <= yr;
        zo_o <= zr;
        xs   <= xs + coord_t'(xinc);
        ys   <= ys + coord_t'(yinc);
        zs   <= zs + coord_t'(zinc);
      end
    end
  end

  assign xs_o = xs;
  assign ys_o = ys;
  assign zs_o = zs;

endmodule

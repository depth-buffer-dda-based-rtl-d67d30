// dda3d_top: 3D-DDA line scan converter with a 128 x 128 depth (Z) buffer.
//
// Given two end points V1 = (x1, y1, z1) and V2 = (x2, y2, z2) in unsigned
// 8.8 fixed point and an intensity, the unit steps along the line one pixel
// per clock, computing x, y and z incrementally, rounds them, and writes the
// intensity and depth of each pixel into the depth buffer when its depth is
// less than the stored one (hidden-surface removal by Z buffer).
//
// Data path, as in the unit's block diagram: control unit (differences, |dx|,
// |dy|, sequencing, depth test) -> comparator/multiplexer (Length) -> three
// dividers (xinc, yinc, zinc) -> line increment part (three adders and
// rounding) -> shifter/adder (address) -> depth buffer, whose stored depth
// Zb returns to the control unit for the test.
//
// Timing: start_i is taken in a cycle where busy_o and buf_busy_o are low;
// v1_i, v2_i and intensity_i need to be valid only in that clock, in which
// the differences, Length and the three increments are all computed (one
// setup clock). The first pixel appears on pix_valid_o two clocks after
// start and then one pixel per clock for Length+1 clocks (Length =
// max(|dx|,|dy|), integer part); done_o pulses two clocks after the last
// pixel. clear_i (while idle) sets the whole buffer to {bg_intensity_i, 0xff}
// in 16384 clocks; a clear and a start in the same clock: the clear wins.
// The read port rd_* returns a stored word one clock after rd_addr_i; it is
// served only while no line is being converted (busy_o low).
module dda3d_top
  import dda_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // line command
  input  logic              start_i,
  input  logic [I_W-1:0]    intensity_i,
  input  vertex_t           v1_i,
  input  vertex_t           v2_i,
  output logic              busy_o,
  output logic              done_o,
  // buffer initialisation
  input  logic              clear_i,
  input  logic [I_W-1:0]    bg_intensity_i,
  output logic              buf_busy_o,
  // generated pixels (observation)
  output logic              pix_valid_o,
  output pix_t              xo_o,
  output pix_t              yo_o,
  output pix_t              zo_o,
  output coord_t            xs_o,         // unrounded position of the next pixel
  output coord_t            ys_o,
  output coord_t            zs_o,
  output logic              y_major_o,    // |dy| > |dx| for the vertices on v1_i/v2_i
  output logic              zpass_o,      // a pixel passed the depth test
  output logic              zfail_o,      // a pixel was hidden by a nearer one
  // buffer read-back for display
  input  logic [ADDR_W-1:0] rd_addr_i,
  output logic [I_W-1:0]    rd_intensity_o,
  output logic [Z_W-1:0]    rd_z_o
);

  diff_t   dx, dy, dz;
  mag_t    abs_dx, abs_dy, length;
  logic    y_major;
  inc_t    xinc, yinc, zinc;
  vertex_t v1;
  logic    load, enable;
  coord_t  xs, ys, zs;
  logic    pix_valid;
  pix_t    xo, yo, zo;
  logic [ADDR_W-1:0] pix_addr, raddr, waddr;
  logic    in_range;
  logic    we;
  logic [I_W-1:0] wintensity, rintensity;
  logic [Z_W-1:0] wz, rz;
  logic    zpass, zfail;
  logic    clear_go, start_go;

  assign clear_go = clear_i & ~busy_o;
  assign start_go = start_i & ~clear_i;

  dda_control u_ctrl (
    .clk, .rst_n,
    .start_i(start_go), .intensity_i, .v1_i, .v2_i,
    .busy_o, .done_o,
    .dx_o(dx), .dy_o(dy), .dz_o(dz),
    .abs_dx_o(abs_dx), .abs_dy_o(abs_dy), .length_i(length),
    .v1_o(v1), .load_o(load), .enable_o(enable),
    .pix_valid_i(pix_valid), .zo_i(zo), .addr_i(pix_addr), .in_range_i(in_range),
    .buf_busy_i(buf_busy_o), .zb_i(rz),
    .we_o(we), .waddr_o(waddr), .wintensity_o(wintensity), .wz_o(wz),
    .zpass_o(zpass), .zfail_o(zfail)
  );

  dda_length_select #(.W(DIFF_W)) u_len (
    .abs_dx_i(abs_dx), .abs_dy_i(abs_dy), .length_o(length), .y_major_o(y_major)
  );

  dda_divider #(.D_W(DIFF_W), .FRAC_W(FRAC_W), .Q_W(COORD_W)) u_div_x (
    .diff_i(dx), .length_i(length), .inc_o(xinc)
  );
  dda_divider #(.D_W(DIFF_W), .FRAC_W(FRAC_W), .Q_W(COORD_W)) u_div_y (
    .diff_i(dy), .length_i(length), .inc_o(yinc)
  );
  dda_divider #(.D_W(DIFF_W), .FRAC_W(FRAC_W), .Q_W(COORD_W)) u_div_z (
    .diff_i(dz), .length_i(length), .inc_o(zinc)
  );

  dda_line_increment u_inc (
    .clk, .rst_n,
    .load_i(load), .enable_i(enable),
    .v1_i(v1), .xinc_i(xinc), .yinc_i(yinc), .zinc_i(zinc),
    .xs_o(xs), .ys_o(ys), .zs_o(zs),
    .pix_valid_o(pix_valid), .xo_o(xo), .yo_o(yo), .zo_o(zo)
  );

  dda_addr_gen #(.PIX_W(PIX_W), .XRES_LOG2(XRES_LOG2), .YRES_LOG2(YRES_LOG2)) u_addr (
    .xo_i(xo), .yo_i(yo), .addr_o(pix_addr), .in_range_o(in_range)
  );

  assign raddr = busy_o ? pix_addr : rd_addr_i;

  depth_buffer #(.ADDR_W(ADDR_W), .I_W(I_W), .Z_W(Z_W)) u_buf (
    .clk, .rst_n,
    .clear_i(clear_go), .bg_intensity_i, .busy_o(buf_busy_o),
    .we_i(we), .waddr_i(waddr), .wintensity_i(wintensity), .wz_i(wz),
    .raddr_i(raddr), .rintensity_o(rintensity), .rz_o(rz)
  );

  assign pix_valid_o    = pix_valid;
  assign xo_o           = xo;
  assign yo_o           = yo;
  assign zo_o           = zo;
  assign xs_o           = xs;
  assign ys_o           = ys;
  assign zs_o           = zs;
  assign y_major_o      = y_major;
  assign zpass_o        = zpass;
  assign zfail_o        = zfail;
  assign rd_intensity_o = rintensity;
  assign rd_z_o         = rz;

endmodule

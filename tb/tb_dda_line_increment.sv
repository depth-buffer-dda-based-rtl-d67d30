// tb_dda_line_increment: runs the two worked examples of the design through
// the line increment part with the printed increments, and compares
//  - the unrounded positions xs, ys, zs with the values of the simulation
//    traces (example 1: 01.00, 01.a5, 02.4a, ...; example 2: 01.00, 01.66, ...),
//  - the rounded pixels with the hand-computed table of example 1
//    (x = 1..15, rounded y and z) and with round() of the exact line for
//    example 2,
//  - the timing: one pixel per enabled clock, each one clock after enable.
module tb_dda_line_increment;
  import dda_pkg::*;

  logic    clk = 0, rst_n = 0;
  logic    load = 0, enable = 0;
  vertex_t v1;
  inc_t    xinc, yinc, zinc;
  coord_t  xs, ys, zs;
  logic    pv;
  pix_t    xo, yo, zo;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dda_line_increment dut (
    .clk, .rst_n, .load_i(load), .enable_i(enable), .v1_i(v1),
    .xinc_i(xinc), .yinc_i(yinc), .zinc_i(zinc),
    .xs_o(xs), .ys_o(ys), .zs_o(zs),
    .pix_valid_o(pv), .xo_o(xo), .yo_o(yo), .zo_o(zo)
  );

  // example 1 table: rounded y and z for x = 1..15
  int ex1_y[15] = '{1,2,2,3,4,4,5,6,6,7,7,8,9,9,10};
  int ex1_z[15] = '{0,0,1,1,1,1,2,2,2,3,3,3,3,4,4};
  // example 1 trace, first eleven positions
  logic [15:0] ex1_ys[11] = '{16'h0100,16'h01a5,16'h024a,16'h02ef,16'h0394,16'h0439,
                              16'h04de,16'h0583,16'h0628,16'h06cd,16'h0772};
  logic [15:0] ex1_zs[11] = '{16'h0000,16'h0049,16'h0092,16'h00db,16'h0124,16'h016d,
                              16'h01b6,16'h01ff,16'h0248,16'h0291,16'h02da};
  // example 2 trace
  logic [15:0] ex2_xs[11] = '{16'h0100,16'h0166,16'h01cc,16'h0232,16'h0298,16'h02fe,
                              16'h0364,16'h03ca,16'h0430,16'h0496,16'h04fc};

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // run one line: load, then n enabled cycles; collect the pixels
  task automatic run_line(input vertex_t a, input inc_t ix, input inc_t iy, input inc_t iz,
                          input int n, input int ex);
    int got;
    @(negedge clk);
    v1 = a; xinc = ix; yinc = iy; zinc = iz; load = 1;
    @(negedge clk);
    load = 0;
    got = 0;
    for (int k = 0; k < n; k++) begin
      enable = 1;
      // position before this step
      if (ex == 1) begin
        chk(xs == 16'((k + 1) << 8), $sformatf("ex1 xs step %0d = %h", k, xs));
        if (k < 11) begin
          chk(ys == ex1_ys[k], $sformatf("ex1 ys step %0d = %h", k, ys));
          chk(zs == ex1_zs[k], $sformatf("ex1 zs step %0d = %h", k, zs));
        end
      end else begin
        if (k < 11) chk(xs == ex2_xs[k], $sformatf("ex2 xs step %0d = %h", k, xs));
        chk(ys == 16'((15 - k) << 8), $sformatf("ex2 ys step %0d = %h", k, ys));
        chk(zs == 16'(k * 128), $sformatf("ex2 zs step %0d = %h", k, zs));
      end
      @(negedge clk);
      chk(pv == 1'b1, $sformatf("pixel %0d valid one clock after enable", k));
      if (ex == 1) begin
        chk(xo == 8'(k + 1) && yo == 8'(ex1_y[k]) && zo == 8'(ex1_z[k]),
            $sformatf("ex1 pixel %0d = (%0d,%0d,%0d)", k, xo, yo, zo));
      end else begin
        // exact line: x = 1 + 0.4k, y = 15 - k, z = 0.5k, rounded half up
        int ex_x, ex_z;
        ex_x = int'($floor(1.0 + 0.4 * k + 0.5));
        ex_z = int'($floor(0.5 * k + 0.5));
        chk(xo == 8'(ex_x) && yo == 8'(15 - k) && zo == 8'(ex_z),
            $sformatf("ex2 pixel %0d = (%0d,%0d,%0d)", k, xo, yo, zo));
      end
      if (pv) got++;
    end
    enable = 0;
    @(negedge clk);
    chk(pv == 1'b0, "no pixel after enable drops");
    chk(got == n, $sformatf("pixel count %0d", got));
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v1 = '0; xinc = '0; yinc = '0; zinc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_line('{x:16'h0100, y:16'h0100, z:16'h0000}, 16'h0100, 16'h00a5, 16'h0049, 15, 1);
    run_line('{x:16'h0100, y:16'h0f00, z:16'h0000}, 16'h0066, 16'hff00, 16'h0080, 11, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

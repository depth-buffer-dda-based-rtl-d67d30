// tb_dda3d_top: end-to-end test of the 3D-DDA depth-buffer unit at its full
// size (128 x 128 buffer, no parameter overrides).
//
//  1. Initialises the buffer to a background intensity and maximum depth and
//     checks the sweep length (16384 clocks).
//  2. Draws the two worked examples of the design and compares the pixel
//     stream with the hand-computed table of example 1 and with round() of
//     the exact line of example 2, and the timing: first pixel two clocks
//     after start, one pixel per clock, Length+1 pixels, done two clocks
//     after the last pixel.
//  3. Draws random lines (steep, shallow, negative slopes, single points,
//     partly off screen, hidden behind earlier ones) and compares every pixel
//     with a reference model of the algorithm kept in this testbench, which
//     also keeps its own copy of the depth buffer.
//  4. Reads the whole buffer back through the display port and compares it
//     with that copy; then clears again with a start in the same clock (the
//     clear must win) and reads the buffer back once more.
// Each mechanism (initialisation, x-major, y-major, negative increment,
// depth pass, depth fail, off-screen pixel, single-pixel line, read-back)
// is counted; one that never happens counts as a failure.
module tb_dda3d_top;
  import dda_pkg::*;

  logic    clk = 0, rst_n = 0;
  logic    start = 0, clear = 0;
  logic [7:0] inten = '0, bg = '0;
  vertex_t v1 = '0, v2 = '0;
  logic    busy, done, bbusy, pv, ymaj, zpass, zfail;
  pix_t    xo, yo, zo;
  coord_t  xs, ys, zs;
  logic [13:0] rd_addr = '0;
  logic [7:0]  rd_i, rd_z;
  int checks = 0, failures = 0;

  // reference copy of the buffer: {intensity, z}
  logic [15:0] ref_buf [16384];

  // mechanism counters
  int n_clear = 0, n_xmaj = 0, n_ymaj = 0, n_neg = 0, n_pass = 0, n_fail = 0;
  int n_clip = 0, n_point = 0, n_read = 0;

  always #5 clk = ~clk;

  dda3d_top dut (
    .clk, .rst_n,
    .start_i(start), .intensity_i(inten), .v1_i(v1), .v2_i(v2),
    .busy_o(busy), .done_o(done),
    .clear_i(clear), .bg_intensity_i(bg), .buf_busy_o(bbusy),
    .pix_valid_o(pv), .xo_o(xo), .yo_o(yo), .zo_o(zo),
    .xs_o(xs), .ys_o(ys), .zs_o(zs),
    .y_major_o(ymaj), .zpass_o(zpass), .zfail_o(zfail),
    .rd_addr_i(rd_addr), .rd_intensity_o(rd_i), .rd_z_o(rd_z));

  always @(posedge clk) begin
    if (zpass) n_pass++;
    if (zfail) n_fail++;
    if (pv && (xo >= 128 || yo >= 128)) n_clip++;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---- reference model of the 3D-DDA -------------------------------------
  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  // increment = round(|d| * 256 / L) with the sign of d, modulo 2^16
  function automatic int ref_inc(input int d, input int l);
    real q;
    if (l == 0) return 0;
    q = $floor(real'(iabs(d)) * 256.0 / real'(l) + 0.5);
    return (d < 0) ? ((-int'(q)) & 16'hffff) : (int'(q) & 16'hffff);
  endfunction

  function automatic int ref_round(input int v);
    return ((v + 128) >> 8) & 8'hff;
  endfunction

  // pixels of a line, packed as {x, y, z}
  function automatic void ref_line(input vertex_t a, input vertex_t b, ref int px[$]);
    int dx, dy, dz, l, ix, iy, iz, x, y, z;
    dx = int'(b.x) - int'(a.x);
    dy = int'(b.y) - int'(a.y);
    dz = int'(b.z) - int'(a.z);
    l  = iabs(dy) > iabs(dx) ? iabs(dy) : iabs(dx);
    ix = ref_inc(dx, l); iy = ref_inc(dy, l); iz = ref_inc(dz, l);
    x = a.x; y = a.y; z = a.z;
    px.delete();
    for (int k = 0; k <= l / 256; k++) begin
      px.push_back((ref_round(x) << 16) | (ref_round(y) << 8) | ref_round(z));
      x = (x + ix) & 16'hffff;
      y = (y + iy) & 16'hffff;
      z = (z + iz) & 16'hffff;
    end
  endfunction

  // ---- driving -------------------------------------------------------------
  task automatic clear_buffer(input logic [7:0] b);
    int cyc;
    @(negedge clk);
    clear = 1; bg = b;
    @(negedge clk);
    clear = 0;
    cyc = 0;
    while (bbusy) begin
      @(negedge clk);
      cyc++;
    end
    chk(cyc == 16384, $sformatf("initialisation took %0d clocks", cyc));
    for (int i = 0; i < 16384; i++) ref_buf[i] = {b, 8'hff};
    n_clear++;
  endtask

  // draw one line and check its pixels and timing against the model;
  // exp_y / exp_z, when not empty, are printed reference values to match too
  task automatic draw(input vertex_t a, input vertex_t b, input logic [7:0] i,
                      input int exp_y[$], input int exp_z[$]);
    int px[$];
    int got, cyc, first_at, last_at, done_at, dx, dy, dz;
    ref_line(a, b, px);
    dx = int'(b.x) - int'(a.x);
    dy = int'(b.y) - int'(a.y);
    dz = int'(b.z) - int'(a.z);
    @(negedge clk);
    v1 = a; v2 = b; inten = i; start = 1;
    #1;
    if (ymaj) n_ymaj++; else n_xmaj++;
    chk(ymaj == (iabs(dy) > iabs(dx)), "y-major flag");
    @(negedge clk);
    // inputs are only needed in the start clock
    start = 0; v1 = vertex_t'({$urandom, $urandom}); v2 = vertex_t'({$urandom, $urandom});
    inten = 8'($urandom);
    got = 0; cyc = 1; first_at = -1; last_at = -1; done_at = -1;
    while (done_at < 0 && cyc < 1000) begin
      if (pv) begin
        int e;
        if (first_at < 0) first_at = cyc;
        last_at = cyc;
        if (got < px.size()) begin
          e = px[got];
          chk({xo, yo, zo} == {8'(e >> 16), 8'(e >> 8), 8'(e)},
              $sformatf("pixel %0d = (%0d,%0d,%0d) expected (%0d,%0d,%0d)", got, xo, yo, zo,
                        (e >> 16) & 255, (e >> 8) & 255, e & 255));
          if (got < exp_y.size())
            chk(int'(yo) == exp_y[got] && int'(zo) == exp_z[got],
                $sformatf("printed value %0d: y=%0d z=%0d", got, yo, zo));
          // depth test in the reference buffer
          if (xo < 128 && yo < 128) begin
            int adr;
            adr = int'(yo) * 128 + int'(xo);
            if (zo < ref_buf[adr][7:0]) ref_buf[adr] = {i, zo};
          end
        end
        got++;
      end
      if (done) done_at = cyc;
      @(negedge clk);
      cyc++;
    end
    chk(got == px.size(), $sformatf("%0d pixels, expected %0d", got, px.size()));
    chk(first_at == 2, $sformatf("first pixel %0d clocks after start", first_at));
    chk(last_at - first_at + 1 == got, "one pixel per clock");
    chk(done_at == last_at + 2, "done two clocks after the last pixel");
    if (dx < 0 || dy < 0 || dz < 0) n_neg++;
    if (px.size() == 1) n_point++;
  endtask

  task automatic read_back();
    @(negedge clk);
    for (int a = 0; a < 16384; a++) begin
      rd_addr = 14'(a);
      @(negedge clk);
      chk({rd_i, rd_z} == ref_buf[a],
          $sformatf("buffer word %0d = %h expected %h", a, {rd_i, rd_z}, ref_buf[a]));
    end
    n_read++;
  endtask

  function automatic vertex_t rnd_vertex(input int lim);
    vertex_t v;
    v.x = 16'($urandom_range(0, lim) << 8);
    v.y = 16'($urandom_range(0, lim) << 8);
    v.z = 16'($urandom_range(0, 255) << 8);
    if ($urandom_range(0, 4) == 0) begin
      v.x = v.x | 16'($urandom_range(0, 255));
      v.y = v.y | 16'($urandom_range(0, 255));
    end
    return v;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int none[$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    clear_buffer(8'h20);

    // worked example 1, with the hand-computed rounded y and z
    draw('{x:16'h0100, y:16'h0100, z:16'h0000}, '{x:16'h0f00, y:16'h0a00, z:16'h0400}, 8'ha1,
         '{1,2,2,3,4,4,5,6,6,7,7,8,9,9,10}, '{0,0,1,1,1,1,2,2,2,3,3,3,3,4,4});
    // worked example 2: exact line y = 15 - k, z = 0.5 k rounded half up
    draw('{x:16'h0100, y:16'h0f00, z:16'h0000}, '{x:16'h0500, y:16'h0500, z:16'h0500}, 8'hb2,
         '{15,14,13,12,11,10,9,8,7,6,5}, '{0,1,1,2,2,3,3,4,4,5,5});
    // the same line again, further away: every pixel hidden
    draw('{x:16'h0100, y:16'h0f00, z:16'h1000}, '{x:16'h0500, y:16'h0500, z:16'h1500}, 8'hc3,
         none, none);
    // single point, and a line leaving the screen
    draw('{x:16'h4000, y:16'h4000, z:16'h0100}, '{x:16'h4000, y:16'h4000, z:16'h0100}, 8'hd4,
         none, none);
    draw('{x:16'h7000, y:16'h1000, z:16'h0800}, '{x:16'h9000, y:16'h3000, z:16'h0800}, 8'he5,
         none, none);

    for (int k = 0; k < 300; k++)
      draw(rnd_vertex(k % 5 == 0 ? 150 : 127), rnd_vertex(127), 8'($urandom), none, none);

    read_back();

    // a clear and a start in the same clock: the clear wins, no line starts
    @(negedge clk);
    clear = 1; bg = 8'h5a; start = 1;
    v1 = '{x:16'h1000, y:16'h1000, z:16'h0000}; v2 = '{x:16'h2000, y:16'h2000, z:16'h0000};
    @(negedge clk);
    clear = 0; start = 0;
    chk(bbusy && !busy, "clear taken, start refused");
    while (bbusy) @(negedge clk);
    for (int i = 0; i < 16384; i++) ref_buf[i] = 16'h5aff;
    n_clear++;
    read_back();

    chk(n_clear > 0, "initialisation happened");
    chk(n_xmaj > 0, "x-major line happened");
    chk(n_ymaj > 0, "y-major line happened");
    chk(n_neg > 0, "negative increment happened");
    chk(n_pass > 0, "depth test pass happened");
    chk(n_fail > 0, "depth test fail happened");
    chk(n_clip > 0, "off-screen pixel happened");
    chk(n_point > 0, "single-pixel line happened");
    chk(n_read > 0, "read-back happened");
    $display("mechanisms: clear=%0d xmajor=%0d ymajor=%0d negative=%0d zpass=%0d zfail=%0d offscreen=%0d point=%0d readback=%0d",
             n_clear, n_xmaj, n_ymaj, n_neg, n_pass, n_fail, n_clip, n_point, n_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

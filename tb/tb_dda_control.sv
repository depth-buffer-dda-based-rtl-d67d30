// tb_dda_control: sequencing and depth test of the control unit.
// The testbench stands in for the comparator/multiplexer (it returns
// max(|dx|,|dy|) itself) and for the line increment part and buffer (it
// drives a pixel stream and the stored depth Zb one clock later). Checked:
//  - dx, dy, dz and |dx|, |dy| of the worked examples and of random lines,
//    formed in the start clock; later changes of the vertex inputs are ignored
//  - load_o in the start clock only, then enable_o for exactly
//    Length+1 clocks (integer part of Length), done_o two clocks after the
//    last pixel leaves the line increment part, busy_o in between
//  - no start is taken while the buffer initialises
//  - we_o = valid & on-screen & z < Zb, with the right address, z and intensity
module tb_dda_control;
  import dda_pkg::*;

  logic    clk = 0, rst_n = 0;
  logic    start = 0;
  logic [7:0] inten = '0;
  vertex_t v1 = '0, v2 = '0;
  logic    busy, done;
  diff_t   dx, dy, dz;
  mag_t    adx, ady, len;
  vertex_t v1o;
  logic    load, enable;
  logic    pv = 0, inr = 0, bbusy = 0;
  pix_t    zo = '0;
  logic [13:0] addr = '0;
  logic [7:0]  zb = '0;
  logic    we, zpass, zfail;
  logic [13:0] waddr;
  logic [7:0]  wi, wz;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // stand-in for the comparator/multiplexer
  assign len = (ady > adx) ? ady : adx;

  dda_control dut (
    .clk, .rst_n, .start_i(start), .intensity_i(inten), .v1_i(v1), .v2_i(v2),
    .busy_o(busy), .done_o(done),
    .dx_o(dx), .dy_o(dy), .dz_o(dz), .abs_dx_o(adx), .abs_dy_o(ady), .length_i(len),
    .v1_o(v1o), .load_o(load), .enable_o(enable),
    .pix_valid_i(pv), .zo_i(zo), .addr_i(addr), .in_range_i(inr),
    .buf_busy_i(bbusy), .zb_i(zb),
    .we_o(we), .waddr_o(waddr), .wintensity_o(wi), .wz_o(wz),
    .zpass_o(zpass), .zfail_o(zfail));

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // one line; the pixel stream is random and only exercises the depth test
  task automatic line(input vertex_t a, input vertex_t b, input logic [7:0] i);
    int edx, edy, edz, steps, n_en, n_load, cyc, last_en, done_at;
    logic p_valid, p_inr;
    logic [7:0] p_z;
    logic [13:0] p_addr;
    edx = int'(b.x) - int'(a.x);
    edy = int'(b.y) - int'(a.y);
    edz = int'(b.z) - int'(a.z);
    steps = ((edx < 0 ? -edx : edx) > (edy < 0 ? -edy : edy) ? (edx < 0 ? -edx : edx)
                                                             : (edy < 0 ? -edy : edy)) / 256;
    @(negedge clk);
    v1 = a; v2 = b; inten = i; start = 1;
    #1;
    // start clock: differences, magnitudes and load are combinational
    chk(load && !enable && !busy, "load in the start clock");
    chk(int'(dx) == edx && int'(dy) == edy && int'(dz) == edz,
        $sformatf("differences %0d %0d %0d", dx, dy, dz));
    chk(int'(adx) == (edx < 0 ? -edx : edx) && int'(ady) == (edy < 0 ? -edy : edy), "magnitudes");
    chk(v1o == a, "first vertex passed to the line increment part");
    @(negedge clk);
    // the vertices need to be valid only in the start clock
    start = 0; v1 = vertex_t'({$urandom, $urandom}); v2 = vertex_t'({$urandom, $urandom}); inten = 8'($urandom);
    chk(busy, "busy after start");
    n_en = 0; n_load = 0; cyc = 0; last_en = -1; done_at = -1;
    p_valid = 0; p_inr = 0; p_z = '0; p_addr = '0;
    while (done_at < 0 && cyc < 400) begin
      // outputs of this cycle
      if (load) n_load++;
      if (enable) begin
        n_en++;
        last_en = cyc;
      end
      if (done) done_at = cyc;
      // depth test of the pixel presented last cycle, Zb arrives now
      zb = 8'($urandom);
      #1;
      chk(we == (p_valid && p_inr && p_z < zb), "we = valid & on screen & z < Zb");
      chk(zfail == (p_valid && p_inr && !(p_z < zb)), "zfail");
      chk(zpass == we, "zpass");
      if (we) chk(waddr == p_addr && wz == p_z && wi == i, "write data");
      // next pixel
      p_valid = $urandom_range(0, 3) != 0;
      p_inr   = $urandom_range(0, 5) != 0;
      p_z     = 8'($urandom);
      p_addr  = 14'($urandom);
      pv = p_valid; inr = p_inr; zo = p_z; addr = p_addr;
      @(negedge clk);
      cyc++;
    end
    pv = 0;
    chk(n_load == 0, $sformatf("extra load cycles %0d", n_load));
    chk(n_en == steps + 1, $sformatf("enable cycles %0d expected %0d", n_en, steps + 1));
    chk(done_at == last_en + 3, $sformatf("done at %0d, last enable at %0d", done_at, last_en));
    chk(!busy, "idle after done");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    line('{x:16'h0100, y:16'h0100, z:16'h0000}, '{x:16'h0f00, y:16'h0a00, z:16'h0400}, 8'h55);
    line('{x:16'h0100, y:16'h0f00, z:16'h0000}, '{x:16'h0500, y:16'h0500, z:16'h0500}, 8'h77);
    line('{x:16'h2000, y:16'h2000, z:16'h1000}, '{x:16'h2000, y:16'h2000, z:16'h9000}, 8'h11);
    // start held while the buffer initialises is not taken
    @(negedge clk);
    bbusy = 1; start = 1;
    repeat (5) begin
      @(negedge clk);
      chk(!busy && !load, "no start during buffer initialisation");
    end
    start = 0; bbusy = 0;
    for (int k = 0; k < 40; k++) begin
      vertex_t a, b;
      a = '{x:16'($urandom_range(0, 160) << 8), y:16'($urandom_range(0, 160) << 8), z:16'($urandom)};
      b = '{x:16'($urandom_range(0, 160) << 8), y:16'($urandom_range(0, 160) << 8), z:16'($urandom)};
      if (k % 4 == 0) begin
        a.x = 16'($urandom); b.y = 16'($urandom);
      end
      line(a, b, 8'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

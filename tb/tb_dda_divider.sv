// tb_dda_divider: increments d/Length in signed 8.8, rounded to nearest.
// Checks the increments printed for the two worked examples of the design,
// then random differences against round(|d| * 256 / Length) computed in
// real arithmetic (sign applied afterwards, result modulo 2^16).
module tb_dda_divider;
  logic signed [16:0] d;
  logic        [16:0] len;
  logic signed [15:0] q;
  int checks = 0, failures = 0;

  dda_divider #(.D_W(17), .FRAC_W(8), .Q_W(16)) dut (.diff_i(d), .length_i(len), .inc_o(q));

  task automatic check(input int dv, input int lv, input logic [15:0] exp);
    d = 17'(dv); len = 17'(lv);
    #1;
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %0d / %0d: got %h expected %h", dv, lv, q, exp);
    end
  endtask

  function automatic logic [15:0] model(input int dv, input int lv);
    real m;
    longint r;
    if (lv == 0) return 16'h0;
    m = $floor((dv < 0 ? -real'(dv) : real'(dv)) * 256.0 / real'(lv) + 0.5);
    r = longint'(m);
    if (dv < 0) r = -r;
    return 16'(r);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // example 1: dx=0e.00 dy=09.00 dz=04.00, Length=0e.00
    check(32'h0e00, 32'h0e00, 16'h0100);
    check(32'h0900, 32'h0e00, 16'h00a5);
    check(32'h0400, 32'h0e00, 16'h0049);
    // example 2: dx=04.00 dy=-0a.00 dz=05.00, Length=0a.00
    check(32'h0400, 32'h0a00, 16'h0066);
    check(-32'h0a00, 32'h0a00, 16'hff00);
    check(32'h0500, 32'h0a00, 16'h0080);
    // zero length
    check(32'h0300, 0, 16'h0000);
    for (int i = 0; i < 20000; i++) begin
      int lv, dv;
      lv = $urandom_range(1, 65535);
      if (i % 3 == 0) lv = 256 * $urandom_range(1, 255);   // integer lengths
      if (i % 2 == 0) dv = $urandom_range(0, lv);           // |d| <= Length (x, y)
      else            dv = $urandom_range(0, 65535);        // any (z)
      if ($urandom_range(0, 1) == 1) dv = -dv;
      check(dv, lv, model(dv, lv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dda_length_select: the comparator/multiplexer must return
// max(|dx|, |dy|) and flag |dy| > |dx|; ties choose |dx|.
module tb_dda_length_select;
  logic [16:0] ax, ay, len;
  logic        ymaj;
  int checks = 0, failures = 0;

  dda_length_select #(.W(17)) dut (.abs_dx_i(ax), .abs_dy_i(ay), .length_o(len), .y_major_o(ymaj));

  task automatic check(input logic [16:0] a, input logic [16:0] b);
    logic [16:0] exp_len;
    logic        exp_y;
    ax = a; ay = b;
    #1;
    exp_y   = (int'(b) > int'(a));
    exp_len = exp_y ? b : a;
    checks++;
    if (len !== exp_len || ymaj !== exp_y) begin
      failures++;
      $display("FAIL |dx|=%h |dy|=%h: len=%h ymaj=%b", a, b, len, ymaj);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(17'h00e00, 17'h00900);   // example 1: Length = 0e.00h, x major
    check(17'h00400, 17'h00a00);   // example 2: Length = 0a.00h, y major
    check(17'h00500, 17'h00500);   // tie
    check(17'h0, 17'h0);
    check(17'h0ffff, 17'h00001);
    for (int i = 0; i < 20000; i++)
      check(17'($urandom_range(0, 65535)), 17'($urandom_range(0, 65535)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

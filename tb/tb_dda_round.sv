// tb_dda_round: exhaustive check of the 8.8 rounding operation.
// Every 16-bit input is compared with floor(value + 0.5) worked out in real
// arithmetic, plus the rounded values of the design's worked examples.
module tb_dda_round;
  logic [15:0] v;
  logic [7:0]  r;
  int checks = 0, failures = 0;

  dda_round #(.INT_W(8), .FRAC_W(8)) dut (.value_i(v), .round_o(r));

  task automatic expect_round(input logic [15:0] val, input int exp);
    v = val;
    #1;
    checks++;
    if (r !== 8'(exp)) begin
      failures++;
      $display("FAIL round(%h) = %0d, expected %0d", val, r, exp);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked examples: 01.a5h -> 2, 00.49h -> 0, 00.80h -> 1, 01.66h -> 1, 02.32h -> 2
    expect_round(16'h01a5, 2);
    expect_round(16'h0049, 0);
    expect_round(16'h0080, 1);
    expect_round(16'h0166, 1);
    expect_round(16'h0232, 2);
    expect_round(16'h0e00, 14);
    for (int i = 0; i < 65536; i++) begin
      real x;
      x = real'(i) / 256.0;
      expect_round(16'(i), int'($floor(x + 0.5)) % 256);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

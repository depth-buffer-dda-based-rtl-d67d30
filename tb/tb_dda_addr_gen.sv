// tb_dda_addr_gen: exhaustive check of the pixel address y*128 + x and the
// on-screen flag (x < 128 and y < 128) over all 8-bit x and y.
module tb_dda_addr_gen;
  logic [7:0]  x, y;
  logic [13:0] a;
  logic        ok;
  int checks = 0, failures = 0;

  dda_addr_gen #(.PIX_W(8), .XRES_LOG2(7), .YRES_LOG2(7)) dut (
    .xo_i(x), .yo_i(y), .addr_o(a), .in_range_o(ok));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int yi = 0; yi < 256; yi++)
      for (int xi = 0; xi < 256; xi++) begin
        x = 8'(xi); y = 8'(yi);
        #1;
        checks++;
        if (ok !== (xi < 128 && yi < 128) ||
            ((xi < 128 && yi < 128) && a !== 14'(yi * 128 + xi))) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d y=%0d addr=%0d ok=%b", xi, yi, a, ok);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

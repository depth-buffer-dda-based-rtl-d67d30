// tb_depth_buffer: initialisation sweep, write port, read port.
//  - clear sets every word to {background, ff}; busy lasts exactly 16384 clocks
//  - writes issued during the sweep are ignored
//  - written words read back one clock after the address
//  - a read in the cycle of a write to the same address returns the old word
module tb_depth_buffer;
  logic        clk = 0, rst_n = 0;
  logic        clear = 0, busy;
  logic [7:0]  bg = 8'h00;
  logic        we = 0;
  logic [13:0] waddr = '0, raddr = '0;
  logic [7:0]  wi = '0, wz = '0, ri, rz;
  logic [15:0] model [16384];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  depth_buffer #(.ADDR_W(14), .I_W(8), .Z_W(8)) dut (
    .clk, .rst_n, .clear_i(clear), .bg_intensity_i(bg), .busy_o(busy),
    .we_i(we), .waddr_i(waddr), .wintensity_i(wi), .wz_i(wz),
    .raddr_i(raddr), .rintensity_o(ri), .rz_o(rz));

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic read_all();
    for (int a = 0; a < 16384; a++) begin
      @(negedge clk);
      raddr = 14'(a);
      @(negedge clk);
      chk({ri, rz} == model[a], $sformatf("word %0d = %h expected %h", a, {ri, rz}, model[a]));
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // clear with background 0x3c
    bg = 8'h3c; clear = 1;
    @(negedge clk);
    clear = 0; bg = 8'h00;
    cyc = 0;
    // a write during the sweep must be ignored
    we = 1; waddr = 14'd5; wi = 8'haa; wz = 8'h01;
    @(negedge clk);
    we = 0;
    cyc = 1;
    while (busy) begin
      @(negedge clk);
      cyc++;
    end
    chk(cyc == 16384, $sformatf("sweep took %0d clocks", cyc));
    for (int a = 0; a < 16384; a++) model[a] = 16'h3cff;
    read_all();
    // random writes
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1; waddr = 14'($urandom); wi = 8'($urandom); wz = 8'($urandom);
      model[waddr] = {wi, wz};
    end
    @(negedge clk);
    we = 0;
    // read during write to the same address returns the old word
    raddr = 14'd77; we = 1; waddr = 14'd77; wi = 8'h12; wz = 8'h34;
    @(negedge clk);
    we = 0;
    chk({ri, rz} == model[77], "read-before-write");
    model[77] = 16'h1234;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

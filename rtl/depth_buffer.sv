// depth_buffer: the (intensity, z) frame memory of the 3D-DDA.
//
// DEPTH = 2^ADDR_W words (128 x 128 = 16384 by default) of one intensity byte
// and one depth byte, the size of the design's buffer (two bytes per pixel,
// 16 block RAMs of 2 KiB). The memory has one write port and one registered
// read port: the read port serves the depth test (read Zb of the pixel) and,
// when the scan converter is idle, the display or host; the write port takes
// the pixels that pass the depth test. A read returns the word as it was
// before a write to the same address in the same cycle.
//
// A one-cycle pulse on clear_i starts the initialisation sweep of the depth
// buffer algorithm: every word is set to {bg_intensity_i, maximum depth}, one
// word per clock, while busy_o is high (DEPTH cycles). Writes on the write
// port are ignored during the sweep. The sweep and its interface are this
// design's choice; the algorithm only requires the initial contents.
module depth_buffer #(
  parameter int unsigned ADDR_W = 14,
  parameter int unsigned I_W    = 8,
  parameter int unsigned Z_W    = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // initialisation
  input  logic              clear_i,
  input  logic [I_W-1:0]    bg_intensity_i,
  output logic              busy_o,
  // write port
  input  logic              we_i,
  input  logic [ADDR_W-1:0] waddr_i,
  input  logic [I_W-1:0]    wintensity_i,
  input  logic [Z_W-1:0]    wz_i,
  // read port, data one clock after the address
  input  logic [ADDR_W-1:0] raddr_i,
  output logic [I_W-1:0]    rintensity_o,
  output logic [Z_W-1:0]    rz_o
);

  localparam int unsigned W = I_W + Z_W;

  logic [W-1:0]      mem [2**ADDR_W];
  logic [ADDR_W-1:0] clr_addr;
  logic [I_W-1:0]    clr_bg;
  logic              clr_busy;

  logic              mem_we;
  logic [ADDR_W-1:0] mem_waddr;
  logic [W-1:0]      mem_wdata;
  logic [W-1:0]      rdata;

  // sweep counter
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clr_busy <= 1'b0;
      clr_addr <= '0;
      clr_bg   <= '0;
    end else if (!clr_busy) begin
      if (clear_i) begin
        clr_busy <= 1'b1;
        clr_addr <= '0;
        clr_bg   <= bg_intensity_i;
      end
    end else begin
      clr_addr <= clr_addr + 1'b1;
      if (clr_addr == '1)
        clr_busy <= 1'b0;
    end
  end

  always_comb begin
    if (clr_busy) begin
      mem_we    = 1'b1;
      mem_waddr = clr_addr;
      mem_wdata = {clr_bg, {Z_W{1'b1}}};
    end else begin
      mem_we    = we_i;
      mem_waddr = waddr_i;
      mem_wdata = {wintensity_i, wz_i};
    end
  end

  always_ff @(posedge clk) begin
    if (mem_we)
      mem[mem_waddr] <= mem_wdata;
    rdata <= mem[raddr_i];
  end

  assign busy_o       = clr_busy;
  assign rintensity_o = rdata[W-1:Z_W];
  assign rz_o         = rdata[Z_W-1:0];

endmodule

// dda_addr_gen: shifter and adder that form the depth buffer address.
//
// address = (yo << XRES_LOG2) + xo, i.e. row-major order with 2^XRES_LOG2
// pixels per row (128 by default). in_range_o is high only when the pixel lies
// on the 2^XRES_LOG2 x 2^YRES_LOG2 screen; the depth test writes nothing for a
// pixel outside it, so an off-screen pixel can never overwrite another one.
// Purely combinational.
module dda_addr_gen #(
  parameter int unsigned PIX_W     = 8,
  parameter int unsigned XRES_LOG2 = 7,
  parameter int unsigned YRES_LOG2 = 7
) (
  input  logic [PIX_W-1:0]               xo_i,
  input  logic [PIX_W-1:0]               yo_i,
  output logic [XRES_LOG2+YRES_LOG2-1:0] addr_o,
  output logic                           in_range_o
);

  localparam int unsigned A_W = XRES_LOG2 + YRES_LOG2;

  logic [A_W-1:0] row_base;

  always_comb begin
    row_base   = A_W'(yo_i) << XRES_LOG2;          // shifter
    addr_o     = row_base + A_W'(xo_i);            // adder
    in_range_o = ((xo_i >> XRES_LOG2) == '0) && ((yo_i >> YRES_LOG2) == '0);
  end

endmodule

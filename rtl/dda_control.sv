// dda_control: control unit of the 3D-DDA scan converter.
//
// Sequence for one line segment:
//   IDLE    The subtractors form dx, dy, dz (signed, 17 bits) and |dx|, |dy|
//           combinationally from the vertex inputs; the comparator/multiplexer
//           and the three dividers outside this module turn them into Length
//           and the increments within the same clock. When start_i is high
//           and the depth buffer is not initialising, load_o stores the first
//           vertex and the increments in the line increment part, and the
//           intensity and the step count (integer part of Length) are
//           latched here. This is the single setup clock of the unit; the
//           vertex inputs need to be valid only in that clock.
//   RUN     enable_o is high for Length+1 clocks: one pixel per clock, from
//           the first vertex through the second one inclusive.
//   DRAIN   two clocks for the last pixel's depth test; done_o pulses as the
//           unit returns to IDLE. A new line can start in the cycle done_o
//           is high.
//
// Depth test (two-stage pipeline): a pixel from the line increment part
// arrives with its buffer address, which the top feeds to the read port of
// the depth buffer. One clock later the stored depth Zb is on zb_i; the pixel
// is written (we_o) with the line's intensity and its own z only when
// z < Zb and the pixel lies on the screen. Pixels of one line always have
// distinct addresses because the major coordinate steps by one, so a read
// never needs data written by the pixel just before it; between lines the
// DRAIN clocks and the setup clock separate the last write from the next read.
//
// The data flow (differences and magnitudes out, Length in, enable out, Zb
// in, WE out) follows the block diagram of the unit; the state encoding, the
// DRAIN phase and the start/done handshake are this design's choices. The
// fraction bits of Length are not needed: the step count is its integer part.
module dda_control
  import dda_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // command
  input  logic             start_i,
  input  logic [I_W-1:0]   intensity_i,
  input  vertex_t          v1_i,
  input  vertex_t          v2_i,
  output logic             busy_o,      // a line is being converted
  output logic             done_o,      // one-cycle pulse: line finished
  // to the comparator/multiplexer and dividers
  output diff_t            dx_o,
  output diff_t            dy_o,
  output diff_t            dz_o,
  output mag_t             abs_dx_o,
  output mag_t             abs_dy_o,
  input  mag_t             length_i,
  // to the line increment part
  output vertex_t          v1_o,
  output logic             load_o,
  output logic             enable_o,
  // pixel from the line increment part and address generator
  input  logic             pix_valid_i,
  input  pix_t             zo_i,
  input  logic [ADDR_W-1:0] addr_i,
  input  logic             in_range_i,
  // depth buffer
  input  logic             buf_busy_i,  // initialisation sweep running
  input  logic [Z_W-1:0]   zb_i,        // stored depth, one clock after addr_i
  output logic             we_o,
  output logic [ADDR_W-1:0] waddr_o,
  output logic [I_W-1:0]   wintensity_o,
  output logic [Z_W-1:0]   wz_o,
  // events, one-cycle pulses
  output logic             zpass_o,     // pixel written
  output logic             zfail_o      // pixel hidden by a nearer one
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;

  state_t         state;
  diff_t          dx, dy, dz;
  logic [I_W-1:0] intensity;
  logic [INT_W:0] steps;      // integer part of Length
  logic [INT_W:0] count;
  logic           drain_cnt;

  // depth test stage
  logic              s_valid;
  logic [ADDR_W-1:0] s_addr;
  logic [Z_W-1:0]    s_z;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      intensity <= '0;
      steps     <= '0;
      count     <= '0;
      drain_cnt <= 1'b0;
      done_o    <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start_i && !buf_busy_i) begin
            intensity <= intensity_i;
            steps     <= length_i[DIFF_W-1:FRAC_W];
            count     <= '0;
            state     <= S_RUN;
          end
        end
        S_RUN: begin
          count <= count + 1'b1;
          if (count == steps) begin
            drain_cnt <= 1'b0;
            state     <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          drain_cnt <= 1'b1;
          if (drain_cnt) begin
            done_o <= 1'b1;
            state  <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // subtractors and absolute values
  always_comb begin
    dx       = diff_t'({1'b0, v2_i.x}) - diff_t'({1'b0, v1_i.x});
    dy       = diff_t'({1'b0, v2_i.y}) - diff_t'({1'b0, v1_i.y});
    dz       = diff_t'({1'b0, v2_i.z}) - diff_t'({1'b0, v1_i.z});
    dx_o     = dx;
    dy_o     = dy;
    dz_o     = dz;
    abs_dx_o = dx[DIFF_W-1] ? mag_t'(-dx) : mag_t'(dx);
    abs_dy_o = dy[DIFF_W-1] ? mag_t'(-dy) : mag_t'(dy);
    v1_o     = v1_i;
    load_o   = (state == S_IDLE) && start_i && !buf_busy_i;
    enable_o = (state == S_RUN);
    busy_o   = (state != S_IDLE);
  end

  // depth test pipeline
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_valid <= 1'b0;
      s_addr  <= '0;
      s_z     <= '0;
    end else begin
      s_valid <= pix_valid_i & in_range_i;
      s_addr  <= addr_i;
      s_z     <= zo_i;
    end
  end

  always_comb begin
    we_o         = s_valid && (s_z < zb_i);
    waddr_o      = s_addr;
    wintensity_o = intensity;
    wz_o         = s_z;
    zpass_o      = we_o;
    zfail_o      = s_valid && !(s_z < zb_i);
  end

  // the line increment part is never loaded and enabled together
  a_load_enable: assert property (@(posedge clk) disable iff (!rst_n) !(load_o && enable_o));
  // no start is taken while the buffer initialises
  a_no_start_in_clear: assert property (@(posedge clk) disable iff (!rst_n)
                                        (state == S_IDLE && buf_busy_i) |-> !load_o);

endmodule

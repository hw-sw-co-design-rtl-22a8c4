// skin_threshold: per-pixel skin classifier on the chrominance plane.
//
// A pixel is skin when both chrominance components fall inside a fixed box,
// CR_MIN <= Cr <= CR_MAX and CB_MIN <= Cb <= CB_MAX; the luminance Y is not
// used, which keeps the test insensitive to lighting. Skin pixels become
// 0xFF and background pixels 0x00 in the binary output image. Testing only
// Cr and Cb follows the method; the box limits are this design's defaults
// (the commonly used 133..173 / 77..127) and are parameters.
//
// Interface: valid/ready on both sides, one registered stage; the stage
//   advances when its output is empty or being taken.
// Timing: latency 1 clock, one pixel per clock. Reset (rst_n low,
//   synchronous) clears the valid bit.
module skin_threshold
  import skinseg_pkg::*;
#(
  parameter logic [7:0] CR_MIN = 8'd133,
  parameter logic [7:0] CR_MAX = 8'd173,
  parameter logic [7:0] CB_MIN = 8'd77,
  parameter logic [7:0] CB_MAX = 8'd127
) (
  input  logic       clk,
  input  logic       rst_n,
  input  ycrcb_t     s_ycc,
  input  logic       s_valid,
  output logic       s_ready,
  output logic [7:0] m_bin,
  output logic       m_valid,
  input  logic       m_ready
);

  logic adv, is_skin;

  assign adv     = !m_valid || m_ready;
  assign s_ready = adv;
  assign is_skin = (s_ycc.cr >= CR_MIN) && (s_ycc.cr <= CR_MAX) &&
                   (s_ycc.cb >= CB_MIN) && (s_ycc.cb <= CB_MAX);

  always_ff @(posedge clk) begin
    if (!rst_n)   m_valid <= 1'b0;
    else if (adv) m_valid <= s_valid;
  end

  always_ff @(posedge clk) begin
    if (adv) m_bin <= is_skin ? PIX_SKIN : PIX_BG;
  end

endmodule

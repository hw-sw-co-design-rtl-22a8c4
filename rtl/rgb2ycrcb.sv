// rgb2ycrcb: pipelined RGB to YCrCb colour-space converter.
//
// Converts one 8-bit-per-channel RGB pixel per clock into luminance Y and the
// two chrominance components Cr and Cb, using the BT.601 full-range transform
//   Y  = 0.299 R + 0.587 G + 0.114 B
//   Cr = 0.713 (R - Y) + 128
//   Cb = 0.564 (B - Y) + 128
// in 14-bit fixed point with round-to-nearest and saturation to 0..255
// (constants in skinseg_pkg). The conversion to YCrCb is the first step of
// the skin segmentation; the exact fixed-point form is this design's choice,
// picked to match the integer conversion of common vision software.
//
// Stage 1 computes Y and carries R and B; stage 2 computes Cr and Cb.
// Interface: valid/ready on both sides. The whole pipeline advances when
//   its output is empty or being taken (global stall), so a stall on m_ready
//   holds every stage. Latency 2 clocks, one pixel per clock throughput.
// Reset (rst_n low, synchronous) clears the valid bits.
module rgb2ycrcb
  import skinseg_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  rgb_t   s_rgb,
  input  logic   s_valid,
  output logic   s_ready,
  output ycrcb_t m_ycc,
  output logic   m_valid,
  input  logic   m_ready
);

  localparam int signed ROUND = 1 << (YUV_SHIFT - 1);
  localparam int signed DELTA = 128 << YUV_SHIFT;

  logic       adv;
  logic       v1;
  logic [7:0] y1, r1, b1;

  assign adv     = !m_valid || m_ready;
  assign s_ready = adv;

  // Stage 1 arithmetic: weighted sum of the three channels.
  logic [7:0] y_c;
  always_comb begin
    logic [31:0] acc;
    acc = 32'(C_R2Y) * 32'(s_rgb.r) + 32'(C_G2Y) * 32'(s_rgb.g)
        + 32'(C_B2Y) * 32'(s_rgb.b) + 32'(ROUND);
    y_c = acc[YUV_SHIFT +: 8];  // the weights sum to 2^14, so Y <= 255
  end

  // Stage 2 arithmetic: scaled colour differences, offset and saturated.
  function automatic logic [7:0] chroma(input logic [7:0] c, input logic [7:0] y,
                                        input int signed coef);
    int signed diff, acc, q;
    diff = int'(c) - int'(y);
    acc  = diff * coef + DELTA + ROUND;
    q    = acc >>> YUV_SHIFT;
    if (q < 0)        return 8'd0;
    else if (q > 255) return 8'd255;
    else              return q[7:0];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1      <= 1'b0;
      m_valid <= 1'b0;
    end else if (adv) begin
      v1      <= s_valid;
      m_valid <= v1;
    end
  end

  always_ff @(posedge clk) begin
    if (adv) begin
      y1       <= y_c;
      r1       <= s_rgb.r;
      b1       <= s_rgb.b;
      m_ycc.y  <= y1;
      m_ycc.cr <= chroma(r1, y1, int'(C_CR));
      m_ycc.cb <= chroma(b1, y1, int'(C_CB));
    end
  end

endmodule

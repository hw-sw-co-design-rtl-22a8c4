// skinseg_pkg: types and constants shared by the skin segmentation accelerator.
//
// Pixels travel as packed structs: an RGB input pixel (8 bits per channel)
// and its YCrCb form. The colour conversion uses the ITU-R BT.601 full-range
// transform in 14-bit fixed point (the coefficients below are the real
// coefficients times 2^14, rounded), which is the integer form used by
// common software libraries, so the hardware result matches a software
// reference bit for bit. The control register offsets follow the usual
// block-level layout of a 32-byte AXI4-Lite control window.
//
// Converting to YCrCb and a 32-byte, 32-bit control window follow the
// published design; the fixed-point form, the output pixel values and the
// register layout are this design's choices.
package skinseg_pkg;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  typedef struct packed {
    logic [7:0] y;
    logic [7:0] cr;
    logic [7:0] cb;
  } ycrcb_t;

  // Fixed-point colour conversion, scale 2^YUV_SHIFT.
  localparam int unsigned YUV_SHIFT = 14;
  localparam int unsigned C_R2Y = 4899;   // 0.299 * 2^14
  localparam int unsigned C_G2Y = 9617;   // 0.587 * 2^14
  localparam int unsigned C_B2Y = 1868;   // 0.114 * 2^14
  localparam int unsigned C_CR  = 11682;  // 0.713 * 2^14
  localparam int unsigned C_CB  = 9241;   // 0.564 * 2^14

  // Output pixel values of the binary image.
  localparam logic [7:0] PIX_SKIN = 8'hFF;
  localparam logic [7:0] PIX_BG   = 8'h00;

  // AXI4-Lite control register byte offsets.
  localparam logic [4:0] REG_CTRL = 5'h00;  // [0] ap_start [1] ap_done [2] ap_idle [3] ap_ready [7] auto_restart
  localparam logic [4:0] REG_GIE  = 5'h04;  // [0] global interrupt enable
  localparam logic [4:0] REG_IER  = 5'h08;  // [0] done irq enable [1] ready irq enable
  localparam logic [4:0] REG_ISR  = 5'h0C;  // [0] done irq status [1] ready irq status (write 1 to toggle)
  localparam logic [4:0] REG_ROWS = 5'h10;  // frame height in lines
  localparam logic [4:0] REG_COLS = 5'h18;  // frame width in pixels

  localparam logic [1:0] AXI_RESP_OKAY = 2'b00;

endpackage

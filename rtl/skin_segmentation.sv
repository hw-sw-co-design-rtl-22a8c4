// skin_segmentation: streaming skin segmentation accelerator (top level).
//
// Finds the skin-coloured pixels of a video frame so that later software
// steps (face contour, eye detection, eye-closure statistics for a driver
// drowsiness monitor) only search the face region. A video DMA reads the
// captured RGB frame from memory and streams it in; every pixel is converted
// to YCrCb and classified as skin (0xFF) or background (0x00) from its two
// chrominance components; the binary frame streams back out to the DMA,
// which writes it to memory for the software.
//
// The frame is never stored: the three tasks run as a dataflow pipeline
// connected by small FIFO channels,
//   axivideo2mat -> stream_fifo -> rgb2ycrcb -> skin_threshold
//                -> stream_fifo -> mat2axivideo
// and skinseg_ctrl is the AXI4-Lite register block the processor uses to
// set the frame size, start a frame and take the done interrupt.
//
// Interface: ap_clk / ap_rst_n (active low, synchronous); s_axi_control_*
//   AXI4-Lite slave (5-bit address, 32-bit data); interrupt (level);
//   s_axis_video_* RGB input stream (TDATA = {R,G,B}, TUSER = start of
//   frame, TLAST = end of line); m_axis_video_* binary output stream with
//   the same framing and 8-bit TDATA.
// Timing: one pixel per clock in steady state; a pixel leaves 6 clocks
//   after it enters when nothing stalls (2 FIFOs, 2 conversion stages, the
//   classifier and the output register). Backpressure on the output stream
//   stalls the whole pipeline back to the input stream.
// The structure (stream in, colour conversion, chrominance test, stream out,
// DMA and register control, interrupt) follows the document; the pipeline
// depths, FIFO depths, register layout and skin bounds are this design's.
module skin_segmentation
  import skinseg_pkg::*;
#(
  parameter int unsigned DIM_W          = 12,
  parameter int unsigned IN_FIFO_DEPTH  = 2,
  parameter int unsigned OUT_FIFO_DEPTH = 2,
  parameter logic [7:0]  CR_MIN         = 8'd133,
  parameter logic [7:0]  CR_MAX         = 8'd173,
  parameter logic [7:0]  CB_MIN         = 8'd77,
  parameter logic [7:0]  CB_MAX         = 8'd127,
  parameter int unsigned DEF_ROWS       = 450,
  parameter int unsigned DEF_COLS       = 750
) (
  input  logic        ap_clk,
  input  logic        ap_rst_n,
  // AXI4-Lite control
  input  logic [4:0]  s_axi_control_awaddr,
  input  logic        s_axi_control_awvalid,
  output logic        s_axi_control_awready,
  input  logic [31:0] s_axi_control_wdata,
  input  logic [3:0]  s_axi_control_wstrb,
  input  logic        s_axi_control_wvalid,
  output logic        s_axi_control_wready,
  output logic [1:0]  s_axi_control_bresp,
  output logic        s_axi_control_bvalid,
  input  logic        s_axi_control_bready,
  input  logic [4:0]  s_axi_control_araddr,
  input  logic        s_axi_control_arvalid,
  output logic        s_axi_control_arready,
  output logic [31:0] s_axi_control_rdata,
  output logic [1:0]  s_axi_control_rresp,
  output logic        s_axi_control_rvalid,
  input  logic        s_axi_control_rready,
  output logic        interrupt,
  // RGB video in
  input  logic [23:0] s_axis_video_tdata,
  input  logic        s_axis_video_tvalid,
  output logic        s_axis_video_tready,
  input  logic        s_axis_video_tuser,
  input  logic        s_axis_video_tlast,
  // binary video out
  output logic [7:0]  m_axis_video_tdata,
  output logic        m_axis_video_tvalid,
  input  logic        m_axis_video_tready,
  output logic        m_axis_video_tuser,
  output logic        m_axis_video_tlast
);

  logic             frame_start, in_done, out_done;
  logic [DIM_W-1:0] rows, cols;
  logic             in_busy, out_busy;
  logic             ev_sof_skip, ev_eol_early, ev_eol_late;

  rgb_t       rd_pix;
  logic       rd_valid, rd_ready;
  logic [23:0] f1_data;
  logic       f1_valid, f1_ready;
  ycrcb_t     cv_ycc;
  logic       cv_valid, cv_ready;
  logic [7:0] th_bin;
  logic       th_valid, th_ready;
  logic [7:0] f2_data;
  logic       f2_valid, f2_ready;
  logic [$clog2(IN_FIFO_DEPTH+1)-1:0]  f1_count;
  logic [$clog2(OUT_FIFO_DEPTH+1)-1:0] f2_count;

  skinseg_ctrl #(
    .ADDR_W(5), .DATA_W(32), .DIM_W(DIM_W), .DEF_ROWS(DEF_ROWS), .DEF_COLS(DEF_COLS)
  ) u_ctrl (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .s_axi_awaddr (s_axi_control_awaddr),  .s_axi_awvalid(s_axi_control_awvalid),
    .s_axi_awready(s_axi_control_awready), .s_axi_wdata  (s_axi_control_wdata),
    .s_axi_wstrb  (s_axi_control_wstrb),   .s_axi_wvalid (s_axi_control_wvalid),
    .s_axi_wready (s_axi_control_wready),  .s_axi_bresp  (s_axi_control_bresp),
    .s_axi_bvalid (s_axi_control_bvalid),  .s_axi_bready (s_axi_control_bready),
    .s_axi_araddr (s_axi_control_araddr),  .s_axi_arvalid(s_axi_control_arvalid),
    .s_axi_arready(s_axi_control_arready), .s_axi_rdata  (s_axi_control_rdata),
    .s_axi_rresp  (s_axi_control_rresp),   .s_axi_rvalid (s_axi_control_rvalid),
    .s_axi_rready (s_axi_control_rready),
    .interrupt(interrupt), .frame_start(frame_start), .rows(rows), .cols(cols),
    .in_done(in_done), .out_done(out_done)
  );

  axivideo2mat #(.DIM_W(DIM_W)) u_in (
    .clk(ap_clk), .rst_n(ap_rst_n), .start(frame_start), .rows(rows), .cols(cols),
    .s_tdata(s_axis_video_tdata), .s_tvalid(s_axis_video_tvalid),
    .s_tready(s_axis_video_tready), .s_tuser(s_axis_video_tuser),
    .s_tlast(s_axis_video_tlast),
    .m_pix(rd_pix), .m_valid(rd_valid), .m_ready(rd_ready),
    .busy(in_busy), .done(in_done),
    .ev_sof_skip(ev_sof_skip), .ev_eol_early(ev_eol_early), .ev_eol_late(ev_eol_late)
  );

  stream_fifo #(.WIDTH(24), .DEPTH(IN_FIFO_DEPTH)) u_fifo_in (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .s_data(rd_pix), .s_valid(rd_valid), .s_ready(rd_ready),
    .m_data(f1_data), .m_valid(f1_valid), .m_ready(f1_ready), .count(f1_count)
  );

  rgb2ycrcb u_conv (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .s_rgb(rgb_t'(f1_data)), .s_valid(f1_valid), .s_ready(f1_ready),
    .m_ycc(cv_ycc), .m_valid(cv_valid), .m_ready(cv_ready)
  );

  skin_threshold #(
    .CR_MIN(CR_MIN), .CR_MAX(CR_MAX), .CB_MIN(CB_MIN), .CB_MAX(CB_MAX)
  ) u_thr (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .s_ycc(cv_ycc), .s_valid(cv_valid), .s_ready(cv_ready),
    .m_bin(th_bin), .m_valid(th_valid), .m_ready(th_ready)
  );

  stream_fifo #(.WIDTH(8), .DEPTH(OUT_FIFO_DEPTH)) u_fifo_out (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .s_data(th_bin), .s_valid(th_valid), .s_ready(th_ready),
    .m_data(f2_data), .m_valid(f2_valid), .m_ready(f2_ready), .count(f2_count)
  );

  mat2axivideo #(.DIM_W(DIM_W), .DATA_W(8)) u_out (
    .clk(ap_clk), .rst_n(ap_rst_n), .start(frame_start), .rows(rows), .cols(cols),
    .s_data(f2_data), .s_valid(f2_valid), .s_ready(f2_ready),
    .m_tdata(m_axis_video_tdata), .m_tvalid(m_axis_video_tvalid),
    .m_tready(m_axis_video_tready), .m_tuser(m_axis_video_tuser),
    .m_tlast(m_axis_video_tlast), .busy(out_busy), .done(out_done)
  );

endmodule

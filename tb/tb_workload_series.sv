// tb_workload_series: a series of full-size frames through the accelerator.
//
// Runs three different 750 x 450 RGB frames back to back under auto_restart,
// the way continuous video is processed, at the default parameters and with
// the source and sink always ready. Every output pixel is compared with the
// reference model. The frames must follow each other with at most a couple of
// idle clocks: the whole series must finish within 3 x (750 x 450 + 8)
// clocks of the first start.
module tb_workload_series;
  import skinseg_pkg::*;
  import skinseg_ref_pkg::*;

  localparam int ROWS = 450, COLS = 750, FRAMES = 3;

  logic ap_clk = 0, ap_rst_n = 0;
  logic [4:0]  s_axi_control_awaddr, s_axi_control_araddr;
  logic        s_axi_control_awvalid, s_axi_control_awready, s_axi_control_wvalid, s_axi_control_wready;
  logic [31:0] s_axi_control_wdata, s_axi_control_rdata;
  logic [3:0]  s_axi_control_wstrb;
  logic [1:0]  s_axi_control_bresp, s_axi_control_rresp;
  logic        s_axi_control_bvalid, s_axi_control_bready, s_axi_control_arvalid;
  logic        s_axi_control_arready, s_axi_control_rvalid, s_axi_control_rready;
  logic        interrupt;
  logic [23:0] s_axis_video_tdata;
  logic        s_axis_video_tvalid, s_axis_video_tready, s_axis_video_tuser, s_axis_video_tlast;
  logic [7:0]  m_axis_video_tdata;
  logic        m_axis_video_tvalid, m_axis_video_tready, m_axis_video_tuser, m_axis_video_tlast;

  skin_segmentation dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int src_f = 0, src_r = 0, src_c = 0;     // source position
  int snk_f = 0, snk_r = 0, snk_c = 0;     // sink position
  int n_skin = 0, t_first_start = -1, t_last_done = 0, n_done = 0;

  always #5 ap_clk = ~ap_clk;
  always @(posedge ap_clk) cycle <= cycle + 1;

  initial begin
    repeat (FRAMES * (ROWS * COLS + 100) + 1000) @(posedge ap_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  // Frame f: the test image shifted down by 60 f lines.
  function automatic logic [23:0] pix(input int f, input int r, input int c);
    return test_pixel((r + 60 * f) % ROWS, c, ROWS, COLS);
  endfunction

  task automatic axil_write(input logic [4:0] a, input logic [31:0] d);
    s_axi_control_awaddr <= a; s_axi_control_awvalid <= 1;
    s_axi_control_wdata <= d; s_axi_control_wvalid <= 1; s_axi_control_wstrb <= 4'hF;
    do @(posedge ap_clk); while (!s_axi_control_awready);
    s_axi_control_awvalid <= 0; s_axi_control_wvalid <= 0; s_axi_control_bready <= 1;
    do @(posedge ap_clk); while (!s_axi_control_bvalid);
    s_axi_control_bready <= 0;
  endtask

  // Source: the frames one after the other, no gaps.
  always @(posedge ap_clk) begin
    if (!ap_rst_n) begin
      s_axis_video_tvalid <= 0; s_axis_video_tdata <= 0; s_axis_video_tuser <= 0; s_axis_video_tlast <= 0;
    end else if (!s_axis_video_tvalid || s_axis_video_tready) begin
      int f, r, c;
      f = src_f; r = src_r; c = src_c;
      if (s_axis_video_tvalid && s_axis_video_tready) begin
        if (c == COLS - 1) begin
          c = 0;
          if (r == ROWS - 1) begin r = 0; f++; end else r++;
        end else c++;
      end
      src_f <= f; src_r <= r; src_c <= c;
      s_axis_video_tvalid <= (f < FRAMES);
      s_axis_video_tdata  <= pix(f, r, c);
      s_axis_video_tuser  <= (r == 0 && c == 0);
      s_axis_video_tlast  <= (c == COLS - 1);
    end
  end

  always @(posedge ap_clk) m_axis_video_tready <= ap_rst_n;

  always @(posedge ap_clk) if (ap_rst_n) begin
    if (m_axis_video_tvalid && m_axis_video_tready) begin
      logic [23:0] p;
      p = pix(snk_f, snk_r, snk_c);
      check(m_axis_video_tdata == ref_bin(int'(p[23:16]), int'(p[15:8]), int'(p[7:0])), "pixel");
      check(m_axis_video_tuser == (snk_r == 0 && snk_c == 0) && m_axis_video_tlast == (snk_c == COLS - 1), "framing");
      if (m_axis_video_tdata == PIX_SKIN) n_skin++;
      if (snk_c == COLS - 1) begin
        snk_c = 0;
        if (snk_r == ROWS - 1) begin snk_r = 0; snk_f++; end else snk_r++;
      end else snk_c++;
    end
    if (dut.frame_start && t_first_start < 0) t_first_start = cycle;
    if (dut.out_done) begin n_done++; t_last_done = cycle; end
  end

  initial begin
    s_axi_control_awvalid = 0; s_axi_control_wvalid = 0; s_axi_control_arvalid = 0;
    s_axi_control_bready = 0; s_axi_control_rready = 0;
    s_axi_control_awaddr = 0; s_axi_control_araddr = 0; s_axi_control_wdata = 0; s_axi_control_wstrb = 0;
    repeat (4) @(posedge ap_clk);
    ap_rst_n <= 1;
    @(posedge ap_clk);
    axil_write(REG_CTRL, 32'h81);           // start, auto_restart
    while (n_done < FRAMES - 1) @(posedge ap_clk);
    axil_write(REG_CTRL, 32'h00);           // let the running frame be the last
    while (n_done < FRAMES) @(posedge ap_clk);
    repeat (20) @(posedge ap_clk);
    check(n_done == FRAMES, "frames completed");
    check(snk_f == FRAMES && snk_r == 0 && snk_c == 0, "all pixels received");
    check(t_last_done - t_first_start <= FRAMES * (ROWS * COLS + 8),
          $sformatf("series took %0d clocks", t_last_done - t_first_start));
    check(n_skin > 0, "skin found");
    $display("frames=%0d clocks=%0d (%0d per frame) skin_pixels=%0d",
             n_done, t_last_done - t_first_start, (t_last_done - t_first_start) / FRAMES, n_skin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

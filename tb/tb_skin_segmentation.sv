// tb_skin_segmentation: end-to-end testbench of the skin segmentation
// accelerator at its default parameters.
//
// A bus-master model programs the AXI4-Lite registers the way a driver
// would; a stream source plays the DMA read channel and a sink the DMA
// write channel. Every output beat is compared with the reference model
// (colour conversion and skin test worked out in floating point) and its
// TUSER/TLAST framing is checked.
//   Part 1, small frames with random source gaps and sink stalls: stray
//   beats before the start of frame, an over-long line, a stray TLAST, a
//   frame with the done interrupt, and back-to-back frames under
//   auto_restart.
//   Part 2, one full 750 x 450 frame (the reset frame size) without stalls:
//   it must run at one pixel per clock, with a 6-clock pipeline latency.
// Each mechanism (stall, gap, start-of-frame skip, early and late end of
// line, full dataflow channel, interrupt, automatic restart) is counted and
// must occur at least once.
module tb_skin_segmentation;
  import skinseg_pkg::*;
  import skinseg_ref_pkg::*;

  typedef struct {logic [23:0] d; bit u; bit l; bit px;} beat_t;

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
  beat_t beats[$];
  logic [7:0] exp_q[$];
  int exp_rows[$], exp_cols[$];
  int bi = 0;
  bit noise = 1;
  int orow = 0, ocol = 0, n_out = 0, n_skin = 0;
  // mechanism counters
  int m_stall = 0, m_gap = 0, m_sof_skip = 0, m_eol_early = 0, m_eol_late = 0;
  int m_fifo_full = 0, m_irq = 0, m_starts = 0, m_done = 0;
  int t_start = 0, t_done = 0, t_first_in = -1, t_first_out = -1;

  always #5 ap_clk = ~ap_clk;
  always @(posedge ap_clk) cycle <= cycle + 1;

  initial begin
    repeat (1500000) @(posedge ap_clk);
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

  // ---------------- AXI4-Lite master ----------------
  task automatic axil_write(input logic [4:0] a, input logic [31:0] d);
    s_axi_control_awaddr <= a; s_axi_control_awvalid <= 1;
    s_axi_control_wdata <= d; s_axi_control_wvalid <= 1; s_axi_control_wstrb <= 4'hF;
    do @(posedge ap_clk); while (!s_axi_control_awready);
    s_axi_control_awvalid <= 0; s_axi_control_wvalid <= 0; s_axi_control_bready <= 1;
    do @(posedge ap_clk); while (!s_axi_control_bvalid);
    s_axi_control_bready <= 0;
  endtask

  task automatic axil_read(input logic [4:0] a, output logic [31:0] d);
    s_axi_control_araddr <= a; s_axi_control_arvalid <= 1;
    do @(posedge ap_clk); while (!s_axi_control_arready);
    s_axi_control_arvalid <= 0; s_axi_control_rready <= 1;
    do @(posedge ap_clk); while (!s_axi_control_rvalid);
    d = s_axi_control_rdata;
    s_axi_control_rready <= 0;
  endtask

  // ---------------- frame construction ----------------
  // kind: 0 clean, 1 stray beats before SOF, 2 over-long line 1,
  //       3 stray TLAST in line 1
  task automatic add_frame(input int rows, input int cols, input int kind);
    if (kind == 1) for (int j = 0; j < 4; j++) beats.push_back('{24'h123456, 1'b0, 1'b0, 1'b0});
    for (int r = 0; r < rows; r++) begin
      for (int c = 0; c < cols; c++) begin
        logic [23:0] p;
        p = test_pixel(r, c, rows, cols);
        beats.push_back('{p, (r == 0 && c == 0), (c == cols - 1 && !(kind == 2 && r == 1)) || (kind == 3 && r == 1 && c == 1), 1'b1});
        exp_q.push_back(ref_bin(int'(p[23:16]), int'(p[15:8]), int'(p[7:0])));
      end
      if (kind == 2 && r == 1) begin
        beats.push_back('{24'hFFFFFF, 1'b0, 1'b0, 1'b0});
        beats.push_back('{24'hFFFFFF, 1'b0, 1'b1, 1'b0});
      end
    end
    exp_rows.push_back(rows);
    exp_cols.push_back(cols);
  endtask

  // ---------------- stream source (DMA read side) ----------------
  always @(posedge ap_clk) begin
    if (!ap_rst_n) begin
      s_axis_video_tvalid <= 0; s_axis_video_tdata <= 0; s_axis_video_tuser <= 0; s_axis_video_tlast <= 0;
    end else if (!s_axis_video_tvalid || s_axis_video_tready) begin
      int nb;
      nb = bi + ((s_axis_video_tvalid && s_axis_video_tready) ? 1 : 0);
      bi <= nb;
      if (nb < beats.size() && (!noise || $urandom_range(0, 4) != 0)) begin
        s_axis_video_tvalid <= 1;
        s_axis_video_tdata <= beats[nb].d;
        s_axis_video_tuser <= beats[nb].u;
        s_axis_video_tlast <= beats[nb].l;
      end else begin
        s_axis_video_tvalid <= 0;
        if (nb < beats.size()) m_gap++;
      end
    end
  end

  // ---------------- stream sink (DMA write side) ----------------
  always @(posedge ap_clk) begin
    if (!ap_rst_n) m_axis_video_tready <= 0;
    else           m_axis_video_tready <= !noise || ($urandom_range(0, 3) != 0);
  end

  always @(posedge ap_clk) if (ap_rst_n) begin
    if (m_axis_video_tvalid && !m_axis_video_tready) m_stall++;
    if (m_axis_video_tvalid && m_axis_video_tready) begin
      int rows, cols;
      rows = exp_rows.size() > 0 ? exp_rows[0] : 1;
      cols = exp_cols.size() > 0 ? exp_cols[0] : 1;
      check(exp_q.size() > 0 && m_axis_video_tdata == exp_q[0], $sformatf("pixel %0d,%0d", orow, ocol));
      check(m_axis_video_tuser == (orow == 0 && ocol == 0), "TUSER");
      check(m_axis_video_tlast == (ocol == cols - 1), "TLAST");
      if (m_axis_video_tdata == PIX_SKIN) n_skin++;
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      if (t_first_out < 0) t_first_out = cycle;
      n_out++;
      if (ocol == cols - 1) begin
        ocol = 0;
        if (orow == rows - 1) begin
          orow = 0;
          void'(exp_rows.pop_front());
          void'(exp_cols.pop_front());
        end else orow++;
      end else ocol++;
    end
    if (t_first_in < 0 && dut.u_in.m_valid && dut.u_in.m_ready) t_first_in = cycle;
    m_sof_skip  += int'(dut.u_in.ev_sof_skip);
    m_eol_early += int'(dut.u_in.ev_eol_early);
    m_eol_late  += int'(dut.u_in.ev_eol_late);
    if (dut.u_fifo_out.count == 2'(2) || dut.u_fifo_in.count == 2'(2)) m_fifo_full++;
    if (dut.frame_start) begin m_starts++; t_start = cycle; end
    if (dut.out_done) begin m_done++; t_done = cycle; end
  end

  logic irq_q;
  always @(posedge ap_clk) begin
    irq_q <= ap_rst_n && interrupt;
    if (ap_rst_n && interrupt && !irq_q) m_irq++;
  end

  task automatic wait_done(input int n);
    while (m_done < n) @(posedge ap_clk);
  endtask

  initial begin
    logic [31:0] d;
    int n0;
    s_axi_control_awvalid = 0; s_axi_control_wvalid = 0; s_axi_control_arvalid = 0;
    s_axi_control_bready = 0; s_axi_control_rready = 0;
    s_axi_control_awaddr = 0; s_axi_control_araddr = 0; s_axi_control_wdata = 0; s_axi_control_wstrb = 0;
    repeat (4) @(posedge ap_clk);
    ap_rst_n <= 1;
    @(posedge ap_clk);

    axil_read(REG_ROWS, d); check(d == 450, "rows reset to 450");
    axil_read(REG_COLS, d); check(d == 750, "cols reset to 750");

    // ---- part 1: small frames under random gaps and stalls ----
    add_frame(6, 8, 1);
    axil_write(REG_ROWS, 6);
    axil_write(REG_COLS, 8);
    axil_write(REG_IER, 1);
    axil_write(REG_GIE, 1);
    axil_write(REG_CTRL, 1);
    while (!interrupt) @(posedge ap_clk);
    axil_read(REG_CTRL, d);
    check(d[1] && d[2], "done and idle after interrupt");
    axil_write(REG_ISR, 1);
    check(!interrupt, "interrupt acknowledged");

    // back-to-back frames under auto_restart
    add_frame(6, 8, 2);
    add_frame(6, 8, 3);
    add_frame(6, 8, 0);
    n0 = m_starts;
    axil_write(REG_CTRL, 32'h81);
    wait_done(3);
    axil_write(REG_CTRL, 32'h00);
    wait_done(4);
    repeat (20) @(posedge ap_clk);
    check(m_starts - n0 == 3, $sformatf("auto_restart started %0d frames", m_starts - n0));
    check(exp_q.size() == 0, "small frames complete");
    axil_write(REG_GIE, 0);

    // ---- part 2: a full 750 x 450 frame at full rate ----
    noise = 0;
    axil_write(REG_ROWS, 450);
    axil_write(REG_COLS, 750);
    while (bi < beats.size()) @(posedge ap_clk);
    t_first_in = -1; t_first_out = -1;
    add_frame(450, 750, 0);
    axil_write(REG_CTRL, 1);
    wait_done(5);
    repeat (5) @(posedge ap_clk);
    check(exp_q.size() == 0, "full frame complete");
    check(t_first_out - t_first_in == 6, $sformatf("pipeline latency %0d", t_first_out - t_first_in));
    check(t_done - t_start == 450 * 750 + 6, $sformatf("full frame in %0d clocks", t_done - t_start));
    axil_read(REG_CTRL, d);
    check(d[1] && d[2], "full frame: done and idle");

    // ---- mechanisms ----
    check(m_stall > 0, "output stalls");
    check(m_gap > 0, "input gaps");
    check(m_sof_skip == 4, "start-of-frame skips");
    check(m_eol_late == 2, "late end of line");
    check(m_eol_early == 1, "early end of line");
    check(m_fifo_full > 0, "dataflow channel full");
    check(m_irq > 0, "interrupt");
    check(m_starts == 5, "frames started");
    check(n_skin > 0 && n_skin < n_out, "both skin and background");
    $display("frames=%0d beats_out=%0d skin=%0d stalls=%0d gaps=%0d sof_skip=%0d eol_early=%0d eol_late=%0d fifo_full=%0d irq=%0d latency=%0d frame_clocks=%0d",
             m_done, n_out, n_skin, m_stall, m_gap, m_sof_skip, m_eol_early, m_eol_late, m_fifo_full, m_irq,
             t_first_out - t_first_in, t_done - t_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mat2axivideo: self-checking testbench for mat2axivideo.
//
// Sends several frames of numbered pixels with random input gaps and random
// TREADY stalls and checks every output beat: its data, TUSER only on the
// first pixel of the frame, TLAST on the last pixel of every line, one done
// pulse per frame on its final beat, and that no pixel is taken while idle.
// A last frame without stalls must take rows x cols + 1 clocks.
module tb_mat2axivideo;
  localparam int DW = 12;
  logic clk = 0, rst_n = 0;
  logic start;
  logic [DW-1:0] rows, cols;
  logic [7:0] s_data, m_tdata;
  logic s_valid, s_ready, m_tvalid, m_tready, m_tuser, m_tlast, busy, done;
  int checks = 0, failures = 0, cycle = 0;
  int f_rows[4] = '{1, 3, 5, 6};
  int f_cols[4] = '{4, 1, 7, 9};
  int cur_rows = 1, cur_cols = 1, orow = 0, ocol = 0, n_done = 0, n_in = 0;
  int stalls = 0;
  bit noise = 1;

  mat2axivideo #(.DIM_W(DW), .DATA_W(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cycle); end
  endtask

  // Pixel source: value = running pixel index (mod 256).
  always @(posedge clk) begin
    if (!rst_n) begin
      s_valid <= 0; s_data <= 0;
    end else if (!s_valid || s_ready) begin
      if (s_valid) n_in <= n_in + 1;
      s_valid <= !noise || $urandom_range(0, 3) != 0;
      s_data  <= 8'(n_in + (s_valid ? 1 : 0));
    end
  end

  always @(posedge clk) begin
    if (!rst_n) m_tready <= 0;
    else        m_tready <= !noise || $urandom_range(0, 2) != 0;
  end

  int n_out = 0;
  always @(posedge clk) if (rst_n) begin
    if (!busy) check(!s_ready, "no pixel taken while idle");
    if (m_tvalid && !m_tready) stalls++;
    if (m_tvalid && m_tready) begin
      bit last_px;
      last_px = (orow == cur_rows - 1) && (ocol == cur_cols - 1);
      check(m_tdata == 8'(n_out), "data");
      check(m_tuser == (orow == 0 && ocol == 0), "TUSER");
      check(m_tlast == (ocol == cur_cols - 1), "TLAST");
      check(done == last_px, "done on final beat");
      n_out++;
      if (ocol == cur_cols - 1) begin ocol = 0; orow++; end else ocol++;
    end
    n_done += int'(done);
  end

  initial begin
    int t0;
    start = 0; rows = 0; cols = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    for (int f = 0; f < 4; f++) begin
      if (f == 3) noise = 0;
      cur_rows = f_rows[f]; cur_cols = f_cols[f]; orow = 0; ocol = 0;
      start <= 1; rows <= DW'(f_rows[f]); cols <= DW'(f_cols[f]);
      @(posedge clk);
      start <= 0;
      t0 = cycle;
      while (!done) @(posedge clk);
      if (f == 3) check(cycle - t0 == f_rows[f] * f_cols[f] + 1, $sformatf("frame time %0d", cycle - t0));
      @(posedge clk);
      repeat ($urandom_range(0, 4)) @(posedge clk);
    end
    check(n_done == 4, "done pulses");
    check(stalls > 0, "output stalls exercised");
    $display("beats=%0d stalls=%0d", n_out, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_axivideo2mat: self-checking testbench for axivideo2mat.
//
// Streams a sequence of frames, some damaged: stray beats before the
// start-of-frame flag, a line with extra beats after its last column, and a
// line whose end-of-line flag comes early. A sequence-level model walks the
// same beat list (skip to TUSER, take rows x cols pixels, drop the tail of
// an over-long line up to TLAST) to give the expected pixels and event
// counts. Random gaps on the input and stalls on the output are applied,
// except on the last frame, which must take rows x cols + 1 clocks from
// start to done.
module tb_axivideo2mat;
  import skinseg_pkg::*;

  localparam int DW = 12;
  typedef struct {logic [23:0] d; bit u; bit l;} beat_t;

  logic clk = 0, rst_n = 0;
  logic start;
  logic [DW-1:0] rows, cols;
  logic [23:0] s_tdata;
  logic s_tvalid, s_tready, s_tuser, s_tlast;
  rgb_t m_pix;
  logic m_valid, m_ready, busy, done, ev_sof_skip, ev_eol_early, ev_eol_late;

  int checks = 0, failures = 0, cycle = 0;
  beat_t beats[$];
  logic [23:0] exp_q[$];
  int f_rows[5] = '{3, 3, 3, 4, 8};
  int f_cols[5] = '{5, 5, 5, 6, 10};
  int exp_skip = 0, exp_early = 0, exp_late = 0;
  int n_skip = 0, n_early = 0, n_late = 0, n_done = 0, n_pix = 0;
  int bi = 0;
  bit noise = 1;

  axivideo2mat #(.DIM_W(DW)) dut (.*);

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

  function automatic logic [23:0] val(input int f, input int r, input int c);
    return 24'((f << 20) | (r << 10) | c);
  endfunction

  // Build the beat list of all frames.
  task automatic build();
    for (int f = 0; f < 5; f++) begin
      if (f == 0) for (int j = 0; j < 3; j++) beats.push_back('{24'hBAD000 + 24'(j), 1'b0, j == 2});
      for (int r = 0; r < f_rows[f]; r++) begin
        int n = f_cols[f];
        if (f == 1 && r == 1) n = f_cols[f] + 2;   // over-long line
        // frame 2, line 1: a stray TLAST at column 2 as well as at the end
        for (int c = 0; c < n; c++)
          beats.push_back('{val(f, r, c), (r == 0 && c == 0), (c == n - 1) || (f == 2 && r == 1 && c == 2)});
      end
    end
  endtask

  // Sequence-level model of the reader.
  task automatic model();
    int idx = 0;
    for (int f = 0; f < 5; f++) begin
      while (!beats[idx].u) begin exp_skip++; idx++; end
      for (int r = 0; r < f_rows[f]; r++) begin
        for (int c = 0; c < f_cols[f]; c++) begin
          beat_t b = beats[idx++];
          exp_q.push_back(b.d);
          if (b.l && c != f_cols[f] - 1) exp_early++;
          if (c == f_cols[f] - 1 && !b.l) begin
            beat_t t;
            do begin t = beats[idx++]; exp_late++; end while (!t.l);
          end
        end
      end
    end
    if (idx != beats.size()) $display("model: %0d beats left over", beats.size() - idx);
  endtask

  // Source: walk the beat list, with random gaps while noise is on.
  always @(posedge clk) begin
    if (!rst_n) begin
      s_tvalid <= 0; s_tdata <= 0; s_tuser <= 0; s_tlast <= 0;
    end else if (!s_tvalid || s_tready) begin
      int nb;
      nb = bi + ((s_tvalid && s_tready) ? 1 : 0);
      bi <= nb;
      if (nb < beats.size() && (!noise || $urandom_range(0, 3) != 0)) begin
        s_tvalid <= 1;
        s_tdata <= beats[nb].d; s_tuser <= beats[nb].u; s_tlast <= beats[nb].l;
      end else s_tvalid <= 0;
    end
  end

  always @(posedge clk) begin
    if (!rst_n) m_ready <= 0;
    else        m_ready <= noise ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  always @(posedge clk) if (rst_n) begin
    if (m_valid && m_ready) begin
      check(exp_q.size() > 0 && m_pix == exp_q[0], "pixel");
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      n_pix++;
    end
    n_skip  += int'(ev_sof_skip);
    n_early += int'(ev_eol_early);
    n_late  += int'(ev_eol_late);
    n_done  += int'(done);
  end

  initial begin
    int t0;
    start = 0; rows = 0; cols = 0;
    build();
    model();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < 5; f++) begin
      if (f == 4) begin
        noise = 0;
        wait (bi >= beats.size() - f_rows[4] * f_cols[4] - 1);
        @(posedge clk);
      end
      start <= 1; rows <= DW'(f_rows[f]); cols <= DW'(f_cols[f]);
      @(posedge clk);
      start <= 0;
      t0 = cycle;
      #1 check(busy, "busy after start");
      while (!done) @(posedge clk);
      if (f == 4) check(cycle - t0 == f_rows[4] * f_cols[4] + 1, $sformatf("frame time %0d", cycle - t0));
      @(posedge clk);
      check(!busy, "idle after done");
    end
    repeat (5) @(posedge clk);
    check(n_done == 5, "done pulses");
    check(exp_q.size() == 0, "all expected pixels seen");
    check(n_skip == exp_skip && exp_skip > 0, $sformatf("sof skips %0d/%0d", n_skip, exp_skip));
    check(n_early == exp_early && exp_early > 0, $sformatf("early eol %0d/%0d", n_early, exp_early));
    check(n_late == exp_late && exp_late > 0, $sformatf("late eol %0d/%0d", n_late, exp_late));
    $display("pixels=%0d skips=%0d early=%0d late=%0d", n_pix, n_skip, n_early, n_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

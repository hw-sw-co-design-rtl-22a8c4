// tb_skin_threshold: self-checking testbench for skin_threshold.
//
// Sweeps Cr and Cb across the edges of the skin box (one below, on, and one
// above each bound) and adds random values, with random stalls on both
// sides; every output is compared with the reference skin test. Y is
// randomised to show it has no effect.
module tb_skin_threshold;
  import skinseg_pkg::*;
  import skinseg_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  ycrcb_t s_ycc;
  logic [7:0] m_bin;
  logic s_valid, s_ready, m_valid, m_ready;
  int checks = 0, failures = 0, cycle = 0;
  ycrcb_t q[$];
  int n_sent = 0, n_skin = 0, n_bg = 0;
  int edges[] = '{0, 76, 77, 78, 100, 126, 127, 128, 132, 133, 134, 150, 172, 173, 174, 255};

  skin_threshold dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cycle); end
  endtask

  function automatic ycrcb_t pick(input int i);
    ycrcb_t v;
    v.y = 8'($urandom);
    if (i < 256) begin
      v.cr = 8'(edges[i % 16]);
      v.cb = 8'(edges[i / 16]);
    end else begin
      v.cr = 8'($urandom);
      v.cb = 8'($urandom);
    end
    return v;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (s_valid && s_ready) q.push_back(s_ycc);
    if (m_valid && m_ready) begin
      ycrcb_t v;
      bit sk;
      v = q.pop_front();
      sk = ref_skin_ycc(int'(v.cr), int'(v.cb));
      check(m_bin == (sk ? 8'hFF : 8'h00), "skin decision");
      if (sk) n_skin++; else n_bg++;
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      s_valid <= 0; m_ready <= 0; s_ycc <= '0;
    end else begin
      if (!s_valid || s_ready) begin
        s_valid <= ($urandom_range(0, 3) != 0);
        s_ycc   <= pick(n_sent);
        if (s_valid) n_sent <= n_sent + 1;
      end
      m_ready <= ($urandom_range(0, 3) != 0);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (20000) @(posedge clk);
    check(n_skin > 10 && n_bg > 10, "both classes seen");
    $display("skin=%0d background=%0d", n_skin, n_bg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rgb2ycrcb: self-checking testbench for rgb2ycrcb.
//
// Sends corner colours (black, white, pure red, green, blue) and random
// pixels through the converter with random input gaps and output stalls,
// and compares every output with the floating-point reference model. Two
// hand-worked values are checked as well: pure red gives Y=76, Cr=255
// (saturated), Cb=85, and white gives 255/128/128. Latency (2 clocks) and
// one-pixel-per-clock throughput are checked without stalls.
module tb_rgb2ycrcb;
  import skinseg_pkg::*;
  import skinseg_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  rgb_t s_rgb;
  ycrcb_t m_ycc;
  logic s_valid, s_ready, m_valid, m_ready;
  int checks = 0, failures = 0, cycle = 0;
  rgb_t sent_q[$];
  int sent_cyc[$];
  bit stall_en = 1, gap_en = 1;
  int n_sent = 0, n_got = 0, lat_checked = 0, calm_from = 1 << 30;

  rgb2ycrcb dut (.*);

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

  function automatic rgb_t pick(input int i);
    case (i)
      0: return '{8'd0, 8'd0, 8'd0};
      1: return '{8'd255, 8'd255, 8'd255};
      2: return '{8'd255, 8'd0, 8'd0};
      3: return '{8'd0, 8'd255, 8'd0};
      4: return '{8'd0, 8'd0, 8'd255};
      5: return '{8'd220, 8'd160, 8'd130};
      default: return rgb_t'(24'($urandom));
    endcase
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (s_valid && s_ready) begin sent_q.push_back(s_rgb); sent_cyc.push_back(cycle); end
    if (m_valid && m_ready) begin
      rgb_t p;
      int c0;
      p = sent_q.pop_front();
      c0 = sent_cyc.pop_front();
      check(m_ycc.y == 8'(ref_y(p.r, p.g, p.b)), "Y");
      check(m_ycc.cr == 8'(ref_cr(p.r, p.g, p.b)), "Cr");
      check(m_ycc.cb == 8'(ref_cb(p.r, p.g, p.b)), "Cb");
      if (p == '{8'd255, 8'd0, 8'd0}) begin
        check(m_ycc == '{8'd76, 8'd255, 8'd85}, "pure red worked by hand");
      end
      if (p == '{8'd255, 8'd255, 8'd255}) begin
        check(m_ycc == '{8'd255, 8'd128, 8'd128}, "white worked by hand");
      end
      if (c0 > calm_from && lat_checked < 50) begin
        check(cycle - c0 == 2, "latency 2 clocks");
        lat_checked++;
      end
      n_got++;
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      s_valid <= 0; m_ready <= 0; s_rgb <= '0;
    end else begin
      if (!s_valid || s_ready) begin
        s_valid <= gap_en ? ($urandom_range(0, 3) != 0) : 1'b1;
        s_rgb   <= pick(n_sent % 50);
        if (s_valid) n_sent <= n_sent + 1;
      end
      m_ready <= stall_en ? ($urandom_range(0, 3) != 0) : 1'b1;
    end
  end

  initial begin
    int g0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (20000) @(posedge clk);
    stall_en = 0; gap_en = 0;
    calm_from = cycle + 5;
    repeat (20) @(posedge clk);
    g0 = n_got;
    repeat (200) @(posedge clk);
    check(n_got - g0 == 200, "one pixel per clock");
    check(lat_checked > 0, "latency measured");
    $display("pixels=%0d", n_got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

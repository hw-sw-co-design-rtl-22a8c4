// tb_stream_fifo: self-checking testbench for stream_fifo.
//
// Pushes a counting sequence through the FIFO with random valid and ready
// patterns and checks order, loss and occupancy against a queue model; then
// checks one word per clock with both sides always ready, and that a full
// FIFO accepts a word in the cycle one leaves.
module tb_stream_fifo;
  localparam int W = 16, D = 4;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] s_data, m_data;
  logic s_valid, s_ready, m_valid, m_ready;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  int cycle = 0;
  logic [W-1:0] q[$];
  int sent = 0, got = 0, full_pass = 0;
  int mode = 0;  // 0 random, 1 streaming, 2 fill then stream

  stream_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  // Scoreboard on the clock edge.
  always @(posedge clk) if (rst_n) begin
    if (s_valid && s_ready) begin
      q.push_back(s_data);
      if (count == D && m_valid && m_ready) full_pass++;
    end
    if (m_valid && m_ready) begin
      check(q.size() > 0 && m_data == q[0], "data order");
      if (q.size() > 0) void'(q.pop_front());
      got++;
    end
  end
  always @(posedge clk) if (rst_n) check(int'(count) == q.size(), "count");

  // Stimulus, changed after each edge.
  always @(posedge clk) begin
    if (!rst_n) begin
      s_valid <= 0; m_ready <= 0; s_data <= 0;
    end else begin
      if (s_valid && s_ready) begin s_data <= s_data + 1'b1; sent++; end
      unique case (mode)
        0: begin
          if (!(s_valid && !s_ready)) s_valid <= ($urandom_range(0, 2) != 0);
          m_ready <= ($urandom_range(0, 2) != 0);
        end
        1: begin s_valid <= 1; m_ready <= 1; end
        default: begin s_valid <= 1; m_ready <= (count == D); end
      endcase
    end
  end

  initial begin
    int g0;
    s_valid = 0; m_ready = 0; s_data = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5000) @(posedge clk);
    // Streaming: both sides always ready, expect one word per clock.
    mode = 1;
    repeat (20) @(posedge clk);
    g0 = got;
    repeat (100) @(posedge clk);
    check(got - g0 == 100, "one word per clock when streaming");
    mode = 2;
    repeat (200) @(posedge clk);
    check(full_pass > 0, "full FIFO accepts while a word leaves");
    check(sent > 1000 && got > 1000, "traffic flowed");
    $display("sent=%0d got=%0d full_pass=%0d", sent, got, full_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

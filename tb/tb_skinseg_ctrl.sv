// tb_skinseg_ctrl: self-checking testbench for skinseg_ctrl.
//
// Drives the AXI4-Lite port with a small bus-master model and plays the
// datapath by pulsing in_done and out_done. Checks reset values, register
// read-back with byte strobes, the start/ready/done/idle sequence with
// clear-on-read flags, interrupt enable/status/toggle behaviour, back-to-back
// frames under auto_restart, and the one-clock write and read timing.
module tb_skinseg_ctrl;
  import skinseg_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [4:0] s_axi_awaddr, s_axi_araddr;
  logic s_axi_awvalid, s_axi_awready, s_axi_wvalid, s_axi_wready;
  logic [31:0] s_axi_wdata, s_axi_rdata;
  logic [3:0] s_axi_wstrb;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic s_axi_bvalid, s_axi_bready, s_axi_arvalid, s_axi_arready, s_axi_rvalid, s_axi_rready;
  logic interrupt, frame_start, in_done, out_done;
  logic [11:0] rows, cols;
  int checks = 0, failures = 0, cycle = 0, n_start = 0;
  int wr_lat, rd_lat;

  skinseg_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (rst_n && frame_start) n_start++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cycle); end
  endtask

  task automatic axil_write(input logic [4:0] a, input logic [31:0] d, input logic [3:0] strb = 4'hF);
    int t0;
    s_axi_awaddr <= a; s_axi_awvalid <= 1; s_axi_wdata <= d; s_axi_wvalid <= 1; s_axi_wstrb <= strb;
    do @(posedge clk); while (!s_axi_awready);
    t0 = cycle;
    s_axi_awvalid <= 0; s_axi_wvalid <= 0; s_axi_bready <= 1;
    do @(posedge clk); while (!s_axi_bvalid);
    wr_lat = cycle - t0;
    check(s_axi_bresp == AXI_RESP_OKAY, "BRESP");
    s_axi_bready <= 0;
  endtask

  task automatic axil_read(input logic [4:0] a, output logic [31:0] d);
    int t0;
    s_axi_araddr <= a; s_axi_arvalid <= 1;
    do @(posedge clk); while (!s_axi_arready);
    t0 = cycle;
    s_axi_arvalid <= 0; s_axi_rready <= 1;
    do @(posedge clk); while (!s_axi_rvalid);
    rd_lat = cycle - t0;
    d = s_axi_rdata;
    check(s_axi_rresp == AXI_RESP_OKAY, "RRESP");
    s_axi_rready <= 0;
  endtask

  task automatic expect_reg(input logic [4:0] a, input logic [31:0] v, input string what);
    logic [31:0] d;
    axil_read(a, d);
    check(d == v, $sformatf("%s: read %h expected %h", what, d, v));
  endtask

  task automatic pulse_in_done();
    in_done <= 1; @(posedge clk); in_done <= 0; @(posedge clk);
  endtask

  task automatic pulse_out_done();
    out_done <= 1; @(posedge clk); out_done <= 0; @(posedge clk);
  endtask

  initial begin
    s_axi_awvalid = 0; s_axi_wvalid = 0; s_axi_arvalid = 0; s_axi_bready = 0; s_axi_rready = 0;
    s_axi_awaddr = 0; s_axi_araddr = 0; s_axi_wdata = 0; s_axi_wstrb = 0;
    in_done = 0; out_done = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // reset values
    expect_reg(REG_ROWS, 450, "rows reset");
    expect_reg(REG_COLS, 750, "cols reset");
    expect_reg(REG_CTRL, 32'h4, "ctrl reset (idle)");
    expect_reg(REG_GIE, 0, "gie reset");
    check(rd_lat == 1, "read data one clock after address");
    check(!interrupt && n_start == 0, "quiet after reset");
    // sizes and byte strobes
    axil_write(REG_ROWS, 10);
    check(wr_lat == 1, "write response one clock after handshake");
    axil_write(REG_COLS, 20);
    expect_reg(REG_ROWS, 10, "rows");
    expect_reg(REG_COLS, 20, "cols");
    check(rows == 10 && cols == 20, "size outputs");
    axil_write(REG_COLS, 32'h0000_0FFF, 4'b0001);
    expect_reg(REG_COLS, 32'h0FF, "cols low byte only");
    axil_write(REG_COLS, 20);
    expect_reg(5'h14, 0, "unmapped offset");
    // single frame with interrupts
    axil_write(REG_IER, 3);
    axil_write(REG_GIE, 1);
    axil_write(REG_CTRL, 1);
    @(posedge clk);
    check(n_start == 1, "frame_start after ap_start");
    expect_reg(REG_CTRL, 32'h1, "running: start=1 idle=0");
    pulse_in_done();
    check(interrupt, "ready interrupt");
    expect_reg(REG_ISR, 2, "isr ready");
    expect_reg(REG_CTRL, 32'h8, "ap_ready set, ap_start cleared");
    expect_reg(REG_CTRL, 32'h0, "ap_ready clear on read");
    axil_write(REG_ISR, 2);
    check(!interrupt, "isr toggle clears interrupt");
    pulse_out_done();
    check(interrupt, "done interrupt");
    expect_reg(REG_CTRL, 32'h6, "done and idle");
    expect_reg(REG_CTRL, 32'h4, "ap_done clear on read");
    axil_write(REG_ISR, 1);
    check(!interrupt, "interrupt cleared");
    check(n_start == 1, "no restart without auto_restart");
    // auto restart
    axil_write(REG_IER, 0);
    axil_write(REG_CTRL, 32'h81);
    @(posedge clk);
    check(n_start == 2, "auto-restart first frame");
    pulse_in_done();
    expect_reg(REG_CTRL, 32'h89, "ap_start held under auto_restart");
    pulse_out_done();
    @(posedge clk);
    check(n_start == 3, "next frame started by itself");
    check(!interrupt, "no interrupt with IER=0");
    axil_write(REG_CTRL, 32'h00);
    pulse_in_done();
    pulse_out_done();
    repeat (3) @(posedge clk);
    check(n_start == 3, "stops after auto_restart cleared");
    axil_write(REG_GIE, 0);
    expect_reg(REG_CTRL, 32'hE, "final: done, idle, ready");
    $display("frames started=%0d", n_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

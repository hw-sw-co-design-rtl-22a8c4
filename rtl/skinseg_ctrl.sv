// skinseg_ctrl: AXI4-Lite control slave of the skin segmentation accelerator.
//
// The processor drives the accelerator through a 32-byte window of 32-bit
// registers (5 address bits, 32 data bits, as the device description of the
// IP gives). Their layout is the usual block-level start/done protocol:
//   0x00 CTRL  [0] ap_start (write 1 to start; clears when the input side
//               has taken the whole frame unless auto_restart is set)
//              [1] ap_done  (set when the frame has left; clears on read)
//              [2] ap_idle  (no frame in flight)
//              [3] ap_ready (set when the input side has taken the frame;
//               clears on read)
//              [7] auto_restart (keep starting frames back to back)
//   0x04 GIE   [0] global interrupt enable
//   0x08 IER   [0] done interrupt enable, [1] ready interrupt enable
//   0x0C ISR   [0] done, [1] ready interrupt status (write 1 toggles)
//   0x10 ROWS  frame height, 0x18 COLS frame width (reset to 450 x 750)
// interrupt = GIE and any ISR bit. One frame is in flight at a time:
// frame_start pulses when ap_start is set and no frame is running.
// The register contents are this design's choice; the window size, the
// width and the use of an interrupt line come from the document.
//
// Timing: a write completes (BVALID) one clock after AWVALID and WVALID are
//   both high; a read returns RDATA one clock after ARVALID. Responses are
//   always OKAY; unmapped offsets read as zero. Reset (rst_n low) is
//   synchronous.
module skinseg_ctrl
  import skinseg_pkg::*;
#(
  parameter int unsigned ADDR_W   = 5,
  parameter int unsigned DATA_W   = 32,
  parameter int unsigned DIM_W    = 12,
  parameter int unsigned DEF_ROWS = 450,
  parameter int unsigned DEF_COLS = 750
) (
  input  logic                clk,
  input  logic                rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0]   s_axi_awaddr,
  input  logic                s_axi_awvalid,
  output logic                s_axi_awready,
  input  logic [DATA_W-1:0]   s_axi_wdata,
  input  logic [DATA_W/8-1:0] s_axi_wstrb,
  input  logic                s_axi_wvalid,
  output logic                s_axi_wready,
  output logic [1:0]          s_axi_bresp,
  output logic                s_axi_bvalid,
  input  logic                s_axi_bready,
  input  logic [ADDR_W-1:0]   s_axi_araddr,
  input  logic                s_axi_arvalid,
  output logic                s_axi_arready,
  output logic [DATA_W-1:0]   s_axi_rdata,
  output logic [1:0]          s_axi_rresp,
  output logic                s_axi_rvalid,
  input  logic                s_axi_rready,
  // to and from the datapath
  output logic                interrupt,
  output logic                frame_start,
  output logic [DIM_W-1:0]    rows,
  output logic [DIM_W-1:0]    cols,
  input  logic                in_done,
  input  logic                out_done
);

  logic       ap_start, ap_done, ap_ready, auto_restart, running;
  logic       gie;
  logic [1:0] ier, isr;
  logic       wr_en, rd_en;
  logic [4:0] wa, ra;

  assign wa = s_axi_awaddr[4:0] & 5'h1C;
  assign ra = s_axi_araddr[4:0] & 5'h1C;

  assign wr_en         = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_awready = wr_en;
  assign s_axi_wready  = wr_en;
  assign s_axi_bresp   = AXI_RESP_OKAY;
  assign rd_en         = s_axi_arvalid && !s_axi_rvalid;
  assign s_axi_arready = !s_axi_rvalid;
  assign s_axi_rresp   = AXI_RESP_OKAY;

  assign frame_start = ap_start && !running;
  assign interrupt   = gie && (isr != 2'b00);

  // Byte-lane merge of a write into a register of up to 32 bits.
  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] wd,
                                        input logic [3:0] strb);
    logic [31:0] r;
    for (int i = 0; i < 4; i++) r[8*i +: 8] = strb[i] ? wd[8*i +: 8] : old[8*i +: 8];
    return r;
  endfunction

  logic [31:0] wdata32;
  logic [3:0]  wstrb4;
  assign wdata32 = 32'(s_axi_wdata);
  assign wstrb4  = 4'(s_axi_wstrb);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ap_start     <= 1'b0;
      ap_done      <= 1'b0;
      ap_ready     <= 1'b0;
      auto_restart <= 1'b0;
      running      <= 1'b0;
      gie          <= 1'b0;
      ier          <= '0;
      isr          <= '0;
      rows         <= DIM_W'(DEF_ROWS);
      cols         <= DIM_W'(DEF_COLS);
      s_axi_bvalid <= 1'b0;
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else begin
      // ---- reads (clear-on-read flags first, events below override) ----
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;
      if (rd_en) begin
        s_axi_rvalid <= 1'b1;
        unique case (ra)
          REG_CTRL: s_axi_rdata <= DATA_W'({auto_restart, 3'b000, ap_ready, !running, ap_done, ap_start});
          REG_GIE:  s_axi_rdata <= DATA_W'(gie);
          REG_IER:  s_axi_rdata <= DATA_W'(ier);
          REG_ISR:  s_axi_rdata <= DATA_W'(isr);
          REG_ROWS: s_axi_rdata <= DATA_W'(rows);
          REG_COLS: s_axi_rdata <= DATA_W'(cols);
          default:  s_axi_rdata <= '0;
        endcase
        if (ra == REG_CTRL) begin
          ap_done  <= 1'b0;
          ap_ready <= 1'b0;
        end
      end

      // ---- writes ----
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
      if (wr_en) begin
        s_axi_bvalid <= 1'b1;
        unique case (wa)
          REG_CTRL: if (wstrb4[0]) begin
            if (wdata32[0]) ap_start <= 1'b1;
            auto_restart <= wdata32[7];
          end
          REG_GIE:  if (wstrb4[0]) gie <= wdata32[0];
          REG_IER:  if (wstrb4[0]) ier <= wdata32[1:0];
          REG_ISR:  if (wstrb4[0]) isr <= isr ^ wdata32[1:0];
          REG_ROWS: rows <= DIM_W'(merge(32'(rows), wdata32, wstrb4));
          REG_COLS: cols <= DIM_W'(merge(32'(cols), wdata32, wstrb4));
          default: ;
        endcase
      end

      // ---- frame events ----
      if (frame_start) running <= 1'b1;
      if (in_done) begin
        ap_ready <= 1'b1;
        if (!auto_restart) ap_start <= 1'b0;
        if (ier[1]) isr[1] <= 1'b1;
      end
      if (out_done) begin
        running <= 1'b0;
        ap_done <= 1'b1;
        if (ier[0]) isr[0] <= 1'b1;
      end
    end
  end

  // AXI rule: a response stays valid until the master takes it.
  logic b_held, r_held;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      b_held <= 1'b0;
      r_held <= 1'b0;
    end else begin
      b_held <= s_axi_bvalid && !s_axi_bready;
      r_held <= s_axi_rvalid && !s_axi_rready;
    end
    if (rst_n && b_held) assert (s_axi_bvalid) else $error("skinseg_ctrl: BVALID dropped");
    if (rst_n && r_held) assert (s_axi_rvalid) else $error("skinseg_ctrl: RVALID dropped");
  end

endmodule

// mat2axivideo: AXI4-Stream video writer, the output task of the accelerator.
//
// Takes rows x cols processed pixels in raster order and sends them as an
// AXI4-Stream video frame: TUSER is set on the first pixel of the frame and
// TLAST on the last pixel of every line, which is what a video DMA write
// channel expects. The stream conversion is the document's; the single
// output register and the done pulse are this design's choices.
//
// Interface: start (pulse, while idle) latches rows and cols and begins a
//   frame; s_* is a valid/ready pixel stream (held off while idle or once
//   the frame's pixels are all in); m_t* is the AXI4-Stream master.
//   done pulses in the clock the frame's last beat is accepted downstream.
// Timing: one register stage, latency 1 clock, one pixel per clock.
//   Reset (rst_n low) is synchronous.
module mat2axivideo #(
  parameter int unsigned DIM_W  = 12,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [DIM_W-1:0]  rows,
  input  logic [DIM_W-1:0]  cols,
  input  logic [DATA_W-1:0] s_data,
  input  logic              s_valid,
  output logic              s_ready,
  output logic [DATA_W-1:0] m_tdata,
  output logic              m_tvalid,
  input  logic              m_tready,
  output logic              m_tuser,
  output logic              m_tlast,
  output logic              busy,
  output logic              done
);

  logic [DIM_W-1:0] n_rows, n_cols, row, col;
  logic             accepting, final_beat, take, last_col, last_row;

  assign last_col = (col == n_cols - 1'b1);
  assign last_row = (row == n_rows - 1'b1);
  assign s_ready  = accepting && (!m_tvalid || m_tready);
  assign take     = s_valid && s_ready;
  assign done     = m_tvalid && m_tready && final_beat;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      accepting  <= 1'b0;
      m_tvalid   <= 1'b0;
      final_beat <= 1'b0;
      row        <= '0;
      col        <= '0;
      n_rows     <= '0;
      n_cols     <= '0;
    end else begin
      if (!busy && start && rows != '0 && cols != '0) begin
        busy      <= 1'b1;
        accepting <= 1'b1;
        n_rows    <= rows;
        n_cols    <= cols;
        row       <= '0;
        col       <= '0;
      end
      if (m_tvalid && m_tready) m_tvalid <= 1'b0;
      if (take) begin
        m_tvalid   <= 1'b1;
        final_beat <= last_col && last_row;
        col        <= last_col ? '0 : col + 1'b1;
        if (last_col) row <= row + 1'b1;
        if (last_col && last_row) accepting <= 1'b0;
      end
      if (done) begin
        busy       <= 1'b0;
        final_beat <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (take) begin
      m_tdata <= s_data;
      m_tuser <= (row == '0) && (col == '0);
      m_tlast <= last_col;
    end
  end

  // AXI4-Stream rule for this master: a beat stays until it is accepted.
  logic held;
  always_ff @(posedge clk) begin
    if (!rst_n) held <= 1'b0;
    else        held <= m_tvalid && !m_tready;
    if (rst_n && held) begin
      assert (m_tvalid) else $error("mat2axivideo: TVALID dropped before TREADY");
    end
  end

endmodule

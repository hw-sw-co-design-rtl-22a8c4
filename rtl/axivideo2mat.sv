// axivideo2mat: AXI4-Stream video reader, the input task of the accelerator.
//
// Turns an AXI4-Stream video frame (TUSER marks the first pixel of a frame,
// TLAST the last pixel of each line) into a plain pixel stream of exactly
// rows x cols pixels in raster order. After start it drops beats until one
// carries TUSER, so the frame always begins at its first pixel. When the
// last column of a line is reached without TLAST, the extra beats of that
// line are dropped until TLAST arrives; a TLAST before the last column is
// reported but the pixel count still decides where a line ends. The stream
// conversion is the document's; this recovery policy is this design's own.
//
// Interface: start (pulse, while idle) latches rows and cols and begins a
//   frame. s_t* is the AXI4-Stream slave, m_* a valid/ready pixel stream.
//   done pulses one clock after the frame's last beat is taken (including
//   any dropped tail). ev_* pulse once per event, for monitoring.
// Timing: pixels pass through combinationally (s_tready follows m_ready),
//   so the reader adds no latency and runs at one pixel per clock.
//   Reset (rst_n low) is synchronous.
module axivideo2mat
  import skinseg_pkg::*;
#(
  parameter int unsigned DIM_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [DIM_W-1:0] rows,
  input  logic [DIM_W-1:0] cols,
  input  logic [23:0]      s_tdata,
  input  logic             s_tvalid,
  output logic             s_tready,
  input  logic             s_tuser,
  input  logic             s_tlast,
  output rgb_t             m_pix,
  output logic             m_valid,
  input  logic             m_ready,
  output logic             busy,
  output logic             done,
  output logic             ev_sof_skip,
  output logic             ev_eol_early,
  output logic             ev_eol_late
);

  typedef enum logic [1:0] {IDLE, WAIT_SOF, PASS, DRAIN} state_t;

  state_t           state, state_n;
  logic [DIM_W-1:0] n_rows, n_cols, row, col;
  logic             beat, px, last_col, last_row, finish;

  assign busy     = (state != IDLE);
  assign m_pix    = rgb_t'(s_tdata);
  assign m_valid  = s_tvalid && ((state == PASS) || (state == WAIT_SOF && s_tuser));
  assign beat     = s_tvalid && s_tready;
  assign px       = m_valid && m_ready;
  assign last_col = (col == n_cols - 1'b1);
  assign last_row = (row == n_rows - 1'b1);

  always_comb begin
    unique case (state)
      IDLE:     s_tready = 1'b0;
      WAIT_SOF: s_tready = s_tuser ? m_ready : 1'b1;
      PASS:     s_tready = m_ready;
      DRAIN:    s_tready = 1'b1;
      default:  s_tready = 1'b0;
    endcase
  end

  assign ev_sof_skip  = beat && (state == WAIT_SOF) && !s_tuser;
  assign ev_eol_early = px && s_tlast && !last_col;
  assign ev_eol_late  = beat && (state == DRAIN);

  // Line end: either the last column carried TLAST, or a drained tail ended.
  logic line_end;
  assign line_end = (px && last_col && s_tlast) || (beat && state == DRAIN && s_tlast);
  assign finish   = line_end && last_row;

  always_comb begin
    state_n = state;
    unique case (state)
      IDLE: if (start) state_n = (rows == '0 || cols == '0) ? IDLE : WAIT_SOF;
      WAIT_SOF, PASS: begin
        if (px) state_n = (last_col && !s_tlast) ? DRAIN : (finish ? IDLE : PASS);
      end
      DRAIN: if (line_end) state_n = finish ? IDLE : PASS;
      default: state_n = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= IDLE;
      row    <= '0;
      col    <= '0;
      n_rows <= '0;
      n_cols <= '0;
      done   <= 1'b0;
    end else begin
      state <= state_n;
      done  <= finish || (state == IDLE && start && (rows == '0 || cols == '0));
      if (state == IDLE && start) begin
        n_rows <= rows;
        n_cols <= cols;
        row    <= '0;
        col    <= '0;
      end else begin
        if (px) col <= last_col ? '0 : col + 1'b1;
        if (line_end) row <= last_row ? '0 : row + 1'b1;
      end
    end
  end

  // AXI4-Stream rule for the upstream master: once TVALID is high it stays
  // high, with the same beat, until TREADY takes it.
  logic       held;
  logic [25:0] held_beat;
  always_ff @(posedge clk) begin
    if (!rst_n) held <= 1'b0;
    else        held <= s_tvalid && !s_tready;
    held_beat <= {s_tdata, s_tuser, s_tlast};
    if (rst_n && held) begin
      assert (s_tvalid && {s_tdata, s_tuser, s_tlast} == held_beat)
        else $error("axivideo2mat: stream beat withdrawn or changed before TREADY");
    end
  end

endmodule

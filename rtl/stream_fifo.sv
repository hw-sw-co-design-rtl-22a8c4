// stream_fifo: a dataflow channel between two pipeline tasks.
//
// A synchronous first-in first-out buffer with a valid/ready handshake on
// both sides. Each task of the accelerator runs as soon as its channel holds
// data, which lets the three stages (stream reader, pixel processing, stream
// writer) overlap; the channel absorbs short stalls on either side.
// Writing a FIFO rather than a ping-pong buffer, and its depth, are choices
// of this design.
//
// Interface: s_* is the write side, m_* the read side. A word moves when
//   valid and ready are both high on a rising clock edge. m_data shows the
//   oldest word whenever m_valid is high. count is the occupancy.
// Timing: one cycle from write to m_valid; full throughput (one word per
//   clock) when neither side stalls, also when full and read in the same
//   cycle. Reset (rst_n low, synchronous) empties the buffer.
module stream_fifo #(
  parameter int unsigned WIDTH = 24,
  parameter int unsigned DEPTH = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [WIDTH-1:0]           s_data,
  input  logic                       s_valid,
  output logic                       s_ready,
  output logic [WIDTH-1:0]           m_data,
  output logic                       m_valid,
  input  logic                       m_ready,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign m_valid = (count != '0);
  // A full FIFO still accepts a word when one leaves in the same cycle.
  assign s_ready = (count != CW'(DEPTH)) || m_ready;
  assign do_rd   = m_valid && m_ready;
  assign do_wr   = s_valid && s_ready;
  assign m_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= s_data;
  end

  // The occupancy never exceeds the depth (no write into a full buffer
  // unless a word leaves in the same cycle).
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (count <= CW'(DEPTH)) else $error("stream_fifo: occupancy above depth");
    end
  end

endmodule

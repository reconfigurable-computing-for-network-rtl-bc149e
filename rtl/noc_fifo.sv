// noc_fifo: synchronous first-in first-out buffer of AXI4-stream beats.
//
// This is the traffic FIFO of a NoC interface: it holds the traffic while
// the platform reconfigures the NoC. It is a circular buffer in a memory
// array (a block RAM on an FPGA) with a registered read port, so the head
// beat appears on m_beat one cycle after it was written. s_ready is low
// when the FIFO is full; m_valid is high while it holds a beat. level
// reports the number of beats stored. DEPTH must be a power of two.
// Depth and the read-register arrangement are this design's choices.
module noc_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic       clk,
  input  logic       rst_n,
  input  axis_beat_t s_beat,
  input  logic       s_valid,
  output logic       s_ready,
  output axis_beat_t m_beat,
  output logic       m_valid,
  input  logic       m_ready,
  output logic [$clog2(DEPTH):0] level
);
  localparam int unsigned AW = $clog2(DEPTH);

  axis_beat_t  mem [DEPTH];
  logic [AW:0] wr_ptr, rd_ptr;   // rd_ptr points past the beat in the output register
  logic        out_valid;
  axis_beat_t  out_q;
  logic        mem_empty, do_wr, do_rd_mem, out_take;

  assign mem_empty = (wr_ptr == rd_ptr);
  assign s_ready   = (wr_ptr - rd_ptr) < (AW+1)'(DEPTH);
  assign do_wr     = s_valid && s_ready;
  assign out_take  = m_valid && m_ready;
  // Refill the output register when it is empty or being emptied.
  assign do_rd_mem = !mem_empty && (!out_valid || out_take);

  assign m_valid = out_valid;
  assign m_beat  = out_q;
  assign level   = (wr_ptr - rd_ptr) + {{AW{1'b0}}, out_valid};

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= s_beat;
    if (do_rd_mem) out_q <= mem[rd_ptr[AW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      out_valid <= 1'b0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd_mem) begin
        rd_ptr    <= rd_ptr + 1'b1;
        out_valid <= 1'b1;
      end else if (out_take) begin
        out_valid <= 1'b0;
      end
    end
  end
endmodule

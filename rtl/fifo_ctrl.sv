// fifo_ctrl: buffer/release control at the output of a NoC interface FIFO.
//
// While buffer_req is low, beats flow from the FIFO to the NoC router
// unchanged (valid and ready are passed through in the same cycle). When
// the central controller raises buffer_req, the block lets the packet that
// is already leaving finish (up to its tlast beat), then stops taking beats
// from the FIFO so that newly arriving traffic collects there. From the
// cycle after the stop, traffic_buffered is high: no further data will leave
// this interface until the traffic is released. Lowering buffer_req releases
// the traffic and clears the flag in the next cycle. hold_cycles counts the
// cycles spent holding, i.e. the buffering time of the last switch-over.
// Buffer/release on command and the flag follow the platform description;
// stopping only at a packet boundary is this design's choice, so that no
// packet is split across a routing change.
module fifo_ctrl
  import noc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        buffer_req,
  output logic        traffic_buffered,
  output logic [31:0] hold_cycles,
  input  axis_beat_t  fifo_beat,
  input  logic        fifo_valid,
  output logic        fifo_ready,
  output axis_beat_t  m_beat,
  output logic        m_valid,
  input  logic        m_ready
);
  typedef enum logic {PASS, HOLD} state_e;
  state_e state;
  logic   in_pkt;   // a packet has started leaving and has not ended
  logic   gate;

  assign gate       = (state == PASS) && !(buffer_req && !in_pkt);
  assign m_beat     = fifo_beat;
  assign m_valid    = fifo_valid && gate;
  assign fifo_ready = m_ready && gate;
  assign traffic_buffered = (state == HOLD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= PASS;
      in_pkt      <= 1'b0;
      hold_cycles <= '0;
    end else begin
      if (m_valid && m_ready) in_pkt <= !fifo_beat.tlast;
      unique case (state)
        PASS: if (buffer_req && (!in_pkt || (m_valid && m_ready && fifo_beat.tlast))) begin
          state       <= HOLD;
          hold_cycles <= '0;
        end
        HOLD: begin
          hold_cycles <= hold_cycles + 1'b1;
          if (!buffer_req) state <= PASS;
        end
        default: state <= PASS;
      endcase
    end
  end

  // No beat may leave while the traffic is held.
  a_no_beat_while_held: assert property (@(posedge clk) disable iff (!rst_n)
    (state == HOLD) |-> !m_valid);
endmodule

// ip_parser: Layer 3 IPv4 parser, a virtual network function held by a PRR.
//
// Frames pass from the NoC side (s_*) to the output (m_*) unchanged and
// without delay; ready is passed back in the same cycle. Alongside, the
// first bytes of each frame are captured and, in the cycle after its last
// beat, checked and decoded: the frame must carry ethertype 0x0800 and an IPv4 header (version 4, header length of at least 5 words, all of it inside the frame) whose header checksum verifies; the source and destination addresses and the protocol are extracted.
// The result is presented for one cycle on info_valid/info, two clock
// edges after the edge that transferred the frame's last beat, and counted in parsed_ok (frames that parse
// without error) or parsed_err. clear zeroes both counters; it is used
// when the PRR is reconfigured. The counting of parsed frames follows the
// platform description's demonstration; the checks are this design's own.
module ip_parser
  import noc_pkg::*;
  import vnf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  axis_beat_t  s_beat,
  input  logic        s_valid,
  output logic        s_ready,
  output axis_beat_t  m_beat,
  output logic        m_valid,
  input  logic        m_ready,
  output logic        info_valid,
  output ip_info_t   info,
  output logic [31:0] parsed_ok,
  output logic [31:0] parsed_err
);
  logic        done;
  hdr_t        hdr;
  logic [15:0] len;
  ip_info_t   res;

  assign m_beat  = s_beat;
  assign m_valid = s_valid;
  assign s_ready = m_ready;

  frame_hdr_capture u_cap (
    .clk, .rst_n, .beat(s_beat), .xfer(s_valid && m_ready), .done, .hdr, .len
  );

  assign res = ip_check(hdr, len);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      info_valid <= 1'b0;
      info       <= '0;
      parsed_ok  <= '0;
      parsed_err <= '0;
    end else begin
      info_valid <= done;
      if (done) info <= res;
      if (clear) begin
        parsed_ok  <= '0;
        parsed_err <= '0;
      end else if (done) begin
        if (res.ok) parsed_ok  <= parsed_ok + 1'b1;
        else        parsed_err <= parsed_err + 1'b1;
      end
    end
  end
endmodule

// axis_switch: the AXI4-stream packet switch inside a NoC router.
//
// N inputs, N outputs. For the packet at the head of each input, the
// router supplies the output port it must go to (route_port) and whether a
// route exists (route_hit). Each output has a round-robin arbiter that
// grants one requesting input at a time; the grant is made in the cycle
// after the request and holds until the packet's tlast beat has passed, so
// packets are never interleaved. An output keeps one register stage; a
// granted input moves one beat per cycle when that stage can take it. A
// packet without a route is consumed and discarded, and counted in
// dropped_pkts, so that it cannot block its input. busy[i] is high while
// input i has a granted packet or a beat of it waits in an output register;
// the router uses it to pass on the traffic buffer flag.
// Packet switching of AXI4-stream follows the platform description; the
// arbitration scheme, the output register and the drop rule are this
// design's choices.
module axis_switch
  import noc_pkg::*;
#(
  parameter int unsigned N      = 15,
  parameter int unsigned PORT_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  axis_beat_t        s_beat  [N],
  input  logic              s_valid [N],
  output logic              s_ready [N],
  input  logic              route_hit  [N],
  input  logic [PORT_W-1:0] route_port [N],
  output axis_beat_t        m_beat  [N],
  output logic              m_valid [N],
  input  logic              m_ready [N],
  output logic              busy    [N],
  output logic [31:0]       dropped_pkts
);
  localparam int unsigned IW = $clog2(N);

  logic              in_lock [N];   // input has been granted an output
  logic [PORT_W-1:0] in_port [N];
  logic              in_drop [N];   // input is discarding an unroutable packet
  logic              out_own [N];   // output is granted to an input
  logic [IW-1:0]     rr_ptr  [N];
  logic [IW-1:0]     reg_src [N];   // source input of the beat in the output register
  logic              stage_free [N];

  always_comb begin
    for (int o = 0; o < N; o++) stage_free[o] = !m_valid[o] || m_ready[o];
    for (int i = 0; i < N; i++) begin
      if (in_drop[i])      s_ready[i] = 1'b1;
      else if (in_lock[i]) s_ready[i] = stage_free[in_port[i]];
      else                 s_ready[i] = 1'b0;
    end
    for (int i = 0; i < N; i++) begin
      busy[i] = in_lock[i];
      for (int o = 0; o < N; o++)
        if (m_valid[o] && reg_src[o] == IW'(i)) busy[i] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        in_lock[i] <= 1'b0;
        in_port[i] <= '0;
        in_drop[i] <= 1'b0;
        out_own[i] <= 1'b0;
        rr_ptr[i]  <= '0;
        reg_src[i] <= '0;
        m_valid[i] <= 1'b0;
        m_beat[i]  <= '0;
      end
      dropped_pkts <= '0;
    end else begin
      logic [31:0] drops;
      drops = dropped_pkts;
      // output registers drain
      for (int o = 0; o < N; o++)
        if (m_valid[o] && m_ready[o]) m_valid[o] <= 1'b0;

      // granted inputs move a beat
      for (int i = 0; i < N; i++) begin
        if (in_lock[i] && s_valid[i] && s_ready[i]) begin
          m_beat[in_port[i]]  <= s_beat[i];
          m_valid[in_port[i]] <= 1'b1;
          reg_src[in_port[i]] <= IW'(i);
          if (s_beat[i].tlast) begin
            in_lock[i]          <= 1'b0;
            out_own[in_port[i]] <= 1'b0;
          end
        end
        if (in_drop[i] && s_valid[i] && s_beat[i].tlast) begin
          in_drop[i] <= 1'b0;
          drops      = drops + 1'b1;
        end
        if (!in_lock[i] && !in_drop[i] && s_valid[i] && !route_hit[i]) in_drop[i] <= 1'b1;
      end

      dropped_pkts <= drops;

      // arbitration of free outputs, round robin from the last winner
      for (int o = 0; o < N; o++) begin
        if (!out_own[o]) begin
          logic found;
          int   cand;
          found = 1'b0;
          for (int k = 1; k <= N; k++) begin
            cand = (int'(rr_ptr[o]) + k) % N;
            if (!found && s_valid[cand] && !in_lock[cand] && !in_drop[cand] &&
                route_hit[cand] && int'(route_port[cand]) == o) begin
              found          = 1'b1;
              out_own[o]     <= 1'b1;
              rr_ptr[o]      <= IW'(cand);
              in_lock[cand]  <= 1'b1;
              in_port[cand]  <= PORT_W'(o);
            end
          end
        end
      end
    end
  end

  // An input is never granted while it is discarding, and grants are unique.
  for (genvar i = 0; i < N; i++) begin : g_chk
    a_lock_xor_drop: assert property (@(posedge clk) disable iff (!rst_n)
      !(in_lock[i] && in_drop[i]));
  end
endmodule

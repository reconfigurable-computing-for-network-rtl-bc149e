// noc_router: an N-port NoC router of the NFV platform.
//
// Each input carries AXI4-stream packets whose user channel holds the NoC
// destination. The router looks the destination of every input's head
// packet up in its routing table (32 destination/output-port pairs,
// written by the central controller over AXI4-lite) and the AXI4-stream
// switch forwards the packet to that output. With the default N = 15 it is
// the single router of a star NoC connecting up to 15 PHYs and PRRs.
// It also carries the traffic buffer flag: flag_out[i] rises one cycle
// after NoC interface i reports that its traffic is buffered and the last
// beat from input i has left the router, so the controller knows that no
// further data from that input is inside the NoC.
// Register map (byte offsets): 0x000 + 8*k pair k of the routing table
// (see routing_table), 0x100 packets dropped for lack of a route.
// The table, its size, its AXI4-lite update and the flag follow the
// platform description; the flag being one bit per input, the drop rule
// and the register map are this design's choices.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned N          = 15,
  parameter int unsigned RT_ENTRIES = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  axil_m2s_t  s_axil_i,
  output axil_s2m_t  s_axil_o,
  input  axis_beat_t s_beat  [N],
  input  logic       s_valid [N],
  output logic       s_ready [N],
  output axis_beat_t m_beat  [N],
  output logic       m_valid [N],
  input  logic       m_ready [N],
  input  logic       flag_in  [N],
  output logic       flag_out [N]
);
  localparam int unsigned PORT_W = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned RW     = $clog2(RT_ENTRIES);

  logic        wr_en;
  logic [15:0] wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data, tbl_rd_data, dropped_pkts;

  axil_regs u_regs (
    .clk, .rst_n, .s_axil_i, .s_axil_o,
    .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data
  );

  assign rd_data = rd_addr[8] ? ((rd_addr[7:0] == 8'h00) ? dropped_pkts : '0) : tbl_rd_data;

  noc_addr_t         dest [N];
  logic              hit  [N];
  logic [PORT_W-1:0] port [N];
  logic              route_ok [N];
  logic              busy [N];

  always_comb
    for (int i = 0; i < N; i++) begin
      dest[i]     = s_beat[i].tuser;
      route_ok[i] = hit[i] && (int'(port[i]) < N);
    end

  routing_table #(.ENTRIES(RT_ENTRIES), .PORT_W(PORT_W), .LOOKUPS(N)) u_rt (
    .clk, .rst_n,
    .wr_en      (wr_en && !wr_addr[8]),
    .wr_entry   (wr_addr[3+:RW]),
    .wr_word    (wr_addr[2]),
    .wr_data,
    .rd_entry   (rd_addr[3+:RW]),
    .rd_word    (rd_addr[2]),
    .rd_data    (tbl_rd_data),
    .lookup_dest(dest),
    .lookup_hit (hit),
    .lookup_port(port)
  );

  axis_switch #(.N(N), .PORT_W(PORT_W)) u_switch (
    .clk, .rst_n, .s_beat, .s_valid, .s_ready,
    .route_hit(route_ok), .route_port(port),
    .m_beat, .m_valid, .m_ready, .busy, .dropped_pkts
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) flag_out[i] <= 1'b0;
    end else begin
      for (int i = 0; i < N; i++) flag_out[i] <= flag_in[i] && !busy[i] && !s_valid[i];
    end
  end
endmodule

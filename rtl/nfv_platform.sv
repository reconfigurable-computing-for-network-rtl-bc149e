// nfv_platform: a protocol-independent switch built from reconfigurable
// regions on a network on chip.
//
// NUM_PHY 10 Gb/s ports and NUM_PRR partial reconfiguration regions (PRRs)
// each attach through their own NoC interface to one NoC router: the star
// NoC, in which all NUM_PHY + NUM_PRR (default 15) modules sit on one
// router and everything runs on the 156.25 MHz PHY clock. Router port p and
// interface p serve PHY p for p < NUM_PHY and PRR p - NUM_PHY above that.
// Because the functions sit in PRRs on the NoC rather than in the PHY
// data path, the same hardware acts as a circuit switch (a PHY's traffic
// routed straight to another PHY), as a Layer 2 packet switch (traffic
// routed to an Ethernet-layer function, whose NoC interface picks the
// output PHY from the Ethernet destination address) or as a chain through
// IP or UDP parsers, and the routing can change while traffic runs.
// The central controller takes host commands, writes the NoC interface and
// router tables over AXI4-lite (slave k = interface k for k < 15 of the
// address map, slave NUM_PHY+NUM_PRR = router), and runs the loss-free
// switch-over: hold the traffic in the interface FIFOs, wait for the
// router's traffic buffer flags, rewrite the routing table, release.
// Partial bit file downloads come from the host directly to the PRRs
// (prr_cfg_*), as on the FPGA. PHY ports carry Ethernet frames (first byte
// in bits 7:0, tkeep marks valid bytes) as they leave and enter the
// Ethernet MAC/PCS layers, which are outside this design; tuser is unused
// on them.
// The architecture follows the platform description; port widths, register
// maps and the host command format are this design's choices.
module nfv_platform
  import noc_pkg::*;
#(
  parameter int unsigned NUM_PHY     = 2,
  parameter int unsigned NUM_PRR     = 13,
  parameter int unsigned FIFO_DEPTH  = 512,
  parameter int unsigned ETH_ENTRIES = 32,
  parameter int unsigned RT_ENTRIES  = 32,
  parameter int unsigned STAGE_DEPTH = 64,
  parameter int unsigned DL_DIV      = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  // PHY side
  input  axis_beat_t  phy_rx_beat  [NUM_PHY],
  input  logic        phy_rx_valid [NUM_PHY],
  output logic        phy_rx_ready [NUM_PHY],
  output axis_beat_t  phy_tx_beat  [NUM_PHY],
  output logic        phy_tx_valid [NUM_PHY],
  input  logic        phy_tx_ready [NUM_PHY],
  // host: commands to the central controller
  input  host_cmd_t   host_cmd,
  input  logic        host_cmd_valid,
  output logic        host_cmd_ready,
  output logic        host_rsp_valid,
  output logic [31:0] host_rsp_data,
  output logic        host_rsp_err,
  input  logic        host_rsp_ready,
  // host: partial bit file downloads
  input  logic        prr_cfg_start [NUM_PRR],
  input  vnf_e        prr_cfg_vnf   [NUM_PRR],
  // status
  output vnf_e        prr_vnf        [NUM_PRR],
  output logic [31:0] prr_parsed_ok  [NUM_PRR],
  output logic [31:0] prr_parsed_err [NUM_PRR],
  output logic [31:0] prr_lost_beats [NUM_PRR],
  output logic [2:0]  ctrl_phase,
  output logic [15:0] switch_count
);
  localparam int unsigned N = NUM_PHY + NUM_PRR;

  // endpoint side of each interface
  axis_beat_t ep_in_beat  [N], ep_out_beat  [N];
  logic       ep_in_valid [N], ep_out_valid [N];
  logic       ep_in_ready [N], ep_out_ready [N];
  // router side
  axis_beat_t r_in_beat  [N], r_out_beat  [N];
  logic       r_in_valid [N], r_out_valid [N];
  logic       r_in_ready [N], r_out_ready [N];
  logic       buf_req [N], if_flag [N], rt_flag [N];
  // configuration
  axil_m2s_t  ctl_m2s;
  axil_s2m_t  ctl_s2m;
  axil_m2s_t  cfg_m2s [N+1];
  axil_s2m_t  cfg_s2m [N+1];

  central_controller #(.NI(N), .STAGE_DEPTH(STAGE_DEPTH)) u_ctrl (
    .clk, .rst_n,
    .cmd(host_cmd), .cmd_valid(host_cmd_valid), .cmd_ready(host_cmd_ready),
    .rsp_valid(host_rsp_valid), .rsp_data(host_rsp_data), .rsp_err(host_rsp_err),
    .rsp_ready(host_rsp_ready),
    .m_axil_o(ctl_m2s), .m_axil_i(ctl_s2m),
    .buffer_req(buf_req), .buffer_flag(rt_flag),
    .phase(ctrl_phase), .switch_count
  );

  axil_demux #(.M(N+1)) u_demux (
    .clk, .rst_n, .s_i(ctl_m2s), .s_o(ctl_s2m), .m_o(cfg_m2s), .m_i(cfg_s2m)
  );

  noc_router #(.N(N), .RT_ENTRIES(RT_ENTRIES)) u_router (
    .clk, .rst_n,
    .s_axil_i(cfg_m2s[N]), .s_axil_o(cfg_s2m[N]),
    .s_beat(r_in_beat), .s_valid(r_in_valid), .s_ready(r_in_ready),
    .m_beat(r_out_beat), .m_valid(r_out_valid), .m_ready(r_out_ready),
    .flag_in(if_flag), .flag_out(rt_flag)
  );

  for (genvar p = 0; p < N; p++) begin : g_if
    noc_interface #(.FIFO_DEPTH(FIFO_DEPTH), .ETH_ENTRIES(ETH_ENTRIES)) u_if (
      .clk, .rst_n,
      .s_axil_i(cfg_m2s[p]), .s_axil_o(cfg_s2m[p]),
      .buffer_req(buf_req[p]), .traffic_buffered(if_flag[p]),
      .ep_in_beat(ep_in_beat[p]),   .ep_in_valid(ep_in_valid[p]),   .ep_in_ready(ep_in_ready[p]),
      .noc_out_beat(r_in_beat[p]),  .noc_out_valid(r_in_valid[p]),  .noc_out_ready(r_in_ready[p]),
      .noc_in_beat(r_out_beat[p]),  .noc_in_valid(r_out_valid[p]),  .noc_in_ready(r_out_ready[p]),
      .ep_out_beat(ep_out_beat[p]), .ep_out_valid(ep_out_valid[p]), .ep_out_ready(ep_out_ready[p])
    );
  end

  for (genvar p = 0; p < NUM_PHY; p++) begin : g_phy
    assign ep_in_beat[p]   = phy_rx_beat[p];
    assign ep_in_valid[p]  = phy_rx_valid[p];
    assign phy_rx_ready[p] = ep_in_ready[p];
    assign phy_tx_beat[p]  = ep_out_beat[p];
    assign phy_tx_valid[p] = ep_out_valid[p];
    assign ep_out_ready[p] = phy_tx_ready[p];
  end

  for (genvar r = 0; r < NUM_PRR; r++) begin : g_prr
    localparam int unsigned P = NUM_PHY + r;
    prr_slot #(.DL_DIV(DL_DIV)) u_prr (
      .clk, .rst_n,
      .cfg_start(prr_cfg_start[r]), .cfg_vnf(prr_cfg_vnf[r]),
      .vnf(prr_vnf[r]), .downloading(),
      .s_beat(ep_out_beat[P]), .s_valid(ep_out_valid[P]), .s_ready(ep_out_ready[P]),
      .m_beat(ep_in_beat[P]),  .m_valid(ep_in_valid[P]),  .m_ready(ep_in_ready[P]),
      .parsed_ok(prr_parsed_ok[r]), .parsed_err(prr_parsed_err[r]),
      .lost_beats(prr_lost_beats[r])
    );
  end
endmodule

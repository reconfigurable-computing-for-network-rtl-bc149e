// prr_slot: a partial reconfiguration region (PRR) and the function it
// holds.
//
// On an FPGA a PRR is an area whose logic is replaced at run time by
// downloading a partial bit file; the rest of the chip keeps running. This
// module gives the same behaviour in plain logic: it contains one instance
// of every function a PRR can be loaded with (Ethernet, IP and UDP
// parsers) and a register naming the one that is loaded. cfg_start with
// cfg_vnf begins a download; for the download time of that function the
// region holds nothing (state "downloading"), then the new function is
// live, with cleared counters. The download times default to those
// measured for the partial bit files (1785, 1980 and 2115 us through the
// configuration port) at the 156.25 MHz clock; DL_DIV divides them for
// short simulations.
// A region that is empty or downloading has no logic to receive traffic:
// beats sent to it are accepted and lost, and counted in lost_beats, so
// that a wrong routing during a switch-over is visible. NoC side in (s_*)
// and out (m_*) are AXI4-stream; a loaded parser forwards frames unchanged.
// Modelling reconfiguration as a selection among resident functions is
// this design's choice; a real PRR holds only one of them.
module prr_slot
  import noc_pkg::*;
#(
  parameter int unsigned DL_ETH_PARSER = 278906,  // 1785 us * 156.25 MHz
  parameter int unsigned DL_IP_PARSER  = 309375,  // 1980 us * 156.25 MHz
  parameter int unsigned DL_UDP_PARSER = 330469,  // 2115 us * 156.25 MHz
  parameter int unsigned DL_DIV        = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_start,
  input  vnf_e        cfg_vnf,
  output vnf_e        vnf,
  output logic        downloading,
  input  axis_beat_t  s_beat,
  input  logic        s_valid,
  output logic        s_ready,
  output axis_beat_t  m_beat,
  output logic        m_valid,
  input  logic        m_ready,
  output logic [31:0] parsed_ok,
  output logic [31:0] parsed_err,
  output logic [31:0] lost_beats
);
  vnf_e        vnf_q;
  logic [31:0] dl_cnt;
  logic        clear;

  function automatic logic [31:0] dl_cycles(vnf_e v);
    unique case (v)
      VNF_ETH_PARSER: return 32'(DL_ETH_PARSER / DL_DIV);
      VNF_IP_PARSER:  return 32'(DL_IP_PARSER  / DL_DIV);
      VNF_UDP_PARSER: return 32'(DL_UDP_PARSER / DL_DIV);
      default:        return 32'd1;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vnf_q       <= VNF_EMPTY;
      downloading <= 1'b0;
      dl_cnt      <= '0;
      clear       <= 1'b0;
    end else begin
      clear <= 1'b0;
      if (cfg_start) begin
        vnf_q       <= cfg_vnf;
        downloading <= (cfg_vnf != VNF_EMPTY);
        dl_cnt      <= dl_cycles(cfg_vnf);
        clear       <= 1'b1;
      end else if (downloading) begin
        dl_cnt <= dl_cnt - 1'b1;
        if (dl_cnt <= 32'd1) downloading <= 1'b0;
      end
    end
  end

  assign vnf = downloading ? VNF_EMPTY : vnf_q;

  // ---- the resident functions ----
  axis_beat_t fn_m_beat  [4];
  logic       fn_m_valid [4];
  logic       fn_s_ready [4];
  logic       fn_m_ready [4];
  logic       fn_s_valid [4];
  logic [31:0] fn_ok [4], fn_err [4];

  always_comb begin
    for (int f = 1; f < 4; f++) begin
      fn_s_valid[f] = s_valid && (vnf == vnf_e'(f));
      fn_m_ready[f] = m_ready && (vnf == vnf_e'(f));
    end
    fn_s_valid[0] = 1'b0;
    fn_m_ready[0] = 1'b0;
    fn_m_beat[0]  = '0;
    fn_m_valid[0] = 1'b0;
    fn_s_ready[0] = 1'b1;
    fn_ok[0]      = '0;
    fn_err[0]     = '0;
  end

  eth_parser u_eth (
    .clk, .rst_n, .clear,
    .s_beat, .s_valid(fn_s_valid[1]), .s_ready(fn_s_ready[1]),
    .m_beat(fn_m_beat[1]), .m_valid(fn_m_valid[1]), .m_ready(fn_m_ready[1]),
    .info_valid(), .info(), .parsed_ok(fn_ok[1]), .parsed_err(fn_err[1])
  );
  ip_parser u_ip (
    .clk, .rst_n, .clear,
    .s_beat, .s_valid(fn_s_valid[2]), .s_ready(fn_s_ready[2]),
    .m_beat(fn_m_beat[2]), .m_valid(fn_m_valid[2]), .m_ready(fn_m_ready[2]),
    .info_valid(), .info(), .parsed_ok(fn_ok[2]), .parsed_err(fn_err[2])
  );
  udp_parser u_udp (
    .clk, .rst_n, .clear,
    .s_beat, .s_valid(fn_s_valid[3]), .s_ready(fn_s_ready[3]),
    .m_beat(fn_m_beat[3]), .m_valid(fn_m_valid[3]), .m_ready(fn_m_ready[3]),
    .info_valid(), .info(), .parsed_ok(fn_ok[3]), .parsed_err(fn_err[3])
  );

  assign m_beat     = fn_m_beat[vnf];
  assign m_valid    = fn_m_valid[vnf];
  assign s_ready    = fn_s_ready[vnf];
  assign parsed_ok  = fn_ok[vnf_q];
  assign parsed_err = fn_err[vnf_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lost_beats <= '0;
    else if (s_valid && vnf == VNF_EMPTY) lost_beats <= lost_beats + 1'b1;
  end
endmodule

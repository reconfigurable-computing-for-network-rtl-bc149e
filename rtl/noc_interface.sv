// noc_interface: the bridge between a PRR or PHY and a NoC router.
//
// Ingress (PRR/PHY to NoC): on the first beat of each packet the Ethernet
// destination address (bytes 0..5) is looked up in the ETH/NoC table. With
// lookup enabled and a hit, the table's NoC address becomes the packet's
// destination; otherwise the interface's default destination is used (this
// is how circuit-switched, non-Ethernet-addressed traffic is given a
// route). The destination is written into the user channel of every beat of
// the packet, and the beats enter the traffic FIFO. The FIFO controller
// releases them to the router, or holds them while the central controller
// asks for buffering and then raises traffic_buffered.
// Egress (NoC to PRR/PHY): beats from the router pass through one register
// stage; the user channel is cleared.
// Registers (AXI4-lite, byte offsets): 0x000 control (bit 0 lookup
// enable), 0x004 default destination, 0x008 status (bit 31 traffic
// buffered, low bits FIFO level), 0x00C packets accepted, 0x010 hold
// cycles of the last buffering, 0x100 + 16*k + 4*w word w of ETH/NoC table
// entry k. The blocks (table, FIFO, FIFO control) and their roles follow
// the platform description; the register map, default destination, lookup
// enable and sizes are this design's choices.
module noc_interface
  import noc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 512,
  parameter int unsigned ETH_ENTRIES = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  // configuration
  input  axil_m2s_t  s_axil_i,
  output axil_s2m_t  s_axil_o,
  input  logic       buffer_req,
  output logic       traffic_buffered,
  // ingress: from the PRR/PHY into the NoC
  input  axis_beat_t ep_in_beat,
  input  logic       ep_in_valid,
  output logic       ep_in_ready,
  output axis_beat_t noc_out_beat,
  output logic       noc_out_valid,
  input  logic       noc_out_ready,
  // egress: from the NoC to the PRR/PHY
  input  axis_beat_t noc_in_beat,
  input  logic       noc_in_valid,
  output logic       noc_in_ready,
  output axis_beat_t ep_out_beat,
  output logic       ep_out_valid,
  input  logic       ep_out_ready
);
  localparam int unsigned EW = $clog2(ETH_ENTRIES);
  localparam int unsigned LW = $clog2(FIFO_DEPTH) + 1;

  // ---------------- configuration registers ----------------
  logic        wr_en;
  logic [15:0] wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data, tbl_rd_data;
  logic        lookup_en;
  noc_addr_t   default_dest;
  logic [31:0] pkt_count, hold_cycles;
  logic [LW-1:0] fifo_level;

  axil_regs u_regs (
    .clk, .rst_n, .s_axil_i, .s_axil_o,
    .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lookup_en    <= 1'b0;
      default_dest <= '0;
    end else if (wr_en && !wr_addr[8]) begin
      if (wr_addr[7:0] == 8'h00) lookup_en    <= wr_data[0];
      if (wr_addr[7:0] == 8'h04) default_dest <= wr_data[NOC_ADDR_W-1:0];
    end
  end

  always_comb begin
    if (rd_addr[8]) rd_data = tbl_rd_data;
    else begin
      unique case (rd_addr[7:0])
        8'h00:   rd_data = {31'h0, lookup_en};
        8'h04:   rd_data = {{(32-NOC_ADDR_W){1'b0}}, default_dest};
        8'h08:   rd_data = {traffic_buffered, {(31-LW){1'b0}}, fifo_level};
        8'h0C:   rd_data = pkt_count;
        8'h10:   rd_data = hold_cycles;
        default: rd_data = '0;
      endcase
    end
  end

  // ---------------- ingress: address translation ----------------
  logic        in_mid;       // inside a packet, destination already chosen
  noc_addr_t   cur_dest, head_dest;
  logic [47:0] head_mac;
  logic        hit;
  noc_addr_t   hit_addr;
  axis_beat_t  fifo_in_beat;
  logic        fifo_in_ready;

  always_comb begin
    for (int b = 0; b < 6; b++) head_mac[47-8*b -: 8] = beat_byte(ep_in_beat.tdata, b);
  end

  eth_noc_table #(.ENTRIES(ETH_ENTRIES)) u_table (
    .clk, .rst_n,
    .wr_en      (wr_en && wr_addr[8]),
    .wr_entry   (wr_addr[4+:EW]),
    .wr_word    (wr_addr[3:2]),
    .wr_data,
    .rd_entry   (rd_addr[4+:EW]),
    .rd_word    (rd_addr[3:2]),
    .rd_data    (tbl_rd_data),
    .lookup_mac (head_mac),
    .lookup_hit (hit),
    .lookup_addr(hit_addr)
  );

  assign head_dest = (lookup_en && hit) ? hit_addr : default_dest;

  always_comb begin
    fifo_in_beat       = ep_in_beat;
    fifo_in_beat.tuser = in_mid ? cur_dest : head_dest;
  end
  assign ep_in_ready = fifo_in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_mid    <= 1'b0;
      cur_dest  <= '0;
      pkt_count <= '0;
    end else if (ep_in_valid && fifo_in_ready) begin
      if (!in_mid) cur_dest <= head_dest;
      in_mid <= !ep_in_beat.tlast;
      if (ep_in_beat.tlast) pkt_count <= pkt_count + 1'b1;
    end
  end

  // ---------------- ingress: FIFO and its controller ----------------
  axis_beat_t fifo_out_beat;
  logic       fifo_out_valid, fifo_out_ready;

  noc_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .s_beat (fifo_in_beat),  .s_valid(ep_in_valid),    .s_ready(fifo_in_ready),
    .m_beat (fifo_out_beat), .m_valid(fifo_out_valid), .m_ready(fifo_out_ready),
    .level  (fifo_level)
  );

  fifo_ctrl u_ctrl (
    .clk, .rst_n, .buffer_req, .traffic_buffered, .hold_cycles,
    .fifo_beat (fifo_out_beat), .fifo_valid(fifo_out_valid), .fifo_ready(fifo_out_ready),
    .m_beat    (noc_out_beat),  .m_valid   (noc_out_valid),  .m_ready   (noc_out_ready)
  );

  // ---------------- egress: one register stage ----------------
  assign noc_in_ready = !ep_out_valid || ep_out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ep_out_valid <= 1'b0;
      ep_out_beat  <= '0;
    end else if (noc_in_ready) begin
      ep_out_valid <= noc_in_valid;
      if (noc_in_valid) begin
        ep_out_beat       <= noc_in_beat;
        ep_out_beat.tuser <= '0;
      end
    end
  end
endmodule

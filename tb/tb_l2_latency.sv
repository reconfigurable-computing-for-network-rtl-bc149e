// tb_l2_latency: latency and throughput of the 2x2 Layer 2 packet switch on
// the star NoC, at the platform's default size.
//
// Set-up: each PHY port has its own Ethernet function. PHY0's frames go to
// the Ethernet parser in PRR0 and PHY1's go to the one in PRR1. Each of
// those interfaces maps the Ethernet destination to the PHY behind it
// through its ETH/NoC table. Both parsers are downloaded at full download
// time before traffic starts.
//
// Two sweeps, both with PHY0 -> PHY1 and PHY1 -> PHY0 at the same time:
//  * random frame sizes (64..1500 bytes) at 1, 3, 5, 7 and 9 Gb/s;
//  * fixed sizes from 100 to 1500 bytes in steps of 200, at 9 Gb/s.
// The offered rate counts 20 bytes of preamble and inter-frame gap per
// frame, as on a 10 Gb/s Ethernet line: a frame of L bytes is sent every
// (L + 20) * 8 / R ns, i.e. (L + 20) * 1.25 / R cycles of 6.4 ns.
//
// Latency is measured per frame, from the cycle its first beat enters a PHY
// receive port to the cycle its first beat leaves the other PHY's transmit
// port. That is the NoC's share: two router passes, three interfaces and
// the parser. It must stay within 78 cycles (0.5 us). That is the star NoC
// total of at most 1 us minus the 0.5 us taken by the Ethernet MAC and
// transceiver, which are outside this RTL. Every frame must arrive intact,
// and the switch must never refuse a beat at a PHY input, so it keeps up
// with the offered rate. The printed delivered rate counts frame bytes
// only, without preamble and gap.
module tb_l2_latency;
  import noc_pkg::*;
  import tb_frames_pkg::*;

  localparam int NUM_PHY = 2;
  localparam int NUM_PRR = 13;
  localparam int N       = NUM_PHY + NUM_PRR;
  localparam longint unsigned MAC_A = 48'h02_00_00_00_00_0A;  // behind PHY0
  localparam longint unsigned MAC_B = 48'h02_00_00_00_00_0B;  // behind PHY1
  localparam int F0 = 'h20, F1 = 'h21;   // NoC flow addresses of PHY0/PHY1 input
  localparam int FRAMES = 30;            // per direction and sweep point
  localparam int MAX_LAT = 78;           // 0.5 us at 156.25 MHz

  logic clk = 0, rst_n = 0;
  always #3.2 clk = ~clk;   // 156.25 MHz

  axis_beat_t  phy_rx_beat  [NUM_PHY];
  logic        phy_rx_valid [NUM_PHY];
  logic        phy_rx_ready [NUM_PHY];
  axis_beat_t  phy_tx_beat  [NUM_PHY];
  logic        phy_tx_valid [NUM_PHY];
  logic        phy_tx_ready [NUM_PHY];
  host_cmd_t   host_cmd;
  logic        host_cmd_valid, host_cmd_ready;
  logic        host_rsp_valid, host_rsp_err, host_rsp_ready;
  logic [31:0] host_rsp_data;
  logic        prr_cfg_start [NUM_PRR];
  vnf_e        prr_cfg_vnf   [NUM_PRR];
  vnf_e        prr_vnf       [NUM_PRR];
  logic [31:0] prr_parsed_ok [NUM_PRR], prr_parsed_err [NUM_PRR], prr_lost_beats [NUM_PRR];
  logic [2:0]  ctrl_phase;
  logic [15:0] switch_count;

  nfv_platform dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- watchdog ----------------
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- traffic ----------------
  typedef struct { bytes_t data; int port; longint unsigned t_in; } exp_t;
  exp_t        expected [int unsigned];
  int unsigned next_id = 1;
  bytes_t      send_q [NUM_PHY][$];
  int          idle_q [NUM_PHY][$];   // idle cycles after each frame
  bytes_t      rx_buf [NUM_PHY];
  longint unsigned t_first [NUM_PHY];
  int          rx_errors = 0;
  // statistics of the current sweep point
  int          n_rx, lat_min, lat_max;
  longint      lat_sum, rx_bytes;
  int          rx_stalls;         // cycles a PHY input was refused

  // queue one frame of len bytes from PHY src, paced for rate_g Gb/s
  task automatic enqueue(int src, int len, int rate_g);
    bytes_t f;
    int unsigned id = next_id++;
    int period, beats;
    f = make_frame(src == 0 ? MAC_B : MAC_A, longint'(src + 1), 2, id, len);
    expected[id] = '{data: f, port: 1 - src, t_in: 0};
    beats  = (len + 7) / 8;
    period = ((len + 20) * 5 + 4 * rate_g - 1) / (4 * rate_g);
    send_q[src].push_back(f);
    idle_q[src].push_back(period > beats ? period - beats : 0);
  endtask

  for (genvar p = 0; p < NUM_PHY; p++) begin : g_drv
    initial begin
      bytes_t f;
      int idle;
      phy_rx_valid[p] = 1'b0;
      phy_rx_beat[p]  = '0;
      forever begin
        @(negedge clk);
        if (send_q[p].size() == 0 || !rst_n) continue;
        f    = send_q[p].pop_front();
        idle = idle_q[p].pop_front();
        for (int b = 0; b < f.size(); b += 8) begin
          axis_beat_t bt;
          bit hs;
          bt = '0;
          for (int k = 0; k < 8; k++)
            if (b + k < f.size()) begin
              bt.tdata[8*k +: 8] = f[b+k];
              bt.tkeep[k] = 1'b1;
            end
          bt.tlast = (b + 8 >= f.size());
          phy_rx_beat[p]  = bt;
          phy_rx_valid[p] = 1'b1;
          do begin
            #1 hs = phy_rx_ready[p];
            if (hs && b == 0) expected[frame_id(f)].t_in = cycle;
            @(negedge clk);
          end while (!hs);
        end
        phy_rx_valid[p] = 1'b0;
        repeat (idle) @(negedge clk);
      end
    end

    assign phy_tx_ready[p] = 1'b1;

    always @(posedge clk) if (rst_n && phy_rx_valid[p] && !phy_rx_ready[p]) rx_stalls++;

    always @(posedge clk) if (rst_n && phy_tx_valid[p]) begin
      if (rx_buf[p].size() == 0) t_first[p] = cycle;
      for (int k = 0; k < 8; k++)
        if (phy_tx_beat[p].tkeep[k]) rx_buf[p].push_back(phy_tx_beat[p].tdata[8*k +: 8]);
      if (phy_tx_beat[p].tlast) begin
        int unsigned id;
        int lat;
        id = frame_id(rx_buf[p]);
        if (!expected.exists(id) || expected[id].port != p || expected[id].data != rx_buf[p]) begin
          rx_errors++;
          $display("FAIL: frame %0d missing from the scoreboard, wrong port or wrong bytes (PHY%0d)", id, p);
        end else begin
          lat = int'(t_first[p] - expected[id].t_in);
          n_rx++;
          lat_sum  += lat;
          rx_bytes += rx_buf[p].size();
          if (lat < lat_min) lat_min = lat;
          if (lat > lat_max) lat_max = lat;
          expected.delete(id);
        end
        rx_buf[p].delete();
      end
    end
  end

  // ---------------- host ----------------
  task automatic host(host_op_e op, int unsigned addr, int unsigned data);
    bit hs;
    @(negedge clk);
    host_cmd       = '{op: op, addr: AXIL_AW'(addr), data: data};
    host_cmd_valid = 1'b1;
    do begin
      #1 hs = host_cmd_ready;
      @(negedge clk);
    end while (!hs);
    host_cmd_valid = 1'b0;
    while (!host_rsp_valid) @(negedge clk);
    check(!host_rsp_err, $sformatf("host command at %h accepted", addr));
    @(negedge clk);
  endtask

  task automatic wr(int slave, int off, int unsigned data);
    host(CMD_WRITE, (slave << 16) | off, data);
  endtask

  task automatic route(int entry, int dest, int port);
    wr(N, 8*entry, 32'h8000_0000 | dest);
    wr(N, 8*entry + 4, port);
  endtask

  task automatic eth_table(int ifc);
    wr(ifc, 'h000, 1);
    wr(ifc, 'h004, 'hFE);
    wr(ifc, 'h100, 32'(MAC_A)); wr(ifc, 'h104, 32'(MAC_A >> 32)); wr(ifc, 'h108, 32'h8000_0000 | 0);
    wr(ifc, 'h110, 32'(MAC_B)); wr(ifc, 'h114, 32'(MAC_B >> 32)); wr(ifc, 'h118, 32'h8000_0000 | 1);
  endtask

  // run one sweep point; size 0 means random sizes
  task automatic point(int rate_g, int size, output int lmax);
    longint unsigned t0, t1;
    int c = 0;
    n_rx = 0; lat_sum = 0; rx_bytes = 0; lat_min = 1 << 30; lat_max = 0;
    rx_stalls = 0;
    for (int i = 0; i < FRAMES; i++)
      for (int s = 0; s < NUM_PHY; s++)
        enqueue(s, size != 0 ? size : 64 + int'($urandom % 1437), rate_g);
    t0 = cycle;
    while ((send_q[0].size() != 0 || send_q[1].size() != 0 || expected.num() != 0) && c < 400000) begin
      @(posedge clk);
      c++;
    end
    t1 = cycle;
    lmax = lat_max;
    check(expected.num() == 0 && n_rx == 2 * FRAMES,
          $sformatf("%0d Gb/s, size %0d: all %0d frames delivered", rate_g, size, 2 * FRAMES));
    $display("%0d Gb/s, %s: latency min %0d avg %0d max %0d cycles (max %0d ns), delivered %0d Gb/s per port",
             rate_g, size != 0 ? $sformatf("%0d-byte frames", size) : "random sizes",
             lat_min, int'(lat_sum / (n_rx > 0 ? n_rx : 1)), lat_max, lat_max * 64 / 10,
             int'(real'(rx_bytes) * 8.0 / (6.4 * real'(t1 - t0)) / 2.0 + 0.5));
    check(rx_stalls == 0, $sformatf("%0d Gb/s, size %0d: inputs never held back (%0d cycles)",
                                    rate_g, size, rx_stalls));
    check(lat_max <= MAX_LAT, $sformatf("%0d Gb/s, size %0d: NoC latency %0d cycles within %0d",
                                        rate_g, size, lat_max, MAX_LAT));
  endtask

  initial begin
    int lmax, lmax_small, lmax_big;
    for (int i = 0; i < NUM_PRR; i++) begin
      prr_cfg_start[i] = 1'b0;
      prr_cfg_vnf[i]   = VNF_EMPTY;
    end
    host_cmd = '0; host_cmd_valid = 1'b0; host_rsp_ready = 1'b1;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // per-port Ethernet functions in PRR0 and PRR1
    @(negedge clk);
    prr_cfg_start[0] = 1'b1; prr_cfg_vnf[0] = VNF_ETH_PARSER;
    prr_cfg_start[1] = 1'b1; prr_cfg_vnf[1] = VNF_ETH_PARSER;
    @(negedge clk);
    prr_cfg_start[0] = 1'b0; prr_cfg_start[1] = 1'b0;
    route(0, 0, 0);
    route(1, 1, 1);
    route(2, F0, 2);
    route(3, F1, 3);
    wr(0, 'h004, F0);
    wr(1, 'h004, F1);
    eth_table(2);
    eth_table(3);
    wait (prr_vnf[0] == VNF_ETH_PARSER && prr_vnf[1] == VNF_ETH_PARSER);

    // throughput sweep with random frame sizes
    for (int g = 1; g <= 9; g += 2) point(g, 0, lmax);
    // frame size sweep at 9 Gb/s
    for (int s = 100; s <= 1500; s += 200) begin
      point(9, s, lmax);
      if (s == 100)  lmax_small = lmax;
      if (s == 1500) lmax_big   = lmax;
    end
    // cut-through: the first beat does not wait for the rest of the frame
    check(lmax_big <= lmax_small + 8, "latency does not grow with frame size (cut-through path)");

    check(rx_errors == 0, "no wrong or unexpected frames");
    check(prr_parsed_ok[0] == 13 * FRAMES && prr_parsed_ok[1] == 13 * FRAMES,
          $sformatf("each Ethernet parser handled its port's frames (%0d, %0d)",
                    prr_parsed_ok[0], prr_parsed_ok[1]));
    check(prr_parsed_err[0] == 0 && prr_parsed_err[1] == 0, "no parse errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

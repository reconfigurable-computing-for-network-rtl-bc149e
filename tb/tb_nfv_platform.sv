// tb_nfv_platform: end-to-end test of the platform at its default size
// (2 PHY ports, 13 PRRs, one 15-port router, full download times).
//
// The host side configures the NoC through the central controller and the
// two PHY ports send frames, each with a unique id, which a scoreboard
// expects at one PHY output with identical bytes. The test walks through:
//  1. circuit switch: PHY0 <-> PHY1 straight through the router, including
//     non-IP frames, plus a full-rate burst whose latency and throughput
//     are measured;
//  2. while traffic runs, an Ethernet parser is downloaded into PRR0 and an
//     IP parser into PRR1, then a loss-free switch-over turns the platform
//     into a Layer 2 packet switch (PHY traffic through PRR0, output PHY
//     chosen from the Ethernet destination), with hairpin, contention and an
//     unknown address that the router must drop;
//  3. UDP traffic from PHY0 is moved onto the IP parser, a UDP parser is
//     downloaded into PRR2 while the IP parser keeps working, traffic is
//     switched to it, PRR1 is reloaded with a UDP parser and traffic is
//     switched back; the parsed counts must add up to the frames sent.
// Every mechanism (circuit path, packet path, hold, flag wait, table
// update, release, download, drop, backpressure, arbitration contention)
// is counted and must occur.
module tb_nfv_platform;
  import noc_pkg::*;
  import tb_frames_pkg::*;

  localparam int NUM_PHY = 2;
  localparam int NUM_PRR = 13;
  localparam int N       = NUM_PHY + NUM_PRR;
  localparam longint unsigned MAC_A = 48'h02_00_00_00_00_0A;  // behind PHY0
  localparam longint unsigned MAC_B = 48'h02_00_00_00_00_0B;  // behind PHY1
  localparam longint unsigned MAC_X = 48'h02_00_00_00_00_FF;  // unknown
  localparam int F0 = 'h20, F1 = 'h21;   // NoC flow addresses of PHY0/PHY1 input

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
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- scoreboard ----------------
  typedef struct { bytes_t data; int port; } exp_t;
  exp_t    expected [int unsigned];
  int unsigned next_id = 1;
  int      received = 0, rx_errors = 0;
  bytes_t  send_q [NUM_PHY][$];
  bytes_t  rx_buf [NUM_PHY];
  int      rx_beats [NUM_PHY];
  bit      gaps = 1'b1;           // random idle cycles between beats
  bit      tx_stall = 1'b1;       // random backpressure on the PHY outputs
  // mechanism counters
  int n_circuit = 0, n_packet = 0, n_pktmode = 0, n_held_beats = 0;
  int n_stall = 0, n_contention = 0, n_download = 0, n_flagwait = 0, n_update = 0, n_release = 0;
  int mode = 0;                   // 0 circuit, 1 packet, 2 parser chain

  function automatic int unsigned enqueue(int src, longint unsigned dst, int kind, int len, int port);
    bytes_t f;
    int unsigned id = next_id++;
    f = make_frame(dst, longint'(src + 1), kind, id, len);
    expected[id] = '{data: f, port: port};
    send_q[src].push_back(f);
    return id;
  endfunction

  // drivers: beat on the negedge, handshake decided by ready just before the posedge
  for (genvar p = 0; p < NUM_PHY; p++) begin : g_drv
    initial begin
      bytes_t f;
      phy_rx_valid[p] = 1'b0;
      phy_rx_beat[p]  = '0;
      forever begin
        @(negedge clk);
        if (send_q[p].size() == 0 || !rst_n) continue;
        f = send_q[p].pop_front();
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
          while (gaps && ($urandom % 8 == 0)) begin
            phy_rx_valid[p] = 1'b0;
            @(negedge clk);
          end
          phy_rx_beat[p]  = bt;
          phy_rx_valid[p] = 1'b1;
          do begin
            #1 hs = phy_rx_ready[p];
            if (ctrl_phase inside {3'd3, 3'd4}) n_held_beats += hs;
            @(negedge clk);
          end while (!hs);
        end
        phy_rx_valid[p] = 1'b0;
      end
    end

    always @(negedge clk) phy_tx_ready[p] <= !tx_stall || ($urandom % 4 != 0);

    always @(posedge clk) if (rst_n) begin
      if (phy_tx_valid[p] && !phy_tx_ready[p]) n_stall++;
      if (phy_tx_valid[p] && phy_tx_ready[p]) begin
        for (int k = 0; k < 8; k++)
          if (phy_tx_beat[p].tkeep[k]) rx_buf[p].push_back(phy_tx_beat[p].tdata[8*k +: 8]);
        rx_beats[p]++;
        if (phy_tx_beat[p].tlast) begin
          int unsigned id;
          id = frame_id(rx_buf[p]);
          if (!expected.exists(id)) begin
            rx_errors++;
            $display("FAIL: unexpected frame id %0d at PHY%0d", id, p);
          end else begin
            if (expected[id].port != p || expected[id].data != rx_buf[p]) begin
              rx_errors++;
              $display("FAIL: frame %0d wrong port or bytes (PHY%0d)", id, p);
            end
            expected.delete(id);
            received++;
            if (mode == 0) n_circuit++;
            if (mode == 1) n_packet++;
          end
          rx_buf[p].delete();
        end
      end
    end
  end

  // the two PHY inputs compete for the same output in packet mode
  always @(posedge clk)
    if (mode == 1 && phy_rx_valid[0] && phy_rx_valid[1]) n_contention++;

  // controller phases seen
  always @(posedge clk) begin
    if (ctrl_phase == 3'd3) n_flagwait++;
    if (ctrl_phase == 3'd4) n_update++;
    if (ctrl_phase == 3'd5) n_release++;
  end

  // ---------------- host ----------------
  task automatic host(host_op_e op, int unsigned addr, int unsigned data, output int unsigned rsp,
                      input bit expect_err = 1'b0);
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
    rsp = host_rsp_data;
    check(host_rsp_err == expect_err, $sformatf("host command %s at %h: error flag %0b", op.name(), addr, host_rsp_err));
    @(negedge clk);
  endtask

  function automatic int unsigned ra(int slave, int off);  // register address
    return (slave << 16) | off;
  endfunction

  task automatic wr(int slave, int off, int unsigned data);
    int unsigned r;
    host(CMD_WRITE, ra(slave, off), data, r);
  endtask

  task automatic route(int entry, int dest, int port, bit staged);
    int unsigned r;
    host(staged ? CMD_STAGE : CMD_WRITE, ra(N, 8*entry),     32'h8000_0000 | dest, r);
    host(staged ? CMD_STAGE : CMD_WRITE, ra(N, 8*entry + 4), port, r);
  endtask

  task automatic switch_over(int unsigned mask, output int unsigned held);
    int sc = switch_count;
    host(CMD_SWITCH, 0, mask, held);
    check(switch_count == 16'(sc + 1), "switch-over counted");
    check(held > 0 && held < 1000, $sformatf("traffic held for %0d cycles", held));
  endtask

  task automatic drain(int max_cycles);
    int c = 0;
    while ((send_q[0].size() != 0 || send_q[1].size() != 0 || expected.num() != 0) && c < max_cycles) begin
      @(posedge clk);
      c++;
    end
    check(expected.num() == 0, $sformatf("all frames delivered (%0d missing)", expected.num()));
  endtask

  task automatic load(int prr, vnf_e v);
    @(negedge clk);
    prr_cfg_start[prr] = 1'b1;
    prr_cfg_vnf[prr]   = v;
    @(negedge clk);
    prr_cfg_start[prr] = 1'b0;
    n_download++;
  endtask

  // keep PHY0 (and optionally PHY1) busy with frames until stop is set
  bit stop_traffic;
  task automatic background(int kind, bit both);
    stop_traffic = 1'b0;
    fork
      while (!stop_traffic) begin
        if (send_q[0].size() < 4) void'(enqueue(0, MAC_B, kind, 64 + $urandom % 400, 1));
        if (both && send_q[1].size() < 4) void'(enqueue(1, MAC_A, kind, 64 + $urandom % 400, 0));
        @(posedge clk);
      end
    join_none
  endtask

  initial begin
    int unsigned r, held, ip_snapshot, sent0, t0, t1, t_in, beats0;
    for (int i = 0; i < NUM_PRR; i++) begin
      prr_cfg_start[i] = 1'b0;
      prr_cfg_vnf[i]   = VNF_EMPTY;
    end
    host_cmd = '0; host_cmd_valid = 1'b0; host_rsp_ready = 1'b1;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // ---- 1. circuit switch ----
    route(0, 0, 0, 0);
    route(1, 1, 1, 0);
    route(2, F0, 1, 0);
    route(3, F1, 0, 0);
    wr(0, 'h004, F0);
    wr(1, 'h004, F1);
    host(CMD_READ, ra(N, 8*2 + 4), 0, r);
    check(r == 1, "routing table read back");
    host(CMD_READ, ra(20, 0), 0, r, 1'b1);   // no such slave: decode error expected
    for (int i = 0; i < 20; i++) begin
      void'(enqueue(0, MAC_X, i % 3, 64 + 37 * i, 1));
      void'(enqueue(1, MAC_X, i % 3, 64 + 53 * i, 0));
    end
    drain(100000);
    // full-rate burst: 20 maximum-size frames, no gaps, no backpressure
    gaps = 1'b0; tx_stall = 1'b0;
    @(posedge clk);
    beats0 = rx_beats[1];
    for (int i = 0; i < 20; i++) void'(enqueue(0, MAC_X, 2, 1500, 1));
    wait (phy_rx_valid[0]);
    t_in = 32'(cycle);
    wait (rx_beats[1] != beats0);
    t0 = 32'(cycle);
    $display("circuit first-beat latency through the NoC: %0d cycles", t0 - t_in);
    check(t0 - t_in <= 8, "circuit path latency of at most 8 cycles (51 ns) through the NoC");
    drain(100000);
    t1 = 32'(cycle);
    $display("circuit burst: %0d beats in %0d cycles", rx_beats[1] - beats0, t1 - t0);
    check(real'(rx_beats[1] - beats0) / real'(t1 - t0 + 1) >= 0.98, "circuit switch sustains >= 9.8 of 10 Gb/s");
    gaps = 1'b1; tx_stall = 1'b1;

    // ---- 2. download Ethernet parser (PRR0) and IP parser (PRR1) under traffic ----
    background(0, 1'b1);
    load(0, VNF_ETH_PARSER);
    load(1, VNF_IP_PARSER);
    check(prr_vnf[0] == VNF_EMPTY, "PRR0 empty while downloading");
    wait (prr_vnf[0] == VNF_ETH_PARSER && prr_vnf[1] == VNF_IP_PARSER);
    // PRR0 interface: Ethernet address lookup; unknown addresses get a dead flow
    wr(2, 'h000, 1);
    wr(2, 'h004, 'hFE);
    wr(2, 'h100, 32'(MAC_A)); wr(2, 'h104, 32'(MAC_A >> 32)); wr(2, 'h108, 32'h8000_0000 | 0);
    wr(2, 'h110, 32'(MAC_B)); wr(2, 'h114, 32'(MAC_B >> 32)); wr(2, 'h118, 32'h8000_0000 | 1);
    // loss-free switch to the packet switch: both PHY flows to PRR0
    route(2, F0, 2, 1);
    route(3, F1, 2, 1);
    switch_over(32'b11, held);
    $display("circuit -> packet switch-over held traffic for %0d cycles", held);
    stop_traffic = 1'b1;
    drain(200000);
    mode = 1;
    for (int i = 0; i < 30; i++) begin
      void'(enqueue(0, MAC_B, 2, 64 + 29 * i, 1));   // PHY0 -> PHY1
      void'(enqueue(1, MAC_B, 2, 64 + 31 * i, 1));   // PHY1 -> PHY1 (hairpin, contention)
      if (i % 5 == 0) void'(enqueue(0, MAC_A, 0, 100, 0));   // PHY0 -> PHY0 (hairpin)
    end
    send_q[0].push_back(make_frame(MAC_X, 1, 2, 32'hDEAD, 80));  // no route: dropped
    drain(200000);
    repeat (200) @(posedge clk);   // the dropped frame is not on the scoreboard
    n_pktmode = n_packet;
    host(CMD_READ, ra(N, 'h100), 0, r);
    check(r == 1, $sformatf("router dropped the unknown-address frame (%0d)", r));
    check(prr_parsed_ok[0] >= 67,
          $sformatf("Ethernet parser counted %0d frames", prr_parsed_ok[0]));
    check(prr_parsed_err[0] == 0, "Ethernet parser saw no short frames");

    // ---- 3. IP -> UDP parser switch-over and back ----
    mode = 2;
    wr(3, 'h004, 1);   // PRR1 output goes to PHY1
    wr(4, 'h004, 1);   // PRR2 output goes to PHY1
    route(2, F0, 3, 1);
    switch_over(32'b01, held);
    sent0 = next_id;
    background(2, 1'b0);
    load(2, VNF_UDP_PARSER);
    wait (prr_vnf[2] == VNF_UDP_PARSER);
    check(prr_parsed_ok[1] > 0, "IP parser kept working during the download");
    route(2, F0, 4, 1);
    switch_over(32'b01, held);
    $display("IP -> UDP switch-over held traffic for %0d cycles", held);
    repeat (200) @(posedge clk);
    ip_snapshot = prr_parsed_ok[1];
    load(1, VNF_UDP_PARSER);
    wait (prr_vnf[1] == VNF_UDP_PARSER);
    route(2, F0, 3, 1);
    switch_over(32'b01, held);
    repeat (2000) @(posedge clk);
    stop_traffic = 1'b1;
    drain(200000);
    $display("parsed: IP in PRR1 %0d, UDP in PRR2 %0d, UDP in PRR1 %0d, sent %0d",
             ip_snapshot, prr_parsed_ok[2], prr_parsed_ok[1], next_id - sent0);
    check(ip_snapshot + prr_parsed_ok[2] + prr_parsed_ok[1] == next_id - sent0,
          "no frame lost across the parser switch-overs");
    check(prr_parsed_err[1] == 0 && prr_parsed_err[2] == 0, "no parse errors");
    for (int i = 0; i < NUM_PRR; i++) check(prr_lost_beats[i] == 0, $sformatf("PRR%0d lost no data", i));
    check(rx_errors == 0, "scoreboard saw no wrong frames");

    // ---- mechanisms ----
    $display("circuit=%0d packet=%0d held_beats=%0d stall=%0d contention=%0d downloads=%0d flagwait=%0d update=%0d release=%0d",
             n_circuit, n_packet, n_held_beats, n_stall, n_contention, n_download, n_flagwait, n_update, n_release);
    check(n_circuit > 0, "circuit switching happened");
    check(n_pktmode > 0, "packet switching happened");
    check(n_held_beats > 0, "traffic was buffered in an interface FIFO during a switch-over");
    check(n_stall > 0, "output backpressure happened");
    check(n_contention > 0, "two inputs contended for one output");
    check(n_download == 4, "partial downloads happened");
    check(n_flagwait > 0 && n_update > 0 && n_release > 0, "all switch-over steps happened");
    check(switch_count == 4, "four switch-overs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_noc_interface: configures a NoC interface over AXI4-lite (ETH/NoC
// table, default destination, lookup enable), sends frames with known,
// unknown and disabled-lookup addresses and checks the NoC destination in
// the user channel of every beat. Then holds the traffic with buffer_req:
// the FIFO must fill to its depth and stall the input, no beat may leave
// while the flag is high, and after release every frame must arrive in
// order. The egress path is checked for contents, cleared user channel
// and one-cycle latency.
module tb_noc_interface;
  import noc_pkg::*;
  import tb_frames_pkg::*;
  localparam int DEPTH = 16;
  localparam longint unsigned MAC_A = 48'h02_11_22_33_44_55, MAC_B = 48'h02_66_77_88_99_AA;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  axil_m2s_t s_axil_i; axil_s2m_t s_axil_o;
  logic buffer_req, traffic_buffered;
  axis_beat_t ep_in_beat, noc_out_beat, noc_in_beat, ep_out_beat;
  logic ep_in_valid, ep_in_ready, noc_out_valid, noc_out_ready;
  logic noc_in_valid, noc_in_ready, ep_out_valid, ep_out_ready;
  noc_interface #(.FIFO_DEPTH(DEPTH), .ETH_ENTRIES(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic axil_write(int addr, int unsigned data);
    bit aw, w, b;
    @(negedge clk);
    s_axil_i.awaddr = AXIL_AW'(addr); s_axil_i.awvalid = 1;
    s_axil_i.wdata = data; s_axil_i.wvalid = 1; s_axil_i.wstrb = 4'hF; s_axil_i.bready = 1;
    aw = 0; w = 0;
    do begin
      #1;
      if (s_axil_o.awready) aw = 1;
      if (s_axil_o.wready) w = 1;
      @(negedge clk);
      s_axil_i.awvalid = !aw; s_axil_i.wvalid = !w;
    end while (!(aw && w));
    do begin #1 b = s_axil_o.bvalid; @(negedge clk); end while (!b);
    s_axil_i.bready = 0;
  endtask
  task automatic axil_read(int addr, output int unsigned data);
    bit a;
    @(negedge clk);
    s_axil_i.araddr = AXIL_AW'(addr); s_axil_i.arvalid = 1; s_axil_i.rready = 1;
    do begin #1 a = s_axil_o.arready; @(negedge clk); end while (!a);
    s_axil_i.arvalid = 0;
    while (!s_axil_o.rvalid) @(negedge clk);
    data = s_axil_o.rdata;
    @(negedge clk);
    s_axil_i.rready = 0;
  endtask

  typedef struct { bytes_t f; noc_addr_t dest; } exp_t;
  exp_t   exp_q[$];
  bytes_t rx;
  int     frames_out = 0, beats_while_held = 0;
  logic   out_ready_rand = 1;
  assign noc_out_ready = out_ready_rand;

  always @(posedge clk) if (rst_n && noc_out_valid && noc_out_ready) begin
    if (traffic_buffered) beats_while_held++;
    checks++;
    if (noc_out_beat.tuser != exp_q[0].dest) begin
      failures++; $display("FAIL: beat destination %h, expected %h", noc_out_beat.tuser, exp_q[0].dest);
    end
    for (int k = 0; k < 8; k++) if (noc_out_beat.tkeep[k]) rx.push_back(noc_out_beat.tdata[8*k +: 8]);
    if (noc_out_beat.tlast) begin
      checks++;
      if (rx != exp_q[0].f) begin failures++; $display("FAIL: frame bytes changed"); end
      void'(exp_q.pop_front());
      rx.delete();
      frames_out++;
    end
  end

  int stalled = 0;
  task automatic send(bytes_t f, noc_addr_t dest);
    exp_q.push_back('{f: f, dest: dest});
    for (int b = 0; b < f.size(); b += 8) begin
      bit hs;
      @(negedge clk);
      ep_in_beat = '0;
      ep_in_beat.tuser = 8'hEE;   // must be replaced
      for (int k = 0; k < 8; k++) if (b + k < f.size()) begin
        ep_in_beat.tdata[8*k +: 8] = f[b+k]; ep_in_beat.tkeep[k] = 1'b1;
      end
      ep_in_beat.tlast = (b + 8 >= f.size());
      ep_in_valid = 1;
      do begin #1 hs = ep_in_ready; if (!hs) begin stalled++; @(negedge clk); end end while (!hs);
    end
    @(negedge clk);
    ep_in_valid = 0;
  endtask

  initial begin
    int unsigned r;
    int n_before;
    s_axil_i = '0; buffer_req = 0; ep_in_valid = 0; ep_in_beat = '0;
    noc_in_valid = 0; noc_in_beat = '0; ep_out_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    axil_write('h004, 'h33);
    axil_write('h100, 32'(MAC_A)); axil_write('h104, 32'(MAC_A >> 32)); axil_write('h108, 32'h8000_0011);
    axil_write('h130, 32'(MAC_B)); axil_write('h134, 32'(MAC_B >> 32)); axil_write('h138, 32'h8000_0022);
    axil_read('h004, r);  check(r == 'h33, "default destination read back");
    axil_read('h134, r);  check(r == 32'(MAC_B >> 32), "table word read back");
    // lookup disabled: everything goes to the default destination
    send(make_frame(MAC_A, 1, 2, 1, 70), 8'h33);
    axil_write('h000, 1);
    send(make_frame(MAC_A, 1, 2, 2, 64), 8'h11);
    send(make_frame(MAC_B, 1, 0, 3, 130), 8'h22);
    send(make_frame(48'h02_00_00_00_00_01, 1, 1, 4, 90), 8'h33);
    repeat (10) @(negedge clk);
    check(frames_out == 4, $sformatf("four frames out (%0d)", frames_out));
    axil_read('h00C, r);  check(r == 4, "packet counter");
    // hold the traffic: the FIFO fills, the input stalls, nothing leaves
    buffer_req = 1;
    @(negedge clk);
    n_before = frames_out;
    fork
      for (int i = 0; i < 6; i++) send(make_frame(MAC_B, 1, 2, 10 + i, 64), 8'h22);
    join_none
    repeat (60) @(negedge clk);
    check(traffic_buffered, "flag high while held");
    check(frames_out == n_before, "no frame leaves while held");
    check(!ep_in_ready, "input stalls when the FIFO is full");
    axil_read('h008, r);
    check(r[31] && r[7:0] == DEPTH + 1, $sformatf("status shows flag and full FIFO (%h)", r));
    buffer_req = 0;
    repeat (100) @(negedge clk);
    check(!traffic_buffered, "flag cleared after release");
    check(frames_out == n_before + 6 && exp_q.size() == 0, "all held frames delivered in order");
    check(beats_while_held == 0, "no beat while the flag was high");
    check(stalled > 0, "input was stalled");
    axil_read('h010, r);  check(r >= 60, $sformatf("hold cycles %0d", r));
    // egress
    @(negedge clk);
    noc_in_beat = '{tdata: 64'hFEED_F00D, tkeep: 8'hFF, tlast: 1'b1, tuser: 8'h44};
    noc_in_valid = 1;
    #1 check(noc_in_ready, "egress ready");
    @(negedge clk);
    noc_in_valid = 0;
    check(ep_out_valid && ep_out_beat.tdata == 64'hFEED_F00D && ep_out_beat.tuser == 0 && ep_out_beat.tlast,
          "egress beat after one cycle, user channel cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_noc_router: a 4-port router. Programs the routing table over
// AXI4-lite, reads it back, sends packets to every destination from every
// input and checks where and how they arrive; an unknown destination must
// be dropped and counted in the drop register. Rewrites one pair and
// checks that the next packet follows the new route. Checks the traffic
// buffer flag: it follows flag_in one cycle later when the input is idle,
// and stays low while the input's last packet is still inside the router.
module tb_noc_router;
  import noc_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  axil_m2s_t s_axil_i; axil_s2m_t s_axil_o;
  axis_beat_t s_beat [N], m_beat [N];
  logic s_valid [N], s_ready [N], m_valid [N], m_ready [N], flag_in [N], flag_out [N];
  noc_router #(.N(N), .RT_ENTRIES(8)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
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


  // destination d (0x40 + k) is routed to port k % N by pair k
  int got_port [int];   // packet tag -> port where it arrived
  always @(posedge clk) if (rst_n)
    for (int o = 0; o < N; o++)
      if (m_valid[o] && m_ready[o] && m_beat[o].tlast) got_port[int'(m_beat[o].tdata[31:0])] = o;

  task automatic send(int i, noc_addr_t dest, int tag, int len);
    for (int b = 0; b < len; b++) begin
      bit hs;
      @(negedge clk);
      s_beat[i] = '{tdata: {32'(b), 32'(tag)}, tkeep: 8'hFF, tlast: (b == len - 1), tuser: dest};
      s_valid[i] = 1;
      do begin #1 hs = s_ready[i]; if (!hs) @(negedge clk); end while (!hs);
    end
    @(negedge clk);
    s_valid[i] = 0;
  endtask

  initial begin
    int unsigned r;
    s_axil_i = '0;
    for (int i = 0; i < N; i++) begin
      s_valid[i] = 0; s_beat[i] = '0; m_ready[i] = 1; flag_in[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 6; k++) begin
      axil_write(8 * k, 32'h8000_0040 + k);
      axil_write(8 * k + 4, k % N);
    end
    axil_read(8 * 5, r);     check(r == 32'h8000_0045, "pair 5 destination read back");
    axil_read(8 * 5 + 4, r); check(r == 1, "pair 5 port read back");
    for (int i = 0; i < N; i++)
      for (int k = 0; k < 6; k++) begin
        send(i, 8'h40 + 8'(k), 100 * i + k, 1 + (i + k) % 5);
      end
    repeat (20) @(negedge clk);
    for (int i = 0; i < N; i++)
      for (int k = 0; k < 6; k++)
        check(got_port.exists(100 * i + k) && got_port[100 * i + k] == k % N,
              $sformatf("packet from %0d to destination %0d at port %0d", i, k, k % N));
    send(2, 8'h77, 999, 3);
    repeat (5) @(negedge clk);
    check(!got_port.exists(999), "unknown destination not delivered");
    axil_read('h100, r); check(r == 1, $sformatf("drop counted (%0d)", r));
    // switch-over style update of one pair
    axil_write(8 * 1 + 4, 3);
    send(0, 8'h41, 555, 2);
    repeat (5) @(negedge clk);
    check(got_port.exists(555) && got_port[555] == 3, "new route used after the update");
    // traffic buffer flag
    flag_in[1] = 1;
    @(negedge clk);
    @(negedge clk);
    check(flag_out[1] && !flag_out[0], "flag passed on for an idle input");
    flag_in[1] = 0;
    m_ready[2] = 0;                      // output 2 stalls: packet stays inside
    fork send(3, 8'h42, 777, 4); join_none
    repeat (3) @(negedge clk);
    flag_in[3] = 1;
    repeat (5) @(negedge clk);
    check(!flag_out[3], "flag held back while the input's data is inside the router");
    m_ready[2] = 1;
    repeat (6) @(negedge clk);
    check(flag_out[3], "flag passed on once the data has left");
    check(got_port.exists(777) && got_port[777] == 2, "stalled packet delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

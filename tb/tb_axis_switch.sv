// tb_axis_switch: four inputs send random-length packets to random outputs
// (and some to no route) with random output backpressure. Every beat
// carries its source, packet number and beat number, so the testbench can
// check that packets arrive whole, uninterleaved, in order per source and
// output, at the right output, and that unroutable packets are dropped and
// counted. A phase where all inputs target output 0 checks that the
// round-robin arbiter serves each input equally, and a phase without
// backpressure checks one beat per cycle through a granted path.
module tb_axis_switch;
  import noc_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  axis_beat_t s_beat [N], m_beat [N];
  logic s_valid [N], s_ready [N], m_valid [N], m_ready [N], busy [N];
  logic route_hit [N]; logic [1:0] route_port [N];
  logic [31:0] dropped_pkts;
  axis_switch #(.N(N), .PORT_W(2)) dut (.*);

  always_comb for (int i = 0; i < N; i++) begin
    route_hit[i]  = s_beat[i].tuser != 8'hFF;
    route_port[i] = s_beat[i].tuser[1:0];
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit all_to_zero = 0, no_stall = 0, stop = 0;
  int sent_pkts [N], dropped_sent = 0, recv_pkts = 0, served [N];
  int last_pkt [N][N];        // per output and source: last packet number seen
  int cur_src [N], cur_pkt [N], cur_beat [N];  // per output: packet being received
  bit in_pkt [N];
  int full_rate_beats = 0;

  for (genvar i = 0; i < N; i++) begin : g_src
    initial begin
      int pkt = 0;
      s_valid[i] = 0; s_beat[i] = '0;
      @(posedge rst_n);
      while (!stop) begin
        int len, dst;
        len = 1 + $urandom % 6;
        dst = all_to_zero ? 0 : ($urandom % 10 == 0) ? 'hFF : $urandom % N;
        for (int b = 0; b < len; b++) begin
          bit hs;
          @(negedge clk);
          s_beat[i] = '{tdata: {16'(i), 16'(pkt), 16'(b), 16'(dst)}, tkeep: 8'hFF,
                        tlast: (b == len - 1), tuser: 8'(dst)};
          s_valid[i] = 1;
          do begin #1 hs = s_ready[i]; if (!hs) @(negedge clk); end while (!hs);
        end
        if (dst == 'hFF) dropped_sent++; else pkt++;
        sent_pkts[i]++;
        @(negedge clk);
        s_valid[i] = 0;
      end
    end
    always @(negedge clk) m_ready[i] <= no_stall || ($urandom % 3 != 0);
    always @(posedge clk) if (rst_n && m_valid[i] && m_ready[i]) begin
      int src, pkt, b, dst;
      {src, pkt, b, dst} = {16'h0, m_beat[i].tdata[63:48], 16'h0, m_beat[i].tdata[47:32],
                            16'h0, m_beat[i].tdata[31:16], 16'h0, m_beat[i].tdata[15:0]};
      checks++;
      if (dst != i) begin failures++; $display("FAIL: beat for output %0d at output %0d", dst, i); end
      if (!in_pkt[i]) begin
        checks++;
        if (b != 0 || pkt <= last_pkt[i][src]) begin
          failures++; $display("FAIL: output %0d: packet %0d beat %0d from %0d after packet %0d", i, pkt, b, src, last_pkt[i][src]);
        end
        cur_src[i] = src; cur_pkt[i] = pkt; cur_beat[i] = 0; in_pkt[i] = 1;
      end else begin
        checks++;
        if (src != cur_src[i] || pkt != cur_pkt[i] || b != cur_beat[i] + 1) begin
          failures++; $display("FAIL: output %0d: packets interleaved", i);
        end
        cur_beat[i] = b;
      end
      if (no_stall) full_rate_beats++;
      if (m_beat[i].tlast) begin
        in_pkt[i] = 0;
        last_pkt[i][src] = pkt;
        recv_pkts++;
        if (all_to_zero) served[src]++;
      end
    end
  end

  initial begin
    int t0;
    for (int o = 0; o < N; o++) for (int i = 0; i < N; i++) last_pkt[o][i] = -1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20000) @(negedge clk);
    check(recv_pkts > 1000, $sformatf("packets switched (%0d)", recv_pkts));
    check(dropped_pkts > 0, "unroutable packets dropped");
    // all inputs to output 0: fairness
    all_to_zero = 1;
    repeat (200) @(negedge clk);
    for (int i = 0; i < N; i++) served[i] = 0;
    repeat (8000) @(negedge clk);
    for (int i = 0; i < N; i++)
      check(served[i] > 0 && served[i] * N * 10 > (served[0] + served[1] + served[2] + served[3]) * 9 - 40 * N,
            $sformatf("input %0d served fairly (%0d)", i, served[i]));
    // quiesce, then measure throughput with no backpressure
    all_to_zero = 0; no_stall = 1;
    full_rate_beats = 0;
    t0 = 0;
    repeat (4000) @(negedge clk);
    $display("no-stall beats in 4000 cycles over %0d outputs: %0d", N, full_rate_beats);
    check(full_rate_beats > 4000, "several outputs busy in parallel");
    stop = 1;
    repeat (300) @(negedge clk);
    check(recv_pkts + int'(dropped_pkts) == sent_pkts[0] + sent_pkts[1] + sent_pkts[2] + sent_pkts[3],
          $sformatf("no packet lost: %0d received + %0d dropped", recv_pkts, dropped_pkts));
    check(int'(dropped_pkts) == dropped_sent, $sformatf("drop count %0d matches %0d sent; sent %0d %0d %0d %0d", dropped_pkts, dropped_sent, sent_pkts[0], sent_pkts[1], sent_pkts[2], sent_pkts[3]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

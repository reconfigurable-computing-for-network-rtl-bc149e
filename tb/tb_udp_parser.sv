// tb_udp_parser: sends frames of every kind (UDP, TCP, non-IP, bad IPv4 checksum,
// too short) through the parser with random gaps and output backpressure.
// Checks that frames leave byte for byte unchanged, that each frame's
// result appears two clock edges after its last beat with the right fields and
// verdict, and that the counters and the clear input work.
module tb_udp_parser;
  import noc_pkg::*;
  import vnf_pkg::*;
  import tb_frames_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear;
  axis_beat_t s_beat, m_beat;
  logic s_valid, s_ready, m_valid, m_ready, info_valid;
  udp_info_t info;
  logic [31:0] parsed_ok, parsed_err;
  udp_parser dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bytes_t f; int kind; bit bad; longint unsigned dst; longint unsigned src; } sent_t;
  sent_t  sent[$];
  bytes_t rx;
  int     n_ok = 0, n_err = 0, n_res = 0;
  logic   last_xfer, last_xfer2;

  always @(negedge clk) m_ready <= ($urandom % 3 != 0);

  always @(posedge clk) if (rst_n) begin
    last_xfer  <= m_valid && m_ready && m_beat.tlast;
    last_xfer2 <= last_xfer;
    if (info_valid) begin
      sent_t s;
      bit exp_ok;
      s = sent.pop_front();
      n_res++;
      checks++;
      if (!last_xfer2) begin failures++; $display("FAIL: result not two edges after the last beat"); end
      exp_ok = (s.kind == 2) && !s.bad;
      checks++;
      if (info.ok != exp_ok) begin failures++; $display("FAIL: verdict %0b, expected %0b (kind %0d)", info.ok, exp_ok, s.kind); end
      if (exp_ok) begin
        checks++;
        if (!(info.src_port == 16'd4000 && info.dst_port == 16'd5000 && info.length == 16'(s.f.size() - 34))) begin failures++; $display("FAIL: fields wrong (kind %0d)", s.kind); end
      end
      if (exp_ok) n_ok++; else n_err++;
    end
    if (m_valid && m_ready) begin
      for (int k = 0; k < 8; k++) if (m_beat.tkeep[k]) rx.push_back(m_beat.tdata[8*k +: 8]);
      if (m_beat.tlast) begin
        checks++;
        if (rx != sent[0].f) begin failures++; $display("FAIL: frame changed"); end
        rx.delete();
      end
    end
  end

  task automatic send(bytes_t f);
    for (int b = 0; b < f.size(); b += 8) begin
      bit hs;
      @(negedge clk);
      while ($urandom % 4 == 0) begin s_valid = 0; @(negedge clk); end
      s_beat = '0;
      for (int k = 0; k < 8; k++) if (b + k < f.size()) begin
        s_beat.tdata[8*k +: 8] = f[b+k]; s_beat.tkeep[k] = 1'b1;
      end
      s_beat.tlast = (b + 8 >= f.size());
      s_valid = 1;
      do begin #1 hs = s_ready; if (!hs) @(negedge clk); end while (!hs);
    end
    @(negedge clk);
    s_valid = 0;
  endtask

  initial begin
    s_valid = 0; s_beat = '0; clear = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      sent_t s;
      s.kind = i % 4;            // 0 non-IP, 1 TCP, 2 UDP, 3 short
      s.bad  = (i % 7 == 6);
      s.dst  = {16'h0200, 32'($urandom)};
      s.src  = 48'(i + 1);
      if (s.kind == 3) begin
        s.f = {};
        for (int b = 0; b < 6 + i % 8; b++) s.f.push_back(byte'(b));
      end else s.f = make_frame(s.dst, s.src, s.kind, i, 64 + $urandom % 300, s.bad);
      sent.push_back(s);
      send(s.f);
    end
    repeat (20) @(negedge clk);
    check(n_res == 60, $sformatf("one result per frame (%0d)", n_res));
    check(parsed_ok == 32'(n_ok) && parsed_err == 32'(n_err),
          $sformatf("counters %0d/%0d, expected %0d/%0d", parsed_ok, parsed_err, n_ok, n_err));
    check(n_ok > 0 && n_err > 0, "both verdicts seen");
    clear = 1; @(negedge clk); clear = 0;
    check(parsed_ok == 0 && parsed_err == 0, "clear zeroes the counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

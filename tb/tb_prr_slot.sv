// tb_prr_slot: loads each function into the region in turn (download times
// divided by 1000) and checks the download time in cycles against the
// bit file download times (1785, 1980 and 2115 us at 156.25 MHz), that
// traffic sent to an empty or downloading region is counted as lost, and
// that a loaded parser forwards frames unchanged and counts exactly the
// frames it should accept (UDP frames pass all three parsers, TCP frames
// pass the Ethernet and IP parsers only, non-IP frames only the Ethernet
// parser). Loading a function again clears its counters.
module tb_prr_slot;
  import noc_pkg::*;
  import tb_frames_pkg::*;
  localparam int DIV = 1000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_start; vnf_e cfg_vnf, vnf; logic downloading;
  axis_beat_t s_beat, m_beat; logic s_valid, s_ready, m_valid, m_ready;
  logic [31:0] parsed_ok, parsed_err, lost_beats;
  prr_slot #(.DL_DIV(DIV)) dut (.*);

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

  bytes_t sent_q[$], rx;
  int frames_out = 0;
  always @(negedge clk) m_ready <= ($urandom % 4 != 0);
  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    for (int k = 0; k < 8; k++) if (m_beat.tkeep[k]) rx.push_back(m_beat.tdata[8*k +: 8]);
    if (m_beat.tlast) begin
      checks++;
      if (rx != sent_q.pop_front()) begin failures++; $display("FAIL: frame changed"); end
      rx.delete();
      frames_out++;
    end
  end

  task automatic send(bytes_t f, bit expect_out);
    if (expect_out) sent_q.push_back(f);
    for (int b = 0; b < f.size(); b += 8) begin
      bit hs;
      @(negedge clk);
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

  task automatic load(vnf_e v, int expected_cycles);
    int c = 0;
    @(negedge clk);
    cfg_start = 1; cfg_vnf = v;
    @(negedge clk);
    cfg_start = 0;
    while (vnf != v) begin @(negedge clk); c++; end
    check(c == expected_cycles, $sformatf("%s download took %0d cycles, expected %0d", v.name(), c, expected_cycles));
    check(parsed_ok == 0 && parsed_err == 0, "counters cleared by the download");
  endtask

  task automatic traffic(int n_udp, int n_tcp, int n_raw);
    for (int i = 0; i < n_udp; i++) send(make_frame(48'h1, 48'h2, 2, i, 64 + 13 * i), 1);
    for (int i = 0; i < n_tcp; i++) send(make_frame(48'h1, 48'h2, 1, i, 100), 1);
    for (int i = 0; i < n_raw; i++) send(make_frame(48'h1, 48'h2, 0, i, 70), 1);
    repeat (10) @(negedge clk);
  endtask

  initial begin
    cfg_start = 0; cfg_vnf = VNF_EMPTY; s_valid = 0; s_beat = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(vnf == VNF_EMPTY, "empty after reset");
    send(make_frame(48'h1, 48'h2, 2, 0, 64), 0);
    check(lost_beats == 8, $sformatf("traffic into an empty region is lost (%0d beats)", lost_beats));
    // IP parser
    fork load(VNF_IP_PARSER, 1980 * 15625 / 100 / DIV); join_none
    repeat (20) @(negedge clk);
    check(downloading && vnf == VNF_EMPTY, "region empty while downloading");
    send(make_frame(48'h1, 48'h2, 2, 0, 64), 0);
    check(lost_beats == 16, "traffic during the download is lost");
    wait (vnf == VNF_IP_PARSER);
    repeat (2) @(negedge clk);
    traffic(5, 4, 3);
    check(parsed_ok == 9 && parsed_err == 3, $sformatf("IP parser counts %0d/%0d", parsed_ok, parsed_err));
    load(VNF_UDP_PARSER, 2115 * 15625 / 100 / DIV);
    traffic(5, 4, 3);
    check(parsed_ok == 5 && parsed_err == 7, $sformatf("UDP parser counts %0d/%0d", parsed_ok, parsed_err));
    load(VNF_ETH_PARSER, 1785 * 15625 / 100 / DIV);
    traffic(5, 4, 3);
    check(parsed_ok == 12 && parsed_err == 0, $sformatf("Ethernet parser counts %0d/%0d", parsed_ok, parsed_err));
    check(frames_out == 36 && sent_q.size() == 0, "every frame through a loaded parser came out");
    check(lost_beats == 16, "no loss while loaded");
    // reloading a function used before starts it with cleared counters
    load(VNF_IP_PARSER, 1980 * 15625 / 100 / DIV);
    check(parsed_ok == 0 && parsed_err == 0, "reloaded IP parser starts from zero");
    traffic(1, 0, 1);
    check(parsed_ok == 1 && parsed_err == 1, "reloaded IP parser counts again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

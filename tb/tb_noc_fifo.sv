// tb_noc_fifo: random push/pop traffic against a queue model of a small
// FIFO (DEPTH 8). Checks order and contents, that it fills to DEPTH plus
// the output register and then refuses input, the level output, and the
// two-cycle latency from a write into an empty FIFO to valid output.
module tb_noc_fifo;
  import noc_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  axis_beat_t s_beat, m_beat;
  logic s_valid, s_ready, m_valid, m_ready;
  logic [$clog2(DEPTH):0] level;
  noc_fifo #(.DEPTH(DEPTH)) dut (.*);

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

  axis_beat_t model[$];
  int full_seen = 0;
  initial begin
    bit push, pop;
    s_valid = 0; m_ready = 0; s_beat = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // latency: one write into the empty FIFO
    @(negedge clk);
    s_beat = '{tdata: 64'h1234, tkeep: 8'hFF, tlast: 1'b1, tuser: 8'h5};
    s_valid = 1;
    @(negedge clk);
    s_valid = 0;
    check(!m_valid, "not valid one cycle after the write");
    @(negedge clk);
    check(m_valid && m_beat.tdata == 64'h1234 && m_beat.tuser == 8'h5, "valid two cycles after the write");
    m_ready = 1;
    @(negedge clk);
    m_ready = 0;
    check(!m_valid && level == 0, "empty again");
    // random traffic, with a phase that fills the FIFO
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      s_beat = '{tdata: {$urandom, $urandom}, tkeep: 8'($urandom), tlast: 1'($urandom), tuser: 8'($urandom)};
      s_valid = (i % 1000 < 300) ? 1'b1 : 1'($urandom);
      m_ready = (i % 1000 < 300) ? 1'b0 : 1'($urandom);
      #1;
      check(level == model.size(), $sformatf("level %0d vs %0d", level, model.size()));
      if (model.size() > DEPTH) full_seen++;
      check(s_ready == (model.size() - (m_valid ? 1 : 0) < DEPTH), "s_ready matches occupancy");
      push = s_valid && s_ready;
      pop = m_valid && m_ready;
      if (pop) begin
        check(model.size() > 0 && m_beat == model[0], "head beat matches");
        void'(model.pop_front());
      end
      if (push) model.push_back(s_beat);
    end
    check(full_seen > 0, "FIFO was filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fifo_ctrl: feeds packets through the buffer/release control and
// raises buffer_req in the middle of a packet. Checks that the packet in
// progress finishes, that nothing leaves while held, that the flag is high
// exactly while held, that hold_cycles counts the held time and that the
// beats after release come out unchanged and in order.
module tb_fifo_ctrl;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic buffer_req, traffic_buffered;
  logic [31:0] hold_cycles;
  axis_beat_t fifo_beat, m_beat;
  logic fifo_valid, fifo_ready, m_valid, m_ready;
  fifo_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source: packets of 5 beats, beat k of packet p has tdata = p*16+k
  int src_idx = 0;
  always_comb begin
    fifo_beat = '0;
    fifo_beat.tdata = 64'((src_idx / 5) * 16 + src_idx % 5);
    fifo_beat.tlast = (src_idx % 5 == 4);
    fifo_valid = 1'b1;
  end
  int out_idx = 0, held_out = 0, flag_cycles = 0, hold_len = 0;
  always @(posedge clk) if (rst_n) begin
    if (fifo_valid && fifo_ready) src_idx <= src_idx + 1;
    if (m_valid && m_ready) begin
      if (m_beat.tdata != 64'((out_idx / 5) * 16 + out_idx % 5)) begin
        failures++; $display("FAIL: beat %0d wrong", out_idx);
      end
      out_idx <= out_idx + 1;
      if (traffic_buffered) held_out++;
    end
    if (traffic_buffered) flag_cycles++;
  end

  initial begin
    buffer_req = 0; m_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (7) @(negedge clk);      // 7 beats out: in the middle of packet 1
    check(out_idx == 7, $sformatf("full-rate pass-through (%0d beats)", out_idx));
    buffer_req = 1;
    @(negedge clk);
    check(!traffic_buffered, "packet in progress still leaving");
    repeat (2) @(negedge clk);
    check(out_idx == 10, $sformatf("packet finished before holding (%0d)", out_idx));
    check(traffic_buffered, "flag raised once held");
    repeat (20) @(negedge clk);
    check(out_idx == 10, "nothing leaves while held");
    check(hold_cycles >= 20, $sformatf("hold cycles counted (%0d)", hold_cycles));
    buffer_req = 0;
    @(negedge clk);
    check(!traffic_buffered, "flag cleared after release");
    m_ready = 0;
    repeat (3) @(negedge clk);
    m_ready = 1;
    repeat (30) @(negedge clk);
    check(out_idx > 35, "traffic flows after release");
    check(held_out == 0, "no beat left while the flag was high");
    // request at a packet boundary: holds without letting a new packet start
    while (out_idx % 5 != 0) @(negedge clk);
    buffer_req = 1;
    #1;
    check(!m_valid, "no new packet starts once buffering is requested");
    @(negedge clk);
    check(traffic_buffered, "held at once at a packet boundary");
    buffer_req = 0;
    repeat (2) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

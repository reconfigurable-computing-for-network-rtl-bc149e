// tb_central_controller: the controller against a model AXI4-lite slave
// (a register file with random ready delays) and model NoC flags that
// follow buffer_req after a delay. Checks direct writes and reads, staging
// (including the error when the staging memory is full) and the
// switch-over order: buffering starts only on the chosen interfaces, no
// staged write is issued before all their flags are up, the staged writes
// arrive in order, traffic is released after the last one, and the
// reported hold time matches the cycles buffer_req was high.
module tb_central_controller;
  import noc_pkg::*;
  localparam int NI = 4, SD = 4, FLAG_DELAY = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  host_cmd_t cmd; logic cmd_valid, cmd_ready, rsp_valid, rsp_err, rsp_ready;
  logic [31:0] rsp_data;
  axil_m2s_t m_axil_o; axil_s2m_t m_axil_i;
  logic buffer_req [NI], buffer_flag [NI];
  logic [2:0] phase; logic [15:0] switch_count;
  central_controller #(.NI(NI), .STAGE_DEPTH(SD)) dut (.*);

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

  // ---- model slave ----
  int unsigned regs [int unsigned];
  int unsigned wlog_addr[$], wlog_data[$];
  longint      wlog_cycle[$];
  longint      cyc = 0;
  bit aw_got, w_got, b_pend, r_pend;
  int unsigned aw_a, w_d, r_d;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) begin
    m_axil_i.awready <= !aw_got && !b_pend && ($urandom % 3 == 0);
    m_axil_i.wready  <= !w_got && !b_pend && ($urandom % 3 == 0);
    m_axil_i.arready <= !r_pend && ($urandom % 2 == 0);
  end
  always @(posedge clk) if (rst_n) begin
    if (m_axil_o.awvalid && m_axil_i.awready) begin aw_got = 1; aw_a = m_axil_o.awaddr; end
    if (m_axil_o.wvalid && m_axil_i.wready)   begin w_got = 1; w_d = m_axil_o.wdata; end
    if (m_axil_i.bvalid && m_axil_o.bready) begin b_pend = 0; m_axil_i.bvalid <= 0; end
    else if (aw_got && w_got && !b_pend) begin
      regs[aw_a] = w_d;
      wlog_addr.push_back(aw_a); wlog_data.push_back(w_d); wlog_cycle.push_back(cyc);
      aw_got = 0; w_got = 0; b_pend = 1;
      m_axil_i.bvalid <= 1;
    end
    if (m_axil_i.rvalid && m_axil_o.rready) begin r_pend = 0; m_axil_i.rvalid <= 0; end
    else if (m_axil_o.arvalid && m_axil_i.arready) begin
      r_pend = 1;
      m_axil_i.rvalid <= 1;
      m_axil_i.rdata  <= regs.exists(m_axil_o.araddr) ? regs[m_axil_o.araddr] : 32'hBAD0_BAD0;
    end
  end
  assign m_axil_i.bresp = RESP_OKAY;
  assign m_axil_i.rresp = RESP_OKAY;

  // ---- model NoC flags ----
  int  req_cnt [NI];
  longint flags_up_cycle = -1, release_cycle = -1, held = 0;
  bit  phase_seen [8];
  always @(posedge clk) if (rst_n) begin
    bit all;
    all = 1;
    for (int i = 0; i < NI; i++) begin
      req_cnt[i] = buffer_req[i] ? req_cnt[i] + 1 : 0;
      buffer_flag[i] <= (req_cnt[i] >= FLAG_DELAY);
    end
    phase_seen[phase] = 1;
    if (buffer_req[0]) held++;
  end

  task automatic host(host_op_e op, int unsigned addr, int unsigned data, output int unsigned rsp,
                      output bit err);
    bit hs;
    @(negedge clk);
    cmd = '{op: op, addr: AXIL_AW'(addr), data: data};
    cmd_valid = 1;
    do begin #1 hs = cmd_ready; @(negedge clk); end while (!hs);
    cmd_valid = 0;
    while (!rsp_valid) @(negedge clk);
    rsp = rsp_data; err = rsp_err;
    @(negedge clk);
  endtask

  initial begin
    int unsigned r; bit e;
    longint t_first_stage;
    cmd = '0; cmd_valid = 0; rsp_ready = 1;
    m_axil_i = '0;
    for (int i = 0; i < NI; i++) buffer_flag[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    host(CMD_WRITE, 'h0F_0008, 'h1234, r, e);
    check(!e && regs.exists('h0F_0008) && regs['h0F_0008] == 'h1234, "direct write lands");
    host(CMD_READ, 'h0F_0008, 0, r, e);
    check(!e && r == 'h1234, "read returns the register");
    for (int k = 0; k < SD; k++) begin
      host(CMD_STAGE, 'h0F_0000 + 4 * k, 'hA0 + k, r, e);
      check(!e && r == k, $sformatf("staged entry %0d", k));
    end
    host(CMD_STAGE, 'h0F_0100, 0, r, e);
    check(e, "staging beyond the depth is refused");
    check(wlog_addr.size() == 1, "staging writes nothing yet");
    held = 0;
    fork
      begin
        // flags of the chosen interfaces all up
        wait (buffer_flag[0] && buffer_flag[2]);
        flags_up_cycle = cyc;
        check(!buffer_req[1] && !buffer_req[3], "only the chosen interfaces buffer");
      end
    join_none
    host(CMD_SWITCH, 0, 'b0101, r, e);
    check(!e, "switch-over completes");
    check(wlog_addr.size() == 1 + SD, "every staged write applied");
    for (int k = 0; k < SD; k++) begin
      check(wlog_addr[1 + k] == 'h0F_0000 + 4 * k && wlog_data[1 + k] == 'hA0 + k, $sformatf("staged write %0d in order", k));
      check(wlog_cycle[1 + k] > flags_up_cycle, $sformatf("staged write %0d after the flags", k));
    end
    check(!buffer_req[0] && !buffer_req[2], "traffic released");
    check(r == held, $sformatf("reported hold %0d cycles, seen %0d", r, held));
    check(r > FLAG_DELAY, "hold includes the flag wait");
    check(phase_seen[2] && phase_seen[3] && phase_seen[4] && phase_seen[5], "all switch-over steps seen");
    check(switch_count == 1, "switch-over counted");
    // a second switch-over with nothing staged still buffers and releases
    host(CMD_SWITCH, 0, 'b0010, r, e);
    check(!e && r > FLAG_DELAY && wlog_addr.size() == 1 + SD && switch_count == 2, "empty switch-over");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// central_controller: configuration and switch-over orchestration of the
// NFV platform.
//
// The host sends commands (op, address, data) on a valid/ready port and
// gets one response per command:
//   CMD_WRITE  writes a 32-bit word over the AXI4-lite master at once
//              (NoC interface and router tables, interface settings);
//   CMD_READ   reads a word and returns it;
//   CMD_STAGE  stores an address/data pair for the next switch-over;
//   CMD_SWITCH runs the loss-free switch-over with data[NI-1:0] as the set
//              of NoC interfaces whose traffic must be held.
// The switch-over follows the steps of the platform description, after the
// host has already loaded the new function into the backup PRR (step 1):
// step 2, raise buffer_req for the chosen interfaces; step 3, wait until
// the router reports the traffic buffer flag of each of them; step 4, apply
// every staged write (the routing table update); step 5, drop buffer_req
// to release the traffic. The response to CMD_SWITCH carries the number of
// cycles the traffic was held. phase shows the step in progress.
// The AXI4-lite master has one transaction in flight. The command format,
// the staging memory and its depth are this design's choices.
module central_controller
  import noc_pkg::*;
#(
  parameter int unsigned NI          = 15,
  parameter int unsigned STAGE_DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  host_cmd_t   cmd,
  input  logic        cmd_valid,
  output logic        cmd_ready,
  output logic        rsp_valid,
  output logic [31:0] rsp_data,
  output logic        rsp_err,
  input  logic        rsp_ready,
  output axil_m2s_t   m_axil_o,
  input  axil_s2m_t   m_axil_i,
  output logic        buffer_req [NI],
  input  logic        buffer_flag [NI],
  output logic [2:0]  phase,
  output logic [15:0] switch_count
);
  typedef enum logic [3:0] {
    S_IDLE, S_WR, S_WR_RESP, S_RD, S_RD_RESP, S_BUFFER, S_WAIT_FLAG,
    S_UPDATE, S_UPD_RESP, S_RELEASE, S_RSP
  } state_e;

  typedef struct packed {
    logic [AXIL_AW-1:0] addr;
    logic [AXIL_DW-1:0] data;
  } stage_t;

  localparam int unsigned SW = $clog2(STAGE_DEPTH);

  state_e       state;
  stage_t       stage_mem [STAGE_DEPTH];
  logic [SW:0]  stage_cnt, upd_idx;
  logic [NI-1:0] mask;
  logic [31:0]  held_cycles;
  logic         aw_done, w_done;
  logic [AXIL_AW-1:0] cur_addr;
  logic [AXIL_DW-1:0] cur_data;
  logic         all_flags;

  always_comb begin
    all_flags = 1'b1;
    for (int i = 0; i < NI; i++)
      if (mask[i] && !buffer_flag[i]) all_flags = 1'b0;
  end

  assign cmd_ready = (state == S_IDLE);

  always_comb begin
    m_axil_o         = '0;
    m_axil_o.awaddr  = cur_addr;
    m_axil_o.wdata   = cur_data;
    m_axil_o.wstrb   = 4'hF;
    m_axil_o.araddr  = cur_addr;
    m_axil_o.awvalid = (state == S_WR || state == S_UPDATE) && !aw_done;
    m_axil_o.wvalid  = (state == S_WR || state == S_UPDATE) && !w_done;
    m_axil_o.bready  = (state == S_WR_RESP || state == S_UPD_RESP);
    m_axil_o.arvalid = (state == S_RD);
    m_axil_o.rready  = (state == S_RD_RESP);
  end

  always_comb begin
    for (int i = 0; i < NI; i++)
      buffer_req[i] = mask[i] && (state == S_BUFFER || state == S_WAIT_FLAG ||
                                  state == S_UPDATE || state == S_UPD_RESP);
  end

  // Step of the switch-over in progress (0 when none): 2 buffering,
  // 3 waiting for the flag, 4 updating the NoC, 5 releasing.
  always_comb begin
    unique case (state)
      S_BUFFER:             phase = 3'd2;
      S_WAIT_FLAG:          phase = 3'd3;
      S_UPDATE, S_UPD_RESP: phase = 3'd4;
      S_RELEASE:            phase = 3'd5;
      default:              phase = 3'd0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (state == S_IDLE && cmd_valid && cmd.op == CMD_STAGE && stage_cnt < (SW+1)'(STAGE_DEPTH))
      stage_mem[stage_cnt[SW-1:0]] <= '{addr: cmd.addr, data: cmd.data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      stage_cnt    <= '0;
      upd_idx      <= '0;
      mask         <= '0;
      held_cycles  <= '0;
      aw_done      <= 1'b0;
      w_done       <= 1'b0;
      cur_addr     <= '0;
      cur_data     <= '0;
      rsp_valid    <= 1'b0;
      rsp_data     <= '0;
      rsp_err      <= 1'b0;
      switch_count <= '0;
    end else begin
      if (state inside {S_BUFFER, S_WAIT_FLAG, S_UPDATE, S_UPD_RESP})
        held_cycles <= held_cycles + 1'b1;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          cur_addr <= cmd.addr;
          cur_data <= cmd.data;
          rsp_err  <= 1'b0;
          rsp_data <= '0;
          aw_done  <= 1'b0;
          w_done   <= 1'b0;
          unique case (cmd.op)
            CMD_WRITE: state <= S_WR;
            CMD_READ:  state <= S_RD;
            CMD_STAGE: begin
              if (stage_cnt < (SW+1)'(STAGE_DEPTH)) stage_cnt <= stage_cnt + 1'b1;
              else rsp_err <= 1'b1;
              rsp_data <= 32'(stage_cnt);
              state    <= S_RSP;
            end
            CMD_SWITCH: begin
              mask        <= cmd.data[NI-1:0];
              held_cycles <= '0;
              upd_idx     <= '0;
              state       <= S_BUFFER;
            end
            default: state <= S_RSP;
          endcase
        end
        S_WR, S_UPDATE: begin
          if (m_axil_i.awready) aw_done <= 1'b1;
          if (m_axil_i.wready)  w_done  <= 1'b1;
          if ((aw_done || m_axil_i.awready) && (w_done || m_axil_i.wready))
            state <= (state == S_WR) ? S_WR_RESP : S_UPD_RESP;
        end
        S_WR_RESP: if (m_axil_i.bvalid) begin
          rsp_err <= (m_axil_i.bresp != RESP_OKAY);
          state   <= S_RSP;
        end
        S_RD: if (m_axil_i.arready) state <= S_RD_RESP;
        S_RD_RESP: if (m_axil_i.rvalid) begin
          rsp_data <= m_axil_i.rdata;
          rsp_err  <= (m_axil_i.rresp != RESP_OKAY);
          state    <= S_RSP;
        end
        S_BUFFER: state <= S_WAIT_FLAG;
        S_WAIT_FLAG: if (all_flags) begin
          if (upd_idx == stage_cnt) state <= S_RELEASE;
          else begin
            cur_addr <= stage_mem[upd_idx[SW-1:0]].addr;
            cur_data <= stage_mem[upd_idx[SW-1:0]].data;
            aw_done  <= 1'b0;
            w_done   <= 1'b0;
            state    <= S_UPDATE;
          end
        end
        S_UPD_RESP: if (m_axil_i.bvalid) begin
          if (m_axil_i.bresp != RESP_OKAY) rsp_err <= 1'b1;
          if (upd_idx + 1'b1 == stage_cnt) state <= S_RELEASE;
          else begin
            cur_addr <= stage_mem[upd_idx[SW-1:0] + 1'b1].addr;
            cur_data <= stage_mem[upd_idx[SW-1:0] + 1'b1].data;
            aw_done  <= 1'b0;
            w_done   <= 1'b0;
            state    <= S_UPDATE;
          end
          upd_idx <= upd_idx + 1'b1;
        end
        S_RELEASE: begin
          stage_cnt    <= '0;
          mask         <= '0;
          rsp_data     <= held_cycles;
          switch_count <= switch_count + 1'b1;
          state        <= S_RSP;
        end
        S_RSP: begin
          rsp_valid <= 1'b1;
          if (rsp_valid && rsp_ready) begin
            rsp_valid <= 1'b0;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

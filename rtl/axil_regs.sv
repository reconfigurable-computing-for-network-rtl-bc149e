// axil_regs: AXI4-lite slave front end for a block of 32-bit registers.
//
// Accepts the write address and write data channels independently, holds
// each until both are present, then issues one write strobe (wr_en with
// wr_addr/wr_data) and answers on the B channel with OKAY. A read accepts
// the address, samples rd_data for rd_addr in that same cycle and returns it
// on the R channel one cycle later. Only the low 16 address bits are passed
// on; the slave behind decodes them. One transaction of each kind is in
// flight at a time. This is a helper of this design; the platform
// description only states that tables are updated through AXI4-lite.
module axil_regs
  import noc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  axil_m2s_t   s_axil_i,
  output axil_s2m_t   s_axil_o,
  output logic        wr_en,
  output logic [15:0] wr_addr,
  output logic [31:0] wr_data,
  output logic [15:0] rd_addr,
  input  logic [31:0] rd_data
);
  logic        aw_held, w_held, b_pend, r_pend;
  logic [15:0] aw_q;
  logic [31:0] w_q, r_q;

  assign s_axil_o.awready = !aw_held && !b_pend;
  assign s_axil_o.wready  = !w_held && !b_pend;
  assign s_axil_o.bvalid  = b_pend;
  assign s_axil_o.bresp   = RESP_OKAY;
  assign s_axil_o.arready = !r_pend;
  assign s_axil_o.rvalid  = r_pend;
  assign s_axil_o.rdata   = r_q;
  assign s_axil_o.rresp   = RESP_OKAY;

  assign wr_en   = aw_held && w_held;
  assign wr_addr = aw_q;
  assign wr_data = w_q;
  assign rd_addr = s_axil_i.araddr[15:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_held <= 1'b0;
      w_held  <= 1'b0;
      b_pend  <= 1'b0;
      r_pend  <= 1'b0;
      aw_q    <= '0;
      w_q     <= '0;
      r_q     <= '0;
    end else begin
      if (s_axil_i.awvalid && s_axil_o.awready) begin
        aw_held <= 1'b1;
        aw_q    <= s_axil_i.awaddr[15:0];
      end
      if (s_axil_i.wvalid && s_axil_o.wready) begin
        w_held <= 1'b1;
        w_q    <= s_axil_i.wdata;
      end
      if (wr_en) begin
        aw_held <= 1'b0;
        w_held  <= 1'b0;
        b_pend  <= 1'b1;
      end
      if (b_pend && s_axil_i.bready) b_pend <= 1'b0;
      if (s_axil_i.arvalid && s_axil_o.arready) begin
        r_pend <= 1'b1;
        r_q    <= rd_data;
      end else if (r_pend && s_axil_i.rready) begin
        r_pend <= 1'b0;
      end
    end
  end
endmodule

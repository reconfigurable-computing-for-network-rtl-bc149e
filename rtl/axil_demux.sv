// axil_demux: connects the central controller's AXI4-lite master to the
// configuration ports of the NoC interfaces and routers.
//
// Address bits 23:16 select slave 0..M-1; bits 15:0 go to the slave. The
// decode is combinational on awaddr/araddr, which is enough for a master
// that keeps its address stable for the whole transaction and has one
// transaction in flight (as the central controller does). An address
// beyond the last slave is accepted and answered with DECERR one cycle
// later. This helper and its address map are this design's choices.
module axil_demux
  import noc_pkg::*;
#(
  parameter int unsigned M = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_m2s_t s_i,
  output axil_s2m_t s_o,
  output axil_m2s_t m_o [M],
  input  axil_s2m_t m_i [M]
);
  logic [7:0] wsel, rsel;
  logic       wbad, rbad;
  logic       aw_seen, w_seen, err_b, err_r;

  assign wsel = s_i.awaddr[23:16];
  assign rsel = s_i.araddr[23:16];
  assign wbad = (int'(wsel) >= M);
  assign rbad = (int'(rsel) >= M);

  always_comb begin
    for (int k = 0; k < M; k++) begin
      m_o[k]         = s_i;
      m_o[k].awvalid = s_i.awvalid && !wbad && (int'(wsel) == k);
      m_o[k].wvalid  = s_i.wvalid  && !wbad && (int'(wsel) == k);
      m_o[k].bready  = s_i.bready  && !wbad && (int'(wsel) == k);
      m_o[k].arvalid = s_i.arvalid && !rbad && (int'(rsel) == k);
      m_o[k].rready  = s_i.rready  && !rbad && (int'(rsel) == k);
    end
    s_o = '0;
    if (wbad) begin
      s_o.awready = !aw_seen;
      s_o.wready  = !w_seen;
      s_o.bvalid  = err_b;
      s_o.bresp   = RESP_DECERR;
    end else begin
      for (int k = 0; k < M; k++) begin
        if (int'(wsel) == k) begin
          s_o.awready = m_i[k].awready;
          s_o.wready  = m_i[k].wready;
          s_o.bvalid  = m_i[k].bvalid;
          s_o.bresp   = m_i[k].bresp;
        end
      end
    end
    if (rbad) begin
      s_o.arready = !err_r;
      s_o.rvalid  = err_r;
      s_o.rresp   = RESP_DECERR;
      s_o.rdata   = '0;
    end else begin
      for (int k = 0; k < M; k++) begin
        if (int'(rsel) == k) begin
          s_o.arready = m_i[k].arready;
          s_o.rvalid  = m_i[k].rvalid;
          s_o.rresp   = m_i[k].rresp;
          s_o.rdata   = m_i[k].rdata;
        end
      end
    end
  end

  // Error responder for addresses that select no slave.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_seen <= 1'b0;
      w_seen  <= 1'b0;
      err_b   <= 1'b0;
      err_r   <= 1'b0;
    end else begin
      if (wbad && s_i.awvalid && !aw_seen) aw_seen <= 1'b1;
      if (wbad && s_i.wvalid && !w_seen)   w_seen  <= 1'b1;
      if (aw_seen && w_seen && !err_b) err_b <= 1'b1;
      if (err_b && s_i.bready) begin
        err_b   <= 1'b0;
        aw_seen <= 1'b0;
        w_seen  <= 1'b0;
      end
      if (rbad && s_i.arvalid && !err_r) err_r <= 1'b1;
      else if (err_r && s_i.rready) err_r <= 1'b0;
    end
  end
endmodule

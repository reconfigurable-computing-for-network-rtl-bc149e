// eth_noc_table: translation of Ethernet destination addresses into NoC
// addresses, held in a NoC interface.
//
// The table has ENTRIES entries of {valid, 48-bit MAC address, NoC
// address}. A lookup compares the given MAC address with every valid entry
// in parallel (content-addressed, combinational) and returns the NoC
// address of the lowest-numbered matching entry with hit = 1. The central
// controller writes entries one 32-bit word at a time:
//   word 0: MAC address bits 31:0
//   word 1: MAC address bits 47:32 in bits 15:0
//   word 2: bit 31 valid, bits 7:0 NoC address
// The MAC address is taken with its first transmitted octet as bits 47:40.
// Table lookup by Ethernet address and update by the controller follow the
// platform description; the entry count, word layout and parallel match are
// this design's choices.
module eth_noc_table
  import noc_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_entry,
  input  logic [1:0]                 wr_word,
  input  logic [31:0]                wr_data,
  input  logic [$clog2(ENTRIES)-1:0] rd_entry,
  input  logic [1:0]                 rd_word,
  output logic [31:0]                rd_data,
  input  logic [47:0]                lookup_mac,
  output logic                       lookup_hit,
  output noc_addr_t                  lookup_addr
);
  typedef struct packed {
    logic        valid;
    logic [47:0] mac;
    noc_addr_t   addr;
  } entry_t;

  entry_t tbl [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tbl[i] <= '0;
    end else if (wr_en) begin
      unique case (wr_word)
        2'd0: tbl[wr_entry].mac[31:0]  <= wr_data;
        2'd1: tbl[wr_entry].mac[47:32] <= wr_data[15:0];
        2'd2: begin
          tbl[wr_entry].valid <= wr_data[31];
          tbl[wr_entry].addr  <= wr_data[NOC_ADDR_W-1:0];
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (rd_word)
      2'd0:    rd_data = tbl[rd_entry].mac[31:0];
      2'd1:    rd_data = {16'h0, tbl[rd_entry].mac[47:32]};
      2'd2:    rd_data = {tbl[rd_entry].valid, {(31-NOC_ADDR_W){1'b0}}, tbl[rd_entry].addr};
      default: rd_data = '0;
    endcase
  end

  always_comb begin
    lookup_hit  = 1'b0;
    lookup_addr = '0;
    for (int i = ENTRIES-1; i >= 0; i--) begin
      if (tbl[i].valid && tbl[i].mac == lookup_mac) begin
        lookup_hit  = 1'b1;
        lookup_addr = tbl[i].addr;
      end
    end
  end
endmodule

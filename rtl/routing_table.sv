// routing_table: the destination-to-output-port table of a NoC router.
//
// ENTRIES pairs of {NoC destination, output port}, each pair occupying
// 8 bytes (two 32-bit words) of the router's register space, 32 pairs per
// router, as the platform description gives. Byte offset 8*k is word 0 of
// pair k: bit 31 valid, bits 7:0 destination. Offset 8*k+4 is word 1:
// bits 7:0 output port. A lookup compares a destination with all valid
// pairs in parallel (combinational) and returns the port of the
// lowest-numbered match; miss is flagged with hit = 0. There are LOOKUPS
// independent lookup ports, one per router input. Writes come from the
// router's AXI4-lite front end and take effect at the next clock edge.
// The word layout and the parallel match are this design's choices.
module routing_table
  import noc_pkg::*;
#(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned PORT_W  = 4,
  parameter int unsigned LOOKUPS = 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_entry,
  input  logic                       wr_word,
  input  logic [31:0]                wr_data,
  input  logic [$clog2(ENTRIES)-1:0] rd_entry,
  input  logic                       rd_word,
  output logic [31:0]                rd_data,
  input  noc_addr_t                  lookup_dest [LOOKUPS],
  output logic                       lookup_hit  [LOOKUPS],
  output logic [PORT_W-1:0]          lookup_port [LOOKUPS]
);
  typedef struct packed {
    logic              valid;
    noc_addr_t         dest;
    logic [PORT_W-1:0] port;
  } pair_t;

  pair_t tbl [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tbl[i] <= '0;
    end else if (wr_en) begin
      if (!wr_word) begin
        tbl[wr_entry].valid <= wr_data[31];
        tbl[wr_entry].dest  <= wr_data[NOC_ADDR_W-1:0];
      end else begin
        tbl[wr_entry].port  <= wr_data[PORT_W-1:0];
      end
    end
  end

  assign rd_data = !rd_word
                   ? {tbl[rd_entry].valid, {(31-NOC_ADDR_W){1'b0}}, tbl[rd_entry].dest}
                   : {{(32-PORT_W){1'b0}}, tbl[rd_entry].port};

  always_comb begin
    for (int l = 0; l < LOOKUPS; l++) begin
      lookup_hit[l]  = 1'b0;
      lookup_port[l] = '0;
      for (int i = ENTRIES-1; i >= 0; i--) begin
        if (tbl[i].valid && tbl[i].dest == lookup_dest[l]) begin
          lookup_hit[l]  = 1'b1;
          lookup_port[l] = tbl[i].port;
        end
      end
    end
  end
endmodule

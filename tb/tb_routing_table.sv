// tb_routing_table: fills a 32-pair table with random destination/port
// pairs through the write port, reads every word back and checks two
// lookup ports at once against the testbench's own list, including
// misses, invalid pairs and rewriting a pair at run time.
module tb_routing_table;
  import noc_pkg::*;
  localparam int E = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en, wr_word, rd_word; logic [4:0] wr_entry, rd_entry;
  logic [31:0] wr_data, rd_data;
  noc_addr_t lookup_dest [2]; logic lookup_hit [2]; logic [3:0] lookup_port [2];
  routing_table #(.ENTRIES(E), .PORT_W(4), .LOOKUPS(2)) dut (.*);

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
  task automatic wr(int e, bit w, logic [31:0] d);
    @(negedge clk);
    wr_en = 1; wr_entry = 5'(e); wr_word = w; wr_data = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  int port_of [256];   // -1: no valid pair
  initial begin
    wr_en = 0; wr_word = 0; rd_word = 0; wr_entry = 0; rd_entry = 0; wr_data = 0;
    lookup_dest[0] = 0; lookup_dest[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (port_of[d]) port_of[d] = -1;
    for (int e = 0; e < E; e++) begin
      // destinations 3*e are unique; every fourth pair is left invalid
      wr(e, 0, {(e % 4 != 3), 23'h0, 8'(3 * e)});
      wr(e, 1, 32'(e % 15));
      if (e % 4 != 3) port_of[3 * e] = e % 15;
    end
    for (int e = 0; e < E; e++) begin
      rd_entry = 5'(e); rd_word = 0; #1;
      check(rd_data == {(e % 4 != 3), 23'h0, 8'(3 * e)}, $sformatf("pair %0d word 0", e));
      rd_word = 1; #1;
      check(rd_data == 32'(e % 15), $sformatf("pair %0d word 1", e));
    end
    for (int d = 0; d < 256; d += 2) begin
      lookup_dest[0] = 8'(d); lookup_dest[1] = 8'(d + 1); #1;
      for (int l = 0; l < 2; l++) begin
        check(lookup_hit[l] == (port_of[d + l] >= 0), $sformatf("hit for destination %0d", d + l));
        if (port_of[d + l] >= 0) check(lookup_port[l] == 4'(port_of[d + l]), $sformatf("port for destination %0d", d + l));
      end
    end
    // rewrite the port of destination 6 (pair 2) as a switch-over would
    wr(2, 1, 32'd14);
    lookup_dest[0] = 8'd6; #1;
    check(lookup_hit[0] && lookup_port[0] == 4'd14, "updated pair used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_eth_noc_table: writes entries word by word, reads them back, and
// checks lookups (hit, miss, invalid entry, lowest entry wins on a
// duplicate) against a list kept by the testbench.
module tb_eth_noc_table;
  import noc_pkg::*;
  localparam int E = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en; logic [2:0] wr_entry, rd_entry; logic [1:0] wr_word, rd_word;
  logic [31:0] wr_data, rd_data;
  logic [47:0] lookup_mac; logic lookup_hit; noc_addr_t lookup_addr;
  eth_noc_table #(.ENTRIES(E)) dut (.*);

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

  task automatic wr(int e, int w, logic [31:0] d);
    @(negedge clk);
    wr_en = 1; wr_entry = 3'(e); wr_word = 2'(w); wr_data = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  logic [47:0] macs [E];
  bit          val  [E];
  initial begin
    wr_en = 0; rd_entry = 0; rd_word = 0; lookup_mac = 0; wr_entry = 0; wr_word = 0; wr_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    lookup_mac = 48'h0; #1;
    check(!lookup_hit, "empty table misses");
    for (int e = 0; e < E; e++) begin
      macs[e] = {16'($urandom), 32'($urandom)};
      val[e]  = (e != 5);
      wr(e, 0, macs[e][31:0]);
      wr(e, 1, {16'h0, macs[e][47:32]});
      wr(e, 2, {val[e], 23'h0, 8'(e + 100)});
    end
    for (int e = 0; e < E; e++) begin
      for (int w = 0; w < 3; w++) begin
        rd_entry = 3'(e); rd_word = 2'(w); #1;
        check(rd_data == (w == 0 ? macs[e][31:0] : w == 1 ? {16'h0, macs[e][47:32]} : {val[e], 23'h0, 8'(e + 100)}),
              $sformatf("read back entry %0d word %0d", e, w));
      end
      lookup_mac = macs[e]; #1;
      check(lookup_hit == val[e], $sformatf("hit for entry %0d", e));
      if (val[e]) check(lookup_addr == 8'(e + 100), $sformatf("address for entry %0d", e));
    end
    lookup_mac = ~macs[0]; #1;
    check(!lookup_hit, "unknown address misses");
    // duplicate address in entry 6: entry 2 (lower) wins
    wr(6, 0, macs[2][31:0]); wr(6, 1, {16'h0, macs[2][47:32]});
    lookup_mac = macs[2]; #1;
    check(lookup_hit && lookup_addr == 8'd102, "lowest matching entry wins");
    wr(2, 2, 32'h0);  // invalidate entry 2: entry 6 now answers
    lookup_mac = macs[2]; #1;
    check(lookup_hit && lookup_addr == 8'd106, "invalidated entry ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

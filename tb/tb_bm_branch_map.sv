// tb_bm_branch_map: loads the mapping table, then looks up every loaded key (hit, right
// value), keys never loaded (miss), an overwritten entry, and an empty table after reset.
module tb_bm_branch_map;
  localparam int unsigned ENTRIES = 16;
  localparam int unsigned XW = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          we = 1'b0;
  logic [XW-1:0] widx = '0;
  logic [31:0]   wkey = '0, wval = '0, key = '0;
  logic          hit;
  logic [31:0]   val;

  bm_branch_map #(.ENTRIES(ENTRIES), .ADDR_W(32)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] keys[ENTRIES], vals[ENTRIES];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    key = 32'h0;
    #1 check(!hit, "empty table misses");
    // distinct word-aligned keys
    for (int e = 0; e < int'(ENTRIES); e++) begin
      keys[e] = {20'($urandom), 4'(e), 8'h0};
      vals[e] = $urandom;
      @(negedge clk);
      we = 1'b1; widx = XW'(e); wkey = keys[e]; wval = vals[e];
    end
    @(negedge clk);
    we = 1'b0;
    for (int e = 0; e < int'(ENTRIES); e++) begin
      key = keys[e];
      #1 check(hit && val == vals[e], $sformatf("entry %0d lookup %0b %08h", e, hit, val));
    end
    for (int k = 0; k < 50; k++) begin
      key = {$urandom} | 32'h1;  // odd addresses were never loaded
      #1 check(!hit, "unloaded key misses");
    end
    // overwrite entry 5 with a new pair; the old key no longer hits
    @(negedge clk);
    we = 1'b1; widx = 4'd5; wkey = 32'hCAFE_0010; wval = 32'h0000_0123;
    @(negedge clk);
    we = 1'b0;
    key = 32'hCAFE_0010;
    #1 check(hit && val == 32'h123, "overwritten entry");
    key = keys[5];
    #1 check(!hit, "old key of the overwritten entry misses");
    key = keys[6];
    #1 check(hit && val == vals[6], "neighbour untouched");
    // reset empties the table
    rst_n = 1'b0;
    #1 rst_n = 1'b1;
    key = keys[6];
    #1 check(!hit, "table empty after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

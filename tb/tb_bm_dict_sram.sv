// tb_bm_dict_sram: writes the whole dictionary, reads it back on both read ports with random
// addresses and a one-cycle read latency, checks that a port with its enable low holds its
// word, and that a read of the address being written returns the old word.
module tb_bm_dict_sram;
  localparam int unsigned ENTRIES = 2048;
  localparam int unsigned LANES = 2;
  localparam int unsigned AW = 11;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                      we = 1'b0;
  logic [AW-1:0]             waddr = '0;
  logic [31:0]               wdata = '0;
  logic [LANES-1:0]          re = '0;
  logic [LANES-1:0][AW-1:0]  raddr = '0;
  logic [LANES-1:0][31:0]    rdata;

  bm_dict_sram #(.ENTRIES(ENTRIES), .LANES(LANES), .WIDTH(32)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model[ENTRIES];

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
    logic [LANES-1:0][31:0] held;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int e = 0; e < int'(ENTRIES); e++) begin
      model[e] = $urandom;
      @(negedge clk);
      we = 1'b1; waddr = AW'(e); wdata = model[e];
    end
    @(negedge clk);
    we = 1'b0;
    for (int k = 0; k < 500; k++) begin
      logic [LANES-1:0][AW-1:0] a;
      for (int l = 0; l < int'(LANES); l++) a[l] = AW'($urandom);
      raddr = a; re = '1;
      @(negedge clk);
      re = '0;
      for (int l = 0; l < int'(LANES); l++)
        check(rdata[l] == model[a[l]], $sformatf("port %0d addr %0d", l, a[l]));
      // enable low: the word stays
      held = rdata;
      raddr = ~a;
      @(negedge clk);
      check(rdata == held, "hold with read enable low");
    end
    // read during write of the same address returns the old word
    raddr[0] = 11'd77; re = 2'b01;
    we = 1'b1; waddr = 11'd77; wdata = ~model[77];
    @(negedge clk);
    we = 1'b0; re = '0;
    check(rdata[0] == model[77], "read-during-write returns old word");
    model[77] = ~model[77];
    re = 2'b10; raddr[1] = 11'd77;
    @(negedge clk);
    check(rdata[1] == model[77], "new word after the write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

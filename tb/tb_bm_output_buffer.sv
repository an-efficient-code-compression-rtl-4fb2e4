// tb_bm_output_buffer: drives decoded lanes and a dictionary word one cycle later, and checks
// that the output is entry XOR mask for dictionary codewords and the raw word for
// uncompressed ones, that a stalled processor sees its instructions held, that `advance`
// follows the stage's occupancy, and that a flush empties the stage.
module tb_bm_output_buffer;
  localparam int unsigned LANES = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                   flush = 1'b0;
  logic [LANES-1:0]       lane_valid = '0, lane_uncomp = '0;
  logic [LANES-1:0][31:0] lane_raw = '0, lane_mask = '0, dict_rdata = '0;
  logic                   advance;
  logic [LANES-1:0]       out_valid;
  logic [LANES-1:0][31:0] out_instr;
  logic                   out_ready = 1'b0;

  bm_output_buffer #(.LANES(LANES)) dut (.*);

  int checks = 0, failures = 0;

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
    logic [LANES-1:0][31:0] entry, expect_w;
    logic [LANES-1:0]       expect_v;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1 check(advance && out_valid == '0, "empty after reset, advancing");
    for (int k = 0; k < 300; k++) begin
      // present new lanes while the stage is free
      out_ready = 1'b1;
      lane_valid = ($urandom_range(3) == 0) ? 2'b01 : (($urandom_range(3) == 0) ? 2'b00 : 2'b11);
      for (int l = 0; l < int'(LANES); l++) begin
        lane_uncomp[l] = 1'($urandom);
        lane_raw[l]    = $urandom;
        lane_mask[l]   = ($urandom_range(2) == 0) ? 32'h0 : $urandom;
        entry[l]       = $urandom;
        expect_w[l]    = lane_uncomp[l] ? lane_raw[l] : (entry[l] ^ lane_mask[l]);
      end
      expect_v = lane_valid;
      #1 check(advance, "advance while output is taken");
      @(negedge clk);
      dict_rdata = entry;          // the SRAM answers one cycle later
      lane_valid = '0;
      lane_raw = '1; lane_mask = '1;
      out_ready = 1'b0;
      #1;
      check(out_valid == expect_v, "valid lanes");
      for (int l = 0; l < int'(LANES); l++)
        if (expect_v[l]) check(out_instr[l] == expect_w[l], $sformatf("lane %0d word %08h expected %08h", l, out_instr[l], expect_w[l]));
      check(advance == (expect_v == '0), "advance only when empty or taken");
      // stall for a few cycles: nothing changes
      repeat ($urandom_range(2)) begin
        @(negedge clk);
        #1;
        check(out_valid == expect_v, "valid held during stall");
        for (int l = 0; l < int'(LANES); l++)
          if (expect_v[l]) check(out_instr[l] == expect_w[l], "word held during stall");
      end
      if (k % 50 == 49) begin
        flush = 1'b1;
        @(negedge clk);
        flush = 1'b0;
        #1 check(out_valid == '0, "flush empties the stage");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bm_configs: runs the decompression engine in the configurations the design is meant to
// cover: the dictionary sizes of the evaluation (2048, 4096 and 8192 entries) with two lanes,
// and the one-lane (one instruction per cycle) and three-lane engines with the default
// 2048-entry dictionary. Each configuration is an instance of bm_cfg_runner; the testbench
// waits for all of them and adds up their checks.
module tb_bm_configs;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 5;
  logic [NCFG-1:0] done;
  int chk[NCFG], fl[NCFG];

  bm_cfg_runner #(.DICT_ENTRIES(2048), .LANES(2)) u_2k (.clk, .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  bm_cfg_runner #(.DICT_ENTRIES(4096), .LANES(2)) u_4k (.clk, .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  bm_cfg_runner #(.DICT_ENTRIES(8192), .LANES(2)) u_8k (.clk, .done(done[2]), .checks(chk[2]), .failures(fl[2]));
  bm_cfg_runner #(.DICT_ENTRIES(2048), .LANES(1)) u_l1 (.clk, .done(done[3]), .checks(chk[3]), .failures(fl[3]));
  bm_cfg_runner #(.DICT_ENTRIES(2048), .LANES(3)) u_l3 (.clk, .done(done[4]), .checks(chk[4]), .failures(fl[4]));

  int checks, failures;

  task automatic total();
    checks = 0; failures = 0;
    for (int c = 0; c < NCFG; c++) begin
      checks += chk[c];
      failures += fl[c];
    end
  endtask

  initial begin
    #50000000;
    total();
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100;
    wait (&done);
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Workload testbench: the AES core with each SDSFF count of the area
// evaluation (45, 60, 90, 179 and 358 replaced scan FFs) plus a normal scan
// path (0), side by side, each taken through the tester flow of
// aes_scan_flow (encrypt, scan in, capture one round, unload, decode,
// resume). The counts come from the evaluation of a 716-register AES
// circuit; this core has 398 scan cells, so 716 replaced cells cannot be
// built and is not part of the run. Each flow takes about 1,300 clocks; a
// watchdog ends the run if one does not finish.
module tb_aes_sdsff_counts;
  localparam int NCFG = 6;
  localparam int COUNTS[NCFG] = '{0, 45, 60, 90, 179, 358};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NCFG-1:0] fin;
  int   c_ch[NCFG];
  int   c_fl[NCFG];

  always #5 clk = ~clk;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    aes_scan_flow #(.K(COUNTS[g])) u_flow (
      .clk(clk), .rst_n(rst_n), .finished(fin[g]), .checks(c_ch[g]), .failures(c_fl[g]));
  end

  int checks, failures;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (&fin);
    @(negedge clk);   // let the final counts settle
    checks = 0;
    failures = 0;
    for (int i = 0; i < NCFG; i++) begin
      $display("SDSFF count %0d: %0d checks, %0d failures", COUNTS[i], c_ch[i], c_fl[i]);
      checks += c_ch[i];
      failures += c_fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

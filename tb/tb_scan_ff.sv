// Self-checking test of scan_ff: random se/d/si for 200 clocks; q must follow
// d in system mode and si in test mode, so must equal q, reset must clear q.
module tb_scan_ff;
  logic clk = 0, rst_n = 0, se = 0, d = 0, si = 0, q, so;
  int   checks = 0, failures = 0;
  logic exp_q;

  scan_ff dut (.clk(clk), .rst_n(rst_n), .se(se), .d(d), .si(si), .q(q), .so(so));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    checks++; if (q !== 1'b0) failures++;
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      se = 1'($urandom); d = 1'($urandom); si = 1'($urandom);
      exp_q = se ? si : d;
      @(negedge clk);
      checks++;
      if (q !== exp_q || so !== exp_q) begin
        failures++;
        $display("mismatch at %0d: se=%b d=%b si=%b q=%b so=%b", i, se, d, si, q, so);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking test of sdsff. A reference model keeps B (the FF) and A (the
// latch): A takes B while load is high; so must be A ^ B and q must be B.
// The load pulse is driven directly, high for the second half of a cycle,
// as sdsff_load_gen would drive it after se falls.
module tb_sdsff;
  logic clk = 0, rst_n = 0, se = 0, load = 0, d = 0, si = 0, q, so;
  int   checks = 0, failures = 0, loads = 0, inverted = 0;
  logic mb, ma;

  sdsff dut (.clk(clk), .rst_n(rst_n), .se(se), .load(load), .d(d), .si(si), .q(q), .so(so));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== mb || so !== (ma ^ mb)) begin
      failures++;
      $display("%s: q=%b so=%b expected B=%b A=%b", what, q, so, mb, ma);
    end
  endtask

  initial begin
    mb = 0; ma = 0;
    @(negedge clk);
    check("reset");
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      se = 1'($urandom); d = 1'($urandom); si = 1'($urandom);
      @(posedge clk);
      mb = se ? si : d;
      @(negedge clk);
      check("clocked");
      if ((i % 3) == 1) begin   // load pulse between the edges
        load = 1; #1;
        ma = mb;
        check("load open");
        #2 load = 0; loads++;
        #1 check("load closed");
      end
      if (ma) inverted++;
    end
    checks++; if (loads == 0 || inverted == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

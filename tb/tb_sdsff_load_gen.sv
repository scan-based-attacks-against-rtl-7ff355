// Self-checking test of sdsff_load_gen: load must rise when se falls
// between clock edges and fall at the next rising edge; it must stay low
// when se rises, stays 1 or stays 0.
module tb_sdsff_load_gen;
  logic clk = 0, rst_n = 0, se = 0, load;
  int checks = 0, failures = 0, pulses = 0;

  sdsff_load_gen dut (.clk(clk), .rst_n(rst_n), .se(se), .load(load));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic prev;
  initial begin
    @(negedge clk);
    rst_n = 1;
    prev = 0;
    for (int i = 0; i < 300; i++) begin
      se = 1'($urandom);
      #1;
      chk(load == (prev && !se), $sformatf("load=%b after se %b->%b", load, prev, se));
      if (load) pulses++;
      @(posedge clk); #1;
      chk(load == 1'b0, "load ends at the rising edge");
      prev = se;
      @(negedge clk);
    end
    chk(pulses > 0, "at least one pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

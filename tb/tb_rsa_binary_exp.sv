// Self-checking test of rsa_binary_exp.
//  1. The worked example with an 8-bit exponent: n = 377, d = 23, c = 156.
//     After each clock m must take the values 1,1,1,156,208,130,39,143, the
//     result must be 143 and done must rise L clocks after start.
//  2. A 64-bit instance against a right-to-left square-and-multiply model on
//     random odd moduli, exponents and messages.
//  3. The scan path of the 8-bit instance: stop after four iterations,
//     unload the chain, find m(4) = 156 and the exponent register in it,
//     shift the same data back in and finish with the right result.
module tb_rsa_binary_exp;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------- small instance ----------
  logic       kw8 = 0, st8 = 0, busy8, done8, se8 = 0, si8 = 0, so8;
  logic [7:0] d8 = 0;
  logic [8:0] n8 = 0, c8 = 0, r8;
  rsa_binary_exp #(.L(8), .NB(9)) u8 (
    .clk(clk), .rst_n(rst_n), .key_we(kw8), .d_in(d8), .n(n8), .start(st8), .msg(c8),
    .busy(busy8), .done(done8), .result(r8), .se(se8), .si(si8), .so(so8));

  // ---------- 64-bit instance ----------
  logic        kw = 0, st = 0, busy64, done64;
  logic [63:0] d64 = 0, n64 = 0, c64 = 0, r64;
  logic        so64;
  rsa_binary_exp #(.L(64), .NB(64)) u64 (
    .clk(clk), .rst_n(rst_n), .key_we(kw), .d_in(d64), .n(n64), .start(st), .msg(c64),
    .busy(busy64), .done(done64), .result(r64), .se(1'b0), .si(1'b0), .so(so64));

  function automatic logic [63:0] ref_modexp(logic [63:0] c, logic [63:0] e, logic [63:0] md);
    logic [127:0] r, b;
    r = 1; b = 128'(c) % 128'(md);
    for (int i = 0; i < 64; i++) begin
      if (e[i]) r = (r * b) % 128'(md);
      b = (b * b) % 128'(md);
    end
    return r[63:0];
  endfunction

  localparam int N8 = 9 + 9 + 8 + 4 + 2;  // chain length of the small instance
  logic [N8-1:0] scanned;
  int lat;
  int trace [8] = '{1, 1, 1, 156, 208, 130, 39, 143};

  initial begin
    @(negedge clk);
    rst_n = 1;
    // ---- 1: worked example ----
    n8 = 9'd377; d8 = 8'd23; kw8 = 1;
    @(negedge clk); kw8 = 0;
    c8 = 9'd156; st8 = 1;
    @(negedge clk); st8 = 0; lat = 1;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); lat++;
      chk(int'(u8.cur.m) == trace[i], $sformatf("m after iteration %0d = %0d, expected %0d",
                                                i, u8.cur.m, trace[i]));
      chk(done8 == (i == 7), "done only after the last iteration");
    end
    chk(done8 && r8 == 9'd143, $sformatf("result %0d expected 143", r8));
    chk(lat == 9, $sformatf("latency %0d expected 9", lat));

    // ---- 3: scan path, stop after four iterations ----
    st8 = 1;
    @(negedge clk); st8 = 0;
    repeat (4) @(negedge clk);   // m(4) is now in the register
    se8 = 1;
    for (int k = 0; k < N8; k++) begin
      scanned[N8-1-k] = so8;
      si8 = so8;                 // feed the data back in: chain rotates
      @(negedge clk);
    end
    se8 = 0;
    // layout: m[31:23] c[22:14] d[13:6] cnt[5:2] busy done
    chk(scanned[31:23] == 9'd156, $sformatf("scanned m = %0d expected 156", scanned[31:23]));
    chk(scanned[22:14] == 9'd156, "scanned c");
    chk(scanned[13:6] == {8'd23 << 4 | 8'd23 >> 4}, "scanned rotating exponent");
    while (!done8) @(negedge clk);
    chk(r8 == 9'd143, "result after scan round trip");

    // ---- 2: random 64-bit runs ----
    for (int t = 0; t < 6; t++) begin
      n64 = {$urandom, $urandom} | 64'h8000_0000_0000_0001;
      d64 = {$urandom, $urandom};
      c64 = {$urandom, $urandom} % n64;
      kw = 1; @(negedge clk); kw = 0;
      st = 1; @(negedge clk); st = 0; lat = 1;
      while (!done64) begin @(negedge clk); lat++; end
      chk(r64 == ref_modexp(c64, d64, n64), $sformatf("64-bit result %h expected %h", r64,
                                                      ref_modexp(c64, d64, n64)));
      chk(lat == 65, $sformatf("64-bit latency %0d", lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

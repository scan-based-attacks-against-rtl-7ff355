// Workload testbench: RSA exponentiation with a 2,048-bit key (exponent and
// modulus of the same length), twice the core's default size.
//
// An rsa_binary_exp instance with L = NB = 2048 is loaded with a random odd
// modulus (top bit set), a random exponent (top bit set) and random messages
// below the modulus. The testbench checks
//   * the result against its own right-to-left (LSB-first) square-and-
//     multiply model, a different order of work from the core's;
//   * the latency, L+1 rising edges from start to done (L clocks of work,
//     one per exponent bit);
//   * the scan path length, 3L + clog2(L+1) + 2 cells (m, c and d plus the
//     counter and two flags), by timing a marker bit through the chain;
//   * that the exponent register is back to d: a second message is
//     exponentiated correctly without reloading the key.
// 2,048 bits is one of the key lengths the scan attack on RSA is evaluated
// with (1,024, 2,048 and 4,096); 1,024 is covered by the top-level test. A
// 4,096-bit core elaborates, but its 8,192-bit product exceeds the widest
// multiply and divide Verilator supports, so it is not simulated. A watchdog
// ends the run if the core never finishes.
module tb_rsa_key_sizes;
  localparam int L = 2048;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic         key_we, start, busy, done, se, si, so;
  logic [L-1:0] d, n, c, result;

  rsa_binary_exp #(.L(L), .NB(L)) dut (
    .clk(clk), .rst_n(rst_n), .key_we(key_we), .d_in(d), .n(n), .start(start),
    .msg(c), .busy(busy), .done(done), .result(result), .se(se), .si(si), .so(so)
  );

  // Right-to-left binary exponentiation.
  function automatic logic [L-1:0] ref_modexp(input logic [L-1:0] b_in,
                                              input logic [L-1:0] e,
                                              input logic [L-1:0] md);
    logic [2*L-1:0] r, b;
    r = 1;
    b = (2*L)'(b_in);
    for (int i = 0; i < L; i++) begin
      if (e[i]) r = (r * b) % (2*L)'(md);
      b = (b * b) % (2*L)'(md);
    end
    return L'(r);
  endfunction

  function automatic logic [L-1:0] rand_bits(input int bits);
    logic [L-1:0] v;
    v = '0;
    for (int i = 0; i < bits; i += 32) v[i +: 32] = $urandom;
    if (bits < L) v &= (L'(1) << bits) - L'(1);
    return v;
  endfunction

  logic [L-1:0] key, exp_v;
  int           lat;

  initial begin
    {key_we, start, se, si} = '0;
    d = '0;
    n = '0;
    c = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    key = rand_bits(L);
    key[L-1] = 1'b1;
    d = key;
    n = rand_bits(L);
    n[L-1] = 1'b1;
    n[0] = 1'b1;
    key_we = 1'b1;
    @(negedge clk);
    key_we = 1'b0;
    d = '0;   // the core must work from its own key register

    for (int run = 0; run < 2; run++) begin
      c = rand_bits(L - 1);
      exp_v = ref_modexp(c, key, n);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      while (!done) begin
        @(negedge clk);
        lat++;
      end
      chk(result == exp_v, $sformatf("2048-bit result, run %0d", run));
      chk(lat == L + 1, $sformatf("latency %0d, expected %0d", lat, L + 1));
    end

    // scan path length: flush with zeros, then time a single 1 through
    se = 1'b1;
    si = 1'b0;
    repeat (3 * L + 40) @(negedge clk);
    si = 1'b1;
    @(negedge clk);
    si = 1'b0;
    lat = 1;
    while (!so && lat < 4 * L) begin
      @(negedge clk);
      lat++;
    end
    chk(lat == 3 * L + $clog2(L + 1) + 2, $sformatf("scan path length %0d", lat));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

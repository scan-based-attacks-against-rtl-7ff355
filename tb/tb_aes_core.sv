// Self-checking test of aes_core with its SDSFF scan path.
//  1. Encrypt two published AES-128 vectors; check ciphertext and that done
//     rises exactly 11 clocks after the clock that samples start.
//  2. Tester flow on the secure scan path: scan a prepared state (key,
//     pre-round result, round 1 due) into the chain, switch to system mode
//     (latches load), run one round, unload the chain and decode it with the
//     knowledge of SDSFF positions and latch values: the round register must
//     hold the published round-1 output, while the raw scan-out stream must
//     differ from it. The decoded state is scanned back in (compensating the
//     latches) and the encryption resumes to the published ciphertext.
module tb_aes_core;
  import scan_pkg::*;

  localparam int K = 199;
  localparam logic [31:0] SEED = 32'h5d5f_f001;

  typedef struct packed {
    logic [127:0] key, r, rk;
    logic [7:0]   rcon;
    logic [3:0]   round;
    logic         busy, done;
  } regs_t;
  localparam int N = $bits(regs_t);
  localparam logic [MAX_CHAIN-1:0] MF = sdsff_mask(N, K, SEED);
  localparam logic [N-1:0] MASK = MF[N-1:0];

  logic clk = 0, rst_n = 0;
  logic key_we = 0, start = 0, busy, done, se = 0, si = 0, so;
  logic [127:0] key_in = 0, pt = 0, ct;
  int checks = 0, failures = 0;

  aes_core #(.SDSFF_COUNT(K), .SCAN_SEED(SEED)) dut (
    .clk(clk), .rst_n(rst_n), .key_we(key_we), .key_in(key_in), .start(start), .pt(pt),
    .busy(busy), .done(done), .ct(ct), .se(se), .si(si), .so(so));

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

  task automatic encrypt(logic [127:0] k, logic [127:0] p, logic [127:0] exp);
    int lat;
    key_we = 1; key_in = k;
    @(negedge clk); key_we = 0;
    start = 1; pt = p;
    @(negedge clk); start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    chk(ct == exp, $sformatf("ciphertext %h expected %h", ct, exp));
    chk(lat == 11, $sformatf("latency %0d expected 11", lat));
  endtask

  logic [N-1:0] A;      // model of the latch contents (0 outside SDSFF cells)
  logic [N-1:0] raw, dec;
  regs_t        st;

  // shift `target` into the chain while unloading it: raw = bits seen at so,
  // dec = raw decoded with the current latches
  task automatic scan_exchange(logic [N-1:0] target);
    logic [N-1:0] pre;
    logic         acc;
    // s_(N-1-j) = target[j] ^ A[0] ^ ... ^ A[j-1]
    acc = 1'b0;
    for (int j = 0; j < N; j++) begin
      pre[j] = target[j] ^ acc;
      acc ^= A[j];
    end
    se = 1;
    for (int k = 0; k < N; k++) begin
      logic b;
      raw[N-1-k] = so;
      b = so;
      for (int j = N - 1 - k; j < N; j++) b ^= A[j];
      dec[N-1-k] = b;
      si = pre[N-1-k];
      @(negedge clk);
    end
  endtask

  initial begin
    A = '0;
    @(negedge clk);
    rst_n = 1;
    encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
            128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
            128'h3925841d02dc09fbdc118597196a0b32);

    // ---- tester flow through the secure scan path ----
    st.key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    st.r = 128'h3243f6a8885a308d313198a2e0370734 ^ st.key;
    st.rk = st.key; st.rcon = 8'h01; st.round = 4'd1; st.busy = 1'b1; st.done = 1'b0;
    scan_exchange(st);
    chk(dec == N'({128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3925841d02dc09fbdc118597196a0b32,
                   128'hd014f9a8c9ee2589e13f0cc8b6630ca6, 8'h6c, 4'd11, 1'b0, 1'b1}),
        "decoded unload of the finished encryption");
    // system mode: latches take the current contents, one round runs
    A = st & MASK;
    se = 0;
    @(negedge clk);
    // unload again, putting back what was captured
    begin
      regs_t exp1;
      exp1 = st;
      exp1.r = 128'ha49c7ff2689f352b6b5bea43026a5049;
      exp1.rk = 128'ha0fafe1788542cb123a339392a6c7605;
      exp1.rcon = 8'h02; exp1.round = 4'd2;
      scan_exchange(exp1);
      chk(dec == exp1, "decoded round-1 state");
      chk(raw != exp1, "raw scan data differs from the state");
      st = exp1;
    end
    A = st & MASK;
    se = 0;
    while (!done) @(negedge clk);
    chk(ct == 128'h3925841d02dc09fbdc118597196a0b32, "ciphertext after scan round trip");
    chk(A != '0, "latches were loaded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

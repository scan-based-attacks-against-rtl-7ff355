// Test helper: one aes_core with K SDSFFs, taken through the tester flow on
// its scan path, reporting its own check and failure counts.
//
// The flow:
//   1. Encrypt the FIPS-197 example block in system mode.
//   2. Scan in a prepared state (key, pre-round result, round 1 due),
//      compensating the latches, while unloading the finished state.
//   3. Switch to system mode for one clock: the latches load and round 1
//      runs.
//   4. Unload again and decode with the known SDSFF positions and latch
//      values. The decoded round register must be the published round-1
//      output.
//   5. Resume to the ciphertext.
//
// The raw scan-out must equal the state when K = 0 (a normal scan path
// leaks R as is) and differ from it when K > 0. The number of SDSFFs in the
// chain must be K. Interface: clk and rst_n in; `finished` rises when the
// flow is over, with `checks` and `failures` valid from then on.
module aes_scan_flow
  import scan_pkg::*;
#(
  parameter int          K    = 45,
  parameter logic [31:0] SEED = 32'h5d5f_f001
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  typedef struct packed {
    logic [127:0] key, r, rk;
    logic [7:0]   rcon;
    logic [3:0]   round;
    logic         busy, done;
  } regs_t;
  localparam int N = $bits(regs_t);
  localparam logic [MAX_CHAIN-1:0] MF = sdsff_mask(N, K, SEED);
  localparam logic [N-1:0] MASK = MF[N-1:0];

  localparam logic [127:0] KEY = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam logic [127:0] PT  = 128'h3243f6a8885a308d313198a2e0370734;
  localparam logic [127:0] CT  = 128'h3925841d02dc09fbdc118597196a0b32;

  logic         key_we, start, busy, done, se, si, so;
  logic [127:0] key_in, pt, ct;

  aes_core #(.SDSFF_COUNT(K), .SCAN_SEED(SEED)) dut (
    .clk(clk), .rst_n(rst_n), .key_we(key_we), .key_in(key_in), .start(start), .pt(pt),
    .busy(busy), .done(done), .ct(ct), .se(se), .si(si), .so(so));

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (K=%0d): %s", K, what);
    end
  endtask

  logic [N-1:0] A;      // model of the latch contents (0 outside SDSFF cells)
  logic [N-1:0] raw, dec;

  // Shift `target` in while unloading the chain: raw = bits seen at so,
  // dec = raw decoded with the current latches.
  task automatic scan_exchange(logic [N-1:0] target);
    logic [N-1:0] pre;
    logic         acc;
    acc = 1'b0;
    for (int j = 0; j < N; j++) begin
      pre[j] = target[j] ^ acc;
      acc ^= A[j];
    end
    se = 1'b1;
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
    regs_t st, exp1;
    {key_we, start, se, si, finished} = '0;
    key_in = '0;
    pt = '0;
    checks = 0;
    failures = 0;
    A = '0;
    chk(mask_ones(MF, N) == K, "number of SDSFFs in the chain");
    @(posedge rst_n);
    @(negedge clk);

    key_we = 1'b1;
    key_in = KEY;
    @(negedge clk);
    key_we = 1'b0;
    start = 1'b1;
    pt = PT;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    chk(ct == CT, "ciphertext");

    st.key = KEY;
    st.r = PT ^ KEY;
    st.rk = KEY;
    st.rcon = 8'h01;
    st.round = 4'd1;
    st.busy = 1'b1;
    st.done = 1'b0;
    scan_exchange(st);
    A = st & MASK;
    se = 1'b0;
    @(negedge clk);

    exp1 = st;
    exp1.r = 128'ha49c7ff2689f352b6b5bea43026a5049;
    exp1.rk = 128'ha0fafe1788542cb123a339392a6c7605;
    exp1.rcon = 8'h02;
    exp1.round = 4'd2;
    scan_exchange(exp1);
    chk(dec == exp1, "decoded round-1 state");
    if (K == 0) chk(raw == exp1, "normal scan path shows the state as is");
    else        chk(raw != exp1, "SDSFFs change the raw scan data");
    A = exp1 & MASK;
    se = 1'b0;
    while (!done) @(negedge clk);
    chk(ct == CT, "ciphertext after the scan round trip");
    finished = 1'b1;
  end
endmodule

// End-to-end test of secure_scan_crypto_top at its default parameters
// (1,024-bit RSA, 163-bit ECC, AES with 199 SDSFFs in a 398-bit scan path).
//
// AES: encrypts a published vector, then goes through the tester flow on
//   the secure scan path twice (scan in a prepared state, switch to system
//   mode so the SDSFF latches reload, capture one round, unload): the raw
//   scan-out data must differ from the register contents, decoding with the
//   SDSFF positions and latch values must give the expected round output,
//   and the latch pattern must change between the two captures.
// RSA: one 1,024-bit exponentiation against a right-to-left model, with
//   1,024 iterations, plus a scan unload in the middle that must show the
//   model's intermediate value m(i) in the scanned data.
// ECC: one point multiplication against an affine model, with a scan
//   unload/reload in the middle.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_secure_scan_crypto_top;
  import scan_pkg::*;
  import ecc_pkg::*;

  localparam int L = 1024, NB = 1024;
  localparam int AES_K = 199;
  localparam logic [31:0] AES_SEED = 32'h5d5f_f001;
  localparam int AES_N = 3 * 128 + 8 + 4 + 2;
  localparam logic [MAX_CHAIN-1:0] AMF = sdsff_mask(AES_N, AES_K, AES_SEED);
  localparam logic [AES_N-1:0] AMASK = AMF[AES_N-1:0];

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_aes_enc = 0, n_sdsff_load = 0, n_scan_inverted = 0, n_decoded = 0, n_latch_change = 0;
  int n_rsa_exp = 0, n_rsa_scan = 0, n_ecc_mult = 0, n_ecc_scan = 0;

  logic aes_key_we = 0, aes_start = 0, aes_busy, aes_done, aes_se = 0, aes_si = 0, aes_so;
  logic [127:0] aes_key = 0, aes_pt = 0, aes_ct;
  logic rsa_key_we = 0, rsa_start = 0, rsa_busy, rsa_done, rsa_se = 0, rsa_si = 0, rsa_so;
  logic [L-1:0] rsa_d = 0;
  logic [NB-1:0] rsa_n = 0, rsa_msg = 0, rsa_result;
  logic ecc_key_we = 0, ecc_start = 0, ecc_busy, ecc_done, ecc_se = 0, ecc_si = 0, ecc_so;
  fe_t  ecc_key = 0, ecc_px = 0, ecc_py = 0, ecc_b = 0, ecc_qx, ecc_qy;

  secure_scan_crypto_top dut (.*);

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- AES helpers ----------------
  typedef struct packed {
    logic [127:0] key, r, rk;
    logic [7:0]   rcon;
    logic [3:0]   round;
    logic         busy, done;
  } aes_regs_t;

  logic [AES_N-1:0] A, raw, dec;

  task automatic aes_exchange(logic [AES_N-1:0] target);
    logic [AES_N-1:0] pre;
    logic acc;
    acc = 1'b0;
    for (int j = 0; j < AES_N; j++) begin pre[j] = target[j] ^ acc; acc ^= A[j]; end
    aes_se = 1;
    for (int k = 0; k < AES_N; k++) begin
      logic b;
      raw[AES_N-1-k] = aes_so;
      b = aes_so;
      for (int j = AES_N - 1 - k; j < AES_N; j++) b ^= A[j];
      dec[AES_N-1-k] = b;
      aes_si = pre[AES_N-1-k];
      @(negedge clk);
    end
  endtask

  // AES flow: capture one round from a prepared state and read it back
  task automatic aes_one_round(aes_regs_t st, logic [127:0] exp_r, logic [127:0] exp_rk);
    aes_regs_t e;
    logic [AES_N-1:0] a_old;
    aes_exchange(st);
    a_old = A;
    A = st & AMASK;            // latches reload on the switch to system mode
    n_sdsff_load++;
    if (A != a_old) n_latch_change++;
    aes_se = 0;
    @(negedge clk);            // capture: one round
    e = st;
    e.r = exp_r; e.rk = exp_rk; e.rcon = {st.rcon[6:0], 1'b0} ^ (st.rcon[7] ? 8'h1b : 8'h00);
    e.round = st.round + 4'd1;
    aes_exchange(e);           // unload (and put the same state back)
    chk(dec == e, $sformatf("AES: decoded scan data %h equals the round output %h", dec, e));
    if (dec == e) n_decoded++;
    if (raw != dec) n_scan_inverted++;
    // stays in test mode: the chain holds e, the latches keep their values
  endtask

  // ---------------- RSA model ----------------
  function automatic logic [NB-1:0] mm(logic [NB-1:0] a, logic [NB-1:0] b, logic [NB-1:0] md);
    logic [2*NB-1:0] p;
    p = (2*NB)'(a) * (2*NB)'(b);
    return NB'(p % (2*NB)'(md));
  endfunction

  function automatic logic [NB-1:0] rsa_ref(logic [NB-1:0] c, logic [L-1:0] e, logic [NB-1:0] md);
    logic [NB-1:0] r, b;
    r = NB'(1); b = c;
    for (int i = 0; i < L; i++) begin
      if (e[i]) r = mm(r, b, md);
      b = mm(b, b, md);
    end
    return r;
  endfunction

  // m after the top `t` exponent bits: c^(d >> (L-t)) mod n
  function automatic logic [NB-1:0] rsa_partial(logic [NB-1:0] c, logic [L-1:0] e,
                                                logic [NB-1:0] md, int t);
    return rsa_ref(c, e >> (L - t), md);
  endfunction

  // ---------------- ECC model ----------------
  function automatic fe_t fmul(fe_t x, fe_t y);
    fe_t r;
    r = '0;
    for (int i = M - 1; i >= 0; i--) begin
      r = r[M-1] ? ((r << 1) ^ POLY_LOW) : (r << 1);
      if (y[i]) r ^= x;
    end
    return r;
  endfunction
  function automatic fe_t finv(fe_t x);
    fe_t r;
    r = x;
    for (int i = 1; i < M - 1; i++) r = fmul(fmul(r, r), x);
    return fmul(r, r);
  endfunction
  typedef struct { fe_t x, y; bit inf; } pt_t;
  function automatic pt_t padd(pt_t p, pt_t q);
    pt_t r;
    fe_t l;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if ((p.y ^ q.y) == p.x || p.x == '0) begin r.inf = 1; r.x = '0; r.y = '0; return r; end
      l = p.x ^ fmul(p.y, finv(p.x));
      r.x = fmul(l, l) ^ l ^ M'(1);
      r.y = fmul(p.x, p.x) ^ fmul(l ^ M'(1), r.x);
      r.inf = 0;
      return r;
    end
    l = fmul(p.y ^ q.y, finv(p.x ^ q.x));
    r.x = fmul(l, l) ^ l ^ p.x ^ q.x ^ M'(1);
    r.y = fmul(l, p.x ^ r.x) ^ r.x ^ p.y;
    r.inf = 0;
    return r;
  endfunction
  function automatic pt_t pmul(fe_t k, pt_t p);
    pt_t r;
    r.inf = 1; r.x = '0; r.y = '0;
    for (int i = M - 1; i >= 0; i--) begin
      r = padd(r, r);
      if (k[i]) r = padd(r, p);
    end
    return r;
  endfunction

  function automatic logic [1023:0] rnd1024();
    logic [1023:0] r;
    for (int i = 0; i < 32; i++) r = {r[991:0], $urandom};
    return r;
  endfunction

  initial begin
    aes_regs_t st;
    int lat;
    A = '0;
    @(negedge clk);
    rst_n = 1;

    // ================= AES =================
    aes_key = 128'h2b7e151628aed2a6abf7158809cf4f3c; aes_key_we = 1;
    @(negedge clk); aes_key_we = 0;
    aes_pt = 128'h3243f6a8885a308d313198a2e0370734; aes_start = 1;
    @(negedge clk); aes_start = 0; lat = 1;
    while (!aes_done) begin @(negedge clk); lat++; end
    chk(aes_ct == 128'h3925841d02dc09fbdc118597196a0b32, "AES ciphertext");
    chk(lat == 11, "AES latency 11 clocks");
    n_aes_enc++;
    // round 1 from a prepared state
    st.key = aes_key; st.r = aes_pt ^ aes_key; st.rk = aes_key;
    st.rcon = 8'h01; st.round = 4'd1; st.busy = 1'b1; st.done = 1'b0;
    aes_one_round(st, 128'ha49c7ff2689f352b6b5bea43026a5049, 128'ha0fafe1788542cb123a339392a6c7605);
    // round 2 from the state just read back (latches take new values)
    st.r = 128'ha49c7ff2689f352b6b5bea43026a5049; st.rk = 128'ha0fafe1788542cb123a339392a6c7605;
    st.rcon = 8'h02; st.round = 4'd2;
    aes_one_round(st, 128'haa8f5f0361dde3ef82d24ad26832469a, 128'hf2c295f27a96b9435935807a7359f67f);
    aes_se = 0;                // back to system mode: the encryption resumes
    while (!aes_done) @(negedge clk);
    chk(aes_ct == 128'h3925841d02dc09fbdc118597196a0b32, "AES ciphertext after scan captures");
    n_aes_enc++;

    // ================= RSA, 1,024 bits =================
    begin
      logic [NB-1:0] scanned_m;
      int nreg;
      nreg = 3 * 1024 + 11 + 2;
      rsa_n = rnd1024() | {1'b1, 1022'd0, 1'b1};
      rsa_d = rnd1024() | {1'b1, 1023'd0};
      rsa_msg = rnd1024() % rsa_n;
      rsa_key_we = 1; @(negedge clk); rsa_key_we = 0;
      rsa_start = 1; @(negedge clk); rsa_start = 0; lat = 1;
      repeat (100) begin @(negedge clk); lat++; end
      // unload the scan path (feeding it back) and find m(i) at the top
      rsa_se = 1;
      for (int k = 0; k < nreg; k++) begin
        if (k < NB) scanned_m[NB-1-k] = rsa_so;
        rsa_si = rsa_so;
        @(negedge clk);
      end
      rsa_se = 0;
      chk(scanned_m == rsa_partial(rsa_msg, rsa_d, rsa_n, 100), "RSA: m(i) in the scanned data");
      n_rsa_scan++;
      while (!rsa_done) begin @(negedge clk); lat++; end
      chk(rsa_result == rsa_ref(rsa_msg, rsa_d, rsa_n), "RSA 1024-bit result");
      chk(lat == L + 1, $sformatf("RSA clocks %0d expected %0d", lat, L + 1));
      n_rsa_exp++;
    end

    // ================= ECC, GF(2^163) =================
    begin
      pt_t p, q;
      int nreg;
      nreg = $bits(dut.u_ecc.cur);
      p.x = rnd1024()[162:0]; p.y = rnd1024()[162:0]; p.inf = 0;
      ecc_b = fmul(p.y, p.y) ^ fmul(p.x, p.y) ^ fmul(fmul(p.x, p.x), p.x) ^ fmul(p.x, p.x);
      ecc_px = p.x; ecc_py = p.y;
      ecc_key = rnd1024()[162:0] | {1'b1, 162'd0};
      q = pmul(ecc_key, p);
      ecc_key_we = 1; @(negedge clk); ecc_key_we = 0;
      ecc_start = 1; @(negedge clk); ecc_start = 0;
      repeat (3000) @(negedge clk);
      ecc_se = 1;
      for (int k = 0; k < nreg; k++) begin ecc_si = ecc_so; @(negedge clk); end
      ecc_se = 0;
      n_ecc_scan++;
      while (!ecc_done) @(negedge clk);
      chk(ecc_qx == q.x && ecc_qy == q.y, "ECC point multiplication result");
      n_ecc_mult++;
    end

    chk(n_aes_enc > 0, "mechanism: AES encryption");
    chk(n_sdsff_load > 0, "mechanism: SDSFF latch reload");
    chk(n_latch_change > 0, "mechanism: latch pattern changed between captures");
    chk(n_scan_inverted > 0, "mechanism: scan data inverted by SDSFFs");
    chk(n_decoded > 0, "mechanism: tester decode");
    chk(n_rsa_exp > 0 && n_rsa_scan > 0, "mechanism: RSA exponentiation and scan unload");
    chk(n_ecc_mult > 0 && n_ecc_scan > 0, "mechanism: ECC multiplication and scan unload");
    $display("mechanisms: aes_enc=%0d sdsff_load=%0d latch_change=%0d inverted=%0d decoded=%0d rsa=%0d rsa_scan=%0d ecc=%0d ecc_scan=%0d",
             n_aes_enc, n_sdsff_load, n_latch_change, n_scan_inverted, n_decoded, n_rsa_exp,
             n_rsa_scan, n_ecc_mult, n_ecc_scan);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

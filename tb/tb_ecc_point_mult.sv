// Self-checking test of ecc_point_mult.
// A reference model written here does affine double-and-add point
// multiplication on y^2 + xy = x^3 + x^2 + b over GF(2^163) (bit-serial
// multiplication, inversion by Fermat's little theorem). Random points are
// made by choosing x and y and solving the curve equation for b. Checked:
// the result point for several keys with k_162 = 1, the clock count of one
// multiplication, that the key register is restored, and that the scan
// path can stop a run midway, unload and reload all state, and resume.
module tb_ecc_point_mult;
  import ecc_pkg::*;

  localparam int DIGIT = 13, ND = (M + DIGIT - 1) / DIGIT;
  // clocks: start edge + 5 init + 162 ladder iterations + conversion + end
  localparam int EXP_LAT = 1 + 5 + 162 * (6 * ND + 3 + 5 + 1) + (19 * ND + 163 + 6) + 1;

  logic clk = 0, rst_n = 0;
  logic key_we = 0, start = 0, busy, done, se = 0, si = 0, so;
  fe_t  key_in = '0, px = '0, py = '0, b_in = '0, qx, qy;
  int   checks = 0, failures = 0;

  ecc_point_mult #(.DIGIT(DIGIT)) dut (
    .clk(clk), .rst_n(rst_n), .key_we(key_we), .key_in(key_in), .start(start),
    .px(px), .py(py), .b_in(b_in), .busy(busy), .done(done), .qx(qx), .qy(qy),
    .se(se), .si(si), .so(so));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference arithmetic ----------------
  function automatic fe_t fmul(fe_t x, fe_t y);
    fe_t r;
    r = '0;
    for (int i = M - 1; i >= 0; i--) begin
      r = r[M-1] ? ((r << 1) ^ POLY_LOW) : (r << 1);
      if (y[i]) r ^= x;
    end
    return r;
  endfunction

  function automatic fe_t finv(fe_t x);   // x^(2^M - 2)
    fe_t r;
    r = x;
    for (int i = 1; i < M - 1; i++) r = fmul(fmul(r, r), x);
    return fmul(r, r);
  endfunction

  typedef struct { fe_t x, y; bit inf; } pt_t;

  function automatic pt_t padd(pt_t p, pt_t q, fe_t b);
    pt_t r;
    fe_t l;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if ((p.y ^ q.y) == p.x || p.x == '0) begin r.inf = 1; r.x = '0; r.y = '0; return r; end
      // doubling: l = x + y/x, x3 = l^2 + l + a, y3 = x^2 + (l+1) x3
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

  function automatic pt_t pmul(fe_t k, pt_t p, fe_t b);
    pt_t r;
    r.inf = 1; r.x = '0; r.y = '0;
    for (int i = M - 1; i >= 0; i--) begin
      r = padd(r, r, b);
      if (k[i]) r = padd(r, p, b);
    end
    return r;
  endfunction

  function automatic fe_t rnd();
    fe_t r;
    for (int i = 0; i < 6; i++) r = {r[M-33:0], $urandom};
    return r;
  endfunction

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(fe_t k, bit scan_midway);
    pt_t p, q;
    int  lat;
    p.x = rnd(); p.y = rnd(); p.inf = 0;
    b_in = fmul(p.y, p.y) ^ fmul(p.x, p.y) ^ fmul(fmul(p.x, p.x), p.x) ^ fmul(p.x, p.x);
    px = p.x; py = p.y;
    q = pmul(k, p, b_in);
    key_in = k; key_we = 1;
    @(negedge clk); key_we = 0;
    start = 1;
    @(negedge clk); start = 0; lat = 1;
    while (!done) begin
      @(negedge clk); lat++;
      if (scan_midway && lat == 5000) begin
        // unload the whole chain while feeding it back: state must survive
        se = 1;
        for (int i = 0; i < $bits(dut.cur); i++) begin
          si = so;
          @(negedge clk);
        end
        se = 0;
      end
    end
    chk(qx == q.x && qy == q.y, $sformatf("kP mismatch for k=%h: got (%h,%h) expected (%h,%h)",
                                          k, qx, qy, q.x, q.y));
    if (!scan_midway)
      chk(lat == EXP_LAT, $sformatf("latency %0d expected %0d", lat, EXP_LAT));
    chk(dut.cur.key == k, "key register restored");
  endtask

  initial begin
    @(negedge clk);
    rst_n = 1;
    run({1'b1, 162'd9}, 0);
    run(rnd() | {1'b1, 162'd0}, 0);
    run(rnd() | {1'b1, 162'd0}, 1);
    run({163{1'b1}}, 0);
    $display("cycles per point multiplication: %0d", EXP_LAT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

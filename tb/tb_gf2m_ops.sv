// Self-checking test of the GF(2^163) field units against a bit-serial
// shift-and-add reference written here: gf2m_sqr on random inputs, and
// full products built from ceil(163/13) gf2m_mul_step steps (digits fed
// most significant first) on random operands, plus the identities
// a*1 = a and a*0 = 0.
module tb_gf2m_ops;
  localparam int M = 163, D = 13, ND = (M + D - 1) / D;
  localparam logic [M-1:0] PL = M'('hC9);

  logic [M-1:0] a, acc, acc_out, sq_out;
  logic [D-1:0] digit;
  int checks = 0, failures = 0;

  gf2m_mul_step #(.M(M), .D(D), .POLY_LOW(PL)) u_mul (.acc(acc), .a(a), .digit(digit), .acc_out(acc_out));
  gf2m_sqr #(.M(M), .POLY_LOW(PL)) u_sqr (.a(a), .out(sq_out));

  function automatic logic [M-1:0] ref_mul(logic [M-1:0] x, logic [M-1:0] y);
    logic [M-1:0] r;
    r = '0;
    for (int i = M - 1; i >= 0; i--) begin
      r = r[M-1] ? ((r << 1) ^ PL) : (r << 1);
      if (y[i]) r ^= x;
    end
    return r;
  endfunction

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] r;
    for (int i = 0; i < 6; i++) r = {r[M-33:0], $urandom};
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic product(logic [M-1:0] x, logic [M-1:0] y, logic [M-1:0] e);
    logic [ND*D-1:0] yp;
    yp = (ND*D)'(y);
    a = x; acc = '0;
    for (int k = 0; k < ND; k++) begin
      digit = yp[ND*D-1-k*D -: D];
      #1;
      acc = acc_out;
    end
    checks++;
    if (acc !== e) begin failures++; $display("mul %h * %h = %h expected %h", x, y, acc, e); end
  endtask

  initial begin
    for (int t = 0; t < 40; t++) begin
      logic [M-1:0] x, y;
      x = rnd(); y = rnd();
      a = x; #1;
      checks++;
      if (sq_out !== ref_mul(x, x)) begin failures++; $display("sqr %h", x); end
      product(x, y, ref_mul(x, y));
    end
    begin
      logic [M-1:0] x;
      x = rnd();
      product(x, M'(1), x);
      product(x, '0, '0);
      product({1'b1, {(M-1){1'b0}}}, {1'b1, {(M-1){1'b0}}}, ref_mul({1'b1, {(M-1){1'b0}}}, {1'b1, {(M-1){1'b0}}}));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

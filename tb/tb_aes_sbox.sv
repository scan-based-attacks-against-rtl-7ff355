// Self-checking test of aes_sbox over all 256 inputs: published S-box values
// for a few inputs, and for every input y = S(x) must satisfy
// inv_affine(y) * x = 1 in GF(2^8) (or inv_affine(y) = 0 for x = 0), using a
// bit-serial multiplier written here, and the map must be a permutation.
module tb_aes_sbox;
  logic [7:0] in, out;
  int checks = 0, failures = 0;
  bit seen [256];

  aes_sbox dut (.in(in), .out(out));

  function automatic logic [7:0] mul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  // inverse affine map: x = rotl(y,1) ^ rotl(y,3) ^ rotl(y,6) ^ 0x05
  function automatic logic [7:0] inv_aff(input logic [7:0] y);
    logic [7:0] r1, r3, r6;
    r1 = {y[6:0], y[7]};
    r3 = {y[4:0], y[7:5]};
    r6 = {y[1:0], y[7:2]};
    return r1 ^ r3 ^ r6 ^ 8'h05;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic known(logic [7:0] x, logic [7:0] y);
    in = x; #1;
    checks++;
    if (out !== y) begin failures++; $display("S(%h)=%h expected %h", x, out, y); end
  endtask

  initial begin
    known(8'h00, 8'h63); known(8'h01, 8'h7c); known(8'h53, 8'hed);
    known(8'hff, 8'h16); known(8'h10, 8'hca); known(8'h9a, 8'hb8);
    for (int x = 0; x < 256; x++) begin
      logic [7:0] b;
      in = 8'(x); #1;
      b = inv_aff(out);
      checks++;
      if (x == 0 ? (b != 0) : (mul(b, 8'(x)) != 8'h01)) begin
        failures++;
        $display("S(%h)=%h is not affine(inverse)", x[7:0], out);
      end
      seen[out] = 1'b1;
    end
    for (int y = 0; y < 256; y++) begin
      checks++;
      if (!seen[y]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

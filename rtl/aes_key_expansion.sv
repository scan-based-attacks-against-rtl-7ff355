// One step of the AES-128 key schedule, combinational: from round key
// RK(l-1) and the round constant rcon(l) it forms RK(l):
//   w4 = w0 ^ SubWord(RotWord(w3)) ^ {rcon,0,0,0}, w5 = w1 ^ w4,
//   w6 = w2 ^ w5, w7 = w3 ^ w6,
// with w0 in bits [127:96]. Four aes_sbox instances do SubWord. Computing
// the round keys on the fly, one per round, is this design's choice.
module aes_key_expansion
  import aes_pkg::*;
(
  input  block_t rk_in,
  input  byte_t  rcon,
  output block_t rk_out
);
  logic [31:0] w0, w1, w2, w3, rot, sub, w4, w5, w6, w7;

  assign {w0, w1, w2, w3} = rk_in;
  assign rot = {w3[23:0], w3[31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_sb
    aes_sbox u_sbox (.in(rot[31 - 8 * i -: 8]), .out(sub[31 - 8 * i -: 8]));
  end

  assign w4 = w0 ^ sub ^ {rcon, 24'h0};
  assign w5 = w1 ^ w4;
  assign w6 = w2 ^ w5;
  assign w7 = w3 ^ w6;
  assign rk_out = {w4, w5, w6, w7};
endmodule

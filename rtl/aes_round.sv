// One AES round, combinational: f = AddRoundKey(MixColumns(ShiftRows(
// SubBytes(b))), rk). In the final round (final_round = 1) MixColumns is
// skipped. SubBytes uses 16 aes_sbox instances; ShiftRows rotates row r left
// by r bytes; MixColumns multiplies each column by the circulant matrix
// [02 03 01 01; 01 02 03 01; 01 01 02 03; 03 01 01 02] over GF(2^8).
module aes_round
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  input  logic   final_round,
  output block_t state_out
);
  block_t sub, shf, mix;

  for (genvar i = 0; i < 16; i++) begin : g_sb
    aes_sbox u_sbox (.in(state_in[127 - 8 * i -: 8]), .out(sub[127 - 8 * i -: 8]));
  end

  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        shf[127 - 8 * (4 * c + r) -: 8] = blk_get(sub, r, (c + r) % 4);
  end

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t d0, d1, d2, d3;
      d0 = blk_get(shf, 0, c);
      d1 = blk_get(shf, 1, c);
      d2 = blk_get(shf, 2, c);
      d3 = blk_get(shf, 3, c);
      mix[127 - 8 * (4 * c + 0) -: 8] = xtime(d0) ^ xtime(d1) ^ d1 ^ d2 ^ d3;
      mix[127 - 8 * (4 * c + 1) -: 8] = d0 ^ xtime(d1) ^ xtime(d2) ^ d2 ^ d3;
      mix[127 - 8 * (4 * c + 2) -: 8] = d0 ^ d1 ^ xtime(d2) ^ xtime(d3) ^ d3;
      mix[127 - 8 * (4 * c + 3) -: 8] = xtime(d0) ^ d0 ^ d1 ^ d2 ^ xtime(d3);
    end
  end

  assign state_out = (final_round ? shf : mix) ^ round_key;
endmodule

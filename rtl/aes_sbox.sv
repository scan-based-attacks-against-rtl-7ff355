// AES S-box (SubBytes for one byte), combinational.
//
// out = affine(inverse(in)) over GF(2^8). The 256 results are computed at
// elaboration from that definition (aes_pkg::sbox_build) and read as a
// constant table, which synthesises to a 256x8 ROM or logic.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t in,
  output byte_t out
);
  localparam sbox_table_t SBOX = sbox_build();

  assign out = SBOX[in];
endmodule

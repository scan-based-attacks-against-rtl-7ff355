// Top level: three cryptographic cores with scan paths, side by side.
//
//  * aes: AES-128 encryptor whose 398-bit scan path uses state-dependent
//    scan FFs (SDSFFs) as the countermeasure against scan-based attacks;
//    AES_SDSFF_COUNT of its scan cells are SDSFFs.
//  * rsa: RSA modular exponentiation by the binary method (RSA_L-bit
//    exponent, RSA_NB-bit modulus), one iteration per clock, normal scan path.
//  * ecc: GF(2^163) point multiplication (Montgomery ladder, Lopez-Dahab
//    coordinates), normal scan path.
//
// The RSA and ECC cores are the circuits the scan-based attacks are
// mounted against; their SDSFF counts default to 0 (plain scan path) and
// can be raised to protect them the same way. Each core has its own
// key/data/handshake ports and its own scan-enable, scan-in and scan-out,
// described in the core modules. All cores share the clock and the
// asynchronous active-low reset.
module secure_scan_crypto_top
  import ecc_pkg::fe_t;
#(
  parameter int AES_SDSFF_COUNT = 199,
  parameter int RSA_L           = 1024,
  parameter int RSA_NB          = 1024,
  parameter int RSA_SDSFF_COUNT = 0,
  parameter int ECC_DIGIT       = 13,
  parameter int ECC_SDSFF_COUNT = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  // AES
  input  logic              aes_key_we,
  input  logic [127:0]      aes_key,
  input  logic              aes_start,
  input  logic [127:0]      aes_pt,
  output logic              aes_busy,
  output logic              aes_done,
  output logic [127:0]      aes_ct,
  input  logic              aes_se,
  input  logic              aes_si,
  output logic              aes_so,
  // RSA
  input  logic              rsa_key_we,
  input  logic [RSA_L-1:0]  rsa_d,
  input  logic [RSA_NB-1:0] rsa_n,
  input  logic              rsa_start,
  input  logic [RSA_NB-1:0] rsa_msg,
  output logic              rsa_busy,
  output logic              rsa_done,
  output logic [RSA_NB-1:0] rsa_result,
  input  logic              rsa_se,
  input  logic              rsa_si,
  output logic              rsa_so,
  // ECC
  input  logic              ecc_key_we,
  input  fe_t               ecc_key,
  input  logic              ecc_start,
  input  fe_t               ecc_px,
  input  fe_t               ecc_py,
  input  fe_t               ecc_b,
  output logic              ecc_busy,
  output logic              ecc_done,
  output fe_t               ecc_qx,
  output fe_t               ecc_qy,
  input  logic              ecc_se,
  input  logic              ecc_si,
  output logic              ecc_so
);
  aes_core #(.SDSFF_COUNT(AES_SDSFF_COUNT)) u_aes (
    .clk(clk), .rst_n(rst_n), .key_we(aes_key_we), .key_in(aes_key),
    .start(aes_start), .pt(aes_pt), .busy(aes_busy), .done(aes_done), .ct(aes_ct),
    .se(aes_se), .si(aes_si), .so(aes_so));

  rsa_binary_exp #(.L(RSA_L), .NB(RSA_NB), .SDSFF_COUNT(RSA_SDSFF_COUNT)) u_rsa (
    .clk(clk), .rst_n(rst_n), .key_we(rsa_key_we), .d_in(rsa_d), .n(rsa_n),
    .start(rsa_start), .msg(rsa_msg), .busy(rsa_busy), .done(rsa_done),
    .result(rsa_result), .se(rsa_se), .si(rsa_si), .so(rsa_so));

  ecc_point_mult #(.DIGIT(ECC_DIGIT), .SDSFF_COUNT(ECC_SDSFF_COUNT)) u_ecc (
    .clk(clk), .rst_n(rst_n), .key_we(ecc_key_we), .key_in(ecc_key),
    .start(ecc_start), .px(ecc_px), .py(ecc_py), .b_in(ecc_b),
    .busy(ecc_busy), .done(ecc_done), .qx(ecc_qx), .qy(ecc_qy),
    .se(ecc_se), .si(ecc_si), .so(ecc_so));
endmodule

// Iterative AES-128 encryptor whose registers form an SDSFF secure scan path.
//
// The secret key is written once into a key register (key_we). A start
// pulse with a plaintext performs the pre-round (a ^ RK0) into the 128-bit
// round register R; then one round per clock follows, each round key being
// derived on the fly from the previous one, so that R holds the output of
// round l after the l-th clock. After 10 rounds `done` rises and `ct` (= R)
// is the ciphertext; `done` stays high until the next start. Latency: 11
// rising edges from the edge that samples start to the edge after which
// done is high. start is ignored while busy or in test mode.
//
// All registers (key, R, round key, round constant, round counter, busy,
// done: 398 bits) sit in one secure_scan_chain, of which SDSFF_COUNT cells
// are state-dependent scan FFs. In test mode (se = 1) the registers shift
// through si -> so instead of computing. The document's AES circuit has 716
// registers and evaluates 45 to 716 SDSFFs; this register set, the default
// of 199 SDSFFs (half the chain, like the 358-of-716 point) and the stitch
// order are this design's choices.
module aes_core
  import aes_pkg::*;
#(
  parameter int          SDSFF_COUNT = 199,
  parameter logic [31:0] SCAN_SEED   = 32'h5d5f_f001
) (
  input  logic   clk,
  input  logic   rst_n,
  // key and data
  input  logic   key_we,
  input  block_t key_in,
  input  logic   start,
  input  block_t pt,
  output logic   busy,
  output logic   done,
  output block_t ct,
  // scan path
  input  logic   se,
  input  logic   si,
  output logic   so
);
  typedef struct packed {
    block_t     key;     // secret key (RK0)
    block_t     r;       // round register R
    block_t     rk;      // current round key RK(l)
    byte_t      rcon;    // round constant for the next key step
    logic [3:0] round;   // next round to compute, 1..10
    logic       busy;
    logic       done;
  } regs_t;

  localparam int NREG = $bits(regs_t);

  regs_t  cur, nxt;
  block_t rk_next, r_next;

  secure_scan_chain #(.N(NREG), .SDSFF_COUNT(SDSFF_COUNT), .SEED(SCAN_SEED)) u_chain (
    .clk(clk), .rst_n(rst_n), .se(se), .si(si),
    .d(nxt), .q(cur), .so(so)
  );

  aes_key_expansion u_kexp (.rk_in(cur.rk), .rcon(cur.rcon), .rk_out(rk_next));

  aes_round u_round (
    .state_in(cur.r), .round_key(rk_next),
    .final_round(cur.round == 4'(ROUNDS)), .state_out(r_next)
  );

  always_comb begin
    nxt = cur;
    if (key_we) nxt.key = key_in;
    if (cur.busy) begin
      nxt.r     = r_next;
      nxt.rk    = rk_next;
      nxt.rcon  = xtime(cur.rcon);
      nxt.round = cur.round + 4'd1;
      if (cur.round == 4'(ROUNDS)) begin
        nxt.busy = 1'b0;
        nxt.done = 1'b1;
      end
    end else if (start) begin
      nxt.r     = pt ^ cur.key;   // pre-round
      nxt.rk    = cur.key;
      nxt.rcon  = 8'h01;
      nxt.round = 4'd1;
      nxt.busy  = 1'b1;
      nxt.done  = 1'b0;
    end
  end

  assign busy = cur.busy;
  assign done = cur.done;
  assign ct   = cur.r;
endmodule

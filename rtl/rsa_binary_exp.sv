// RSA modular exponentiation m = c^d mod n by the left-to-right binary
// method, one loop iteration per clock, with its registers on a scan path.
//
// The secret exponent d (L bits, loaded with key_we) sits in a register that
// rotates left once per iteration, so its MSB is the current exponent bit
// d_i and the register is back to d after a full run. A start pulse loads
// the message c and sets m = 1. Each clock then does
//   m <= m^2 mod n, and, if d_i = 1, m <= (m^2 mod n) * c mod n
// (both modular products in one cycle), for i = L-1 down to 0. After L
// clocks `done` rises and `result` = m = c^d mod n; done stays high until
// the next start. Latency: L+1 rising edges from the start edge to the edge
// after which done is high, i.e. L clocks of computation, as the document's
// circuit (1,024 cycles for a 1,024-bit exponent). start is ignored while
// busy or in test mode. The modulus n is a public input and must stay stable
// during a run; c must be below n.
//
// All registers (m, c, d, iteration counter, busy, done) form one scan path
// (secure_scan_chain with SDSFF_COUNT = 0 by default: a normal scan path, as
// in the attacked circuit). The modular products are written as a full
// product followed by a remainder: correct and compact, but a large
// combinational block at L = 1024; the multiplier structure is not given by
// the document and is this design's choice.
module rsa_binary_exp #(
  parameter int          L           = 1024,  // exponent bits
  parameter int          NB          = 1024,  // modulus bits
  parameter int          SDSFF_COUNT = 0,
  parameter logic [31:0] SCAN_SEED   = 32'h2a5a_0001
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          key_we,
  input  logic [L-1:0]  d_in,
  input  logic [NB-1:0] n,
  input  logic          start,
  input  logic [NB-1:0] msg,
  output logic          busy,
  output logic          done,
  output logic [NB-1:0] result,
  input  logic          se,
  input  logic          si,
  output logic          so
);
  localparam int CW = $clog2(L + 1);

  typedef struct packed {
    logic [NB-1:0] m;     // intermediate value m(i)
    logic [NB-1:0] c;     // message
    logic [L-1:0]  d;     // secret exponent, rotating
    logic [CW-1:0] cnt;   // iterations left
    logic          busy;
    logic          done;
  } regs_t;

  localparam int NREG = $bits(regs_t);

  regs_t cur, nxt;

  secure_scan_chain #(.N(NREG), .SDSFF_COUNT(SDSFF_COUNT), .SEED(SCAN_SEED)) u_chain (
    .clk(clk), .rst_n(rst_n), .se(se), .si(si),
    .d(nxt), .q(cur), .so(so)
  );

  function automatic logic [NB-1:0] modmul(input logic [NB-1:0] a, input logic [NB-1:0] b,
                                           input logic [NB-1:0] md);
    logic [2*NB-1:0] p;
    p = (2*NB)'(a) * (2*NB)'(b);
    return NB'(p % (2*NB)'(md));
  endfunction

  logic [NB-1:0] msq, mmul;

  assign msq  = modmul(cur.m, cur.m, n);
  assign mmul = modmul(msq, cur.c, n);

  always_comb begin
    nxt = cur;
    if (key_we) nxt.d = d_in;
    if (cur.busy) begin
      nxt.m   = cur.d[L-1] ? mmul : msq;
      nxt.d   = {cur.d[L-2:0], cur.d[L-1]};
      nxt.cnt = cur.cnt - CW'(1);
      if (cur.cnt == CW'(1)) begin
        nxt.busy = 1'b0;
        nxt.done = 1'b1;
      end
    end else if (start) begin
      nxt.m    = NB'(1);
      nxt.c    = msg;
      nxt.cnt  = CW'(L);
      nxt.busy = 1'b1;
      nxt.done = 1'b0;
    end
  end

  assign busy   = cur.busy;
  assign done   = cur.done;
  assign result = cur.m;
endmodule

// Elliptic curve point multiplier Q = kP over GF(2^163), with all registers
// on one scan path.
//
// Curve: y^2 + xy = x^3 + ax^2 + b; the point P = (px, py) and the curve
// constant b are inputs, the 163-bit secret key k (MSB k_162 = 1, as the
// Montgomery method requires) is written beforehand with key_we and cannot
// be read out except through the scan path. A start pulse runs the
// Montgomery ladder in Lopez-Dahab projective coordinates over k_161 .. k_0
// (162 iterations, each one point addition and one point doubling with the
// same operation sequence whatever the key bit), then converts the result
// to affine coordinates with a single inversion. When `done` rises, (qx, qy)
// is kP; done stays high until the next start. The point at infinity (a
// multiple of the group order) is not handled.
//
// Datapath: a 13-entry register file of field elements and three field
// units, an adder (XOR), a squarer (gf2m_sqr, one squaring per clock) and a
// digit-serial multiplier (gf2m_mul_step, DIGIT bits of the second operand
// per clock, ceil(163/DIGIT) clocks per product). Controller: a program
// counter stepping through the microprogram in ecc_pkg, a repeat counter
// for chained squarings, an iteration counter, and the key register, which
// rotates so its MSB is the current key bit and is back to k at the end.
// One unit works at a time here; the document's units can run in parallel,
// which this design does not reproduce. With DIGIT = 13 one point
// multiplication takes 14,517 clocks, counting the start edge, to done (the
// document's circuit: 15,137), and the scan path is 2,642 bits long (the
// document's circuit: 2,520 registers). The digit size was chosen to bring
// the clock count close to the document's. SDSFF_COUNT = 0 gives a normal scan
// path, as in the attacked circuit.
module ecc_point_mult
  import ecc_pkg::*;
#(
  parameter int          DIGIT       = 13,
  parameter int          SDSFF_COUNT = 0,
  parameter logic [31:0] SCAN_SEED   = 32'h0ecc_0001
) (
  input  logic clk,
  input  logic rst_n,
  input  logic key_we,
  input  fe_t  key_in,
  input  logic start,
  input  fe_t  px,
  input  fe_t  py,
  input  fe_t  b_in,
  output logic busy,
  output logic done,
  output fe_t  qx,
  output fe_t  qy,
  input  logic se,
  input  logic si,
  output logic so
);
  localparam int ND = (M + DIGIT - 1) / DIGIT;   // clocks per multiplication
  localparam int BW = ND * DIGIT;                // padded multiplier operand
  localparam int MC = $clog2(ND + 1);

  typedef struct packed {
    logic [NR-1:0][M-1:0] rf;     // register file
    fe_t                  acc;    // multiplier accumulator
    logic [BW-1:0]        bsh;    // multiplier operand, shifted a digit per clock
    logic [MC-1:0]        mcnt;   // multiplier digits left
    logic                 mbusy;
    fe_t                  key;    // secret key, rotating
    logic [5:0]           pc;
    logic [6:0]           rep;    // squarings done in the current OP_SQR
    logic [7:0]           icnt;   // ladder iterations left
    logic                 busy;
    logic                 done;
  } regs_t;

  localparam int NREG = $bits(regs_t);

  regs_t  cur, nxt;
  instr_t ir;
  logic   kbit;
  reg_e   pa, pb;
  fe_t    va, vb, sq_in, sq_out, mul_acc, mul_out;
  logic [BW-1:0]    vb_pad;
  logic [DIGIT-1:0] digit;

  secure_scan_chain #(.N(NREG), .SDSFF_COUNT(SDSFF_COUNT), .SEED(SCAN_SEED)) u_chain (
    .clk(clk), .rst_n(rst_n), .se(se), .si(si),
    .d(nxt), .q(cur), .so(so)
  );

  // swap (X1,Z1) <-> (X2,Z2) in the ladder body when the key bit is 0
  function automatic reg_e phys(reg_e r, logic swap);
    return (swap && r <= R_Z2) ? reg_e'(r ^ 4'd2) : r;
  endfunction

  assign ir   = program_rom(cur.pc);
  assign kbit = cur.key[M-1];
  assign pa   = phys(ir.a, ir.sw && !kbit);
  assign pb   = phys(ir.b, ir.sw && !kbit);
  assign va   = cur.rf[pa];
  assign vb   = cur.rf[pb];

  reg_e pd;
  assign pd = phys(ir.dst, ir.sw && !kbit);

  assign sq_in = (cur.rep == 7'd0) ? va : cur.rf[pd];
  gf2m_sqr #(.M(M), .POLY_LOW(POLY_LOW)) u_sqr (.a(sq_in), .out(sq_out));

  assign vb_pad  = BW'(vb);
  assign digit   = cur.mbusy ? cur.bsh[BW-1 -: DIGIT] : vb_pad[BW-1 -: DIGIT];
  assign mul_acc = cur.mbusy ? cur.acc : '0;
  gf2m_mul_step #(.M(M), .D(DIGIT), .POLY_LOW(POLY_LOW)) u_mul (
    .acc(mul_acc), .a(va), .digit(digit), .acc_out(mul_out));

  always_comb begin
    nxt = cur;
    if (key_we) nxt.key = key_in;
    if (cur.busy) begin
      unique case (ir.op)
        OP_MOV: begin nxt.rf[pd] = va;      nxt.pc = cur.pc + 6'd1; end
        OP_ONE: begin nxt.rf[pd] = M'(1);   nxt.pc = cur.pc + 6'd1; end
        OP_ADD: begin nxt.rf[pd] = va ^ vb; nxt.pc = cur.pc + 6'd1; end
        OP_SQR: begin
          nxt.rf[pd] = sq_out;
          if (cur.rep + 7'd1 == ir.n) begin
            nxt.rep = '0;
            nxt.pc  = cur.pc + 6'd1;
          end else begin
            nxt.rep = cur.rep + 7'd1;
          end
        end
        OP_MUL: begin
          if ((cur.mbusy && cur.mcnt == MC'(1)) || (!cur.mbusy && ND == 1)) begin
            nxt.rf[pd] = mul_out;
            nxt.mbusy  = 1'b0;
            nxt.pc     = cur.pc + 6'd1;
          end else begin
            nxt.acc   = mul_out;
            nxt.bsh   = (cur.mbusy ? cur.bsh : vb_pad) << DIGIT;
            nxt.mcnt  = cur.mbusy ? cur.mcnt - MC'(1) : MC'(ND - 1);
            nxt.mbusy = 1'b1;
          end
        end
        OP_NEXT: begin
          nxt.key  = {cur.key[M-2:0], cur.key[M-1]};
          nxt.icnt = cur.icnt - 8'd1;
          nxt.pc   = (cur.icnt == 8'd1) ? cur.pc + 6'd1 : PC_LOOP;
        end
        default: begin   // OP_END
          nxt.busy = 1'b0;
          nxt.done = 1'b1;
        end
      endcase
    end else if (start) begin
      nxt.rf[R_X] = px;
      nxt.rf[R_Y] = py;
      nxt.rf[R_B] = b_in;
      nxt.key     = {cur.key[M-2:0], cur.key[M-1]};   // skip k_162 = 1
      nxt.pc      = '0;
      nxt.rep     = '0;
      nxt.mbusy   = 1'b0;
      nxt.icnt    = 8'(M - 1);
      nxt.busy    = 1'b1;
      nxt.done    = 1'b0;
    end
  end

  assign busy = cur.busy;
  assign done = cur.done;
  assign qx   = cur.rf[R_QX];
  assign qy   = cur.rf[R_QY];
endmodule

// State-dependent scan flip-flop (SDSFF).
//
// A mux-D scan FF (value B) plus a level-sensitive latch (value A) and an XOR
// gate. While `load` is high the latch is transparent and follows B; when
// `load` falls it holds the last B. The scan output towards the next cell is
// S = A ^ B, so whether this cell inverts the data passing through it on the
// scan path depends on a value the circuit itself held at the last
// test-to-system switch. The functional output q (B) is not affected, so the
// cell behaves as a plain FF in system mode.
//
// Interface: as scan_ff, plus `load`. Timing: B updates on the rising clock
// edge; `load` is expected to be a pulse that rises when `se` falls and drops
// at the next rising clock edge (see sdsff_load_gen), so A captures the value
// B held at the end of the last shift. The latch is intentional: it is the
// storage element of the cell, and a latch is what the cell is defined with.
// Reset (asynchronous, active low) clears both B and A, so right after reset
// no cell inverts until the first load; that reset behaviour is this
// design's choice.
module sdsff (
  input  logic clk,
  input  logic rst_n,
  input  logic se,    // 1 = test mode (shift), 0 = system mode
  input  logic load,  // latch enable, pulsed on every test-to-system switch
  input  logic d,     // functional next value
  input  logic si,    // scan input from the previous cell
  output logic q,     // B: stored value, to the functional logic
  output logic so     // S = A ^ B: scan output to the next cell
);
  logic a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (se) q <= si;
    else         q <= d;
  end

  always_latch begin
    if (!rst_n)    a = 1'b0;
    else if (load) a = q;
  end

  assign so = a ^ q;
endmodule

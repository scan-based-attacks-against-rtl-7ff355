// Secure scan path: the register bank of a circuit, stitched into one scan
// chain in which SDSFF_COUNT of the N cells are state-dependent scan FFs.
//
// The chain holds N register bits. In system mode (se = 0) every bit loads
// its functional next value d[i]; in test mode (se = 1) the bits shift one
// place per clock from si through cell 0 ... cell N-1 to so. A plain cell
// passes its value on unchanged; an SDSFF passes on its value XORed with its
// latch, and all latches reload from their own cells on every switch from
// test to system mode (pulse from sdsff_load_gen). A tester that knows MASK
// and the latch contents can undo the inversions; to anyone else the
// inversion pattern is unknown and changes at every capture.
//
// Parameters: N cells; SDSFF_COUNT of them are SDSFFs, at positions drawn
// by scan_pkg::sdsff_mask from SEED (MASK is exported as a localparam so a
// tester model can rebuild it). SDSFF_COUNT = 0 gives a normal scan path.
// Stitch order (cell i holds register bit i) is this design's choice.
// Timing: registers update on the rising edge; so is combinational from the
// last cell (and its latch).
module secure_scan_chain
  import scan_pkg::*;
#(
  parameter int          N           = 16,
  parameter int          SDSFF_COUNT = 8,
  parameter logic [31:0] SEED        = 32'h5d5f_f001
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         se,
  input  logic         si,
  input  logic [N-1:0] d,
  output logic [N-1:0] q,
  output logic         so
);
  // A chain without SDSFFs (a normal scan path) is not limited to MAX_CHAIN.
  localparam logic [N-1:0] MASK =
      (SDSFF_COUNT == 0) ? '0 : N'(sdsff_mask(N, SDSFF_COUNT, SEED));

  initial begin
    assert ((SDSFF_COUNT == 0 || N <= MAX_CHAIN) && SDSFF_COUNT <= N)
      else $error("secure_scan_chain: N or SDSFF_COUNT out of range");
  end

  logic         load;
  logic [N:0]   sc;   // sc[i] is the scan input of cell i, sc[N] the chain output

  assign sc[0] = si;

  sdsff_load_gen u_load (.clk(clk), .rst_n(rst_n), .se(se), .load(load));

  for (genvar i = 0; i < N; i++) begin : g_cell
    if (MASK[i]) begin : g_sd
      sdsff u_cell (.clk(clk), .rst_n(rst_n), .se(se), .load(load),
                    .d(d[i]), .si(sc[i]), .q(q[i]), .so(sc[i+1]));
    end else begin : g_plain
      scan_ff u_cell (.clk(clk), .rst_n(rst_n), .se(se),
                      .d(d[i]), .si(sc[i]), .q(q[i]), .so(sc[i+1]));
    end
  end

  assign so = sc[N];
endmodule

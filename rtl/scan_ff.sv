// Mux-D scan flip-flop: the building block of a normal scan path.
//
// A 2:1 multiplexer in front of a D flip-flop selects the functional input
// `d` when scan enable `se` is 0 (system mode: capture) and the scan input
// `si` when `se` is 1 (test mode: shift). The scan output `so` is the stored
// value itself, so a chain of these cells is a shift register in test mode.
// Timing: q updates on the rising clock edge; reset is asynchronous and
// active low, clearing the cell to 0 (reset style is this design's choice).
module scan_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic se,   // 1 = test mode (shift), 0 = system mode
  input  logic d,    // functional next value
  input  logic si,   // scan input from the previous cell
  output logic q,    // stored value, to the functional logic
  output logic so    // scan output to the next cell
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (se) q <= si;
    else         q <= d;
  end

  assign so = q;
endmodule

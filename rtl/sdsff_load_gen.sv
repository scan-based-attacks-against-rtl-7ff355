// Load pulse generator for the SDSFF latches.
//
// The latches of all SDSFFs must be loaded every time the scan path moves
// from test mode (se = 1) to system mode (se = 0), with a pulse that rises
// together with the falling se and ends before the next rising clock edge.
// This block registers se on the clock and raises `load` while the
// registered copy is still 1 but se is already 0: the pulse starts the
// moment se falls and ends at the next rising edge, when the register
// catches up. Generating Load from se this way, so that no extra pin or
// controller is needed, is this design's choice.
module sdsff_load_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic se,
  output logic load
);
  logic se_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) se_q <= 1'b0;
    else        se_q <= se;
  end

  assign load = se_q & ~se;
endmodule

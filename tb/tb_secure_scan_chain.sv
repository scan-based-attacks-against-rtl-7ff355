// Self-checking test of secure_scan_chain.
//  1. Example chain of four SDSFFs: latches set to 0101, contents D3..D0,
//     shift in 1,0,0,1; the scan-out stream and the cell contents must follow
//     the hand-derived sequence (~D0, ~D1, D2, D3 out; 1010 left in the chain),
//     then a capture must reload the latches with 1010.
//  2. A 24-cell chain with 9 SDSFFs against a reference model of B and A,
//     over random shift/capture sequences; a tester that knows the mask and
//     latch contents decodes every unloaded word back to the captured data.
module tb_secure_scan_chain;
  import scan_pkg::*;

  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- chain 1: four SDSFFs ----------------
  logic       se1 = 0, si1 = 0, so1;
  logic [3:0] d1 = 0, q1;
  secure_scan_chain #(.N(4), .SDSFF_COUNT(4)) u_c1 (
    .clk(clk), .rst_n(rst_n), .se(se1), .si(si1), .d(d1), .q(q1), .so(so1));

  // ---------------- chain 2: 24 cells, 9 SDSFFs ----------------
  localparam int N2 = 24, K2 = 9;
  localparam logic [31:0] SEED2 = 32'h1234_abcd;
  localparam logic [MAX_CHAIN-1:0] M2F = sdsff_mask(N2, K2, SEED2);
  localparam logic [N2-1:0] M2 = M2F[N2-1:0];
  logic          se2 = 0, si2 = 0, so2;
  logic [N2-1:0] d2 = 0, q2;
  secure_scan_chain #(.N(N2), .SDSFF_COUNT(K2), .SEED(SEED2)) u_c2 (
    .clk(clk), .rst_n(rst_n), .se(se2), .si(si2), .d(d2), .q(q2), .so(so2));

  task automatic chk(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %b expected %b", what, got, exp);
    end
  endtask

  // chain-1 helpers: q1[i] is cell i (B_i)
  task automatic shift1(logic in);
    se1 = 1; si1 = in;
    @(negedge clk);
  endtask

  logic [3:0] D;
  logic [N2-1:0] mb, ma, cap, dec;
  logic          out_exp;
  int            inversions_seen;

  initial begin
    D = 4'b1011;  // D3 D2 D1 D0 = 1 0 1 1
    @(negedge clk);
    rst_n = 1;
    // set B = (B0..B3) = (0,1,0,1) by shifting in 1,0,1,0 (cell 0 last)
    // latches are 0 after reset, so the chain shifts plainly
    shift1(1); shift1(0); shift1(1); shift1(0);
    chk(q1 == 4'b1010, 1'b1, "ex: preset B3..B0");
    // capture D: se falls -> latches load 0101 (A0..A3), then B = D
    se1 = 0; d1 = {D[0], D[1], D[2], D[3]}; // cell0=D3, cell1=D2, cell2=D1, cell3=D0
    @(negedge clk);
    chk(q1 == {D[0], D[1], D[2], D[3]}, 1'b1, "ex: capture");
    chk(so1, ~D[0], "ex: scan out before shift");
    shift1(1);   // -> B = 1 D3 ~D2 D1, out ~D1 next
    chk(q1 == {D[1], ~D[2], D[3], 1'b1}, 1'b1, "ex: shift1 contents");
    chk(so1, ~D[1], "ex: out 2");
    shift1(0);   // -> 0 1 ~D3 ~D2
    chk(q1 == {~D[2], ~D[3], 1'b1, 1'b0}, 1'b1, "ex: shift2 contents");
    chk(so1, D[2], "ex: out 3");
    shift1(0);   // -> 0 0 0 ~D3
    chk(q1 == {~D[3], 1'b0, 1'b0, 1'b0}, 1'b1, "ex: shift3 contents");
    chk(so1, D[3], "ex: out 4");
    shift1(1);   // -> 1 0 1 0
    chk(q1 == 4'b0101, 1'b1, "ex: shift4 contents (B0..B3 = 1010)");
    // switch to system mode: latches take 1010, capture D' = 0110
    se1 = 0; d1 = 4'b0110;  // cell0=0,cell1=1,cell2=1,cell3=0
    @(negedge clk);
    // now A = (1,0,1,0): cell 0 and 2 invert, so out = B3 ^ A3 = B3
    chk(so1, 1'b0, "ex: out after 2nd capture");
    shift1(1);   // B = 1, B0^1, B1^0, B2^1 = 1, 1, 1, 0
    chk(q1 == 4'b0111, 1'b1, "ex: 2nd shift contents");
    chk(so1, 1'b0, "ex: 2nd out");

    // ---------------- chain 2 against the model ----------------
    mb = '0; ma = '0;
    inversions_seen = 0;
    for (int op = 0; op < 60; op++) begin
      // capture a random word (latches load the pre-capture contents)
      se2 = 0; d2 = N2'($urandom);
      ma = mb & M2;  // latch = B for SDSFF cells (non-SDSFF cells never invert)
      mb = d2;
      cap = d2;
      @(negedge clk);
      chk(q2 == mb, 1'b1, "c2: capture");
      // unload with random scan-in, check each output bit, decode
      for (int k = 0; k < N2; k++) begin
        out_exp = mb[N2-1] ^ ma[N2-1];
        chk(so2, out_exp, "c2: scan out");
        // the tester knows mask and latches: undo the inversions the bit met
        begin
          logic bit_v;
          bit_v = so2;
          for (int j = N2 - 1 - k; j < N2; j++) bit_v ^= ma[j];
          dec[N2 - 1 - k] = bit_v;
        end
        se2 = 1; si2 = 1'($urandom);
        mb = {mb[N2-2:0] ^ ma[N2-2:0], si2};
        @(negedge clk);
        chk(q2 == mb, 1'b1, "c2: shift contents");
      end
      chk(dec == cap, 1'b1, "c2: tester decode");
      if ((cap ^ dec) == 0 && ma != 0) inversions_seen++;
    end
    chk(inversions_seen > 0, 1'b1, "c2: latches ever inverted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

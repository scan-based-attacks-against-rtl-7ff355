// Shared definitions for the scan path cells and chains.
//
// sdsff_mask() chooses which cells of an N-cell scan path are built as
// state-dependent scan flip-flops (SDSFFs) rather than plain scan FFs. The
// positions are meant to be secret and look random to anyone who only sees
// the scan-out stream, so they are drawn from a 32-bit Galois LFSR started
// at a design-time seed: walk over the cells, and keep cell i with
// probability COUNT/N (threshold on the LFSR output), then top up or trim so
// that exactly COUNT cells are chosen. Which cells get replaced, and how they
// are chosen, is this design's choice; the countermeasure only requires that
// the tester knows the set and an attacker does not.
package scan_pkg;

  // Longest scan path a chain may have.
  localparam int MAX_CHAIN = 8192;

  // One step of a 32-bit maximal-length Galois LFSR (polynomial 0x80200003).
  function automatic logic [31:0] lfsr32_step(input logic [31:0] s);
    return s[0] ? ((s >> 1) ^ 32'h8020_0003) : (s >> 1);
  endfunction

  // Mask with exactly `count` ones (count <= n) at pseudo-random positions.
  function automatic logic [MAX_CHAIN-1:0] sdsff_mask(input int n, input int count,
                                               input logic [31:0] seed);
    logic [MAX_CHAIN-1:0] m;
    logic [31:0]   s;
    int            ones;
    m    = '0;
    s    = (seed == 32'd0) ? 32'h1 : seed;
    ones = 0;
    for (int i = 0; i < n; i++) begin
      s = lfsr32_step(s);
      // keep cell i when the 16-bit sample falls under count/n of the range
      if ((longint'(s[15:0]) * n) < (longint'(count) * 65536) && ones < count) begin
        m[i] = 1'b1;
        ones++;
      end
    end
    // top up deterministically from the end if the random walk fell short
    for (int i = n - 1; i >= 0; i--) begin
      if (ones < count && !m[i]) begin
        m[i] = 1'b1;
        ones++;
      end
    end
    return m;
  endfunction

  // Number of ones in the low n bits of a mask.
  function automatic int mask_ones(input logic [MAX_CHAIN-1:0] m, input int n);
    int c;
    c = 0;
    for (int i = 0; i < n; i++) c += int'(m[i]);
    return c;
  endfunction

endpackage

// Self-checking test of aes_round with the published AES-128 worked example
// (key 2b7e1516..., plaintext 3243f6a8...): a normal round (round 1) and the
// final round without MixColumns (round 10).
module tb_aes_round;
  logic [127:0] s_in, rk, s_out;
  logic         fin;
  int checks = 0, failures = 0;

  aes_round dut (.state_in(s_in), .round_key(rk), .final_round(fin), .state_out(s_out));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t(logic [127:0] a, logic [127:0] k, logic f, logic [127:0] e);
    s_in = a; rk = k; fin = f; #1;
    checks++;
    if (s_out !== e) begin failures++; $display("round out %h expected %h", s_out, e); end
  endtask

  initial begin
    t(128'h193de3bea0f4e22b9ac68d2ae9f84808, 128'ha0fafe1788542cb123a339392a6c7605, 1'b0,
      128'ha49c7ff2689f352b6b5bea43026a5049);
    t(128'heb40f21e592e38848ba113e71bc342d2, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, 1'b1,
      128'h3925841d02dc09fbdc118597196a0b32);
    // all-zero key: state_out of round with zero key must equal round with key folded in
    t(128'h193de3bea0f4e22b9ac68d2ae9f84808, 128'h0, 1'b0,
      128'ha49c7ff2689f352b6b5bea43026a5049 ^ 128'ha0fafe1788542cb123a339392a6c7605);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

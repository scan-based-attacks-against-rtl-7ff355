// Self-checking test of aes_key_expansion: chain ten steps from the key
// 2b7e151628aed2a6abf7158809cf4f3c with the round constants 01..36 and
// compare round keys 1, 2 and 10 with the published key schedule.
module tb_aes_key_expansion;
  logic [127:0] rk_in, rk_out;
  logic [7:0]   rcon;
  int checks = 0, failures = 0;
  logic [7:0] rc [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  aes_key_expansion dut (.rk_in(rk_in), .rcon(rcon), .rk_out(rk_out));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rk_in = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    for (int l = 1; l <= 10; l++) begin
      rcon = rc[l-1]; #1;
      if (l == 1) begin checks++; if (rk_out !== 128'ha0fafe1788542cb123a339392a6c7605) failures++; end
      if (l == 2) begin checks++; if (rk_out !== 128'hf2c295f27a96b9435935807a7359f67f) failures++; end
      if (l == 10) begin checks++; if (rk_out !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) failures++; end
      rk_in = rk_out;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_aes_enc_round: self-checking testbench for aes_enc_round.
//
// Inner and final round on 300 random states and keys against SubBytes, ShiftRows and
// MixColumns written out in the testbench from the reference functions.
// Ends with a TB_RESULT line; a watchdog stops the run and counts a failure if the
// stimulus has not finished after 100000 clock cycles.
module tb_aes_enc_round;
  import aes_tb_pkg::*;

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [127:0] s, k, o_mid, o_fin;
  aes_enc_round #(.FINAL(1'b0)) u_mid (.state_in(s), .round_key(k), .state_out(o_mid));
  aes_enc_round #(.FINAL(1'b1)) u_fin (.state_in(s), .round_key(k), .state_out(o_fin));

  initial begin
    for (int i = 0; i < 300; i++) begin
      logic [127:0] t, m;
      s = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++)
          t[127 - 8*(4*c + r) -: 8] = sbox(at(s, r, (c + r) % 4));
      for (int c = 0; c < 4; c++) m[127-32*c -: 32] = mix_col(t[127-32*c -: 32]);
      #1;
      check(o_mid, m ^ k, "inner round");
      check(o_fin, t ^ k, "final round");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

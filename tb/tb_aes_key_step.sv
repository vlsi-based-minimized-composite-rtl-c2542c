// tb_aes_key_step: self-checking testbench for aes_key_step.
//
// For all ten rounds, forward and inverse steps against the reference key schedule:
// the FIPS-197 key 2b7e1516... and 50 random keys.
// Ends with a TB_RESULT line; a watchdog stops the run and counts a failure if the
// stimulus has not finished after 100000 clock cycles.
module tb_aes_key_step;
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

  logic [127:0] kin;
  logic [127:0] fwd [1:10];
  logic [127:0] bwd [1:10];
  logic [127:0] kprev [1:10];
  logic [127:0] knext [1:10];

  for (genvar r = 1; r <= 10; r++) begin : g_r
    aes_key_step #(.ROUND(r), .INVERSE(1'b0)) u_f (.key_in(kprev[r]), .key_out(fwd[r]));
    aes_key_step #(.ROUND(r), .INVERSE(1'b1)) u_b (.key_in(knext[r]), .key_out(bwd[r]));
  end

  initial begin
    for (int t = 0; t < 51; t++) begin
      rkeys_t rk;
      kin = (t == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c
                     : {$urandom, $urandom, $urandom, $urandom};
      rk = expand_key(kin);
      for (int r = 1; r <= 10; r++) begin
        kprev[r] = rk[r-1];
        knext[r] = rk[r];
      end
      #1;
      for (int r = 1; r <= 10; r++) begin
        check(fwd[r], rk[r],   $sformatf("forward round %0d", r));
        check(bwd[r], rk[r-1], $sformatf("inverse round %0d", r));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gf4_sq_lambda: self-checking testbench for gf4_sq_lambda.
//
// All 16 inputs: k must equal {1000} * q^2, with q^2 and the product taken from the
// schoolbook GF(2^4) reference.
// Ends with a TB_RESULT line; a watchdog stops the run and counts a failure if the
// stimulus has not finished after 100000 clock cycles.
module tb_gf4_sq_lambda;
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

  logic [3:0] q, k;
  gf4_sq_lambda dut (.q(q), .k(k));

  initial begin
    for (int i = 0; i < 16; i++) begin
      q = 4'(i);
      #1 check(128'(k), 128'(ref_mul4(4'b1000, ref_mul4(q, q))), $sformatf("sq_lambda(%h)", q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gf8_mul_inv: self-checking testbench for gf8_mul_inv.
//
// All 256 inputs: q * inv(q) = 1 in the composite field GF((2^4)^2), y^2 = y + {1000}
// (schoolbook reference multiply), and inv(0) = 0.
// Ends with a TB_RESULT line; a watchdog stops the run and counts a failure if the
// stimulus has not finished after 100000 clock cycles.
module tb_gf8_mul_inv;
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

  logic [7:0] q, qi;
  gf8_mul_inv dut (.q(q), .qi(qi));

  initial begin
    for (int i = 0; i < 256; i++) begin
      q = 8'(i);
      #1;
      if (q == 8'h00) check(128'(qi), 128'h0, "inv(0)");
      else            check(128'(ref_mul8c(q, qi)), 128'h1, $sformatf("%h*inv(%h)", q, q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

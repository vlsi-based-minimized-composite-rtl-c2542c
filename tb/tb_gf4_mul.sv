// tb_gf4_mul: self-checking testbench for gf4_mul.
//
// All 256 operand pairs against the schoolbook GF(2^4) reference.
// Ends with a TB_RESULT line; a watchdog stops the run and counts a failure if the
// stimulus has not finished after 100000 clock cycles.
module tb_gf4_mul;
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

  logic [3:0] a, b, p;
  gf4_mul dut (.a(a), .b(b), .p(p));

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      #1 check(128'(p), 128'(ref_mul4(a, b)), $sformatf("%h*%h", a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

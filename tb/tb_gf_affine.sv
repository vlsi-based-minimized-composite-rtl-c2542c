// tb_gf_affine: self-checking testbench for gf_affine.
//
// All 256 bytes: the affine transform against the bitwise FIPS formula, and the
// inverse transform undoing it.
// Ends with a TB_RESULT line; a watchdog stops the run and counts a failure if the
// stimulus has not finished after 100000 clock cycles.
module tb_gf_affine;
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

  logic [7:0] a, fwd, back;
  gf_affine #(.INVERSE(1'b0)) u_fwd (.a(a),   .y(fwd));
  gf_affine #(.INVERSE(1'b1)) u_inv (.a(fwd), .y(back));

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      check(128'(fwd),  128'(affine(a)), $sformatf("affine(%h)", a));
      check(128'(back), 128'(a),         $sformatf("inv_affine(affine(%h))", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

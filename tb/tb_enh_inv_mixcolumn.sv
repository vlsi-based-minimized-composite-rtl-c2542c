// tb_enh_inv_mixcolumn: self-checking testbench for enh_inv_mixcolumn.
//
// The column 8e 4d a1 bc -> db 13 53 45 and 2000 random columns against the
// 0e/0b/0d/09 matrix product, plus the round trip through the reference MixColumns.
// Ends with a TB_RESULT line; a watchdog stops the run and counts a failure if the
// stimulus has not finished after 100000 clock cycles.
module tb_enh_inv_mixcolumn;
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

  logic [31:0] c, o;
  enh_inv_mixcolumn dut (.col_in(c), .col_out(o));

  initial begin
    c = 32'h8e4da1bc;
    #1 check(128'(o), 128'hdb135345, "known column");
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] x;
      x = $urandom;
      c = mix_col(x);
      #1;
      check(128'(o), 128'(inv_mix_col(c)), $sformatf("col %h", c));
      check(128'(o), 128'(x), $sformatf("round trip %h", x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

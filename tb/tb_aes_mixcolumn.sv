// tb_aes_mixcolumn: self-checking testbench for aes_mixcolumn.
//
// The FIPS-197 / common test column db 13 53 45 -> 8e 4d a1 bc and 2000 random columns
// against the matrix product.
// Ends with a TB_RESULT line; a watchdog stops the run and counts a failure if the
// stimulus has not finished after 100000 clock cycles.
module tb_aes_mixcolumn;
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
  aes_mixcolumn dut (.col_in(c), .col_out(o));

  initial begin
    c = 32'hdb135345;
    #1 check(128'(o), 128'h8e4da1bc, "known column");
    for (int i = 0; i < 2000; i++) begin
      c = $urandom;
      #1 check(128'(o), 128'(mix_col(c)), $sformatf("col %h", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

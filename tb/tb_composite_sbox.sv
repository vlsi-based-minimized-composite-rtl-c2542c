// tb_composite_sbox: self-checking testbench for composite_sbox.
//
// All 256 bytes in both modes against the reference S-Box and Inv S-Box, plus the
// FIPS-197 spot values S(53) = ed and InvS(ed) = 53.
// Ends with a TB_RESULT line; a watchdog stops the run and counts a failure if the
// stimulus has not finished after 100000 clock cycles.
module tb_composite_sbox;
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

  logic       sel;
  logic [7:0] in, out;
  composite_sbox dut (.sel(sel), .in(in), .out(out));

  initial begin
    sel = 1'b0; in = 8'h53;
    #1 check(128'(out), 128'hed, "S(53)");
    sel = 1'b1; in = 8'hed;
    #1 check(128'(out), 128'h53, "InvS(ed)");
    for (int m = 0; m < 2; m++)
      for (int i = 0; i < 256; i++) begin
        sel = m[0];
        in  = 8'(i);
        #1 check(128'(out), 128'(sel ? inv_sbox(in) : sbox(in)), $sformatf("sel=%0d in=%h", sel, in));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

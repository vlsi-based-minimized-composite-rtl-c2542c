// tb_gf_iso_map: self-checking testbench for gf_iso_map.
//
// Both directions.  delta must be a field isomorphism: delta(1) = 1 and
// delta(a*b) = delta(a)*delta(b) (AES multiply on one side, composite multiply on the other)
// for all a and 16 random b; delta^-1(delta(a)) = a for all 256 bytes.
// Ends with a TB_RESULT line; a watchdog stops the run and counts a failure if the
// stimulus has not finished after 100000 clock cycles.
module tb_gf_iso_map;
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

  logic [7:0] a, b, da, db, dab, back;
  gf_iso_map #(.INVERSE(1'b0)) u_fa  (.a(a),  .y(da));
  gf_iso_map #(.INVERSE(1'b0)) u_fb  (.a(b),  .y(db));
  gf_iso_map #(.INVERSE(1'b0)) u_fab (.a(gmul(a, b)), .y(dab));
  gf_iso_map #(.INVERSE(1'b1)) u_inv (.a(da), .y(back));

  initial begin
    a = 8'h01; b = 8'h01;
    #1 check(128'(da), 128'h1, "delta(1)");
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1 check(128'(back), 128'(a), $sformatf("delta^-1(delta(%h))", a));
      for (int j = 0; j < 16; j++) begin
        b = 8'($urandom);
        #1 check(128'(dab), 128'(ref_mul8c(da, db)), $sformatf("delta(%h*%h)", a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

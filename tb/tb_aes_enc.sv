// tb_aes_enc: self-checking testbench for aes_enc.
//
// Streams the worked example (key 2b7e1516..., plaintext 85fc3432...), the FIPS-197
// example and 200 random blocks with random keys, with random bubbles, through the pipeline.
// Every result is checked against the reference cipher, its key_out against round key 10,
// and its latency against the ten pipeline stages.
// Ends with a TB_RESULT line; a watchdog stops the run and counts a failure if the
// stimulus has not finished after 5000 clock cycles.
module tb_aes_enc;
  import aes_tb_pkg::*;

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  localparam int unsigned NR = 10;

  typedef struct {
    logic [127:0] data;
    logic [127:0] key;
    int           cycle;
  } exp_t;

  logic         rst_n;
  logic         valid_in, valid_out;
  logic [127:0] data_in, key_in, data_out, key_out;
  exp_t         q [$];
  int           cycle = 0;
  int           blocks = 0, bubbles = 0;

  aes_enc dut (.clk, .rst_n, .valid_in, .data_in, .key_in, .valid_out, .data_out, .key_out);

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && valid_out) begin
      if (q.size() == 0) begin
        checks++; failures++;
        $display("FAIL unexpected result %h", data_out);
      end else begin
        exp_t e;
        e = q.pop_front();
        check(data_out, e.data, "ciphertext");
        check(key_out,  e.key,  "key_out");
        check(128'(cycle - e.cycle), 128'(NR), "latency in clocks");
      end
    end
  end

  // Drive one block (or a bubble) in the cycle ahead of the next rising edge.
  task automatic send(logic v, logic [127:0] pt_or_ct, logic [127:0] cipher_key);
    rkeys_t rk = expand_key(cipher_key);
    @(negedge clk);
    valid_in = v;
    data_in  = pt_or_ct;
    key_in   = cipher_key;
    if (v) begin
      q.push_back('{data: encrypt(pt_or_ct, cipher_key), key: rk[10], cycle: cycle});
      blocks++;
    end else bubbles++;
  endtask

  initial begin
    rst_n = 1'b0; valid_in = 1'b0; data_in = '0; key_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // The worked example: key 2b7e1516..., plaintext 85fc3432..., ciphertext 9ba71628....
    send(1'b1, 128'h85fc3432abcd53210be0ac125ccdb110, 128'h2b7e151628aed2a6abf7158809cf4f3c);
    // FIPS-197 appendix example.
    send(1'b1, 128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c);
    // Back-to-back random blocks with random keys, with occasional bubbles.
    for (int i = 0; i < 200; i++) begin
      logic [127:0] k, d;
      k = {$urandom, $urandom, $urandom, $urandom};
      d = {$urandom, $urandom, $urandom, $urandom};
      send(($urandom % 4) != 0, d, k);
    end
    @(negedge clk) valid_in = 1'b0;
    repeat (NR + 2) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d results missing", q.size()); end
    checks++;
    if (blocks < 100 || bubbles == 0) begin failures++; $display("FAIL stimulus too thin"); end
    $display("blocks=%0d bubbles=%0d", blocks, bubbles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

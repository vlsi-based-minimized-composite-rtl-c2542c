// tb_aes_top: self-checking testbench for aes_top.
//
// Runs the full-size design end to end (default parameters): the worked example
// (85fc3432... <-> 9ba71628... under key 2b7e1516...) in both directions, then 400 cycles of
// randomly mixed encryptions, decryptions, bubbles and round trips (an encrypted result is
// fed back for decryption with the round-10 key the design returned).  Each result is
// checked for data, direction, key_out and a ten-clock latency; each mechanism must occur.
// Ends with a TB_RESULT line; a watchdog stops the run and counts a failure if the
// stimulus has not finished after 5000 clock cycles.
module tb_aes_top;
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

  localparam int unsigned NR = 10;   // the top's default depth

  typedef struct {
    logic         sel;
    logic [127:0] data;
    logic [127:0] key;
    logic [127:0] orig;     // plaintext of an encrypted block, for the round trip
    int           cycle;
  } exp_t;

  typedef struct {
    logic [127:0] ct;
    logic [127:0] last_key;
    logic [127:0] pt;
  } trip_t;

  logic         rst_n, sel, valid_in, valid_out, sel_out;
  logic [127:0] data_in, key_in, data_out, key_out;
  exp_t         q [$];
  trip_t        trips [$];
  int           cycle = 0;
  // Mechanism counters.
  int n_enc = 0, n_dec = 0, n_switch = 0, n_bubble = 0, n_trip = 0, n_trip_ok = 0;
  logic         last_sel = 1'b0;
  bit           have_last = 1'b0;

  aes_top dut (.clk, .rst_n, .sel, .valid_in, .data_in, .key_in,
               .valid_out, .sel_out, .data_out, .key_out);

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && valid_out) begin
      if (q.size() == 0) begin
        checks++; failures++;
        $display("FAIL unexpected result %h", data_out);
      end else begin
        exp_t e;
        e = q.pop_front();
        check(128'(sel_out), 128'(e.sel), "sel_out");
        check(data_out, e.data, e.sel ? "plaintext" : "ciphertext");
        check(key_out, e.key, "key_out");
        check(128'(cycle - e.cycle), 128'(NR), "latency in clocks");
        if (!e.sel) trips.push_back('{ct: data_out, last_key: key_out, pt: e.orig});
        else if (e.orig != '0) begin
          n_trip_ok++;
          check(data_out, e.orig, "round trip");
        end
      end
    end
  end

  task automatic send(logic v, logic s, logic [127:0] d, logic [127:0] k, logic [127:0] orig);
    @(negedge clk);
    valid_in = v;
    sel      = s;
    data_in  = d;
    key_in   = k;
    if (!v) begin
      n_bubble++;
      return;
    end
    if (have_last && s != last_sel) n_switch++;
    have_last = 1'b1;
    last_sel  = s;
    if (s) begin
      // Decrypt: the key given is the last round key; the reference needs the cipher key.
      logic [127:0] ck = orig_key(k);
      n_dec++;
      q.push_back('{sel: 1'b1, data: decrypt(d, ck), key: ck, orig: orig, cycle: cycle});
    end else begin
      rkeys_t rk = expand_key(k);
      n_enc++;
      q.push_back('{sel: 1'b0, data: encrypt(d, k), key: rk[10], orig: d, cycle: cycle});
    end
  endtask

  // Cipher key whose round-10 key is lk: run the schedule backwards in the testbench.
  function automatic logic [127:0] orig_key(logic [127:0] lk);
    logic [31:0] w [4];
    logic [7:0]  rc [11] = '{8'h00, 8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};
    for (int i = 0; i < 4; i++) w[i] = lk[127-32*i -: 32];
    for (int r = 10; r >= 1; r--) begin
      logic [31:0] t;
      w[3] = w[3] ^ w[2];
      w[2] = w[2] ^ w[1];
      w[1] = w[1] ^ w[0];
      t    = {w[3][23:0], w[3][31:24]};
      w[0] = w[0] ^ {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])} ^ {rc[r], 24'h0};
    end
    return {w[0], w[1], w[2], w[3]};
  endfunction

  task automatic need(int n, string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    rst_n = 1'b0; sel = 1'b0; valid_in = 1'b0; data_in = '0; key_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // The worked example in both directions, back to back (a mode switch).
    send(1'b1, 1'b0, 128'h85fc3432abcd53210be0ac125ccdb110, 128'h2b7e151628aed2a6abf7158809cf4f3c, '0);
    send(1'b1, 1'b1, 128'h9ba71628a7ee25e0416a7354a15b1321, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6,
         128'h85fc3432abcd53210be0ac125ccdb110);
    for (int i = 0; i < 400; i++) begin
      int unsigned  pick;
      logic [127:0] k, d;
      pick = $urandom % 8;
      k    = {$urandom, $urandom, $urandom, $urandom};
      d    = {$urandom, $urandom, $urandom, $urandom};
      if (pick == 0) send(1'b0, 1'b0, d, k, '0);                       // bubble
      else if (pick <= 2 && trips.size() != 0) begin                   // decrypt an earlier result
        trip_t t;
        t = trips.pop_front();
        n_trip++;
        send(1'b1, 1'b1, t.ct, t.last_key, t.pt);
      end
      else if (pick <= 5) send(1'b1, 1'b0, d, k, '0);                  // encrypt
      else begin                                                       // decrypt random data
        rkeys_t rk;
        rk = expand_key(k);
        send(1'b1, 1'b1, d, rk[10], '0);
      end
    end
    @(negedge clk) valid_in = 1'b0;
    repeat (NR + 2) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d results missing", q.size()); end
    need(n_enc, "encryption");
    need(n_dec, "decryption");
    need(n_switch, "mode switch between consecutive blocks");
    need(n_bubble, "bubble (cycle without a block)");
    need(n_trip_ok, "round trip of an encrypted block");
    $display("encrypt=%0d decrypt=%0d switches=%0d bubbles=%0d round_trips=%0d",
             n_enc, n_dec, n_switch, n_bubble, n_trip_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

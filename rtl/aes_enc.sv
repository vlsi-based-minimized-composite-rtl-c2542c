// aes_enc: fully unrolled, pipelined AES-128 encryption.
//
// The plaintext is XORed with the cipher key (initial AddRoundKey) and then passes NR
// round units, the last one without MixColumns.  Each round is followed by a register, so
// a new block (with its own key) can enter every clock and leaves NR clocks later.  The key
// schedule is unrolled alongside: stage i derives round key i from the registered round key
// i-1 of the same block, so keys travel with their data and no key storage is needed.
//
// Interface: valid_in/data_in/key_in are sampled on the rising clock edge; valid_out,
// data_out (ciphertext) and key_out (the block's round-NR key, which is what aes_dec takes
// as its key) appear NR clocks later.  rst_n (synchronous, active low) clears only the
// valid bits; data and key registers are not reset.
// The round order, ten rounds and one register per round follow the document; carrying the
// key through the pipeline, the valid bits and the reset are this design's choices.
module aes_enc
  import aes_pkg::*;
#(
  parameter int unsigned NR = NR_AES128
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   valid_in,
  input  block_t data_in,
  input  block_t key_in,
  output logic   valid_out,
  output block_t data_out,
  output block_t key_out
);
  block_t key_add_out;           // state after the initial AddRoundKey
  block_t reg_out [1:NR];        // state register after each round
  block_t key_reg [1:NR];        // round key used by each stage
  logic   vld     [1:NR];

  assign key_add_out = data_in ^ key_in;

  for (genvar i = 1; i <= NR; i++) begin : g_stage
    block_t state_prev, key_prev, round_key, round_out;

    if (i == 1) begin : g_first
      assign state_prev = key_add_out;
      assign key_prev   = key_in;
    end else begin : g_next
      assign state_prev = reg_out[i-1];
      assign key_prev   = key_reg[i-1];
    end

    aes_key_step  #(.ROUND(i), .INVERSE(1'b0)) u_key   (.key_in(key_prev), .key_out(round_key));
    aes_enc_round #(.FINAL(i == NR))           u_round (.state_in(state_prev), .round_key(round_key),
                                                        .state_out(round_out));

    always_ff @(posedge clk) begin
      reg_out[i] <= round_out;
      key_reg[i] <= round_key;
    end

    always_ff @(posedge clk) begin
      if (!rst_n)      vld[i] <= 1'b0;
      else if (i == 1) vld[i] <= valid_in;
      else             vld[i] <= vld[i-1];
    end
  end

  assign valid_out = vld[NR];
  assign data_out  = reg_out[NR];
  assign key_out   = key_reg[NR];
endmodule

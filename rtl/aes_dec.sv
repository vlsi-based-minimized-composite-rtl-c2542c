// aes_dec: fully unrolled, pipelined AES-128 decryption.
//
// The key input is the last round key (round NR of the encryption schedule).  The
// ciphertext is XORed with it, then passes NR decryption rounds (aes_dec_round: Inv
// SubBytes, Inv ShiftRows, Inv MixColumn, add of the Inv-MixColumn-ed round key), the last
// one without Inv MixColumn.  The key schedule runs backwards beside the data: stage i
// derives round key NR-i from the registered round key NR-i+1, so the cipher key itself
// (round key 0) is used by the last stage and comes out as key_out.
//
// Interface and timing as aes_enc: one block per clock in, results NR clocks later,
// rst_n (synchronous, active low) clears only the valid bits.
// Starting from the last round key and the per-round registers follow the document; the
// rest of the pipeline control is this design's choice.
module aes_dec
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
  block_t key_add_out;
  block_t reg_out [1:NR];
  block_t key_reg [1:NR];
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

    aes_key_step  #(.ROUND(NR - i + 1), .INVERSE(1'b1)) u_key   (.key_in(key_prev), .key_out(round_key));
    aes_dec_round #(.FINAL(i == NR))                    u_round (.state_in(state_prev), .round_key(round_key),
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

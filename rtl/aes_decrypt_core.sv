// aes_decrypt_core: iterative AES-128 inverse cipher, one round per clock.
//
// On `start` the state register loads ciphertext XOR round key 10; each of
// the next ten clocks applies one inverse round (InvShiftRows, InvSubBytes,
// AddRoundKey with key 10-r, then InvMixColumns except in the last round),
// reading the round-key file of aes_key_expand backwards. `done` pulses with
// `plaintext` valid 11 clocks after `start`; `plaintext` holds its value
// until the next `start`. `start` while busy is ignored.
//
// The inverse cipher is the AES standard; the iterative organisation, which
// mirrors aes_encrypt_core, is a choice of this design.
module aes_decrypt_core
  import maes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t ciphertext,
  input  block_t round_key [NR+1],
  output logic   busy,
  output logic   done,
  output block_t plaintext
);

  block_t     state;
  logic [3:0] rnd;     // key index used in this clock, counts 9 down to 0
  block_t     keyed;
  block_t     round_out;

  always_comb begin
    keyed = inv_sub_bytes(inv_shift_rows(state)) ^ round_key[rnd];
    if (rnd == 4'd0) round_out = keyed;
    else             round_out = inv_mix_columns(keyed);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= '0;
      rnd   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        state <= ciphertext ^ round_key[NR];
        rnd   <= 4'(NR - 1);
        busy  <= 1'b1;
      end else if (busy) begin
        state <= round_out;
        rnd   <= rnd - 4'd1;
        if (rnd == 4'd0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign plaintext = state;

endmodule

// aes_encrypt_core: iterative AES-128 cipher, one round per clock.
//
// The core holds one 128-bit state register. On `start` it loads
// plaintext XOR round key 0; each of the next ten clocks applies one round
// (SubBytes, ShiftRows, MixColumns, AddRoundKey; MixColumns left out in
// round 10) with round key r read from the `round_key` file supplied by
// aes_key_expand, which must stay stable while `busy`. `done` pulses with
// `ciphertext` valid 11 clocks after `start`; `ciphertext` then holds its
// value until the next `start`. `start` while busy is ignored.
//
// The round function is the AES standard. Its iterative one-round-per-clock
// organisation, with sixteen S-boxes in the round and no pipelining, is a
// choice of this design.
module aes_encrypt_core
  import maes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t plaintext,
  input  block_t round_key [NR+1],
  output logic   busy,
  output logic   done,
  output block_t ciphertext
);

  block_t     state;
  logic [3:0] rnd;
  block_t     after_shift;
  block_t     round_out;

  always_comb begin
    after_shift = shift_rows(sub_bytes(state));
    if (rnd == 4'(NR)) round_out = after_shift ^ round_key[rnd];
    else               round_out = mix_columns(after_shift) ^ round_key[rnd];
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
        state <= plaintext ^ round_key[0];
        rnd   <= 4'd1;
        busy  <= 1'b1;
      end else if (busy) begin
        state <= round_out;
        rnd   <= rnd + 4'd1;
        if (rnd == 4'(NR)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign ciphertext = state;

endmodule

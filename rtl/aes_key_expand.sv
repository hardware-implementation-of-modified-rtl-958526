// aes_key_expand: AES-128 key schedule, one round key per clock.
//
// On `start` the 128-bit cipher key is taken as round key 0; during the next
// ten clocks round keys 1..10 are derived (RotWord, SubWord, Rcon, XOR chain
// of the AES standard) and kept in a register file of eleven 128-bit words,
// so that the encryption core can read them forwards and the decryption core
// backwards. `busy` is high while the schedule runs and `done` pulses for one
// clock when all eleven keys are valid (11 clocks after `start`). A new
// `start` while busy is ignored. Reset clears the key file.
//
// The AES-128 key schedule itself is the standard one; the iterative,
// one-word-group-per-clock organisation is a choice of this design.
module aes_key_expand
  import maes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t key,
  output logic   busy,
  output logic   done,
  output block_t round_key [NR+1]
);

  logic [3:0] rnd;     // index of the next round key to produce
  byte_t      rcon;

  function automatic block_t next_key(block_t k, byte_t rc);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = k;
    t  = {SBOX[w3[23:16]] ^ rc, SBOX[w3[15:8]], SBOX[w3[7:0]], SBOX[w3[31:24]]};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      rnd  <= '0;
      rcon <= 8'h01;
      for (int i = 0; i <= NR; i++) round_key[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        round_key[0] <= key;
        rnd          <= 4'd1;
        rcon         <= 8'h01;
        busy         <= 1'b1;
      end else if (busy) begin
        round_key[rnd] <= next_key(round_key[rnd-1], rcon);
        rcon           <= xtime(rcon);
        rnd            <= rnd + 4'd1;
        if (rnd == 4'(NR)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule

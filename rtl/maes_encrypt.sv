// maes_encrypt: modified AES (MAES) encryption of a stream of 128-bit planes.
//
// Each plane is encrypted with AES-128 under its own key. The keys come
// from a W7 key stream generator seeded once with the 128-bit user key:
// plane n is encrypted under key stream bytes 16n..16n+15, the first byte
// of the sixteen being the most significant key byte. A receiver that seeds
// its own generator with the same key regenerates the same key sequence.
//
// Interface: `key_load` (one clock, with `key`) restarts the key stream; it
// is meant for idle periods between images. Planes enter on a valid/ready
// handshake (`in_valid`/`in_ready`/`in_block`) and leave on another
// (`out_valid`/`out_ready`/`out_block`); `out_block` and `out_valid` stay
// stable until taken. `key_count` counts the plane keys drawn since reset
// or the last key load.
//
// Timing, per plane, strictly sequential: 1 clock to accept, 17 clocks to
// draw 16 key stream bytes, 12 clocks of key expansion (start, ten rounds,
// done), 12 clocks of cipher rounds and 1 clock to present: one plane every
// 43 clocks when the output is taken at once. Using the W7 output as a fresh AES key
// for every plane follows the MAES scheme; the sequential schedule and the
// handshakes are choices of this design.
module maes_encrypt
  import maes_pkg::*;
#(
  parameter int unsigned W7_WARMUP = 0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_load,
  input  block_t key,
  input  logic   in_valid,
  output logic   in_ready,
  input  block_t in_block,
  output logic   out_valid,
  input  logic   out_ready,
  output block_t out_block,
  output logic [31:0] key_count
);

  typedef enum logic [2:0] {S_IDLE, S_KEYGEN, S_EXPAND, S_CIPHER, S_OUT} state_t;
  state_t state;

  logic   ks_ready, ks_next, ks_valid;
  byte_t  ks_byte;
  logic [4:0] req_cnt, got_cnt;
  block_t plane_key, data;

  logic   kx_start, kx_busy, kx_done;
  block_t round_key [NR+1];
  logic   c_start, c_busy, c_done;
  block_t c_out;

  w7_keystream #(.WARMUP(W7_WARMUP)) u_w7 (
    .clk(clk), .rst_n(rst_n), .load(key_load), .key(key),
    .next(ks_next), .ready(ks_ready), .ks_byte(ks_byte), .ks_valid(ks_valid)
  );

  aes_key_expand u_kx (
    .clk(clk), .rst_n(rst_n), .start(kx_start), .key(plane_key),
    .busy(kx_busy), .done(kx_done), .round_key(round_key)
  );

  aes_encrypt_core u_core (
    .clk(clk), .rst_n(rst_n), .start(c_start), .plaintext(data),
    .round_key(round_key), .busy(c_busy), .done(c_done), .ciphertext(c_out)
  );

  assign in_ready  = (state == S_IDLE) && ks_ready && !key_load;
  assign ks_next   = (state == S_KEYGEN) && (req_cnt != 5'd16);
  assign out_valid = (state == S_OUT);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      req_cnt   <= '0;
      got_cnt   <= '0;
      plane_key <= '0;
      data      <= '0;
      out_block <= '0;
      kx_start  <= 1'b0;
      c_start   <= 1'b0;
      key_count <= '0;
    end else begin
      kx_start <= 1'b0;
      c_start  <= 1'b0;
      if (key_load) key_count <= '0;
      unique case (state)
        S_IDLE: if (in_valid && in_ready) begin
          data    <= in_block;
          req_cnt <= '0;
          got_cnt <= '0;
          state   <= S_KEYGEN;
        end
        S_KEYGEN: begin
          if (ks_next) req_cnt <= req_cnt + 5'd1;
          if (ks_valid) begin
            plane_key <= {plane_key[119:0], ks_byte};
            got_cnt   <= got_cnt + 5'd1;
            if (got_cnt == 5'd15) begin
              kx_start  <= 1'b1;
              key_count <= key_count + 32'd1;
              state     <= S_EXPAND;
            end
          end
        end
        S_EXPAND: if (kx_done) begin
          c_start <= 1'b1;
          state   <= S_CIPHER;
        end
        S_CIPHER: if (c_done) begin
          out_block <= c_out;
          state     <= S_OUT;
        end
        S_OUT: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Output must hold while offered and not taken.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_block));

  // The key schedule and the cipher core are only started when idle.
  a_kx_idle: assert property (@(posedge clk) disable iff (!rst_n) kx_start |-> !kx_busy);
  a_core_idle: assert property (@(posedge clk) disable iff (!rst_n) c_start |-> !c_busy);

endmodule

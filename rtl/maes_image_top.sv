// maes_image_top: secure grey-scale image link, sender and receiver side by
// side.
//
// Sender: an N x N 8-bit image (row-major pixel stream) is transformed by
// the one-level 2D modified 9/7 wavelet (mdwt_2d); the CW-bit coefficients
// are packed, 128/CW at a time, into 128-bit planes (plane_pack) and each
// plane is AES-128 encrypted under its own key drawn from a W7 key stream
// generator (maes_encrypt). Receiver: ciphered planes are decrypted with
// the key sequence regenerated from the same 128-bit seed (maes_decrypt),
// split back into coefficients (plane_unpack) and inverse-transformed
// (midwt_2d) into an 8-bit image stream.
//
// All streams use valid/ready handshakes. The two sides share only the
// clock, reset and the seed `key`; each has its own key-load strobe, which
// restarts that side's key stream and belongs at an image boundary. Linking
// `ct_out` to `ct_in` gives the full encrypt/decrypt loop. Status outputs
// count the plane keys drawn on each side and the wavelet lines processed.
//
// The chain MDWT -> MAES encryption and MAES decryption -> MIDWT, a single
// user key for the W7 generator and 128x128 8-bit images follow the
// design. CW = 16 (eight coefficients per plane) is a choice of this design.
module maes_image_top
  import maes_pkg::*;
#(
  parameter int unsigned N  = 128,  // image width and height
  parameter int unsigned CW = 16,   // wavelet coefficient width
  parameter int unsigned W7_WARMUP = 0  // silent W7 steps after a key load
) (
  input  logic         clk,
  input  logic         rst_n,
  input  block_t       key,
  // sender
  input  logic         enc_key_load,
  input  logic         pix_in_valid,
  output logic         pix_in_ready,
  input  logic [7:0]   pix_in_data,
  output logic         ct_out_valid,
  input  logic         ct_out_ready,
  output block_t       ct_out_data,
  // receiver
  input  logic         dec_key_load,
  input  logic         ct_in_valid,
  output logic         ct_in_ready,
  input  block_t       ct_in_data,
  output logic         pix_out_valid,
  input  logic         pix_out_ready,
  output logic [7:0]   pix_out_data,
  // status
  output logic [31:0]  enc_key_count,
  output logic [31:0]  dec_key_count,
  output logic [31:0]  fwd_lines,
  output logic [31:0]  inv_lines,
  output logic [1:0]   fwd_pass,
  output logic [1:0]   inv_pass
);

  // ------------------------------------------------------------- sender
  logic          c_valid, c_ready;
  logic [CW-1:0] c_data;
  logic          p_valid, p_ready;
  block_t        p_block;

  mdwt_2d #(.N(N), .CW(CW)) u_mdwt (
    .clk(clk), .rst_n(rst_n),
    .pix_valid(pix_in_valid), .pix_ready(pix_in_ready), .pix_data(pix_in_data),
    .coef_valid(c_valid), .coef_ready(c_ready), .coef_data(c_data),
    .busy_pass(fwd_pass), .lines_done(fwd_lines)
  );

  plane_pack #(.CW(CW)) u_pack (
    .clk(clk), .rst_n(rst_n),
    .in_valid(c_valid), .in_ready(c_ready), .in_data(c_data),
    .out_valid(p_valid), .out_ready(p_ready), .out_block(p_block)
  );

  maes_encrypt #(.W7_WARMUP(W7_WARMUP)) u_enc (
    .clk(clk), .rst_n(rst_n), .key_load(enc_key_load), .key(key),
    .in_valid(p_valid), .in_ready(p_ready), .in_block(p_block),
    .out_valid(ct_out_valid), .out_ready(ct_out_ready), .out_block(ct_out_data),
    .key_count(enc_key_count)
  );

  // ----------------------------------------------------------- receiver
  logic          d_valid, d_ready;
  block_t        d_block;
  logic          u_valid, u_ready;
  logic [CW-1:0] u_data;

  maes_decrypt #(.W7_WARMUP(W7_WARMUP)) u_dec (
    .clk(clk), .rst_n(rst_n), .key_load(dec_key_load), .key(key),
    .in_valid(ct_in_valid), .in_ready(ct_in_ready), .in_block(ct_in_data),
    .out_valid(d_valid), .out_ready(d_ready), .out_block(d_block),
    .key_count(dec_key_count)
  );

  plane_unpack #(.CW(CW)) u_unpack (
    .clk(clk), .rst_n(rst_n),
    .in_valid(d_valid), .in_ready(d_ready), .in_block(d_block),
    .out_valid(u_valid), .out_ready(u_ready), .out_data(u_data)
  );

  midwt_2d #(.N(N), .CW(CW)) u_midwt (
    .clk(clk), .rst_n(rst_n),
    .coef_valid(u_valid), .coef_ready(u_ready), .coef_data(u_data),
    .pix_valid(pix_out_valid), .pix_ready(pix_out_ready), .pix_data(pix_out_data),
    .busy_pass(inv_pass), .lines_done(inv_lines)
  );

endmodule

// tb_four_images: four different 128x128 8-bit images sent back to back
// through one link instance at the default parameters: a smooth gradient
// with texture, a fine checkerboard, uniform noise and a high-contrast
// disc. Between images both key streams are reloaded, once with the same
// seed and then with new ones, so the blocks' return to their idle state
// and the key restart are exercised. Every ciphered plane and output pixel
// is compared with the reference models; the reconstruction error and PSNR
// of each image are reported.
module tb_four_images;
  import maes_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 128, CW = 16, P = 128 / CW, PLANES = N * N / P;

  logic clk = 0, rst_n = 0, enc_key_load = 0, dec_key_load = 0;
  block_t key;
  logic pix_in_valid = 0, pix_in_ready, ct_out_valid, ct_out_ready = 0;
  logic [7:0] pix_in_data, pix_out_data;
  block_t ct_out_data, ct_in_data;
  logic ct_in_valid = 0, ct_in_ready, pix_out_valid, pix_out_ready = 0;
  logic [31:0] enc_key_count, dec_key_count, fwd_lines, inv_lines;
  logic [1:0] fwd_pass, inv_pass;
  int checks = 0, failures = 0;

  maes_image_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int img [] = new[N*N];
  int coef [] = new[N*N];
  int rec [] = new[N*N];
  block_t cipher [PLANES];
  block_t link_q [$];

  function automatic int make_pixel(int kind, int r, int c);
    int dr, dc;
    unique case (kind)
      0: return test_pixel(r, c, N, 7);
      1: return ((r + c) % 2 == 0) ? 230 : 20;
      2: return $urandom_range(255);
      default: begin
        dr = r - N/2; dc = c - N/2;
        return (dr*dr + dc*dc < (N/3)*(N/3)) ? 250 : 5;
      end
    endcase
  endfunction

  task automatic send_pixels();
    int k = 0;
    while (k < N*N) begin
      @(negedge clk); pix_in_valid = ($urandom_range(7) != 0); pix_in_data = 8'(img[k]);
      @(posedge clk); if (pix_in_valid && pix_in_ready) k++;
    end
    @(negedge clk); pix_in_valid = 0;
  endtask

  task automatic take_cipher();
    int b = 0;
    while (b < PLANES) begin
      @(negedge clk); ct_out_ready = ($urandom_range(3) != 0);
      @(posedge clk);
      if (ct_out_valid && ct_out_ready) begin
        checks++;
        if (ct_out_data !== cipher[b]) begin
          failures++;
          if (failures < 10) $display("plane %0d: ct %h expected %h", b, ct_out_data, cipher[b]);
        end
        link_q.push_back(ct_out_data);
        b++;
      end
    end
    @(negedge clk); ct_out_ready = 0;
  endtask

  task automatic give_cipher();
    int b = 0;
    while (b < PLANES) begin
      @(negedge clk);
      ct_in_valid = (link_q.size() != 0) && ($urandom_range(3) != 0);
      if (ct_in_valid) ct_in_data = link_q[0];
      @(posedge clk);
      if (ct_in_valid && ct_in_ready) begin
        void'(link_q.pop_front());
        b++;
      end
    end
    @(negedge clk); ct_in_valid = 0;
  endtask

  task automatic take_pixels(int kind);
    int k = 0, e, maxerr = 0;
    real sq = 0.0;
    while (k < N*N) begin
      @(negedge clk); pix_out_ready = ($urandom_range(4) != 0);
      @(posedge clk);
      if (pix_out_valid && pix_out_ready) begin
        checks++;
        if (int'(pix_out_data) != rec[k]) begin
          failures++;
          if (failures < 10) $display("image %0d pixel %0d: %0d expected %0d", kind, k, pix_out_data, rec[k]);
        end
        e = int'(pix_out_data) - img[k];
        sq += real'(e * e);
        if (e < 0) e = -e;
        if (e > maxerr) maxerr = e;
        k++;
      end
    end
    @(negedge clk); pix_out_ready = 0;
    $display("image %0d: largest error %0d grey levels, PSNR %0.1f dB", kind, maxerr,
             (sq == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 * N * N / sq));
    checks++;
    if (maxerr > 12) begin failures++; $display("image %0d: reconstruction error too large", kind); end
  endtask

  initial begin
    w7_ref m = new();
    block_t plain;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int kind = 0; kind < 4; kind++) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) img[r*N + c] = make_pixel(kind, r, c);
      coef = img;
      fwd_2d(coef, N);
      rec = coef;
      inv_2d(rec, N);
      key = (kind < 2) ? 128'h000102030405060708090a0b0c0d0e0f : {$urandom, $urandom, $urandom, $urandom};
      m.load(key);
      for (int b = 0; b < PLANES; b++) begin
        for (int j = 0; j < P; j++) plain[127 - CW*j -: CW] = CW'(coef[b*P + j]);
        cipher[b] = aes_enc(m.next_key(), plain);
      end
      @(negedge clk); enc_key_load = 1; dec_key_load = 1;
      @(negedge clk); enc_key_load = 0; dec_key_load = 0;
      fork
        send_pixels();
        take_cipher();
        give_cipher();
        take_pixels(kind);
      join
      checks += 2;
      if (enc_key_count != PLANES) begin failures++; $display("sender keys %0d", enc_key_count); end
      if (dec_key_count != PLANES) begin failures++; $display("receiver keys %0d", dec_key_count); end
    end
    checks += 2;
    if (fwd_lines != 8 * N) begin failures++; $display("forward lines %0d", fwd_lines); end
    if (inv_lines != 8 * N) begin failures++; $display("inverse lines %0d", inv_lines); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

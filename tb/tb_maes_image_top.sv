// tb_maes_image_top: one full 128x128 image through the whole link at the
// default parameters: wavelet transform, per-plane W7 keys, AES-128
// encryption, decryption with the regenerated keys and inverse transform.
//
// The ciphered planes are carried from the sender to the receiver through a
// queue in the testbench, with random stalls on both ends. Every ciphered
// plane is compared with the reference models (2D lifting, packing, W7 and
// AES), every output pixel with the reference inverse transform, and the
// reconstruction error against the original image is bounded and reported.
// The test counts the mechanisms of the design and fails on any that never
// happened: column and row passes on both sides, one fresh key per plane on
// both sides, equal planes encrypted to different ciphertexts, and stalls
// on the cipher and pixel streams.
module tb_maes_image_top;
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

  // mechanism counters
  int fwd_col = 0, fwd_row = 0, inv_col = 0, inv_row = 0;
  int ct_stalls = 0, pix_stalls = 0, repeat_planes = 0;
  always @(posedge clk) begin
    if (fwd_pass == 2'd1) fwd_col++;
    if (fwd_pass == 2'd2) fwd_row++;
    if (inv_pass == 2'd1) inv_col++;
    if (inv_pass == 2'd2) inv_row++;
    if (ct_out_valid && !ct_out_ready) ct_stalls++;
    if (pix_out_valid && !pix_out_ready) pix_stalls++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int img [] = new[N*N];
  int coef [] = new[N*N];
  int rec [] = new[N*N];
  block_t plain [PLANES];
  block_t cipher [PLANES];
  block_t link_q [$];
  bit send_done = 0;

  // reference image with a flat corner, so that some planes repeat
  initial begin
    w7_ref m = new();
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        img[r*N + c] = (r >= N - N/4 && c >= N - N/4) ? 50 : test_pixel(r, c, N, 3);
    coef = img;
    fwd_2d(coef, N);
    rec = coef;
    inv_2d(rec, N);
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    m.load(key);
    for (int b = 0; b < PLANES; b++) begin
      for (int j = 0; j < P; j++) plain[b][127 - CW*j -: CW] = CW'(coef[b*P + j]);
      cipher[b] = aes_enc(m.next_key(), plain[b]);
    end
  end

  // sender: pixels in
  initial begin
    int k = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); enc_key_load = 1; dec_key_load = 1;
    @(negedge clk); enc_key_load = 0; dec_key_load = 0;
    while (k < N*N) begin
      @(negedge clk); pix_in_valid = ($urandom_range(7) != 0); pix_in_data = 8'(img[k]);
      @(posedge clk); if (pix_in_valid && pix_in_ready) k++;
    end
    @(negedge clk); pix_in_valid = 0;
  end

  // sender: ciphered planes out, checked and queued for the receiver
  initial begin
    int b = 0;
    int first_of [block_t];
    wait (rst_n);
    while (b < PLANES) begin
      @(negedge clk); ct_out_ready = ($urandom_range(3) != 0);
      @(posedge clk);
      if (ct_out_valid && ct_out_ready) begin
        checks++;
        if (ct_out_data !== cipher[b]) begin
          failures++;
          if (failures < 10) $display("plane %0d: ct %h expected %h", b, ct_out_data, cipher[b]);
        end
        if (first_of.exists(plain[b])) begin
          if (cipher[first_of[plain[b]]] != ct_out_data) repeat_planes++;
        end else begin
          first_of[plain[b]] = b;
        end
        link_q.push_back(ct_out_data);
        b++;
      end
    end
    @(negedge clk); ct_out_ready = 0;
    send_done = 1;
  end

  // receiver: planes in from the queue
  initial begin
    int b = 0;
    wait (rst_n);
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
  end

  // receiver: pixels out
  initial begin
    int k = 0, e, maxerr = 0;
    real sq = 0.0, psnr;
    wait (rst_n);
    while (k < N*N) begin
      @(negedge clk); pix_out_ready = ($urandom_range(4) != 0);
      @(posedge clk);
      if (pix_out_valid && pix_out_ready) begin
        checks++;
        if (int'(pix_out_data) != rec[k]) begin
          failures++;
          if (failures < 10) $display("pixel %0d: %0d expected %0d", k, pix_out_data, rec[k]);
        end
        e = int'(pix_out_data) - img[k];
        sq += real'(e * e);
        if (e < 0) e = -e;
        if (e > maxerr) maxerr = e;
        k++;
      end
    end
    psnr = (sq == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 * N * N / sq);
    $display("reconstruction: largest error %0d grey levels, PSNR %0.1f dB", maxerr, psnr);
    $display("finished at clock %0t", $time / 10);
    checks++;
    if (maxerr > 8) begin failures++; $display("reconstruction error too large"); end
    checks++;
    if (!send_done) begin failures++; $display("sender not finished"); end
    // every mechanism must have happened
    $display("forward passes: columns %0d clocks, rows %0d clocks", fwd_col, fwd_row);
    $display("inverse passes: rows %0d clocks, columns %0d clocks", inv_row, inv_col);
    $display("plane keys drawn: sender %0d, receiver %0d", enc_key_count, dec_key_count);
    $display("repeated planes encrypted differently: %0d", repeat_planes);
    $display("stalls: cipher stream %0d, pixel stream %0d", ct_stalls, pix_stalls);
    checks += 9;
    if (fwd_col == 0)  begin failures++; $display("no forward column pass"); end
    if (fwd_row == 0)  begin failures++; $display("no forward row pass"); end
    if (inv_col == 0)  begin failures++; $display("no inverse column pass"); end
    if (inv_row == 0)  begin failures++; $display("no inverse row pass"); end
    if (enc_key_count != PLANES) begin failures++; $display("sender keys %0d", enc_key_count); end
    if (dec_key_count != PLANES) begin failures++; $display("receiver keys %0d", dec_key_count); end
    if (repeat_planes == 0) begin failures++; $display("no repeated plane seen"); end
    if (ct_stalls == 0) begin failures++; $display("cipher stream never stalled"); end
    if (pix_stalls == 0) begin failures++; $display("pixel stream never stalled"); end
    checks += 2;
    if (fwd_lines != 2 * N) begin failures++; $display("forward lines %0d", fwd_lines); end
    if (inv_lines != 2 * N) begin failures++; $display("inverse lines %0d", inv_lines); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_midwt_2d: the 2D inverse wavelet on 16x16 images. Coefficients made by
// the reference forward model are streamed in; every output pixel is
// compared with the reference inverse (rows first, then columns, clamped to
// 0..255) and must also lie within 8 grey levels of the original image.
// The second image is taken out through a stalled stream.
module tb_midwt_2d;
  import tb_ref_pkg::*;

  localparam int N = 16, CW = 16;
  logic clk = 0, rst_n = 0, coef_valid = 0, coef_ready, pix_valid, pix_ready = 0;
  logic signed [CW-1:0] coef_data;
  logic [7:0] pix_data;
  logic [1:0] busy_pass;
  logic [31:0] lines_done;
  int checks = 0, failures = 0, stalls = 0, maxerr = 0;

  midwt_2d #(.N(N), .CW(CW)) dut (.clk, .rst_n, .coef_valid, .coef_ready, .coef_data,
    .pix_valid, .pix_ready, .pix_data, .busy_pass, .lines_done);

  always #5 clk = ~clk;

  always @(posedge clk) if (pix_valid && !pix_ready) stalls++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int img [] = new[N*N];
    int coef [] = new[N*N];
    int rec [] = new[N*N];
    int k, e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          img[r*N + c] = (t == 0) ? test_pixel(r, c, N, 9) : (t == 1 ? $urandom_range(255) : 255 * ((r + c) % 2));
      coef = img;
      fwd_2d(coef, N);
      rec = coef;
      inv_2d(rec, N);
      k = 0;
      while (k < N*N) begin
        @(negedge clk); coef_valid = 1; coef_data = CW'(coef[k]);
        @(posedge clk); if (coef_ready) k++;
      end
      @(negedge clk); coef_valid = 0;
      k = 0;
      while (k < N*N) begin
        @(negedge clk); pix_ready = (t != 1) || ($urandom_range(1) == 1);
        @(posedge clk);
        if (pix_valid && pix_ready) begin
          checks += 2;
          if (int'(pix_data) != rec[k]) begin
            failures++;
            if (failures < 10) $display("img %0d pixel %0d: %0d expected %0d", t, k, pix_data, rec[k]);
          end
          e = int'(pix_data) - img[k];
          if (e < 0) e = -e;
          if (e > maxerr) maxerr = e;
          if (e > 8) begin failures++; $display("img %0d pixel %0d: %0d, original %0d", t, k, pix_data, img[k]); end
          k++;
        end
      end
      @(negedge clk); pix_ready = 0;
    end
    checks += 2;
    if (lines_done != 6 * N) begin failures++; $display("lines_done %0d", lines_done); end
    if (stalls == 0) begin failures++; $display("output never stalled"); end
    $display("largest reconstruction error %0d grey levels", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

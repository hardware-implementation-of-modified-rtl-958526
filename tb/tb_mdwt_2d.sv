// tb_mdwt_2d: the 2D forward wavelet on 16x16 images (two images back to
// back, the second one with a stalled output stream). Every coefficient is
// compared with the reference model (columns first, then rows); the test
// also checks that both passes ran with N lines each.
module tb_mdwt_2d;
  import tb_ref_pkg::*;

  localparam int N = 16, CW = 16;
  logic clk = 0, rst_n = 0, pix_valid = 0, pix_ready, coef_valid, coef_ready = 0;
  logic [7:0] pix_data;
  logic signed [CW-1:0] coef_data;
  logic [1:0] busy_pass;
  logic [31:0] lines_done;
  int checks = 0, failures = 0, col_clocks = 0, row_clocks = 0, stalls = 0;

  mdwt_2d #(.N(N), .CW(CW)) dut (.clk, .rst_n, .pix_valid, .pix_ready, .pix_data,
    .coef_valid, .coef_ready, .coef_data, .busy_pass, .lines_done);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (busy_pass == 2'd1) col_clocks++;
    if (busy_pass == 2'd2) row_clocks++;
    if (coef_valid && !coef_ready) stalls++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int img [] = new[N*N];
    int ref_c [] = new[N*N];
    int k;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2; t++) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          img[r*N + c] = (t == 0) ? test_pixel(r, c, N, 5) : $urandom_range(255);
      ref_c = img;
      fwd_2d(ref_c, N);
      k = 0;
      while (k < N*N) begin
        @(negedge clk); pix_valid = 1; pix_data = 8'(img[k]);
        @(posedge clk); if (pix_ready) k++;
      end
      @(negedge clk); pix_valid = 0;
      k = 0;
      while (k < N*N) begin
        @(negedge clk); coef_ready = (t == 0) || ($urandom_range(1) == 1);
        @(posedge clk);
        if (coef_valid && coef_ready) begin
          checks++;
          if (int'(coef_data) != ref_c[k]) begin
            failures++;
            if (failures < 10) $display("img %0d coef %0d: %0d expected %0d", t, k, coef_data, ref_c[k]);
          end
          k++;
        end
      end
      @(negedge clk); coef_ready = 0;
    end
    checks += 3;
    if (lines_done != 4 * N) begin failures++; $display("lines_done %0d", lines_done); end
    if (col_clocks == 0 || row_clocks == 0) begin failures++; $display("a pass never ran"); end
    if (stalls == 0) begin failures++; $display("output never stalled"); end
    $display("column pass %0d clocks, row pass %0d clocks per image", col_clocks / 2, row_clocks / 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

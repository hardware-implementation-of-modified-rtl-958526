// tb_dwt97_line: the forward and inverse one-dimensional lifting engines on
// 16-sample lines. The forward engine's subbands are compared with the
// reference lifting model; the inverse engine is fed the reference
// coefficients and must return the reference reconstruction, which must lie
// within 4 of the original samples. Also checks the 5N/2+1 clock duration.
module tb_dwt97_line;
  import tb_ref_pkg::*;

  localparam int N = 16, CW = 16, AW = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic f_wr = 0, f_start = 0, f_busy, f_done, i_wr = 0, i_start = 0, i_busy, i_done;
  logic [AW-1:0] f_waddr, f_raddr, i_waddr, i_raddr;
  logic signed [CW-1:0] f_wdata, f_rdata, i_wdata, i_rdata;
  int checks = 0, failures = 0;

  dwt97_line #(.N(N), .CW(CW), .INVERSE(1'b0)) u_fwd (
    .clk, .rst_n, .wr_en(f_wr), .wr_addr(f_waddr), .wr_data(f_wdata),
    .rd_addr(f_raddr), .rd_data(f_rdata), .start(f_start), .busy(f_busy), .done(f_done));
  dwt97_line #(.N(N), .CW(CW), .INVERSE(1'b1)) u_inv (
    .clk, .rst_n, .wr_en(i_wr), .wr_addr(i_waddr), .wr_data(i_wdata),
    .rd_addr(i_raddr), .rd_data(i_rdata), .start(i_start), .busy(i_busy), .done(i_done));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x [] = new[N];
    int y [] = new[N];
    int z [] = new[N];
    int lat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < N; i++)
        x[i] = (t < 20) ? $urandom_range(255) : 100 + 8 * i - ((t * i) % 23);
      if (t == 0) foreach (x[i]) x[i] = 255;
      if (t == 1) foreach (x[i]) x[i] = 0;
      y = x;
      fwd_1d(y, N);
      z = y;
      inv_1d(z, N);
      // forward engine
      for (int i = 0; i < N; i++) begin
        @(negedge clk); f_wr = 1; f_waddr = AW'(i); f_wdata = CW'(x[i]);
      end
      @(negedge clk); f_wr = 0; f_start = 1;
      @(negedge clk); f_start = 0;
      lat = 1;
      while (!f_done) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 5 * N / 2 + 1) begin failures++; $display("forward took %0d clocks", lat); end
      for (int i = 0; i < N; i++) begin
        f_raddr = AW'(i); #1;
        checks++;
        if (int'(f_rdata) != y[i]) begin failures++; $display("t%0d fwd[%0d] = %0d expected %0d", t, i, f_rdata, y[i]); end
      end
      // inverse engine, fed with the reference subbands
      for (int i = 0; i < N; i++) begin
        @(negedge clk); i_wr = 1; i_waddr = AW'(i); i_wdata = CW'(y[i]);
      end
      @(negedge clk); i_wr = 0; i_start = 1;
      @(negedge clk); i_start = 0;
      while (!i_done) @(negedge clk);
      for (int i = 0; i < N; i++) begin
        i_raddr = AW'(i); #1;
        checks += 2;
        if (int'(i_rdata) != z[i]) begin failures++; $display("t%0d inv[%0d] = %0d expected %0d", t, i, i_rdata, z[i]); end
        if (z[i] - x[i] > 4 || x[i] - z[i] > 4) begin failures++; $display("t%0d reconstruction %0d vs %0d", t, z[i], x[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

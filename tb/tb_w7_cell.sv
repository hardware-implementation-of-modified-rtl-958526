// tb_w7_cell: one W7 cell (the parameters of cell C3) against the bit-array
// reference model: key loading, majority clocking and the output bit over
// 300 steps for several random keys, with idle clocks mixed in.
module tb_w7_cell;
  import tb_ref_pkg::*;

  localparam int K = 2;
  logic clk = 0, rst_n = 0, load = 0, step = 0, out_bit;
  logic [127:0] key;
  int checks = 0, failures = 0;

  w7_cell #(.CLK_A(11 + 2*K), .CLK_B(13 + 2*K), .CLK_C(15 + 2*K),
            .OUT_A(37 - K), .OUT_B(42 - K), .OUT_C(46 - K))
    dut (.clk, .rst_n, .load, .key, .step, .out_bit);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w7_ref_cell m = new(K);
    int ones;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      if (t == 0) key = '0;   // all-zero registers must stay silent
      m.load(key);
      @(negedge clk); load = 1;
      @(negedge clk); load = 0;
      ones = 0;
      for (int n = 0; n < 300; n++) begin
        automatic bit e = m.step();
        step = 1;
        @(negedge clk); step = 0;
        checks++;
        if (out_bit !== e) begin failures++; if (failures < 10) $display("key %h step %0d: %b expected %b", key, n, out_bit, e); end
        ones += out_bit;
        if ($urandom_range(3) == 0) @(negedge clk);   // idle clock: nothing moves
      end
      if (t != 0) begin
        checks++;
        if (ones < 90 || ones > 210) begin failures++; $display("unbalanced output: %0d ones in 300", ones); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

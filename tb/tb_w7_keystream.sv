// tb_w7_keystream: the eight-cell W7 generator against the reference model,
// byte by byte, with `next` asserted irregularly, for several keys; a second
// instance with a warm-up of 20 steps checks `ready` and the skipped bytes.
module tb_w7_keystream;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, next = 0, next2 = 0;
  logic ready, ks_valid, ready2, ks_valid2;
  logic [7:0] ks_byte, ks_byte2;
  logic [127:0] key;
  int checks = 0, failures = 0;

  w7_keystream #(.WARMUP(0))  dut  (.clk, .rst_n, .load, .key, .next, .ready, .ks_byte, .ks_valid);
  w7_keystream #(.WARMUP(20)) dut2 (.clk, .rst_n, .load, .key, .next(next2), .ready(ready2),
                                    .ks_byte(ks_byte2), .ks_valid(ks_valid2));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w7_ref m = new();
    w7_ref m2 = new();
    int wait_cnt;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      m.load(key);
      m2.load(key, 20);
      @(negedge clk); load = 1;
      @(negedge clk); load = 0;
      checks++;
      #1;
      if (!ready) begin failures++; $display("not ready after load"); end
      // warm-up instance: ready only after 20 silent steps
      wait_cnt = 0;
      while (!ready2) begin @(negedge clk); wait_cnt++; end
      checks++;
      if (wait_cnt < 15 || wait_cnt > 22) begin failures++; $display("warm-up took %0d clocks", wait_cnt); end
      for (int n = 0; n < 100; n++) begin
        automatic u8 e = m.next_byte();
        next = 1;
        @(negedge clk); next = 0;
        checks++;
        if (!ks_valid || ks_byte !== e) begin failures++; $display("byte %0d: %h/%b expected %h", n, ks_byte, ks_valid, e); end
        if ($urandom_range(2) == 0) begin
          @(negedge clk);
          checks++;
          if (ks_valid) begin failures++; $display("valid without next"); end
        end
      end
      for (int n = 0; n < 20; n++) begin
        automatic u8 e = m2.next_byte();
        next2 = 1;
        @(negedge clk); next2 = 0;
        checks++;
        if (!ks_valid2 || ks_byte2 !== e) begin failures++; $display("warm byte %0d: %h expected %h", n, ks_byte2, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

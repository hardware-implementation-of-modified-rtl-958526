// tb_aes_key_expand: checks the AES-128 key schedule against the worked
// example of the AES standard (key 2b7e1516...) and against the reference
// model for random keys; also checks that `done` comes 11 clocks after
// `start`.
module tb_aes_key_expand;
  import maes_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  block_t key, rk [NR+1];
  int checks = 0, failures = 0;

  aes_key_expand dut (.clk, .rst_n, .start, .key, .busy, .done, .round_key(rk));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expand(block_t k);
    int lat = 0;
    @(negedge clk); key = k; start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 10) begin failures++; $display("latency %0d, expected 11 clocks after start", lat + 1); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    expand(128'h2b7e151628aed2a6abf7158809cf4f3c);
    checks += 3;
    if (rk[0]  !== 128'h2b7e151628aed2a6abf7158809cf4f3c) begin failures++; $display("rk0 %h", rk[0]); end
    if (rk[1]  !== 128'ha0fafe1788542cb123a339392a6c7605) begin failures++; $display("rk1 %h", rk[1]); end
    if (rk[10] !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin failures++; $display("rk10 %h", rk[10]); end
    for (int t = 0; t < 20; t++) begin
      automatic block_t k = {$urandom, $urandom, $urandom, $urandom};
      expand(k);
      for (int r = 0; r <= NR; r++) begin
        checks++;
        if (rk[r] !== round_key(k, r)) begin failures++; $display("key %h round %0d: %h", k, r, rk[r]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_aes_decrypt_core: AES-128 decryption with the key schedule in front.
// Decrypts the worked examples of the AES standard and blocks encrypted by
// the reference model, expecting the plaintext back, and checks the 11-clock
// start-to-done latency.
module tb_aes_decrypt_core;
  import maes_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, kstart = 0, kbusy, kdone, start = 0, busy, done;
  block_t key, pt, ct, rk [NR+1];
  int checks = 0, failures = 0;

  aes_key_expand   u_kx (.clk, .rst_n, .start(kstart), .key, .busy(kbusy), .done(kdone), .round_key(rk));
  aes_decrypt_core dut  (.clk, .rst_n, .start, .ciphertext(ct), .round_key(rk), .busy, .done, .plaintext(pt));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(block_t k, block_t c, block_t expect_pt);
    int lat = 0;
    @(negedge clk); key = k; kstart = 1;
    @(negedge clk); kstart = 0;
    while (!kdone) @(negedge clk);
    ct = c; start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); lat++; end
    checks += 2;
    if (pt !== expect_pt) begin failures++; $display("key %h ct %h: pt %h expected %h", k, c, pt, expect_pt); end
    if (lat != 10) begin failures++; $display("latency %0d", lat + 1); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3925841d02dc09fbdc118597196a0b32,
        128'h3243f6a8885a308d313198a2e0370734);
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a,
        128'h00112233445566778899aabbccddeeff);
    for (int t = 0; t < 30; t++) begin
      automatic block_t k = {$urandom, $urandom, $urandom, $urandom};
      automatic block_t p = {$urandom, $urandom, $urandom, $urandom};
      run(k, aes_enc(k, p), p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

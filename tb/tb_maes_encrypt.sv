// tb_maes_encrypt: MAES encryption of a stream of planes. Expected
// ciphertexts come from the reference models: W7 bytes 16n..16n+15 form the
// AES key of plane n. The test stalls the output at random, reloads the key
// half-way (the key sequence must restart), checks that equal planes give
// different ciphertexts, checks `key_count`, and measures the 43-clock plane
// period with the output never stalled.
module tb_maes_encrypt;
  import maes_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, key_load = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  block_t key, in_block, out_block;
  logic [31:0] key_count;
  int checks = 0, failures = 0, stalls = 0;

  maes_encrypt dut (.clk, .rst_n, .key_load, .key, .in_valid, .in_ready, .in_block,
                    .out_valid, .out_ready, .out_block, .key_count);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid && !out_ready) stalls++;

  w7_ref m = new();

  task automatic load_key(block_t k);
    key = k;
    m.load(k);
    @(negedge clk); key_load = 1;
    @(negedge clk); key_load = 0;
  endtask

  // send one plane and collect its ciphertext; returns the clocks taken
  task automatic plane(block_t p, bit random_stall, output block_t c, output int clocks);
    block_t expect_c = aes_enc(m.next_key(), p);
    clocks = 0;
    in_block = p; in_valid = 1;
    out_ready = random_stall ? ($urandom_range(1) == 1) : 1'b1;
    do begin @(posedge clk); clocks++; end while (!(in_valid && in_ready));
    forever begin
      @(negedge clk); in_valid = 0;
      out_ready = random_stall ? ($urandom_range(2) == 0) : 1'b1;
      @(posedge clk); clocks++;
      if (out_valid && out_ready) break;
    end
    c = out_block;
    @(negedge clk); out_ready = 0;
    checks++;
    if (c !== expect_c) begin failures++; $display("plane %h: ct %h expected %h", p, c, expect_c); end
  endtask

  initial begin
    block_t c0, c1, c;
    int clocks;
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    plane('0, 1'b1, c0, clocks);
    plane('0, 1'b1, c1, clocks);
    checks++;
    if (c0 === c1) begin failures++; $display("equal planes gave equal ciphertext"); end
    for (int t = 0; t < 10; t++) plane({$urandom, $urandom, $urandom, $urandom}, 1'b1, c, clocks);
    checks++;
    if (key_count != 12) begin failures++; $display("key_count %0d", key_count); end
    // restart the key stream: the first plane must match c0 again
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    plane('0, 1'b0, c, clocks);
    checks++;
    if (c !== c0) begin failures++; $display("reload did not restart the key stream"); end
    for (int t = 0; t < 4; t++) begin
      plane({$urandom, $urandom, $urandom, $urandom}, 1'b0, c, clocks);
      checks++;
      if (clocks != 43) begin failures++; $display("plane took %0d clocks, expected 43", clocks); end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("output never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

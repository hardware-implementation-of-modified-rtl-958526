// w7_keystream: W7 key stream generator, one key stream byte per clock.
//
// Eight w7_cell instances C1..C8 share the same 128-bit key and differ in
// their clocking and output tap positions. The control unit loads the key
// into all cells on `load`, then optionally runs WARMUP steps with no
// output, after which `ready` is high. Each clock with `next` high (and
// `ready`) steps all eight cells together; the function unit gathers their
// output bits into one byte, C1 in bit 0 up to C8 in bit 7, presented on
// `ks_byte` with `ks_valid` one clock later. `next` is ignored while not
// ready.
//
// Eight cells, a shared key and one byte per clock follow the W7 structure;
// the per-cell tap positions (cell k, k = 0..7, clocks on bits 11+2k, 13+2k,
// 15+2k and outputs bits 37-k, 42-k, 46-k of its three registers), the bit
// order of the byte and the warm-up count are choices of this design.
module w7_keystream #(
  parameter int unsigned WARMUP = 0  // silent steps after a key load
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [127:0] key,
  input  logic         next,
  output logic         ready,
  output logic [7:0]   ks_byte,
  output logic         ks_valid
);

  localparam int unsigned WCW = (WARMUP > 1) ? $clog2(WARMUP + 1) : 1;

  logic [WCW-1:0] warm_cnt;
  logic           warming;
  logic           step;

  assign ready = !warming && !load;
  assign step  = warming || (next && ready);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      warming  <= 1'b0;
      warm_cnt <= '0;
      ks_valid <= 1'b0;
    end else if (load) begin
      warming  <= (WARMUP != 0);
      warm_cnt <= WCW'(WARMUP);
      ks_valid <= 1'b0;
    end else begin
      ks_valid <= next && ready;
      if (warming) begin
        warm_cnt <= warm_cnt - 1'b1;
        if (warm_cnt == WCW'(1)) warming <= 1'b0;
      end
    end
  end

  for (genvar k = 0; k < 8; k++) begin : g_cell
    w7_cell #(
      .CLK_A(11 + 2*k), .CLK_B(13 + 2*k), .CLK_C(15 + 2*k),
      .OUT_A(37 - k),   .OUT_B(42 - k),   .OUT_C(46 - k)
    ) u_cell (
      .clk    (clk),
      .rst_n  (rst_n),
      .load   (load),
      .key    (key),
      .step   (step),
      .out_bit(ks_byte[k])
    );
  end

endmodule

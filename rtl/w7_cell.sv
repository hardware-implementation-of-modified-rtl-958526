// w7_cell: one cell of the W7 key stream generator.
//
// A cell holds three linear feedback shift registers of 38, 43 and 47 bits
// (LFSRa, LFSRb, LFSRc; 128 bits in all) and a majority function. On `load`
// the registers take the 128-bit key directly: LFSRa bit j = key[j]
// (j = 0..37), LFSRb bit j = key[38+j], LFSRc bit j = key[81+j]. On each
// `step` the majority m of the three clocking bits (one per register) is
// formed and only the registers whose clocking bit equals m shift, so at
// least two of the three move. A register shifts towards its high end and
// takes the XOR of its feedback taps into bit 0. The output bit, registered
// on every `step`, is the XOR of one output tap of each register taken from
// the state after the shift; `out_bit` therefore follows `step` by one clock.
//
// The register lengths, the key-to-register mapping and the use of a
// majority function follow the W7 cell structure. The feedback polynomials
// (x^38+x^6+x^5+x+1, x^43+x^42+x^38+x^37+1, x^47+x^42+1, all primitive), the
// clocking and output tap positions (parameters, different in each of the
// eight cells) and the A5/1-style "move when equal to majority" rule are
// choices of this design.
module w7_cell #(
  parameter int unsigned CLK_A = 11,  // clocking tap of LFSRa
  parameter int unsigned CLK_B = 13,  // clocking tap of LFSRb
  parameter int unsigned CLK_C = 15,  // clocking tap of LFSRc
  parameter int unsigned OUT_A = 37,  // output tap of LFSRa
  parameter int unsigned OUT_B = 42,  // output tap of LFSRb
  parameter int unsigned OUT_C = 46   // output tap of LFSRc
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [127:0] key,
  input  logic         step,
  output logic         out_bit
);

  localparam int unsigned LA = 38;
  localparam int unsigned LB = 43;
  localparam int unsigned LC = 47;

  logic [LA-1:0] ra, ra_n;
  logic [LB-1:0] rb, rb_n;
  logic [LC-1:0] rc, rc_n;
  logic          maj;

  always_comb begin
    maj  = (ra[CLK_A] & rb[CLK_B]) | (ra[CLK_A] & rc[CLK_C]) | (rb[CLK_B] & rc[CLK_C]);
    ra_n = ra;
    rb_n = rb;
    rc_n = rc;
    if (ra[CLK_A] == maj) ra_n = {ra[LA-2:0], ra[37] ^ ra[5] ^ ra[4] ^ ra[0]};
    if (rb[CLK_B] == maj) rb_n = {rb[LB-2:0], rb[42] ^ rb[41] ^ rb[37] ^ rb[36]};
    if (rc[CLK_C] == maj) rc_n = {rc[LC-2:0], rc[46] ^ rc[41]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ra      <= '0;
      rb      <= '0;
      rc      <= '0;
      out_bit <= 1'b0;
    end else if (load) begin
      ra      <= key[LA-1:0];
      rb      <= key[LA+LB-1:LA];
      rc      <= key[127:LA+LB];
      out_bit <= 1'b0;
    end else if (step) begin
      ra      <= ra_n;
      rb      <= rb_n;
      rc      <= rc_n;
      out_bit <= ra_n[OUT_A] ^ rb_n[OUT_B] ^ rc_n[OUT_C];
    end
  end

endmodule

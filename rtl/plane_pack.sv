// plane_pack: gathers 128/CW consecutive CW-bit wavelet coefficients into
// one 128-bit plane for the cipher.
//
// Coefficients arrive on a valid/ready stream; the first of each group goes
// to the most significant CW bits. When the group is complete the plane is
// offered on a valid/ready output and held until taken; no coefficient is
// accepted meanwhile. Cutting the coefficient stream into 128-bit planes
// in raster order follows the design; the bit order is a choice of this
// design.
module plane_pack #(
  parameter int unsigned CW = 16  // coefficient width, divides 128
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [CW-1:0] in_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [127:0]  out_block
);

  localparam int unsigned P  = 128 / CW;
  localparam int unsigned PW = $clog2(P + 1);

  logic [PW-1:0] cnt;

  assign in_ready  = (cnt != PW'(P));
  assign out_valid = (cnt == PW'(P));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_block <= '0;
    end else begin
      if (in_valid && in_ready) begin
        out_block <= {out_block[127-CW:0], in_data};
        cnt       <= cnt + 1'b1;
      end else if (out_valid && out_ready) begin
        cnt <= '0;
      end
    end
  end

endmodule

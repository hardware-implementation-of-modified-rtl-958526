// plane_unpack: splits each recovered 128-bit plane back into 128/CW
// CW-bit wavelet coefficients, most significant CW bits first.
//
// A plane is taken from a valid/ready input when the unpacker is empty and
// its coefficients leave one per accepted clock on a valid/ready output.
// It is the mirror of plane_pack; the bit order is a choice of this design.
module plane_unpack #(
  parameter int unsigned CW = 16  // coefficient width, divides 128
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [127:0]  in_block,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [CW-1:0] out_data
);

  localparam int unsigned P  = 128 / CW;
  localparam int unsigned PW = $clog2(P + 1);

  logic [PW-1:0] left;   // coefficients still to send
  logic [127:0]  buf_q;

  assign in_ready  = (left == '0);
  assign out_valid = (left != '0);
  assign out_data  = buf_q[127 -: CW];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      left  <= '0;
      buf_q <= '0;
    end else if (in_valid && in_ready) begin
      buf_q <= in_block;
      left  <= PW'(P);
    end else if (out_valid && out_ready) begin
      buf_q <= {buf_q[127-CW:0], CW'(0)};
      left  <= left - 1'b1;
    end
  end

endmodule

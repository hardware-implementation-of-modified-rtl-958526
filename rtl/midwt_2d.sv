// midwt_2d: inverse of mdwt_2d, rebuilding an N x N grey-scale image from
// its one-level 2D modified 9/7 wavelet coefficients.
//
// CW-bit signed coefficients arrive row-major on a valid/ready stream, in
// the quadrant layout mdwt_2d produces (low-pass half first along each
// axis), and fill a frame buffer. The inverse one-dimensional lifting
// engine (dwt97_line, inverse) then runs first along every row and then
// down every column, the reverse of the forward order: each line is copied
// in (N clocks), inverse-transformed (5N/2+1 clocks) and copied back in
// natural sample order (N clocks). The result is rounded to the nearest
// integer by the lifting arithmetic, clamped to 0..255 and sent row-major
// as 8-bit pixels on a second valid/ready stream.
//
// Timing for N = 128: N*N clocks to load, 2*N*(4.5N+2) = 147,968
// clocks to transform and N*N clocks to send. `busy_pass` tells which pass
// runs (0 none, 1 columns, 2 rows); `lines_done` counts transformed lines.
//
// The inverse transform is needed by the design but not spelled out in it:
// this block undoes the forward lifting steps in reverse order with the
// same integer constants, which is the standard inverse of a lifting
// wavelet. Only the two scale steps round, so an image comes back within
// a few grey levels. The frame buffer, schedule, clamping and stream
// interfaces are choices of this design.
module midwt_2d #(
  parameter int unsigned N  = 128,  // image width and height
  parameter int unsigned CW = 16    // coefficient width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 coef_valid,
  output logic                 coef_ready,
  input  logic signed [CW-1:0] coef_data,
  output logic                 pix_valid,
  input  logic                 pix_ready,
  output logic [7:0]           pix_data,
  output logic [1:0]           busy_pass,
  output logic [31:0]          lines_done
);

  localparam int unsigned AW = $clog2(N);
  localparam int unsigned FW = 2 * AW;

  typedef enum logic [2:0] {F_LOAD, F_COPY_IN, F_RUN, F_COPY_OUT, F_SEND} fstate_t;

  fstate_t              fst;
  logic                 row_pass;   // 1: row pass (first), 0: column pass
  logic [AW-1:0]        line;
  logic [AW-1:0]        pos;
  logic [FW-1:0]        faddr;

  logic signed [CW-1:0] frame [N*N];
  logic signed [CW-1:0] pix_word;

  logic                 l_wr, l_start, l_busy, l_done;
  logic signed [CW-1:0] l_rd;
  logic [FW-1:0]        line_addr;

  assign line_addr = row_pass ? {line, pos} : {pos, line};

  dwt97_line #(.N(N), .CW(CW), .INVERSE(1'b1)) u_line (
    .clk(clk), .rst_n(rst_n),
    .wr_en(l_wr), .wr_addr(pos), .wr_data(frame[line_addr]),
    .rd_addr(pos), .rd_data(l_rd),
    .start(l_start), .busy(l_busy), .done(l_done)
  );

  assign coef_ready = (fst == F_LOAD);
  assign pix_valid  = (fst == F_SEND);
  assign l_wr       = (fst == F_COPY_IN);
  assign busy_pass  = (fst == F_LOAD || fst == F_SEND) ? 2'd0 : (row_pass ? 2'd2 : 2'd1);

  // clamp the reconstructed sample to the 8-bit grey range
  always_comb begin
    pix_word = frame[faddr];
    if (pix_word < 0)        pix_data = 8'd0;
    else if (pix_word > 255) pix_data = 8'd255;
    else                     pix_data = pix_word[7:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fst        <= F_LOAD;
      row_pass   <= 1'b1;
      line       <= '0;
      pos        <= '0;
      faddr      <= '0;
      l_start    <= 1'b0;
      lines_done <= '0;
    end else begin
      l_start <= 1'b0;
      unique case (fst)
        F_LOAD: if (coef_valid) begin
          frame[faddr] <= coef_data;
          faddr        <= faddr + 1'b1;
          if (faddr == FW'(N*N - 1)) begin
            row_pass <= 1'b1;
            line     <= '0;
            pos      <= '0;
            fst      <= F_COPY_IN;
          end
        end
        F_COPY_IN: begin
          pos <= pos + 1'b1;
          if (pos == AW'(N - 1)) begin
            l_start <= 1'b1;
            fst     <= F_RUN;
          end
        end
        F_RUN: if (l_done) begin
          pos <= '0;
          fst <= F_COPY_OUT;
        end
        F_COPY_OUT: begin
          frame[line_addr] <= l_rd;
          pos <= pos + 1'b1;
          if (pos == AW'(N - 1)) begin
            lines_done <= lines_done + 32'd1;
            line       <= line + 1'b1;
            fst        <= F_COPY_IN;
            if (line == AW'(N - 1)) begin
              if (!row_pass) begin
                faddr <= '0;
                fst   <= F_SEND;
              end
              row_pass <= 1'b0;
            end
          end
        end
        F_SEND: if (pix_ready) begin
          faddr <= faddr + 1'b1;
          if (faddr == FW'(N*N - 1)) fst <= F_LOAD;
        end
        default: fst <= F_LOAD;
      endcase
    end
  end

  a_line_idle: assert property (@(posedge clk) disable iff (!rst_n) l_start |-> !l_busy);

endmodule

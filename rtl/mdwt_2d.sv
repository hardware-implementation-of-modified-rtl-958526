// mdwt_2d: one-level two-dimensional modified 9/7 wavelet transform of an
// N x N grey-scale image.
//
// The image is received as 8-bit pixels in row-major order on a valid/ready
// stream and stored in a frame buffer of N*N CW-bit words. The transform
// then runs the one-dimensional lifting engine (dwt97_line, forward) first
// down every column and then along every row: for each line the samples are
// copied from the frame buffer into the engine (N clocks), transformed
// (5N/2+1 clocks) and copied back in subband order, low-pass half first
// (N clocks). After both passes the frame holds the LL, HL, LH and HH
// quadrants of the one-level 2D DWT (LL at the top left); it is sent out
// row-major as CW-bit signed coefficients on a second valid/ready stream.
// Then the block waits for the next image.
//
// Timing for N = 128: N*N clocks to load, 2*N*(4.5N+2) = 147,968 clocks to
// transform, N*N clocks to send when the output is never stalled. `busy_pass`
// tells which pass runs (0 none, 1 columns, 2 rows) and `lines_done` counts
// transformed lines since reset.
//
// Columns first, then rows, and a single decomposition level follow the
// design; the frame buffer, the copy-in/copy-out schedule and the stream
// interfaces are choices of this design.
module mdwt_2d #(
  parameter int unsigned N  = 128,  // image width and height
  parameter int unsigned CW = 16    // coefficient width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 pix_valid,
  output logic                 pix_ready,
  input  logic [7:0]           pix_data,
  output logic                 coef_valid,
  input  logic                 coef_ready,
  output logic signed [CW-1:0] coef_data,
  output logic [1:0]           busy_pass,
  output logic [31:0]          lines_done
);

  localparam int unsigned AW = $clog2(N);
  localparam int unsigned FW = 2 * AW;

  typedef enum logic [2:0] {F_LOAD, F_COPY_IN, F_RUN, F_COPY_OUT, F_SEND} fstate_t;

  fstate_t              fst;
  logic                 row_pass;   // 0: column pass, 1: row pass
  logic [AW-1:0]        line;       // column or row being transformed
  logic [AW-1:0]        pos;        // sample position inside the line
  logic [FW-1:0]        faddr;      // load / send address, row major

  logic signed [CW-1:0] frame [N*N];

  logic                 l_wr, l_start, l_busy, l_done;
  logic signed [CW-1:0] l_rd;
  logic [FW-1:0]        line_addr;

  // frame address of sample `pos` of the current line
  assign line_addr = row_pass ? {line, pos} : {pos, line};

  dwt97_line #(.N(N), .CW(CW), .INVERSE(1'b0)) u_line (
    .clk(clk), .rst_n(rst_n),
    .wr_en(l_wr), .wr_addr(pos), .wr_data(frame[line_addr]),
    .rd_addr(pos), .rd_data(l_rd),
    .start(l_start), .busy(l_busy), .done(l_done)
  );

  assign pix_ready  = (fst == F_LOAD);
  assign coef_valid = (fst == F_SEND);
  assign coef_data  = frame[faddr];
  assign l_wr       = (fst == F_COPY_IN);
  assign busy_pass  = (fst == F_LOAD || fst == F_SEND) ? 2'd0 : (row_pass ? 2'd2 : 2'd1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fst        <= F_LOAD;
      row_pass   <= 1'b0;
      line       <= '0;
      pos        <= '0;
      faddr      <= '0;
      l_start    <= 1'b0;
      lines_done <= '0;
    end else begin
      l_start <= 1'b0;
      unique case (fst)
        F_LOAD: if (pix_valid) begin
          frame[faddr] <= CW'(pix_data);
          faddr        <= faddr + 1'b1;
          if (faddr == FW'(N*N - 1)) begin
            row_pass <= 1'b0;
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
              if (row_pass) begin
                faddr <= '0;
                fst   <= F_SEND;
              end
              row_pass <= 1'b1;
            end
          end
        end
        F_SEND: if (coef_ready) begin
          faddr <= faddr + 1'b1;
          if (faddr == FW'(N*N - 1)) fst <= F_LOAD;
        end
        default: fst <= F_LOAD;
      endcase
    end
  end

  // the line engine is only started when idle
  a_line_idle: assert property (@(posedge clk) disable iff (!rst_n) l_start |-> !l_busy);

endmodule

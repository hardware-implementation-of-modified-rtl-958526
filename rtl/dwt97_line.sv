// dwt97_line: one-dimensional 9/7 lifting wavelet engine for one line.
//
// The line (N samples, CW-bit two's complement) sits in a register buffer.
// Forward mode (INVERSE = 0) runs, after `start`, the lifting sequence of
// the 9/7 wavelet in place on the even/odd split of the line:
//   P1: X(2i+1) += a*(X(2i) + X(2i+2))      (odd samples -> D)
//   U1: X(2i)   += b*(X(2i-1) + X(2i+1))    (even samples -> S)
//   P2: X(2i+1) += c*(X(2i) + X(2i+2))      (detail, before scaling)
//   U2: X(2i)   += d*(X(2i-1) + X(2i+1))    (approximation, before scaling)
//   scale: X(2i+1) *= K, X(2i) *= 1/K
// with every product taken as round(coef*sum/256) using the integer
// constants of dwt_pkg. The line is extended symmetrically at both ends
// (X(-1) = X(1), X(N) = X(N-2)). Inverse mode (INVERSE = 1) undoes the
// steps in reverse order: unscale, then U2, P2, U1, P1 subtracted. The
// lifting steps cancel exactly; only the two scalings round.
//
// Interface: the line is written through `wr_en`/`wr_addr`/`wr_data` and
// read through `rd_addr`/`rd_data` (combinational). In forward mode samples
// are written in natural order and read back in subband order: addresses
// 0..N/2-1 give the low-pass half, N/2..N-1 the high-pass half. In inverse
// mode it is the other way round. `start` begins the transform; `done`
// pulses when it ends, 5*N/2 + 1 clocks later; one sample (two in the scale
// step) is updated per clock. Writes while `busy` are ignored.
//
// The split / predict / update / scale structure and the constants follow
// the 9/7 lifting scheme with coefficients scaled by 256 and rounded to
// integers; the one-sample-per-clock schedule, the symmetric extension and
// the subband addressing are choices of this design.
module dwt97_line
  import dwt_pkg::*;
#(
  parameter int unsigned N       = 128,  // samples per line, even, >= 4
  parameter int unsigned CW      = 16,   // coefficient width
  parameter bit          INVERSE = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic [$clog2(N)-1:0] wr_addr,
  input  logic signed [CW-1:0] wr_data,
  input  logic [$clog2(N)-1:0] rd_addr,
  output logic signed [CW-1:0] rd_data,
  input  logic                 start,
  output logic                 busy,
  output logic                 done
);

  localparam int unsigned AW   = $clog2(N);
  localparam int unsigned HALF = N / 2;

  typedef enum logic [2:0] {ST_P1, ST_U1, ST_P2, ST_U2, ST_SCALE} lstep_t;

  logic signed [CW-1:0] x [N];
  lstep_t               lstep;
  logic [AW-1:0]        idx;        // pair index i, 0..N/2-1

  // position of an address in the interleaved (even/odd) buffer
  function automatic logic [AW-1:0] sub_to_pos(logic [AW-1:0] a);
    if (int'(a) < int'(HALF)) return AW'(2 * int'(a));
    else                       return AW'(2 * (int'(a) - int'(HALF)) + 1);
  endfunction

  // forward step order P1 U1 P2 U2 SCALE, inverse order SCALE U2 P2 U1 P1
  function automatic lstep_t first_step();
    return INVERSE ? ST_SCALE : ST_P1;
  endfunction

  function automatic lstep_t last_step();
    return INVERSE ? ST_P1 : ST_SCALE;
  endfunction

  function automatic lstep_t following(lstep_t s);
    if (INVERSE) begin
      unique case (s)
        ST_SCALE: return ST_U2;
        ST_U2:    return ST_P2;
        ST_P2:    return ST_U1;
        default:  return ST_P1;
      endcase
    end else begin
      unique case (s)
        ST_P1:   return ST_U1;
        ST_U1:   return ST_P2;
        ST_P2:   return ST_U2;
        default: return ST_SCALE;
      endcase
    end
  endfunction

  // neighbours of the pair i, with symmetric extension
  int signed xe, xo, xe_next, xo_prev;
  int signed coef;
  logic signed [CW-1:0] upd_even, upd_odd;

  always_comb begin
    xe      = int'(x[2*idx]);
    xo      = int'(x[2*idx + 1]);
    xe_next = (idx == AW'(HALF - 1)) ? int'(x[N - 2]) : int'(x[2*idx + 2]);
    xo_prev = (idx == '0)            ? int'(x[1])     : int'(x[2*idx - 1]);
    unique case (lstep)
      ST_P1:   coef = LIFT_A;
      ST_U1:   coef = LIFT_B;
      ST_P2:   coef = LIFT_C;
      ST_U2:   coef = LIFT_D;
      default: coef = 0;
    endcase
    // predict steps change the odd sample, update steps the even one
    if (INVERSE) begin
      upd_odd  = CW'(xo - lift_mul(coef, xe + xe_next));
      upd_even = CW'(xe - lift_mul(coef, xo_prev + xo));
    end else begin
      upd_odd  = CW'(xo + lift_mul(coef, xe + xe_next));
      upd_even = CW'(xe + lift_mul(coef, xo_prev + xo));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      idx   <= '0;
      lstep <= first_step();
      for (int k = 0; k < int'(N); k++) x[k] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (wr_en) x[INVERSE ? sub_to_pos(wr_addr) : wr_addr] <= wr_data;
        if (start) begin
          busy  <= 1'b1;
          idx   <= '0;
          lstep <= first_step();
        end
      end else begin
        unique case (lstep)
          ST_P1, ST_P2: x[2*idx + 1] <= upd_odd;
          ST_U1, ST_U2: x[2*idx]     <= upd_even;
          default: begin
            if (INVERSE) begin
              x[2*idx + 1] <= CW'(lift_mul(LIFT_KINV, xo));
              x[2*idx]     <= CW'(lift_mul(LIFT_K, xe));
            end else begin
              x[2*idx + 1] <= CW'(lift_mul(LIFT_K, xo));
              x[2*idx]     <= CW'(lift_mul(LIFT_KINV, xe));
            end
          end
        endcase
        if (idx == AW'(HALF - 1)) begin
          idx <= '0;
          if (lstep == last_step()) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            lstep <= following(lstep);
          end
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

  assign rd_data = x[INVERSE ? rd_addr : sub_to_pos(rd_addr)];

endmodule

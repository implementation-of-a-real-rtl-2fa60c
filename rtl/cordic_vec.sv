// cordic_vec: magnitude of a 2-D vector, sqrt(x^2 + y^2), by CORDIC in
// vectoring mode.
//
// The vector is first folded into the right half-plane (x := |x|), then rotated
// towards the x axis by micro-rotations of atan(2^-i), i = 0..ITERS-1, each one
// only a shift and an add: if y >= 0 then (x, y) := (x + y>>i, y - x>>i), else
// the opposite signs. The remaining x is the magnitude times the CORDIC gain
// (about 1.647), which one final multiply by its inverse removes. The
// angle is not produced because the beamformer only needs the magnitude, the
// use the published design makes of its CORDIC core. That core was a vendor
// library block; this plain iterative version, its iteration count and its
// handshake are this design's own.
//
// Interface and timing: one pass is iterative, one micro-rotation per clock.
// 'start' is sampled with x_in/y_in; the first micro-rotation happens on that
// edge, the other ITERS-1 on the next edges, the gain correction on the edge
// after, so 'done' is high for one cycle ITERS+1 cycles after 'start' and
// 'mag' holds its value until the next start. Any fx_t inputs are accepted:
// the datapath has two integer guard bits for the gain growth and FG fraction
// guard bits so the shifted terms lose nothing that shows in the result, and
// the gain correction uses a 30-bit constant and rounds to nearest. The
// result saturates if the magnitude exceeds the fx_t range. Keeping the result
// unbiased matters because the boundary cells feed it back every beat.
module cordic_vec
  import mvdr_pkg::*;
#(
  parameter int ITERS = CORDIC_ITERS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  x_in,
  input  fx_t  y_in,
  output fx_t  mag,
  output logic done
);

  localparam int FG = 8;                      // fraction guard bits
  localparam int IW = DW + 2 + FG;            // internal width with guard bits
  localparam int GB = 30;                     // fraction bits of the gain constant
  localparam longint INV_GAIN = longint'(0.6072529350088813 * (2.0 ** GB));
  typedef logic signed [IW-1:0] iw_t;
  typedef logic signed [IW+GB+1:0] pw_t;

  iw_t  x_q, y_q;
  logic busy_q, fin_q;
  logic [$clog2(ITERS+1)-1:0] i_q;

  // One micro-rotation of (x, y) by shift amount sh.
  function automatic void micro(input iw_t x, input iw_t y, input int sh,
                                output iw_t xo, output iw_t yo);
    if (y >= 0) begin
      xo = x + (y >>> sh);
      yo = y - (x >>> sh);
    end else begin
      xo = x - (y >>> sh);
      yo = y + (x >>> sh);
    end
  endfunction

  iw_t x0, y0, x_nx, y_nx;
  always_comb begin
    x0 = ((x_in < 0) ? -iw_t'(x_in) : iw_t'(x_in)) <<< FG;
    y0 = iw_t'(y_in) <<< FG;
    micro(x_q, y_q, int'(i_q), x_nx, y_nx);
  end

  iw_t xs_f, ys_f;
  always_comb micro(x0, y0, 0, xs_f, ys_f);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q    <= '0;
      y_q    <= '0;
      i_q    <= '0;
      busy_q <= 1'b0;
      fin_q  <= 1'b0;
      mag    <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        x_q    <= xs_f;
        y_q    <= ys_f;
        i_q    <= 1;
        busy_q <= (ITERS > 1);
        fin_q  <= (ITERS <= 1);
      end else if (busy_q) begin
        x_q <= x_nx;
        y_q <= y_nx;
        i_q <= i_q + 1'b1;
        if (int'(i_q) == ITERS - 1) begin
          busy_q <= 1'b0;
          fin_q  <= 1'b1;
        end
      end else if (fin_q) begin
        fin_q <= 1'b0;
        mag   <= fx_sat(fx2_t'((pw_t'(x_q) * pw_t'(INV_GAIN) + (pw_t'(1) <<< (GB + FG - 1))) >>> (GB + FG)));
        done  <= 1'b1;
      end
    end
  end

endmodule

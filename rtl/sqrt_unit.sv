// sqrt_unit: r = sqrt(f^2 + |g|^2) for a real f and a complex g, the radius
// of the complex Givens rotation computed by a boundary cell.
//
// As in the published boundary cell, it is two CORDIC vectoring passes in
// cascade: the first turns g = (g_re, g_im) into |g|, the second turns
// (f, |g|) into r. f is held in a register enabled by 'start' while the
// first pass runs. The published unit also scales each input by 2^-2 to make
// room for the CORDIC gain; here the CORDIC's own guard bits give that room,
// so the two lowest input bits are kept (this design's choice). The CORDIC carries its own guard bits, so no input scaling
// is needed and r is within about one LSB of the exact value, without a
// systematic bias (a biased r would make the stored diagonal drift over long
// runs). r saturates at the top of the fx_t range.
//
// Interface and timing: 'start' samples f and g. 'done' pulses 2*(ITERS+1)
// cycles later (34 cycles with 16 iterations) and 'r' then holds until the
// next pass ends. Inputs may change after the 'start' cycle.
module sqrt_unit
  import mvdr_pkg::*;
#(
  parameter int ITERS = CORDIC_ITERS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  f,
  input  cpx_t g,
  output fx_t  r,
  output logic done
);

  fx_t  f_q;          // f, held for the second pass
  fx_t  g_mag;        // |g|
  logic g_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     f_q <= '0;
    else if (start) f_q <= f;
  end

  cordic_vec #(.ITERS(ITERS)) u_cordic_g (
    .clk, .rst_n,
    .start (start),
    .x_in  (g.re),
    .y_in  (g.im),
    .mag   (g_mag),
    .done  (g_done)
  );

  cordic_vec #(.ITERS(ITERS)) u_cordic_r (
    .clk, .rst_n,
    .start (g_done),
    .x_in  (f_q),
    .y_in  (g_mag),
    .mag   (r),
    .done  (done)
  );

endmodule

// boundary_cell: diagonal (circle) cell of the MVDR systolic array. It owns one
// diagonal element of the triangular factor Phi^(1/2) and turns each incoming
// sample into the complex Givens rotation that annihilates it.
//
// For the stored real value phi and the incoming complex u it computes
//   f = lambda^(1/2) * phi,   r = sqrt(f^2 + |u|^2),
//   c = f / r,   s = conj(u) / r,   phi := r,
// with c = 1, s = 0 and phi := f exactly when u = 0 (the g = 0 branch of the
// complex Givens parameter algorithm, which also covers f = g = 0). Since
// f >= 0, the general branch covers f = 0, g != 0, giving c = 0,
// s = conj(u)/|u| and phi := |u|. It also multiplies the diagonal "1" path by c, so the output
// of the last boundary cell is gamma^(1/2) = prod(c).
//
// Datapath, as in the published cell: a square-root unit of two cascaded
// CORDICs, a Newton-Raphson reciprocal unit, and one multiplier that a
// multiplexer feeds serially with f, u_re and -u_im (the sine takes the
// conjugate, hence the negation) against 1/r. The fourth multiplier pass (the
// gamma product) is this design's addition, as is the u = 0 case handled by a
// flag rather than by the reciprocal. c and s leave with RW fraction bits
// (see mvdr_pkg), more than the data carry.
//
// Interface and timing: all work is paced by the global controller (ctrl).
// Inputs u_in/gamma_in are read during the beat (they only change on commit
// edges). rot_out, gamma_out and phi change on the commit edge at the end of
// the beat, one beat after the sample arrived. A beat whose u_in.valid is low
// leaves phi alone and emits rot_out.valid = 0. 'init' loads phi := init_val.
// The cell reads only the strobes it needs from the shared ctrl bundle; lint
// reports the remaining bits as unused.
module boundary_cell
  import mvdr_pkg::*;
#(
  parameter fx_t LAMBDA_SQRT = FX_ONE
) (
  input  logic       clk,
  input  logic       rst_n,
  input  beat_ctrl_t ctrl,
  input  logic       init,
  input  fx_t        init_val,
  input  smp_t       u_in,
  input  fx_t        gamma_in,
  output rot_t       rot_out,
  output fx_t        gamma_out,
  output fx_t        phi
);

  fx_t  f_c, f_q;
  cpx_t u_q;
  fx_t  gamma_q;
  logic valid_q;

  fx_t  r;
  logic r_done, r_ready;
  fx_t  q;
  logic signed [7:0] e;

  fx_t  c_q, gamma_n_q;
  cpx_t s_q;

  assign f_c = fx_mul(LAMBDA_SQRT, phi);

  sqrt_unit u_sqrt (
    .clk, .rst_n,
    .start (ctrl.start),
    .f     (f_c),
    .g     (u_in.v),
    .r     (r),
    .done  (r_done)
  );

  nr_reciprocal u_recip (
    .clk, .rst_n,
    .load    (ctrl.recip_load),
    .seed    (ctrl.recip_seed),
    .iter    (ctrl.recip_iter),
    .out     (ctrl.recip_out),
    .divisor (r),
    .q       (q),
    .e       (e)
  );

  // The single output multiplier and its operand multiplexer.
  fx_t               mul_a, mul_b, mul_y;
  logic signed [7:0] mul_e;
  always_comb begin
    mul_b = q;
    mul_e = e - 8'(RW - FW);          // c and s come out with RW fraction bits
    unique case (ctrl.mul_step)
      2'd0:    mul_a = f_q;
      2'd1:    mul_a = u_q.re;
      2'd2:    mul_a = -u_q.im;
      default: begin
        mul_a = gamma_q;
        mul_b = c_q;
        mul_e = 8'(RW - FW);
      end
    endcase
    mul_y = fx_mul_exp(mul_a, mul_b, mul_e);
  end

  // g = 0: the rotation is the identity and r = f exactly (first branch of
  // the complex Givens parameter algorithm); r = 0 is caught the same way.
  logic r_zero, g_zero, ident;
  assign r_zero = (r == 0);
  assign g_zero = (u_q.re == 0) && (u_q.im == 0);
  assign ident  = r_zero || g_zero;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_q       <= '0;
      u_q       <= '0;
      gamma_q   <= '0;
      valid_q   <= 1'b0;
      r_ready   <= 1'b0;
      c_q       <= '0;
      s_q       <= '0;
      gamma_n_q <= '0;
      rot_out   <= '0;
      gamma_out <= '0;
      phi       <= '0;
    end else begin
      if (ctrl.start) begin
        f_q     <= f_c;
        u_q     <= u_in.v;
        gamma_q <= gamma_in;
        valid_q <= u_in.valid;
        r_ready <= 1'b0;
      end
      if (r_done) r_ready <= 1'b1;
      if (ctrl.mul_en) begin
        unique case (ctrl.mul_step)
          2'd0:    c_q       <= ident ? ROT_ONE : mul_y;
          2'd1:    s_q.re    <= ident ? FX_ZERO : mul_y;
          2'd2:    s_q.im    <= ident ? FX_ZERO : mul_y;
          default: gamma_n_q <= mul_y;
        endcase
      end
      if (ctrl.commit) begin
        rot_out.valid <= valid_q;
        if (valid_q) begin
          rot_out.c <= c_q;
          rot_out.s <= s_q;
          gamma_out <= gamma_n_q;
          phi       <= g_zero ? f_q : r;
        end
      end
      if (init) phi <= init_val;
    end
  end

  // The square root must be ready before the reciprocal unit loads it.
  assert property (@(posedge clk) disable iff (!rst_n) ctrl.recip_load |-> r_ready)
    else $error("boundary_cell: square root not ready at reciprocal load");

endmodule

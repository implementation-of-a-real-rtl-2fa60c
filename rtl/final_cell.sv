// final_cell: the cell at the end of the auxiliary row (marked "X" in the
// array drawing). It turns what the rotations leave behind into the beam
// output
//   e(n) = -(beta * gamma^(1/2)) / ||a(n)||^2
// where beta = -e'(n) gamma^(-1/2)(n) arrives from the last auxiliary cell,
// gamma^(1/2)(n) arrives along the diagonal from the last boundary cell, and
// ||a(n)||^2 is the squared norm of the updated auxiliary vector, summed along
// the auxiliary row. e(n) equals w^H(n) u(n) for the MVDR weight vector
// w(n) = Phi^-1 s / (s^H Phi^-1 s), so a signal from the steering direction
// passes with unit gain.
//
// The division reuses the Newton-Raphson reciprocal unit of the boundary
// cell, and one multiplier runs serially: first gamma * (1/||a||^2), then the
// real and imaginary parts of -beta times that. How the final cell obtains
// ||a||^2 is not shown in the published drawing; the running sum along the
// auxiliary row is this design's choice.
//
// Interface and timing: paced by the global controller like the other cells;
// e_out changes on the commit edge, one beat after beta arrived. e_out.valid
// follows beta.valid.
// The cell reads only the strobes it needs from the shared ctrl bundle; lint
// reports the remaining bits as unused.
module final_cell
  import mvdr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  beat_ctrl_t ctrl,
  input  smp_t       beta,
  input  fx_t        nrm_in,
  input  fx_t        gamma_in,
  output smp_t       e_out
);

  fx_t               q;
  logic signed [7:0] e;
  fx_t               g_q;     // gamma / ||a||^2 as mantissa, exponent e
  cpx_t              y_q;

  nr_reciprocal u_recip (
    .clk, .rst_n,
    .load    (ctrl.recip_load),
    .seed    (ctrl.recip_seed),
    .iter    (ctrl.recip_iter),
    .out     (ctrl.recip_out),
    .divisor (nrm_in),
    .q       (q),
    .e       (e)
  );

  fx_t               mul_a, mul_b, mul_y;
  logic signed [7:0] mul_e;
  always_comb begin
    mul_e = '0;
    unique case (ctrl.mul_step)
      2'd0:    begin mul_a = gamma_in;    mul_b = q;   end
      2'd1:    begin mul_a = -beta.v.re;  mul_b = g_q; mul_e = e; end
      2'd2:    begin mul_a = -beta.v.im;  mul_b = g_q; mul_e = e; end
      default: begin mul_a = '0;          mul_b = '0;  end
    endcase
    mul_y = fx_mul_exp(mul_a, mul_b, mul_e);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_q   <= '0;
      y_q   <= '0;
      e_out <= '0;
    end else begin
      if (ctrl.mul_en) begin
        unique case (ctrl.mul_step)
          2'd0:    g_q    <= mul_y;
          2'd1:    y_q.re <= mul_y;
          2'd2:    y_q.im <= mul_y;
          default: ;
        endcase
      end
      if (ctrl.commit) begin
        e_out.valid <= beta.valid;
        if (beta.valid) e_out.v <= y_q;
      end
    end
  end

endmodule

// internal_cell: square cell of the MVDR systolic array. It owns one
// off-diagonal element x of Phi^(1/2), or one element of the auxiliary vector
// a in the bottom row, and applies to it the rotation (c, s) made by the
// boundary cell at the top of its column:
//   xl = SCALE * x
//   x' = c*xl + s*u              (stored)
//   u' = c*u  - conj(s)*xl       (passed to the right)
// The rotation is passed down unchanged. For the auxiliary row the cell also
// adds |x'|^2 to a running sum that travels along the row, so the last cell
// delivers ||a(n)||^2 to the final cell together with its u' (= beta).
//
// A direct implementation needs twelve real multipliers; as in the published
// cell, this one has two and runs the products serially, a small sequencer
// selecting the operands and whether each product is added or subtracted. The
// published cell buffers operands in block RAMs; here they are registers. The
// SCALE pass (lambda^(1/2) for the Phi rows, lambda^(-1/2) for the auxiliary
// row) and the squared-norm pass are this design's additions. c and s arrive
// with RW fraction bits (see mvdr_pkg); their products are scaled to match.
//
// Interface and timing: paced by the global controller. The sequence runs
// during phases 0..8 of each beat; the results are held and released on the
// commit edge at the end of the beat (the 51st cycle), so u_out, rot_out and
// nrm_out are one beat behind their inputs. x is only updated when rot_in is
// valid; 'init' loads x := init_val.
// The cell reads only the strobes it needs from the shared ctrl bundle; lint
// reports the remaining bits as unused.
module internal_cell
  import mvdr_pkg::*;
#(
  parameter fx_t SCALE = FX_ONE
) (
  input  logic       clk,
  input  logic       rst_n,
  input  beat_ctrl_t ctrl,
  input  logic       init,
  input  cpx_t       init_val,
  input  rot_t       rot_in,
  input  smp_t       u_in,
  input  fx_t        nrm_in,
  output rot_t       rot_out,
  output smp_t       u_out,
  output fx_t        nrm_out,
  output cpx_t       x
);

  localparam int NSTEPS = 8;

  typedef enum logic [1:0] {ACC_NONE, ACC_X, ACC_U, ACC_N} acc_sel_e;

  logic [3:0] step_q;
  logic       busy_q;
  cpx_t       xl_q, xn_q, un_q;
  fx_t        nn_q;

  // Operand multiplexers of the two multipliers for each step; 'neg' turns
  // the accumulate into a subtract (the add/sub control of the published cell).
  fx_t      a0, b0, a1, b1;
  logic     neg0, neg1;
  acc_sel_e dst;
  fx_t      p0, p1;

  always_comb begin
    a0 = '0; b0 = '0; a1 = '0; b1 = '0;
    neg0 = 1'b0; neg1 = 1'b0;
    dst  = ACC_NONE;
    unique case (step_q)
      4'd0: begin a0 = SCALE;        b0 = x.re;    a1 = SCALE;        b1 = x.im;    end
      4'd1: begin a0 = rot_in.c;     b0 = xl_q.re; a1 = rot_in.c;     b1 = xl_q.im; dst = ACC_X; end
      4'd2: begin a0 = rot_in.s.re;  b0 = u_in.v.re; a1 = rot_in.s.re; b1 = u_in.v.im; dst = ACC_X; end
      4'd3: begin a0 = rot_in.s.im;  b0 = u_in.v.im; a1 = rot_in.s.im; b1 = u_in.v.re; neg0 = 1'b1; dst = ACC_X; end
      4'd4: begin a0 = rot_in.c;     b0 = u_in.v.re; a1 = rot_in.c;    b1 = u_in.v.im; dst = ACC_U; end
      4'd5: begin a0 = rot_in.s.re;  b0 = xl_q.re; a1 = rot_in.s.re;  b1 = xl_q.im; neg0 = 1'b1; neg1 = 1'b1; dst = ACC_U; end
      4'd6: begin a0 = rot_in.s.im;  b0 = xl_q.im; a1 = rot_in.s.im;  b1 = xl_q.re; neg0 = 1'b1; dst = ACC_U; end
      4'd7: begin a0 = xn_q.re;      b0 = xn_q.re; a1 = xn_q.im;      b1 = xn_q.im; dst = ACC_N; end
      default: ;
    endcase
    // steps 1..6 multiply by c or s, which carry RW fraction bits
    if (step_q >= 4'd1 && step_q <= 4'd6) begin
      p0 = fx_mul_rot(b0, a0);
      p1 = fx_mul_rot(b1, a1);
    end else begin
      p0 = fx_mul(a0, b0);
      p1 = fx_mul(a1, b1);
    end
    if (neg0) p0 = -p0;
    if (neg1) p1 = -p1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_q  <= '0;
      busy_q  <= 1'b0;
      xl_q    <= '0;
      xn_q    <= '0;
      un_q    <= '0;
      nn_q    <= '0;
      rot_out <= '0;
      u_out   <= '0;
      nrm_out <= '0;
      x       <= '0;
    end else begin
      if (ctrl.start) begin
        step_q <= 4'd1;
        busy_q <= 1'b1;
        xl_q   <= '{re: p0, im: p1};
        xn_q   <= '0;
        un_q   <= '0;
      end else if (busy_q) begin
        if (int'(step_q) == NSTEPS - 1) begin
          busy_q <= 1'b0;
          step_q <= '0;
        end else begin
          step_q <= step_q + 1'b1;
        end
        unique case (dst)
          ACC_X: begin
            xn_q.re <= fx_sat(fx2_t'(xn_q.re) + fx2_t'(p0));
            xn_q.im <= fx_sat(fx2_t'(xn_q.im) + fx2_t'(p1));
          end
          ACC_U: begin
            un_q.re <= fx_sat(fx2_t'(un_q.re) + fx2_t'(p0));
            un_q.im <= fx_sat(fx2_t'(un_q.im) + fx2_t'(p1));
          end
          ACC_N:   nn_q <= fx_sat(fx2_t'(nrm_in) + fx2_t'(p0) + fx2_t'(p1));
          default: ;
        endcase
      end
      if (ctrl.commit) begin
        rot_out     <= rot_in;
        u_out.valid <= rot_in.valid;
        if (rot_in.valid) begin
          u_out.v <= un_q;
          nrm_out <= nn_q;
          x       <= xn_q;
        end
      end
      if (init) x <= init_val;
    end
  end

  // A sample and its rotation always arrive in the same beat.
  assert property (@(posedge clk) disable iff (!rst_n) ctrl.start |-> (rot_in.valid == u_in.valid))
    else $error("internal_cell: rotation and sample out of step");

endmodule

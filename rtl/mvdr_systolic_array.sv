// mvdr_systolic_array: adaptive MVDR beamformer for K antennas as a QR-RLS
// systolic array (Haykin's "systolic implementation 2" of the MVDR problem).
//
// Each antenna sample vector u(n) updates the lower-triangular factor
// Phi^(1/2)(n) of the exponentially weighted correlation matrix and the
// auxiliary vector a(n) = Phi^(-1/2)(n) s(theta0), by the pre-array /
// post-array rotation
//   [ lambda^(1/2) Phi^(1/2)(n-1)   u(n) ]        [ Phi^(1/2)(n)   0              ]
//   [ lambda^(-1/2) a^H(n-1)        0    ] Theta = [ a^H(n)         beta           ]
//   [ 0^T                           1    ]        [ ...            gamma^(1/2)(n) ]
// and produces the beam output e(n) = -beta gamma^(1/2) / ||a(n)||^2.
//
// Layout (row i, column j, 0-based):
//   row i < K : internal cells (i,0..i-1) then boundary cell (i,i)
//   row K     : auxiliary internal cells (K,0..K-1) then the final cell
// Samples enter row i from the left; rotations made by boundary cell (j,j)
// travel down column j; the "1" enters boundary (0,0) and the running product
// of cosines travels down the diagonal to the final cell. Row i is skewed by i
// beats, the auxiliary row (fed with zeros) by K beats, and the diagonal link
// has one extra beat register, so every cell sees its operands in the same
// beat. The global controller inside paces all cells; every cell works once per
// CELL_PERIOD-cycle beat and releases its results on the last cycle.
//
// Interface and timing: while 'run' is high the array runs beat after beat.
// 'in_take' is high in the last cycle of each beat; in_valid/in_u are sampled
// then (in_valid low inserts a bubble). e_out.valid rises on a commit edge
// 2K+1 beats after the sample was taken. 'init' (with run low) loads
// Phi^(1/2) := init_phi * I and the auxiliary row := init_a, i.e. Phi(0) =
// delta I with init_phi = sqrt(delta) and init_a = a^H(0) = s^H(theta0) /
// sqrt(delta) (the row holds a^H, so the steering vector enters conjugated).
// l_out and a_out show the current factor and auxiliary row a^H, from which
// the weight vector w = Phi^(-H/2) a / ||a||^2 can be formed. l_out is the
// full K x K matrix for ease of use: its entries above the diagonal and the
// imaginary parts of the diagonal are constant zero.
// The norm output of the internal cells in the Phi rows has no consumer (only
// the auxiliary row sums a norm); lint reports it as unused.
module mvdr_systolic_array
  import mvdr_pkg::*;
#(
  parameter int  K            = 3,
  parameter fx_t LAMBDA_SQRT  = FX_ONE,   // lambda^(1/2)
  parameter fx_t LAMBDA_ISQRT = FX_ONE    // lambda^(-1/2)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic        init,
  input  fx_t         init_phi,
  input  cpx_t        init_a [K],
  input  logic        in_valid,
  input  cpx_t        in_u [K],
  output logic        in_take,
  output smp_t        e_out,
  output cpx_t        l_out [K][K],
  output cpx_t        a_out [K],
  output beat_ctrl_t  ctrl,
  output logic [31:0] beat_count
);

  global_ctrl u_ctrl (
    .clk, .rst_n,
    .run        (run),
    .ctrl       (ctrl),
    .beat_count (beat_count)
  );

  assign in_take = ctrl.commit;

  // ---------------------------------------------------------------- input skew
  // skew[i][d]: row i sample after d+1 beat registers; row i uses skew[i][i].
  smp_t skew [K+1][K+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= K; i++)
        for (int d = 0; d <= K; d++)
          skew[i][d] <= '0;
    end else if (ctrl.commit) begin
      for (int i = 0; i <= K; i++) begin
        skew[i][0].valid <= in_valid;
        skew[i][0].v     <= (i < K) ? in_u[(i < K) ? i : 0] : '0;
        for (int d = 1; d <= K; d++)
          skew[i][d] <= skew[i][d-1];
      end
    end
  end

  // ---------------------------------------------------------------- cell grid
  rot_t rot_o [K+1][K];     // rotation leaving cell (i,j) downwards
  smp_t u_l   [K+1][K+1];   // sample entering cell (i,j) from the left
  fx_t  nrm_l [K+1];        // squared-norm sum entering auxiliary cell j
  fx_t  gam_o [K];          // gamma^(1/2) leaving boundary cell i
  fx_t  gam_d [K];          // ... after the extra diagonal beat register
  fx_t  phi_d [K];

  assign nrm_l[0] = FX_ZERO;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) gam_d[i] <= '0;
    end else if (ctrl.commit) begin
      for (int i = 0; i < K; i++) gam_d[i] <= gam_o[i];
    end
  end

  for (genvar i = 0; i <= K; i++) begin : g_row
    assign u_l[i][0] = skew[i][i];
    for (genvar j = 0; j < K; j++) begin : g_col
      if (i == j) begin : g_bc
        boundary_cell #(.LAMBDA_SQRT(LAMBDA_SQRT)) u_bc (
          .clk, .rst_n,
          .ctrl      (ctrl),
          .init      (init),
          .init_val  (init_phi),
          .u_in      (u_l[i][i]),
          .gamma_in  ((i == 0) ? FX_ONE : gam_d[(i == 0) ? 0 : i-1]),
          .rot_out   (rot_o[i][j]),
          .gamma_out (gam_o[i]),
          .phi       (phi_d[i])
        );
        assign u_l[i][j+1] = '0;
      end else if (j < i) begin : g_ic
        fx_t  nrm_o;
        cpx_t x_o;
        internal_cell #(.SCALE((i == K) ? LAMBDA_ISQRT : LAMBDA_SQRT)) u_ic (
          .clk, .rst_n,
          .ctrl     (ctrl),
          .init     (init),
          .init_val ((i == K) ? init_a[j] : cpx_t'('0)),
          .rot_in   (rot_o[i-1][j]),
          .u_in     (u_l[i][j]),
          .nrm_in   ((i == K) ? nrm_l[j] : FX_ZERO),
          .rot_out  (rot_o[i][j]),
          .u_out    (u_l[i][j+1]),
          .nrm_out  (nrm_o),
          .x        (x_o)
        );
        if (i == K) begin : g_aux
          assign nrm_l[j+1] = nrm_o;
          assign a_out[j]   = x_o;
        end else begin : g_phi
          assign l_out[i][j] = x_o;
        end
      end else begin : g_none
        // Above the diagonal: no cell, the factor is zero there.
        assign rot_o[i][j] = '0;
        assign u_l[i][j+1] = '0;
        assign l_out[i][j] = '0;
      end
    end
  end

  for (genvar i = 0; i < K; i++) begin : g_diag
    assign l_out[i][i] = '{re: phi_d[i], im: FX_ZERO};
  end

  final_cell u_final (
    .clk, .rst_n,
    .ctrl     (ctrl),
    .beta     (u_l[K][K]),
    .nrm_in   (nrm_l[K]),
    .gamma_in (gam_d[K-1]),
    .e_out    (e_out)
  );

endmodule

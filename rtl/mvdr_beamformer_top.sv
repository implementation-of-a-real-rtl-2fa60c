// mvdr_beamformer_top: real-time MVDR receive beamformer for a linear array
// of K antennas (three by default).
//
// It joins the two halves of the system: the sample buffer, a block RAM that
// the host fills with fixed-point antenna sample sets and from which it reads
// the beam outputs, and the QR-RLS systolic array that adapts the MVDR
// weights and forms one beam output e(n) per sample set. The host side (a soft
// processor with its Ethernet link, memory and peripherals in the intended
// system) is not part of this RTL; its connection is brought out as a plain
// synchronous memory port, a start/num_sets job request and a busy/done
// notification, together with the array's configuration port for the initial
// factor and the steering vector. l_out and a_out show the adapted factor and
// auxiliary row; l_out's entries above the diagonal and the imaginary parts
// of its diagonal are constant zero.
//
// Timing: one sample set per beat of CELL_PERIOD (51) cycles; a result is
// written back 2K+1 beats after its set entered the array. A job of N sets
// takes about (N + 2K + 2) beats.
//
// rst_n is an asynchronous reset; the assertions inside the cells also use it
// to disable checking during reset, which lint reports as a synchronous use.
module mvdr_beamformer_top
  import mvdr_pkg::*;
#(
  parameter int  K            = 3,
  parameter int  MAX_SETS     = 200,
  parameter fx_t LAMBDA_SQRT  = FX_ONE,
  parameter fx_t LAMBDA_ISQRT = FX_ONE,
  localparam int OUT_BASE     = 2 * K * MAX_SETS,
  localparam int DEPTH        = OUT_BASE + 2 * MAX_SETS,
  localparam int AW           = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host memory port
  input  logic          host_en,
  input  logic          host_we,
  input  logic [AW-1:0] host_addr,
  input  fx_t           host_wdata,
  output fx_t           host_rdata,
  // job control
  input  logic          start,
  input  logic [15:0]   num_sets,
  output logic          busy,
  output logic          done,
  // array configuration: Phi^(1/2)(0) = init_phi * I, auxiliary row
  // a^H(0) = init_a, i.e. conj(s(theta0)) / init_phi
  input  logic          cfg_init,
  input  fx_t           cfg_init_phi,
  input  cpx_t          cfg_init_a [K],
  // observation of the adapted state (for forming the weight vector):
  // the lower-triangular factor and the auxiliary row a^H
  output cpx_t          l_out [K][K],
  output cpx_t          a_out [K],
  output logic [31:0]   beat_count
);

  beat_ctrl_t ctrl;
  logic       run, in_take, arr_valid;
  cpx_t       arr_u [K];
  smp_t       e_out;

  sample_buffer #(.K(K), .MAX_SETS(MAX_SETS)) u_buf (
    .clk, .rst_n,
    .host_en, .host_we, .host_addr, .host_wdata, .host_rdata,
    .start, .num_sets, .busy, .done,
    .ctrl      (ctrl),
    .in_take   (in_take),
    .e_in      (e_out),
    .run       (run),
    .arr_valid (arr_valid),
    .arr_u     (arr_u)
  );

  mvdr_systolic_array #(
    .K(K), .LAMBDA_SQRT(LAMBDA_SQRT), .LAMBDA_ISQRT(LAMBDA_ISQRT)
  ) u_array (
    .clk, .rst_n,
    .run        (run),
    .init       (cfg_init),
    .init_phi   (cfg_init_phi),
    .init_a     (cfg_init_a),
    .in_valid   (arr_valid),
    .in_u       (arr_u),
    .in_take    (in_take),
    .e_out      (e_out),
    .l_out      (l_out),
    .a_out      (a_out),
    .ctrl       (ctrl),
    .beat_count (beat_count)
  );

endmodule

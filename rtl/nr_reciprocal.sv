// nr_reciprocal: 1/D by Newton-Raphson iteration, returned as a mantissa and
// a power of two: 1/D = q * 2^-e.
//
// The published unit works on a divisor in [0.5, 1]: a seed x0 = 2.9142 - 2*D
// is selected into a loop that applies x := x * (2 - D*x), and the loop result
// is fed back through a multiplexer so that three iterations in all are made,
// after which an output register takes the result. The divisor's range is not
// known in advance in the beamformer, so this unit normalises it first (this
// design's addition): on 'load' it finds the leading one of D and shifts it to
// m in [0.5, 1) with D = m * 2^e. It then returns q = 1/m in (1, 2] and e, and
// the caller forms a/D as fx_mul_exp(a, q, e). A divisor <= 0 gives q = 0.
// Inside, m and the loop value carry NF = DW-3 fraction bits (more than the
// FW of fx_t; q is below 4) and each step rounds to nearest. q leaves with
// those NF fraction bits and e is raised by NF-FW to match, so read as an
// fx_t the pair still means q * 2^-e. The extra bits are this design's
// choice: every rotation uses the reciprocal, and an error of 2^-FW in it
// would scale the stored factor by the same amount on every update.
//
// Interface and timing (strobes from the global controller, one cycle each):
//   load  - register the divisor and normalise it
//   seed  - x := 2.9142 - 2*m (multiplexer on the seed input)
//   iter  - x := x*(2 - m*x) (multiplexer on the feedback); give it NR_ITERS times
//   out   - output register: q := x, e
// The strobes must come in this order, each at least one cycle apart.
module nr_reciprocal
  import mvdr_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic                seed,
  input  logic                iter,
  input  logic                out,
  input  fx_t                 divisor,
  output fx_t                 q,
  output logic signed [7:0]   e
);

  localparam int     NF  = DW - 3;                            // internal fraction bits
  localparam fx_t    T1  = fx_t'(longint'(2.9142 * (2.0 ** NF)));  // seed constants
  localparam fx_t    TWO = fx_t'(2) <<< NF;

  fx_t              m_q;     // normalised divisor
  logic signed [7:0] e_q;
  logic             zero_q;  // divisor was <= 0
  fx_t              x_q;     // loop value

  // Leading-one position of a positive word.
  function automatic int lead_one(input fx_t v);
    int p;
    p = 0;
    for (int b = 0; b < int'(DW) - 1; b++)
      if (v[b]) p = b;
    return p;
  endfunction

  int  p_d;
  fx_t m_d;
  always_comb begin
    p_d = lead_one(divisor);
    if (p_d >= NF - 1) m_d = divisor >>> (p_d - (NF - 1));
    else               m_d = divisor <<< ((NF - 1) - p_d);
  end

  // Product with NF fraction bits, rounded (operands stay below 4).
  function automatic fx_t mul_nf(input fx_t a, input fx_t b);
    return fx_t'(fx_round_shift(fx2_t'(a) * fx2_t'(b), NF));
  endfunction

  // One Newton-Raphson step x * (2 - m*x).
  fx_t x_step;
  always_comb x_step = mul_nf(x_q, TWO - mul_nf(m_q, x_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_q    <= '0;
      e_q    <= '0;
      zero_q <= 1'b1;
      x_q    <= '0;
      q      <= '0;
      e      <= '0;
    end else begin
      if (load) begin
        zero_q <= (divisor <= 0);
        m_q    <= m_d;
        e_q    <= 8'(p_d + 1 + NF - 2 * int'(FW));   // D = m * 2^(p+1-FW)
      end
      if (seed)      x_q <= T1 - (m_q <<< 1);
      else if (iter) x_q <= x_step;
      if (out) begin
        q <= zero_q ? FX_ZERO : x_q;
        e <= zero_q ? 8'sd0   : e_q;
      end
    end
  end

endmodule

// sample_buffer: block RAM that holds antenna sample sets written by a host,
// plus the sequencer that streams them into the systolic array and stores the
// beam outputs back into a second region of the same RAM.
//
// In the intended system a soft processor receives the samples from a PC,
// converts them to fixed point and places them in block RAM; when the array is
// ready for data it signals the processor, the data are routed from the RAM
// to the array, and the results are stored in a different section of the RAM.
// This module is that data path with the processor reduced to a plain memory
// port: the RAM layout, the handshake and the streaming rule are this design's
// choices.
//
// Memory map (DW-bit words):
//   set n, antenna k, real part  : 2*K*n + 2*k
//   set n, antenna k, imag part  : 2*K*n + 2*k + 1
//   result e(n) real / imag part : OUT_BASE + 2*n / OUT_BASE + 2*n + 1
// with OUT_BASE = 2*K*MAX_SETS. The default of 200 sets of three complex
// samples is the 1200 real numbers named for one run.
//
// Operation: the host writes the sets through port A, then pulses 'start' with
// 'num_sets'. 'busy' rises and 'run' keeps the array beating. In each beat the
// sequencer reads the next set through port B in phases 1..2K into a staging
// register, offers it on the array's input (taken on the commit cycle), and,
// when the array's output carries a result, writes it to the result region in
// phases 2K+2 and 2K+3. After the last sample bubbles are fed until all
// num_sets results are stored; then 'busy' falls and 'done' pulses (the
// notification to the host). Host reads have one cycle of latency.
// Only the phase and commit fields of ctrl are used here; lint reports the
// other strobes as unused.
module sample_buffer
  import mvdr_pkg::*;
#(
  parameter int K        = 3,
  parameter int MAX_SETS = 200,
  parameter int OUT_BASE = 2 * K * MAX_SETS,
  parameter int DEPTH    = OUT_BASE + 2 * MAX_SETS,
  parameter int AW       = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // host port (port A)
  input  logic             host_en,
  input  logic             host_we,
  input  logic [AW-1:0]    host_addr,
  input  fx_t              host_wdata,
  output fx_t              host_rdata,
  // job control
  input  logic             start,
  input  logic [15:0]      num_sets,
  output logic             busy,
  output logic             done,
  // array side
  input  beat_ctrl_t       ctrl,
  input  logic             in_take,
  input  smp_t             e_in,
  output logic             run,
  output logic             arr_valid,
  output cpx_t             arr_u [K]
);

  fx_t mem [DEPTH];

  // ------------------------------------------------------------- sequencer
  logic [15:0] n_sets_q, rd_n, wr_n;
  logic        rd_pend;          // a read issued last cycle
  logic [$clog2(2*K+1)-1:0] rd_idx_q;
  fx_t         stage [2*K];
  logic        stage_valid;
  fx_t         rd_data;

  int   ph;
  logic rd_now, wr_re, wr_im;
  logic [AW-1:0] b_addr;
  fx_t           b_wdata;

  always_comb begin
    ph     = int'(ctrl.phase);
    rd_now = busy && !ctrl.commit && (ph >= 1) && (ph <= 2*K) &&
             !stage_valid && (rd_n < n_sets_q);
    wr_re  = busy && (ph == 2*K + 2) && e_in.valid && (rd_n != wr_n);
    wr_im  = busy && (ph == 2*K + 3) && e_in.valid && (rd_n != wr_n);
    b_addr  = '0;
    b_wdata = '0;
    if (rd_now)     b_addr = AW'(2*K*int'(rd_n) + ph - 1);
    else if (wr_re) begin b_addr = AW'(OUT_BASE + 2*int'(wr_n));     b_wdata = e_in.v.re; end
    else if (wr_im) begin b_addr = AW'(OUT_BASE + 2*int'(wr_n) + 1); b_wdata = e_in.v.im; end
  end

  // ------------------------------------------------------------- RAM
  // True dual-port: port A for the host, port B for the sequencer.
  always_ff @(posedge clk) begin
    if (host_en) begin
      if (host_we) mem[host_addr] <= host_wdata;
      host_rdata <= mem[host_addr];
    end
    if (wr_re || wr_im) mem[b_addr] <= b_wdata;
    rd_data <= mem[b_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_sets_q    <= '0;
      rd_n        <= '0;
      wr_n        <= '0;
      rd_pend     <= 1'b0;
      rd_idx_q    <= '0;
      stage_valid <= 1'b0;
      busy        <= 1'b0;
      done        <= 1'b0;
      run         <= 1'b0;
      for (int w = 0; w < 2*K; w++) stage[w] <= '0;
    end else begin
      done    <= 1'b0;
      rd_pend <= rd_now;
      if (rd_now) rd_idx_q <= ($bits(rd_idx_q))'(ph - 1);
      if (rd_pend) begin
        stage[rd_idx_q] <= rd_data;
        if (int'(rd_idx_q) == 2*K - 1) stage_valid <= 1'b1;
      end
      if (start && !busy) begin
        n_sets_q    <= num_sets;
        rd_n        <= '0;
        wr_n        <= '0;
        stage_valid <= 1'b0;
        busy        <= (num_sets != 0);
        run         <= (num_sets != 0);
        done        <= (num_sets == 0);
      end else if (busy) begin
        if (in_take && stage_valid) begin
          stage_valid <= 1'b0;
          rd_n        <= rd_n + 1'b1;
        end
        if (wr_im) begin
          wr_n <= wr_n + 1'b1;
          if (wr_n + 1'b1 == n_sets_q) begin
            busy <= 1'b0;
            run  <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  assign arr_valid = stage_valid;
  for (genvar k = 0; k < K; k++) begin : g_u
    assign arr_u[k] = '{re: stage[2*k], im: stage[2*k+1]};
  end

  // At most MAX_SETS sets fit in the input region.
  assert property (@(posedge clk) disable iff (!rst_n) (start && !busy) |-> (num_sets <= 16'(MAX_SETS)))
    else $error("sample_buffer: num_sets exceeds MAX_SETS");

endmodule

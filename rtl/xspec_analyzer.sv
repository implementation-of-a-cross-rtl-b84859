// xspec_analyzer - FPGA part of a cross-spectrum FFT analyzer for
// cross-correlation phase-noise measurement.
//
// Two baseband channels A and B, each the output of an independent phase
// detector looking at the same device under test, arrive from a two-channel
// ADC at one sample pair per clock (125 MHz). An input mux chooses between
// them and an internal test signal generator. A cascade of NSTAGES
// decimate-by-10 filters (decimator10) produces the sample rates 125 MHz /
// 10^n, and stage n (xspec_stage) computes and averages the cross-spectrum
// X(k) conj(Y(k)) of 1024-sample frames at rate n, so that the stages
// together cover logarithmically spaced frequency decades with a constant
// number of bins per decade. Stages OVERLAP_FROM and above use 50 %
// overlapping frames. The output of the last decimator (125 Hz) is stored
// in a FIFO for software processing.
//
// Widths: stage n sees ADC_W + STAGE_GROW*n bit samples (each decimator
// keeps two more low bits); the accumulator sums of stage n are
// 2*(ADC_W + STAGE_GROW*n + LOG2N + 2) + 1 + GROW bits and are read back
// sign-extended to ACC_MAX_W bits.
// Host side: acc_start[n] restarts averaging of stage n over acc_n_avg
// frames; acc_done[n] reports completion; accumulated bin rd_bin of stage
// rd_stage appears on rd_re / rd_im one clock after it is addressed. The
// FIFO is popped with fifo_rd (its head is always visible). The processor
// that drives these ports, the ADC and the analog front end are outside
// this module. Single clock domain; rst is synchronous, active high.
module xspec_analyzer #(
  parameter int ADC_W        = 16,
  parameter int LOG2N        = 10,
  parameter int NSTAGES      = 6,
  parameter int OVERLAP_FROM = 3,
  parameter int STAGE_GROW   = 2,
  parameter int FIFO_DEPTH   = 1024,
  parameter int GROW         = 14,
  parameter int CNT_W        = GROW + 1,
  localparam int W_LAST      = ADC_W + STAGE_GROW * NSTAGES,
  localparam int ACC_MAX_W   = 2 * (ADC_W + STAGE_GROW * (NSTAGES - 1) + LOG2N + 2) + 1 + GROW,
  localparam int SEL_W       = (NSTAGES > 1) ? $clog2(NSTAGES) : 1
) (
  input  logic                              clk,
  input  logic                              rst,
  input  logic signed [ADC_W-1:0]           adc_a,
  input  logic signed [ADC_W-1:0]           adc_b,
  input  logic                              test_sel,
  input  logic [NSTAGES-1:0]                acc_start,
  input  logic [CNT_W-1:0]                  acc_n_avg,
  output logic [NSTAGES-1:0]                acc_busy,
  output logic [NSTAGES-1:0]                acc_done,
  output logic [NSTAGES-1:0][CNT_W-1:0]     acc_count,
  input  logic [SEL_W-1:0]                  rd_stage,
  input  logic [LOG2N-1:0]                  rd_bin,
  output logic signed [ACC_MAX_W-1:0]       rd_re,
  output logic signed [ACC_MAX_W-1:0]       rd_im,
  input  logic                              fifo_rd,
  output logic signed [W_LAST-1:0]          fifo_a,
  output logic signed [W_LAST-1:0]          fifo_b,
  output logic                              fifo_empty,
  output logic                              fifo_full,
  output logic [$clog2(FIFO_DEPTH):0]       fifo_level,
  output logic                              fifo_overflow
);
  localparam int WMAX = W_LAST;

  // Sample stream entering stage n (and decimator n); index NSTAGES is the
  // last decimator's output. Packed into WMAX-bit slots.
  logic                   s_valid [NSTAGES+1];
  logic signed [WMAX-1:0] s_a     [NSTAGES+1];
  logic signed [WMAX-1:0] s_b     [NSTAGES+1];

  logic signed [ADC_W-1:0] tst_a, tst_b, mux_a, mux_b;
  logic                    mux_valid;

  logic signed [ACC_MAX_W-1:0] st_re [NSTAGES];
  logic signed [ACC_MAX_W-1:0] st_im [NSTAGES];
  logic [SEL_W-1:0]            rd_stage_q;

  test_signal_gen #(.W(ADC_W)) u_testgen (
    .clk, .rst, .a(tst_a), .b(tst_b)
  );

  input_mux #(.W(ADC_W)) u_mux (
    .clk, .rst, .sel(test_sel), .adc_a, .adc_b, .tst_a, .tst_b,
    .a(mux_a), .b(mux_b), .valid(mux_valid)
  );

  assign s_valid[0] = mux_valid;
  assign s_a[0]     = WMAX'(mux_a);
  assign s_b[0]     = WMAX'(mux_b);

  for (genvar n = 0; n < NSTAGES; n++) begin : g_chain
    localparam int WI = ADC_W + STAGE_GROW * n;
    localparam int WO = WI + STAGE_GROW;
    localparam int WA = 2 * (WI + LOG2N + 2) + 1 + GROW;
    logic signed [WO-1:0] d_a, d_b;
    logic signed [WA-1:0] a_re, a_im;

    decimator10 #(.W_IN(WI), .W_OUT(WO)) u_dec (
      .clk, .rst, .in_valid(s_valid[n]), .in_a(WI'(s_a[n])), .in_b(WI'(s_b[n])),
      .out_valid(s_valid[n+1]), .out_a(d_a), .out_b(d_b)
    );
    assign s_a[n+1] = WMAX'(d_a);
    assign s_b[n+1] = WMAX'(d_b);

    xspec_stage #(.W(WI), .LOG2N(LOG2N), .OVERLAP(n >= OVERLAP_FROM),
                  .GROW(GROW), .CNT_W(CNT_W)) u_stage (
      .clk, .rst, .in_valid(s_valid[n]), .in_a(WI'(s_a[n])), .in_b(WI'(s_b[n])),
      .start(acc_start[n]), .n_avg(acc_n_avg),
      .busy(acc_busy[n]), .done(acc_done[n]), .count(acc_count[n]),
      .rd_addr(rd_bin), .rd_re(a_re), .rd_im(a_im)
    );
    assign st_re[n] = ACC_MAX_W'(a_re);
    assign st_im[n] = ACC_MAX_W'(a_im);
  end

  // The accumulators answer one clock after rd_bin; select with the stage
  // number of that same clock.
  always_ff @(posedge clk) rd_stage_q <= rd_stage;
  assign rd_re = st_re[rd_stage_q];
  assign rd_im = st_im[rd_stage_q];

  logic [2*W_LAST-1:0] fifo_dout;
  sample_fifo #(.W(2 * W_LAST), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .wr(s_valid[NSTAGES]), .din({s_a[NSTAGES], s_b[NSTAGES]}),
    .rd(fifo_rd), .dout(fifo_dout), .empty(fifo_empty), .full(fifo_full),
    .level(fifo_level), .overflow(fifo_overflow)
  );
  assign fifo_a = fifo_dout[2*W_LAST-1:W_LAST];
  assign fifo_b = fifo_dout[W_LAST-1:0];
endmodule

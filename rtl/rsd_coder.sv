// rsd_coder: N-stage pipelined RSD coder for a binary-weighted DAC.
//
// The N-bit two's-complement input word x is read as the fraction
//     D_in = (2x + 1) / 2^N,
// which lies strictly inside (-1, 1) and is symmetric about zero.  A cascade
// of N rsd_stage blocks turns D_in into N signed digits S_1..S_N, S_1 being
// the most significant, such that exactly
//     D_in = sum_{j=1..N} S_j * 2^-j      (the last residue is always 0).
// Every stage sits in its own pipeline step: the residue is registered after
// each stage, and each digit is delayed by a shift register so that all N
// digits of one input word leave the coder on the same clock edge.
//
// Interface:
//   din     input word, one new word every clock cycle
//   alpha   decision level, alpha/2^N; 2^(N-1) is alpha = 0.5, 0 gives plain
//           binary coding.  Values above 0.5 are clipped to 0.5.
//   s[b]    digit of weight 2^b (in units of the smallest cell): s[N-1] is
//           S_1 from the first stage, s[0] is S_N from the last stage.
// Timing: the digits of the word presented at din before clock edge k appear
// on s just after edge k + N - 1 (latency N cycles, throughput one word per
// cycle).  For the first N cycles after reset, while the pipeline still
// holds no sample, a valid flag travelling with each word forces the digits
// to 0.  alpha is sampled by each stage when that stage processes the
// word, so a change of alpha takes full effect N cycles later.  rst_n is an
// asynchronous active-low reset that clears the pipeline to the digit 0.
//
// The cascade of stages and the decision rule follow the RSD DAC scheme;
// the (2x+1) input mapping, the registering after every stage, the digit
// alignment, the clipping of alpha, the reset value and the flush flag are this design's
// own.
module rsd_coder
  import rsd_pkg::*;
#(
  parameter int unsigned N = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [N-1:0] din,
  input  logic        [N-1:0] alpha,
  output rsd_digit_e          s [N]
);

  localparam logic [N-1:0] ALPHA_MAX = (N)'(1) << (N - 1);

  logic        [N-1:0] alpha_eff;
  logic signed [N:0]   d_q [N];      // d_q[j] = D_{j+1}, the input of stage j (0-based)
  logic signed [N:0]   d_nx [N];     // residue out of stage j
  rsd_digit_e          s_nx [N];     // digit out of stage j
  logic        [N-1:0] range_err;
  logic        [N-1:0] v_q;          // v_q[j]: the word in stage j is a real sample

  assign alpha_eff = (alpha > ALPHA_MAX) ? ALPHA_MAX : alpha;
  assign d_q[0]    = {din, 1'b1};
  assign v_q[0]    = 1'b1;

  for (genvar j = 0; j < N; j++) begin : g_stage
    rsd_stage #(.F(N)) u_stage (
      .d_in     (d_q[j]),
      .alpha    (alpha_eff),
      .s_out    (s_nx[j]),
      .d_out    (d_nx[j]),
      .range_err(range_err[j])
    );

    if (j < N - 1) begin : g_res
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) begin
          d_q[j+1] <= '0;
          v_q[j+1] <= 1'b0;
        end else begin
          d_q[j+1] <= d_nx[j];
          v_q[j+1] <= v_q[j];
        end
    end

    // Stage j decides one cycle after the previous stage; its digit waits
    // N-1-j extra cycles so that all digits of a word leave together.
    localparam int unsigned DEPTH = N - j;
    rsd_digit_e dly [DEPTH];

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        for (int k = 0; k < DEPTH; k++) dly[k] <= S_ZERO;
      end else begin
        dly[0] <= v_q[j] ? s_nx[j] : S_ZERO;
        for (int k = 1; k < DEPTH; k++) dly[k] <= dly[k-1];
      end

    assign s[N-1-j] = dly[DEPTH-1];
  end

  // With alpha clipped to [0, 0.5] every residue of a real sample stays
  // inside (-1, 1), and the residue after the last stage is exactly zero.
  a_range : assert property (@(posedge clk) disable iff (!rst_n) (range_err & v_q) == '0);
  a_exact : assert property (@(posedge clk) disable iff (!rst_n) v_q[N-1] |-> d_nx[N-1] == '0);

endmodule

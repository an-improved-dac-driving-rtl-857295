// rsd_dac: binary-weighted current-steering DAC driven by RSD coding.
//
// A binary-weighted DAC switches its largest cells even for small signals,
// because a small positive and a small negative sample differ in every bit.
// Here the input word is first recoded into N redundant signed digits
// (-1, 0, +1) by a pipeline of decision stages.  A digit of 0 leaves its
// cell's net contribution at zero, and small samples get zero digits in all
// the large cells, so those cells stop toggling and their errors stay out of
// the output.  Each cell is built from two half-weight sources so that it can
// deliver +I, 0 or -I.
//
//   din --> rsd_coder (N stages, N cycles) --> switch_driver (1 cycle)
//       --> sw_a / sw_b --> current_steering_array (behavioural) --> v_out
//
// Interface: one N-bit two's-complement sample x per clock on din; the
// differential output is v_out = R_L * I_LSB * (2x + 1), i.e. x mapped onto a
// scale that is symmetric about zero and never lands on 0.  alpha is the decision level
// (alpha/2^N, 2^(N-1) = 0.5, the value used in the measured prototype);
// alpha = 0 selects conventional binary coding.  Latency from din to the
// switches is N + 1 clock cycles.  rst_n is asynchronous, active low; during
// reset all cells sit in their zero state.  sw_a/sw_b are the digital
// switch controls of the array, i_pos/i_neg/v_out come from its model
// (per-clock averages).  REL_ERR_PPM and SKEW_PPM pass static and dynamic
// source errors to that model; both default to an ideal array.
//
// The partitioning follows the RSD DAC scheme; the number format, the
// latencies and the reset state are this design's own choices.
module rsd_dac
  import rsd_pkg::*;
#(
  parameter int unsigned N           = 12,
  parameter real         I_LSB       = 20.0e-3 / 4095.0,
  parameter real         R_L         = 50.0,
  parameter int          REL_ERR_PPM [2*N] = '{default: 0},
  parameter int          SKEW_PPM    [2*N] = '{default: 0}
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [N-1:0] din,
  input  logic        [N-1:0] alpha,
  output logic        [N-1:0] sw_a,
  output logic        [N-1:0] sw_b,
  output real                 i_pos,
  output real                 i_neg,
  output real                 v_out
);

  rsd_digit_e s [N];

  rsd_coder #(.N(N)) u_coder (
    .clk  (clk),
    .rst_n(rst_n),
    .din  (din),
    .alpha(alpha),
    .s    (s)
  );

  switch_driver #(.N(N)) u_drv (
    .clk  (clk),
    .rst_n(rst_n),
    .s    (s),
    .sw_a (sw_a),
    .sw_b (sw_b)
  );

  current_steering_array #(
    .N          (N),
    .I_LSB      (I_LSB),
    .R_L        (R_L),
    .REL_ERR_PPM(REL_ERR_PPM),
    .SKEW_PPM   (SKEW_PPM)
  ) u_array (
    .clk  (clk),
    .sw_a (sw_a),
    .sw_b (sw_b),
    .i_pos(i_pos),
    .i_neg(i_neg),
    .v_out(v_out)
  );

endmodule

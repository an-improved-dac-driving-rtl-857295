// rsd_stage: one stage of the RSD selection logic (purely combinational).
//
// The stage receives the residue D_j, a fraction in [-1, 1), and the
// decision level alpha.  It decides
//     S_j = +1  when  alpha <= D_j
//     S_j =  0  when -alpha <  D_j < alpha
//     S_j = -1  when  D_j <= -alpha
// and passes on the residue D_{j+1} = 2*D_j - S_j to the next stage.  With
// alpha = 0 the middle band is empty and the stage is an ordinary binary
// selection stage (S_j = +1 for D_j >= 0, -1 otherwise).  The rule and the
// residue equation follow the RSD coding scheme; the fixed-point format is
// this design's choice.
//
// Number format: D_j = d_in / 2^F, d_in an (F+1)-bit two's-complement
// integer.  alpha = alpha / 2^F, unsigned, valid for 0 .. 2^(F-1) (that is
// 0 <= alpha <= 0.5, the range over which the coding is exact).  For any
// alpha in that range and D_j in (-1, 1) the new residue stays in (-1, 1),
// so d_out has the same format as d_in; the caller keeps alpha in range.
// range_err flags a residue that did not fit (only possible when that rule
// is broken) so that the parent can check it.
//
// Timing: no clock; the stage is registered by its parent (rsd_coder).
module rsd_stage
  import rsd_pkg::*;
#(
  parameter int unsigned F = 12
) (
  input  logic signed [F:0]   d_in,
  input  logic        [F-1:0] alpha,
  output rsd_digit_e          s_out,
  output logic signed [F:0]   d_out,
  output logic                range_err   // residue left [-1, 1): alpha out of range
);

  localparam logic signed [F+1:0] ONE = (F+2)'(1) <<< F;  // 1.0 in the wide format

  logic signed [F+1:0] d_w, a_pos, a_neg, twice, res;

  always_comb begin
    d_w   = (F+2)'(d_in);
    a_pos = signed'({2'b00, alpha});
    a_neg = -a_pos;
    twice = {d_in, 1'b0};

    if (d_w >= a_pos) begin
      s_out = S_POS;
      res   = twice - ONE;
    end else if (d_w <= a_neg) begin
      s_out = S_NEG;
      res   = twice + ONE;
    end else begin
      s_out = S_ZERO;
      res   = twice;
    end

    // In range the top two bits of res are equal; drop the redundant one.
    d_out     = res[F:0];
    range_err = res[F+1] != res[F];
  end

endmodule

// current_steering_array: behavioural model (not synthesizable) of the
// analog binary-weighted current-steering array.
//
// For every weight b = 0..N-1 there are two current sources of
// I_LSB * 2^b / 2 each, so the cell of weight b carries I_LSB * 2^b in all,
// I_LSB being the current of the smallest cell.  Switch control 1 steers a
// source into the positive load R_L, 0 into the matched negative load R'_L.
// The model reports both load currents and the differential output voltage
//     v_out = R_L * (i_pos - i_neg) = R_L * sum_b S_b * I_LSB * 2^b
// as averages over one clock period.
//
// Two kinds of source error can be modelled, both off by default:
//   REL_ERR_PPM[k]  static error: source k (A of weight b is k = 2b, B is
//                   k = 2b + 1) is off by this many ppm of its nominal value.
//   SKEW_PPM[k]     dynamic error: when source k is steered to the other load
//                   at a clock edge, it keeps feeding the old load for this
//                   fraction (ppm) of the following clock period.  The error
//                   is added to that period's average and is zero in periods
//                   in which the source does not move.
// clk must be the clock at whose rising edge the switch controls change; it
// only serves the dynamic error model.  Output impedance and settling are not
// modelled.
//
// The binary weighting, the split into half-weight sources and the output
// equation follow the RSD DAC scheme; that toggling a source injects its
// error is also the scheme's premise.  The default I_LSB gives 20 mA full
// scale for N = 12; R_L = 50 ohm and the two error models are this model's
// own.
module current_steering_array #(
  parameter int unsigned N           = 12,
  parameter real         I_LSB       = 20.0e-3 / 4095.0,
  parameter real         R_L         = 50.0,
  parameter int          REL_ERR_PPM [2*N] = '{default: 0},
  parameter int          SKEW_PPM    [2*N] = '{default: 0}
) (
  input  logic         clk,
  input  logic [N-1:0] sw_a,
  input  logic [N-1:0] sw_b,
  output real          i_pos,
  output real          i_neg,
  output real          v_out
);

  real          src [2*N];    // actual current of each half source
  logic [2*N-1:0] pos_now, pos_old;

  always_comb begin
    for (int k = 0; k < 2 * N; k++)
      src[k] = 0.5 * I_LSB * real'(64'(1) << (k / 2)) * (1.0 + 1.0e-6 * real'(REL_ERR_PPM[k]));
  end

  // Source k feeds the positive load when pos_now[k] is 1.
  always_comb begin
    for (int b = 0; b < N; b++) begin
      pos_now[2*b]   = sw_a[b];
      pos_now[2*b+1] = sw_b[b];
    end
  end

  // Routing before the most recent clock edge (sampled ahead of the update).
  initial pos_old = '0;
  always @(posedge clk) pos_old <= pos_now;

  always_comb begin
    real late;
    i_pos = 0.0;
    i_neg = 0.0;
    for (int k = 0; k < 2 * N; k++) begin
      late = src[k] * 1.0e-6 * real'(SKEW_PPM[k]);
      if (pos_now[k]) i_pos += src[k];
      else            i_neg += src[k];
      if (pos_now[k] != pos_old[k]) begin
        if (pos_old[k]) begin i_pos += late; i_neg -= late; end
        else            begin i_neg += late; i_pos -= late; end
      end
    end
    v_out = R_L * (i_pos - i_neg);
  end

endmodule

// tb_rsd_dac: end-to-end test of the RSD DAC at its default size (N = 12,
// 20 mA full scale, 50 ohm loads, ideal sources).
//
// A stream of words, one per clock, passes through coder, switch drivers and
// the array model.  N + 1 cycles after each word the differential output
// must be exactly R_L * I_LSB * (2x + 1), whatever the coding.  The run goes
// through these phases, each counted and required to occur:
//   - reset: all cell pairs in the zero state, output 0 V;
//   - binary coding (alpha = 0) on small signals: the largest cell toggles;
//   - RSD coding (alpha = 0.5) on the same small signals: the two largest
//     cells stay in their zero state and never toggle;
//   - RSD coding on full-range random words, which uses those cells;
//   - a switch of alpha while the stream runs, and an out-of-range alpha,
//     which must behave as 0.5.
module tb_rsd_dac;

  localparam int  N     = 12;
  localparam int  LAT   = N + 1;
  localparam real I_LSB = 20.0e-3 / 4095.0;
  localparam real R_L   = 50.0;
  localparam int  T     = 8000;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic signed [N-1:0] din = '0;
  logic        [N-1:0] alpha = '0;
  logic        [N-1:0] sw_a, sw_b;
  real                 i_pos, i_neg, v_out;

  int checks = 0, failures = 0;
  int hist_x [T];
  int phase_of [T];
  int n_phase [6];           // words checked per phase
  int msb_toggles [6];       // toggles of the two largest cells per phase
  int n_reset = 0, n_switch = 0;
  logic [1:0] last_a, last_b;

  rsd_dac dut (.*);

  always #2 clk = ~clk;

  initial begin
    repeat (T + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(real a, real b);
    return (a - b < 1.0e-9) && (b - a < 1.0e-9);
  endfunction

  // Phase of cycle t: 0 binary small, 1 RSD small, 2 RSD full range,
  // 3 RSD with out-of-range alpha, 4 binary full range, 5 RSD small again.
  function automatic int phase(int t);
    return (t / (T / 6)) % 6;
  endfunction

  initial begin
    int ph;
    repeat (3) @(posedge clk);
    @(negedge clk);
    checks++;
    n_reset++;
    if (!near(v_out, 0.0) || sw_a != '1 || sw_b != '0) begin
      failures++;
      $display("FAIL reset output %e", v_out);
    end
    rst_n  = 1'b1;
    last_a = sw_a[N-1:N-2];
    last_b = sw_b[N-1:N-2];
    for (int t = 0; t < T; t++) begin
      // Output now belongs to the word of cycle t - LAT.
      if (t >= LAT) begin
        int w;
        w = t - LAT;
        if (phase_of[w] == phase(t - 1) && phase_of[w] == phase_of[t - 1]) begin
          checks++;
          n_phase[phase_of[w]]++;
          if (!near(v_out, R_L * I_LSB * real'(2 * hist_x[w] + 1))) begin
            failures++;
            if (failures < 10) $display("FAIL word %0d x=%0d v_out=%f exp %f", w, hist_x[w], v_out,
                                        R_L * I_LSB * real'(2 * hist_x[w] + 1));
          end
          if (w > 0 && phase_of[w - 1] == phase_of[w] &&
              (sw_a[N-1:N-2] != last_a || sw_b[N-1:N-2] != last_b))
            msb_toggles[phase_of[w]]++;
        end
      end
      last_a = sw_a[N-1:N-2];
      last_b = sw_b[N-1:N-2];

      ph = phase(t);
      if (t > 0 && ph != phase(t - 1)) n_switch++;
      phase_of[t] = ph;
      case (ph)
        0, 1, 5: hist_x[t] = int'($urandom % 400) - 200;   // |D| < 0.1
        default: hist_x[t] = int'($urandom % 4096) - 2048;
      endcase
      case (ph)
        0, 4:    alpha = 12'd0;
        3:       alpha = 12'd3000;
        default: alpha = 12'd2048;
      endcase
      din = (N)'(hist_x[t]);
      @(negedge clk);
    end

    $display("words per phase: %0d %0d %0d %0d %0d %0d", n_phase[0], n_phase[1], n_phase[2],
             n_phase[3], n_phase[4], n_phase[5]);
    $display("toggles of the two largest cells: binary small %0d, rsd small %0d/%0d, rsd full %0d, binary full %0d",
             msb_toggles[0], msb_toggles[1], msb_toggles[5], msb_toggles[2], msb_toggles[4]);
    checks++;
    if (msb_toggles[1] != 0 || msb_toggles[5] != 0) begin
      failures++;
      $display("FAIL large cells toggled on small signals with RSD coding");
    end
    checks++;
    if (msb_toggles[0] == 0 || msb_toggles[2] == 0) begin
      failures++;
      $display("FAIL large cells never toggled where they must");
    end
    for (int p = 0; p < 6; p++) if (n_phase[p] == 0) begin
      failures++;
      $display("FAIL phase %0d never checked", p);
    end
    if (n_reset == 0 || n_switch < 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

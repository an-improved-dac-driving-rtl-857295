// tb_rsd_coder: streaming check of the N = 12 RSD coder.
//
// A new word enters every cycle.  The digits of each word must appear
// exactly N cycles later (latency and one-word-per-cycle throughput), must
// equal a real-arithmetic model of the stage cascade, and must add up to the
// input exactly: sum_b S_b 2^b = 2x + 1.  The decision level is switched
// between 0.5 (the measured setting), 0.25, 0 (binary coding), random levels
// and an out-of-range level that must act as 0.5.  Words only near alpha
// changes, whose stages saw different levels, are not compared.  Also
// checked: zero digits right after reset, the small-signal example of an
// input near alpha/3 (the two largest digits are 0), and that binary coding
// reproduces the offset-binary bits of the input.  Each of these situations
// is counted and must occur.
module tb_rsd_coder;
  import rsd_pkg::*;

  localparam int N  = 12;
  localparam int T  = 6000;   // cycles of stimulus
  localparam int SEG = 400;   // cycles per decision level

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic signed [N-1:0] din = '0;
  logic        [N-1:0] alpha = '0;
  rsd_digit_e          s [N];

  int checks = 0, failures = 0;
  int n_reset = 0, n_small_zero = 0, n_binary = 0, n_clip = 0, n_rsd = 0, n_zero_digit = 0;

  int hist_x [T];
  int hist_a [T];

  rsd_coder #(.N(N)) dut (.*);

  always #2 clk = ~clk;

  initial begin
    repeat (T + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Digits of word x at level a (a/2^N), from the decision rule in reals.
  task automatic ref_digits(int x, int a, output int sd [N]);
    real d, ar;
    ar = real'(a > 2048 ? 2048 : a) / 4096.0;
    d  = real'(2 * x + 1) / 4096.0;
    for (int j = 0; j < N; j++) begin
      if (d >= ar)       sd[N-1-j] = 1;
      else if (d <= -ar) sd[N-1-j] = -1;
      else               sd[N-1-j] = 0;
      d = 2.0 * d - real'(sd[N-1-j]);
    end
  endtask

  function automatic int pick_level(int seg);
    case (seg % 6)
      0: return 2048;
      1: return 1024;
      2: return 0;
      3: return 4095;
      4: return 1 + int'($urandom % 2047);
      default: return 2048;
    endcase
  endfunction

  // Word whose value (2x+1)/2^N is closest to alpha/3, as in the
  // small-signal example (alpha is clipped to 0.5 as in the coder).
  function automatic int third_of(int a);
    return ((a > 2048 ? 2048 : a) / 3 - 1) / 2;
  endfunction

  function automatic int pick_word(int t, int a);
    case ($urandom % 5)
      0: return int'($urandom % 4096) - 2048;
      1: return int'($urandom % 128) - 64;
      2: return third_of(a);
      3: return int'($urandom % 16) - 8;
      default: return (t % 2) ? 2047 : -2048;
    endcase
  endfunction

  task automatic check_word(int t);
    int sd [N];
    int sum, u;
    bit same_level, ok;
    same_level = 1'b1;
    for (int k = t; k < t + N; k++) if (hist_a[k] != hist_a[t]) same_level = 1'b0;
    if (!same_level) return;
    ref_digits(hist_x[t], hist_a[t], sd);
    ok  = 1'b1;
    sum = 0;
    for (int b = 0; b < N; b++) begin
      if (digit_value(s[b]) != sd[b]) ok = 1'b0;
      sum += digit_value(s[b]) * (1 << b);
      if (digit_value(s[b]) == 0) n_zero_digit++;
    end
    checks++;
    if (!ok || sum != 2 * hist_x[t] + 1) begin
      failures++;
      if (failures < 10) $display("FAIL word %0d x=%0d alpha=%0d sum=%0d", t, hist_x[t], hist_a[t], sum);
    end
    if (hist_a[t] == 0) begin
      // Binary coding: digit b is +1 exactly where the offset-binary bit is 1.
      u  = hist_x[t] + 2048;
      ok = 1'b1;
      for (int b = 0; b < N; b++) if (digit_value(s[b]) != (u[b] ? 1 : -1)) ok = 1'b0;
      checks++;
      n_binary++;
      if (!ok) begin
        failures++;
        $display("FAIL binary word x=%0d", hist_x[t]);
      end
    end else begin
      n_rsd++;
      if (hist_a[t] > 2048) n_clip++;
      if (hist_a[t] >= 64 && hist_x[t] == third_of(hist_a[t])) begin
        checks++;
        n_small_zero++;
        if (s[N-1] != S_ZERO || s[N-2] != S_ZERO) begin
          failures++;
          $display("FAIL alpha/3 example: S1=%0d S2=%0d", digit_value(s[N-1]), digit_value(s[N-2]));
        end
      end
    end
  endtask

  initial begin
    alpha = 12'd0;               // worst case for the flush: binary coding
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < T; t++) begin
      // Outputs now reflect the clock edge before word t is sampled: they
      // belong to word t - N.
      if (t >= N) check_word(t - N);
      else if (t < N) begin
        checks++;
        n_reset++;
        for (int b = 0; b < N; b++)
          if (s[b] != S_ZERO) begin
            failures++;
            $display("FAIL digit %0d not zero %0d cycles after reset", b, t);
            break;
          end
      end
      hist_a[t] = (t < SEG) ? 0 : pick_level(t / SEG);
      hist_x[t] = pick_word(t, hist_a[t]);
      alpha = (N)'(hist_a[t]);
      din   = (N)'(hist_x[t]);
      @(negedge clk);
    end
    $display("words: rsd %0d binary %0d clipped-alpha %0d alpha/3 %0d zero digits %0d reset %0d",
             n_rsd, n_binary, n_clip, n_small_zero, n_zero_digit, n_reset);
    if (n_rsd == 0 || n_binary == 0 || n_clip == 0 || n_small_zero == 0 || n_zero_digit == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

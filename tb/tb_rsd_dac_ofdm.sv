// tb_rsd_dac_ofdm: multitone (OFDM-like) workload, binary versus RSD coding.
//
// Stimulus: 96 equal carriers on a grid of 250 MHz / 600 (about 417 kHz)
// at a 250 MS/s sample rate, 24 of them from 5 to 15 MHz (bins 12..35) and
// 72 from 20 to 50 MHz (bins 48..119), with pseudo-random phases.  Their sum
// is scaled to an rms value of 1/6 of full scale and quantised to 12 bits.
// The band between 15 and 20 MHz carries no tone; the power that leaks into
// it measures the distortion (missing tone power ratio, MTPR = mean carrier
// power over the largest empty-bin power).
//
// Five copies of the DAC convert one 600-sample period:
//   ideal            : RSD coding, ideal sources; its output must be exact;
//   bin_st / rsd_st  : alpha = 0 / alpha = 0.5, with static source errors;
//   bin_dy / rsd_dy  : alpha = 0 / alpha = 0.5, with switching-time errors;
//   q_dy             : alpha = 0.25, with switching-time errors (printed only).
// The static errors are independent per half source, with a spread that
// shrinks as one over the square root of the source size (0.28% for a half
// source of the largest cell), which stands for an array matched to about
// 8 bits.  The switching-time errors are independent per source, with a
// spread of 1% of a clock period (a negative value means early).  Both
// tables were drawn once from a normal distribution and are fixed here.
// The test requires the RSD copies to toggle their two largest cells less
// often than the binary ones, and RSD coding to raise the MTPR when the
// switching errors dominate; it prints all MTPR figures.  The carrier grid,
// the error tables and the phases are this test's own choices.
module tb_rsd_dac_ofdm;

  localparam int  N     = 12;
  localparam int  LAT   = N + 1;
  localparam int  P     = 600;           // samples per period
  localparam real I_LSB = 20.0e-3 / 4095.0;
  localparam real R_L   = 50.0;
  localparam real PI    = 3.14159265358979323846;

  // Static error (ppm) of source A / B of each weight, index 2b / 2b+1.
  localparam int ERR [2*N] = '{
    -32771, -28956, -84222, 100695, 66397, 25279, -75439, 22929,
    -54154, -28484,   6915,  11795,  4942, -10584,  6301,  -7022,
     -2754,   5059,  -2532,  -2947, -3234,   1707,   137,  -5701};
  // Switching-time error (ppm of a clock period) of each source.
  localparam int SKEW [2*N] = '{
      5114,  -3151,  -2133,   4241,  2489,   1853,  8553,   4988,
    -17439,  -4682,   -459,  -6422,  3942,  17175, 11970,  -7395,
     -1064,   2484,  -9569,  12209,  2448, -14897, 13062,  -3216};

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic signed [N-1:0] din = '0;
  localparam logic [N-1:0] A_BIN = 12'd0, A_RSD = 12'd2048, A_QTR = 12'd1024;

  // Index: 0 ideal, 1 bin_st, 2 rsd_st, 3 bin_dy, 4 rsd_dy, 5 q_dy.
  logic [N-1:0] sw_a [6], sw_b [6];
  real          ip [6], in_ [6], v [6];

  rsd_dac #(.N(N)) u_ideal (
    .clk(clk), .rst_n(rst_n), .din(din), .alpha(A_RSD),
    .sw_a(sw_a[0]), .sw_b(sw_b[0]), .i_pos(ip[0]), .i_neg(in_[0]), .v_out(v[0]));
  rsd_dac #(.N(N), .REL_ERR_PPM(ERR)) u_bin_st (
    .clk(clk), .rst_n(rst_n), .din(din), .alpha(A_BIN),
    .sw_a(sw_a[1]), .sw_b(sw_b[1]), .i_pos(ip[1]), .i_neg(in_[1]), .v_out(v[1]));
  rsd_dac #(.N(N), .REL_ERR_PPM(ERR)) u_rsd_st (
    .clk(clk), .rst_n(rst_n), .din(din), .alpha(A_RSD),
    .sw_a(sw_a[2]), .sw_b(sw_b[2]), .i_pos(ip[2]), .i_neg(in_[2]), .v_out(v[2]));
  rsd_dac #(.N(N), .SKEW_PPM(SKEW)) u_bin_dy (
    .clk(clk), .rst_n(rst_n), .din(din), .alpha(A_BIN),
    .sw_a(sw_a[3]), .sw_b(sw_b[3]), .i_pos(ip[3]), .i_neg(in_[3]), .v_out(v[3]));
  rsd_dac #(.N(N), .SKEW_PPM(SKEW)) u_rsd_dy (
    .clk(clk), .rst_n(rst_n), .din(din), .alpha(A_RSD),
    .sw_a(sw_a[4]), .sw_b(sw_b[4]), .i_pos(ip[4]), .i_neg(in_[4]), .v_out(v[4]));
  rsd_dac #(.N(N), .SKEW_PPM(SKEW)) u_q_dy (
    .clk(clk), .rst_n(rst_n), .din(din), .alpha(A_QTR),
    .sw_a(sw_a[5]), .sw_b(sw_b[5]), .i_pos(ip[5]), .i_neg(in_[5]), .v_out(v[5]));

  int  checks = 0, failures = 0;
  int  x [P];
  real y0 [P], y1 [P], y2 [P], y3 [P], y4 [P], y5 [P];
  real ctab [P], stab [P];
  int  tog_b = 0, tog_r = 0;
  real pwr_i = 0.0, pwr_q = 0.0;

  always #2 clk = ~clk;

  initial begin
    repeat (20 * P) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit is_carrier(int k);
    return (k >= 12 && k <= 35) || (k >= 48 && k <= 119);
  endfunction

  function automatic real bin_power(ref real y [P], input int k);
    real re = 0.0, im = 0.0;
    for (int n = 0; n < P; n++) begin
      re += y[n] * ctab[(k * n) % P];
      im -= y[n] * stab[(k * n) % P];
    end
    return re * re + im * im;
  endfunction

  task automatic mtpr(ref real y [P], output real db);
    real pc = 0.0, pm = 0.0, p;
    int  nc = 0;
    for (int k = 1; k < P / 2; k++) begin
      p = bin_power(y, k);
      if (is_carrier(k)) begin pc += p; nc++; end
      else if (k >= 37 && k <= 46 && p > pm) pm = p;
    end
    db = 10.0 * $log10((pc / nc) / pm);
  endtask

  initial begin
    real phase [120], acc, amp, rms, db [6];
    logic [1:0] la_b, lb_b, la_r, lb_r;

    for (int n = 0; n < P; n++) begin
      ctab[n] = $cos(2.0 * PI * n / P);
      stab[n] = $sin(2.0 * PI * n / P);
    end
    for (int k = 0; k < 120; k++) phase[k] = 2.0 * PI * real'($urandom % 10000) / 10000.0;
    // 96 tones of amplitude amp: rms = amp * sqrt(48) = 2048 / 6.
    amp = 2048.0 / 6.0 / $sqrt(48.0);
    rms = 0.0;
    for (int n = 0; n < P; n++) begin
      acc = 0.0;
      for (int k = 0; k < 120; k++)
        if (is_carrier(k)) acc += amp * $cos(2.0 * PI * k * n / P + phase[k]);
      x[n] = int'($floor(acc));
      if (x[n] > 2047) x[n] = 2047;
      if (x[n] < -2048) x[n] = -2048;
      rms += acc * acc;
    end
    $display("stimulus rms %0.1f LSB (full scale 2048)", $sqrt(rms / P));

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < P + LAT; t++) begin
      if (t >= LAT) begin
        int w;
        w = t - LAT;
        checks++;
        if (v[0] - R_L * I_LSB * real'(2 * x[w] + 1) > 1.0e-9 ||
            R_L * I_LSB * real'(2 * x[w] + 1) - v[0] > 1.0e-9) begin
          failures++;
          if (failures < 10) $display("FAIL sample %0d: %f", w, v[0]);
        end
        y0[w] = v[0]; y1[w] = v[1]; y2[w] = v[2]; y3[w] = v[3]; y4[w] = v[4]; y5[w] = v[5];
        if (w > 0) begin
          if (sw_a[1][N-1:N-2] != la_b || sw_b[1][N-1:N-2] != lb_b) tog_b++;
          if (sw_a[2][N-1:N-2] != la_r || sw_b[2][N-1:N-2] != lb_r) tog_r++;
        end
      end
      la_b = sw_a[1][N-1:N-2]; lb_b = sw_b[1][N-1:N-2];
      la_r = sw_a[2][N-1:N-2]; lb_r = sw_b[2][N-1:N-2];
      din = (N)'(x[t % P]);
      @(negedge clk);
    end

    mtpr(y0, db[0]);
    mtpr(y1, db[1]);
    mtpr(y2, db[2]);
    mtpr(y3, db[3]);
    mtpr(y4, db[4]);
    mtpr(y5, db[5]);
    $display("samples with a toggle of the two largest cells: binary %0d, rsd %0d of %0d", tog_b, tog_r, P);
    $display("MTPR ideal sources (12-bit quantisation only): %0.1f dB", db[0]);
    $display("MTPR static errors:    binary %0.1f dB, rsd %0.1f dB, difference %0.1f dB", db[1], db[2], db[2] - db[1]);
    $display("MTPR switching errors: binary %0.1f dB, rsd %0.1f dB, difference %0.1f dB", db[3], db[4], db[4] - db[3]);
    $display("MTPR switching errors, alpha = 0.25: %0.1f dB", db[5]);
    checks++;
    if (tog_r >= tog_b) begin
      failures++;
      $display("FAIL RSD coding did not reduce large-cell switching");
    end
    checks++;
    if (db[4] <= db[3]) begin
      failures++;
      $display("FAIL RSD coding did not improve the MTPR under switching errors");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

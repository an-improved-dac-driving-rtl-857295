// tb_rsd_stage: exhaustive check of one RSD selection stage.
//
// For F = 12 every input residue d_in (all 8192 codes) is applied with the
// decision levels 0 (binary coding), 0.25, 0.5 and a few random levels in
// between.  The expected digit and residue are worked out with real
// arithmetic straight from the decision rule (S = +1 for D >= alpha, -1 for
// D <= -alpha, 0 otherwise; D' = 2D - S).  Inputs whose residue would leave
// [-1, 1) must raise range_err instead; all others must not.
module tb_rsd_stage;
  import rsd_pkg::*;

  localparam int F = 12;

  logic signed [F:0]   d_in;
  logic        [F-1:0] alpha;
  rsd_digit_e          s_out;
  logic signed [F:0]   d_out;
  logic                range_err;

  int checks = 0, failures = 0;

  rsd_stage #(.F(F)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(int d, int a);
    real dr, ar, nr;
    int  se;
    bit  fits;
    d_in  = (F+1)'(d);
    alpha = F'(a);
    #1;
    dr = real'(d) / 4096.0;
    ar = real'(a) / 4096.0;
    if (dr >= ar)       se = 1;
    else if (dr <= -ar) se = -1;
    else                se = 0;
    nr   = 2.0 * dr - real'(se);
    fits = (nr >= -1.0) && (nr < 1.0);
    checks++;
    if (digit_value(s_out) != se || range_err != !fits ||
        (fits && real'(d_out) / 4096.0 != nr)) begin
      failures++;
      if (failures < 10)
        $display("FAIL d=%0d alpha=%0d: S=%0d (exp %0d) d_out=%0d (exp %f) err=%0b",
                 d, a, digit_value(s_out), se, d_out, nr * 4096.0, range_err);
    end
  endtask

  initial begin
    int levels [6];
    levels[0] = 0;
    levels[1] = 1024;
    levels[2] = 2048;
    levels[3] = 1;
    levels[4] = 1 + ($urandom % 2047);
    levels[5] = 1 + ($urandom % 2047);
    foreach (levels[i])
      for (int d = -4096; d < 4096; d++) check_one(d, levels[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

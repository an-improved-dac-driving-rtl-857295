// tb_current_steering_array: checks the behavioural current-steering array.
//
// Three instances see the same switch controls, which change at each rising
// clock edge as they would coming from the switch drivers:
//   ideal : no source errors;
//   stat  : source A of weight 11 is 1000 ppm high;
//   dyn   : source A of weight 11 switches late by 1% of a clock period.
// For random switch patterns the load currents must equal the binary weights
// of the steered half sources, computed here from the switch bits as
// integers; both loads together must carry the full scale of 20 mA; the
// output voltage must be R_L times their difference; and the two error
// instances must differ from the ideal one by exactly the modelled error.
module tb_current_steering_array;

  localparam int  N     = 12;
  localparam real I_LSB = 20.0e-3 / 4095.0;
  localparam real R_L   = 50.0;
  localparam int  ERR  [2*N] = '{22: 1000, default: 0};
  localparam int  SKEW [2*N] = '{22: 10000, default: 0};

  logic         clk = 1'b0;
  logic [N-1:0] sw_a = '0, sw_b = '0;
  real          i_pos, i_neg, v_out, e_pos, e_neg, e_vout, d_pos, d_neg, d_vout;

  int checks = 0, failures = 0, n_moves = 0;

  current_steering_array #(.N(N)) dut (.*);
  current_steering_array #(.N(N), .REL_ERR_PPM(ERR)) dut_err (
    .clk(clk), .sw_a(sw_a), .sw_b(sw_b), .i_pos(e_pos), .i_neg(e_neg), .v_out(e_vout));
  current_steering_array #(.N(N), .SKEW_PPM(SKEW)) dut_dyn (
    .clk(clk), .sw_a(sw_a), .sw_b(sw_b), .i_pos(d_pos), .i_neg(d_neg), .v_out(d_vout));

  always #2 clk = ~clk;

  function automatic bit near(real a, real b);
    return (a - b < 1.0e-12 * 50.0) && (b - a < 1.0e-12 * 50.0);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real exp_pos, exp_neg, big, late;
    int  units_pos;
    logic old_msb;
    old_msb = 1'b0;
    big  = 0.5 * I_LSB * 2048.0 * 1.0e-3;   // extra current of the static-error source
    late = 0.5 * I_LSB * 2048.0 * 1.0e-2;   // charge of the late source, per period
    @(negedge clk);
    for (int t = 0; t < 3000; t++) begin
      @(posedge clk);
      old_msb = sw_a[11];
      sw_a <= (t == 0) ? '1 : (t == 1) ? '0 : (N)'($urandom);
      sw_b <= (t == 0) ? '1 : (t == 1) ? '0 : (N)'($urandom);
      @(negedge clk);
      // Load current in units of I_LSB/2: each half of weight b is 2^b.
      units_pos = int'(sw_a) + int'(sw_b);
      exp_pos   = 0.5 * I_LSB * real'(units_pos);
      exp_neg   = I_LSB * 4095.0 - exp_pos;
      checks += 5;
      if (!near(i_pos, exp_pos) || !near(i_neg, exp_neg)) begin
        failures++;
        $display("FAIL currents a=%h b=%h pos=%e exp %e", sw_a, sw_b, i_pos, exp_pos);
      end
      if (!near(i_pos + i_neg, 20.0e-3)) failures++;
      if (!near(v_out, R_L * (exp_pos - exp_neg))) failures++;
      if (!near(e_pos - i_pos, sw_a[11] ? big : 0.0) || !near(e_neg - i_neg, sw_a[11] ? 0.0 : big)) begin
        failures++;
        $display("FAIL static error model a=%h diff=%e", sw_a, e_pos - i_pos);
      end
      if (old_msb != sw_a[11]) n_moves++;
      if (!near(d_pos - i_pos, (old_msb == sw_a[11]) ? 0.0 : (old_msb ? late : -late)) ||
          !near(d_pos + d_neg, 20.0e-3)) begin
        failures++;
        $display("FAIL dynamic error model t=%0d old=%0b new=%0b diff=%e", t, old_msb, sw_a[11], d_pos - i_pos);
      end
    end
    if (n_moves == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_switch_driver: checks the digit-to-switch mapping and its register.
//
// Random digit vectors are applied every cycle.  One cycle later every pair
// must carry the net current of its digit (sw_a + sw_b - 1 = S), use the
// documented half for the zero state (sw_a = 1, sw_b = 0), and during reset
// every pair must sit in the zero state.
module tb_switch_driver;
  import rsd_pkg::*;

  localparam int N = 12;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  rsd_digit_e   s [N];
  logic [N-1:0] sw_a, sw_b;

  int checks = 0, failures = 0;
  int n_pos = 0, n_zero = 0, n_neg = 0;

  switch_driver #(.N(N)) dut (.*);

  always #2 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev [N];
    foreach (s[b]) s[b] = S_POS;
    repeat (2) @(negedge clk);
    checks++;
    if (sw_a != '1 || sw_b != '0) begin
      failures++;
      $display("FAIL reset state a=%h b=%h", sw_a, sw_b);
    end
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      for (int b = 0; b < N; b++) begin
        case ($urandom % 3)
          0: s[b] = S_NEG;
          1: s[b] = S_ZERO;
          default: s[b] = S_POS;
        endcase
        prev[b] = digit_value(s[b]);
      end
      @(negedge clk);
      for (int b = 0; b < N; b++) begin
        checks++;
        if (int'(sw_a[b]) + int'(sw_b[b]) - 1 != prev[b] ||
            (prev[b] == 0 && !(sw_a[b] && !sw_b[b]))) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d b=%0d S=%0d a=%0b b=%0b", t, b, prev[b], sw_a[b], sw_b[b]);
        end
        if (prev[b] > 0) n_pos++; else if (prev[b] < 0) n_neg++; else n_zero++;
      end
    end
    if (n_pos == 0 || n_neg == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

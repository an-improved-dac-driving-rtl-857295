// switch_driver: turns RSD digits into current-source switch controls.
//
// Each digit of weight 2^b drives a pair of half-weight current sources
// (each 2^(b-1) units of the smallest full cell).  A switch control of 1
// steers its source into the positive load R_L, 0 into the negative load
// R'_L.  The pair delivers a differential current of +I, 0 or -I:
//     S = +1 : sw_a = 1, sw_b = 1   (both halves to R_L)
//     S =  0 : sw_a = 1, sw_b = 0   (one half each way, net zero)
//     S = -1 : sw_a = 0, sw_b = 0   (both halves to R'_L)
// With binary coding (no zero digits) the two halves always switch together
// and act as one full-weight cell.
//
// The outputs are registered so that all switches change on the same clock
// edge (latency one cycle).  rst_n is asynchronous, active low, and puts
// every pair in the zero state.  Splitting each cell into two halves follows
// the RSD DAC scheme; which half points where for S = 0, and the output
// register, are this design's choices.
module switch_driver
  import rsd_pkg::*;
#(
  parameter int unsigned N = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  rsd_digit_e   s [N],
  output logic [N-1:0] sw_a,
  output logic [N-1:0] sw_b
);

  logic [N-1:0] a_nx, b_nx;

  always_comb begin
    for (int b = 0; b < N; b++) begin
      case (s[b])
        S_POS:   begin a_nx[b] = 1'b1; b_nx[b] = 1'b1; end
        S_NEG:   begin a_nx[b] = 1'b0; b_nx[b] = 1'b0; end
        default: begin a_nx[b] = 1'b1; b_nx[b] = 1'b0; end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sw_a <= '1;
      sw_b <= '0;
    end else begin
      sw_a <= a_nx;
      sw_b <= b_nx;
    end

endmodule

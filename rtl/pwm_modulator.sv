// pwm_modulator: basic carrier-based PWM for the full bridges of NCH PESBs.
//
// A sawtooth counter runs over CARRIER_DIV clocks (100 MHz / 12500 = 8 kHz, the source's
// PWM frequency). In the last clock of each period the signed duty cycles (Q16.16, 1.0 = 65536,
// clamped to +-1) are latched for the next period. PESB m is active, inserting its module with the polarity of
// its duty cycle (state +1 or -1), while the counter is below |d_m| * CARRIER_DIV, and
// bypassed (state 0) for the rest of the period. period_start pulses in the first clock
// of every period. Sawtooth carrier, unipolar states and latching once per period are
// this design's choices; the source only names a basic 8 kHz modulator.
module pwm_modulator
  import hil_pkg::*;
#(
  parameter int NCH = 20,
  parameter int CARRIER_DIV = 12500
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fix_t              duty  [NCH],
  output logic signed [1:0] state [NCH],
  output logic              period_start
);
  localparam int CW = $clog2(CARRIER_DIV);

  logic [CW-1:0] cnt;
  logic [CW:0]   cmp_q [NCH];
  logic          neg_q [NCH];

  assign period_start = (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int m = 0; m < NCH; m++) begin cmp_q[m] <= '0; neg_q[m] <= 1'b0; end
    end else begin
      cnt <= (int'(cnt) == CARRIER_DIV - 1) ? '0 : cnt + 1'b1;
      if (int'(cnt) == CARRIER_DIV - 1) begin
        for (int m = 0; m < NCH; m++) begin
          fix_t d, a;
          d = fsat1(duty[m]);
          a = d[31] ? -d : d;
          cmp_q[m] <= (CW+1)'((64'(a) * 64'(CARRIER_DIV)) >>> 16);
          neg_q[m] <= d[31];
        end
      end
    end
  end

  // state follows the latched compare values of the running period
  always_comb begin
    for (int m = 0; m < NCH; m++) begin
      if ({1'b0, cnt} < cmp_q[m]) state[m] = neg_q[m] ? -2'sd1 : 2'sd1;
      else                                         state[m] = 2'sd0;
    end
  end
endmodule

// soc_balancer: SoC balancing of the PESBs within one converter arm.
//
// Each PESB m of the arm receives the duty cycle
//   d_m = (u_arm_ref / N) * (1 - PI(SoC_avg - SoC_m)) / U_PESB,m
// where SoC_avg is the mean SoC of the NCH modules handled here and N the number of PESBs
// the arm voltage is shared between. A module with more charge than the mean gets a larger
// share of the arm voltage and so discharges faster (valid while power flows into the AC
// grid, as in the source). The structure - 1/N, subtraction, PI, "1 -", product, division -
// follows the source's controller diagram; gains come in at run time.
//
// In the source this control runs as software on the controller under test. Here it is a
// sequential datapath: on start the inputs are sampled, then the modules are processed
// one after another, 52 clocks per module (PI step, start of a seq_div division, 50 clocks
// to its result); done pulses NCH*52+1 clocks after start, when all duty cycles are
// updated. The PI integrator is one register per module, forward Euler with ki = Ki * Ts,
// clamped to +-pi_lim; duty cycles are clamped to +-1. With NCH = 1 the PI term vanishes
// and the block divides the arm voltage evenly, which serves the arms represented by one
// averaged module.
module soc_balancer
  import hil_pkg::*;
#(
  parameter int NCH = 20,
  parameter int N_SERIES = 20
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fix_t u_arm_ref,
  input  fix_t soc    [NCH],
  input  fix_t u_pesb [NCH],
  input  fix_t kp,
  input  fix_t ki,
  input  fix_t pi_lim,
  output fix_t duty   [NCH],
  output fix_t soc_avg,
  output logic busy,
  output logic done
);
  localparam int   CHW   = (NCH > 1) ? $clog2(NCH) : 1;
  localparam fix_t INV_N = fix_t'((65536 + N_SERIES / 2) / N_SERIES);

  typedef enum logic [1:0] {IDLE, PI_STEP, DIVIDE} state_e;
  state_e st;

  fix_t           soc_q [NCH];
  fix_t           u_q   [NCH];
  fix_t           integ [NCH];
  fix_t           uref_n_q;   // u_arm_ref / N
  logic [CHW-1:0] ch;

  // mean SoC of the sampled vector
  logic signed [47:0] sum;
  fix_t               avg_n;
  always_comb begin
    sum = '0;
    for (int c = 0; c < NCH; c++) sum += 48'(soc[c]);
    avg_n = fix_t'(sum / 48'(NCH));
  end

  fix_t err, int_new, pi_out, num_n;
  always_comb begin
    err     = soc_avg - soc_q[ch];
    int_new = integ[ch] + fmul(ki, err);
    if (int_new > pi_lim)       int_new = pi_lim;
    else if (int_new < -pi_lim) int_new = -pi_lim;
    pi_out  = fmul(kp, err) + int_new;
    num_n   = fmul(uref_n_q, FIX_ONE - pi_out);
  end

  logic div_start, div_busy, div_done;
  fix_t div_num, div_q;
  seq_div u_div (.clk, .rst_n, .start(div_start), .num(div_num), .den(u_q[ch]),
                 .busy(div_busy), .done(div_done), .quo(div_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; ch <= '0; soc_avg <= '0; uref_n_q <= '0; done <= 1'b0;
      div_start <= 1'b0; div_num <= '0;
      for (int c = 0; c < NCH; c++) begin
        soc_q[c] <= '0; u_q[c] <= '0; integ[c] <= '0; duty[c] <= '0;
      end
    end else begin
      done      <= 1'b0;
      div_start <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          soc_q    <= soc;
          u_q      <= u_pesb;
          soc_avg  <= avg_n;
          uref_n_q <= fmul(u_arm_ref, INV_N);
          ch       <= '0;
          st       <= PI_STEP;
        end
        PI_STEP: begin
          integ[ch] <= int_new;
          div_num   <= num_n;
          div_start <= 1'b1;
          st        <= DIVIDE;
        end
        DIVIDE: if (div_done) begin
          duty[ch] <= fsat1(div_q);
          if (int'(ch) == NCH - 1) begin
            st   <= IDLE;
            done <= 1'b1;
          end else begin
            ch <= ch + 1'b1;
            st <= PI_STEP;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  assign busy = (st != IDLE);

  logic unused;
  assign unused = div_busy;
endmodule

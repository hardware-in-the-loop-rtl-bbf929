// seq_div: sequential signed fixed-point divider, quo = num / den in Q16.16.
//
// Restoring division of |num| << 16 by |den|, one quotient bit per clock (48 clocks), sign
// applied at the end. The result saturates to the Q16.16 range, and a zero divisor gives
// the largest value of the numerator's sign. start is taken when busy is low; done pulses
// for one clock with the result, 50 clocks after start.
module seq_div
  import hil_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fix_t num,
  input  fix_t den,
  output logic busy,
  output logic done,
  output fix_t quo
);
  localparam int NB = 48;

  logic [NB-1:0] dvd_q;    // dividend bits, shifted out MSB first
  logic [NB-1:0] q_q;
  logic [32:0]   rem_q;
  logic [31:0]   dvs_q;
  logic          neg_q, zero_q;
  logic [5:0]    cnt_q;
  logic          fin_q;

  logic [32:0] rem_sh;
  always_comb rem_sh = {rem_q[31:0], dvd_q[NB-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dvd_q <= '0; q_q <= '0; rem_q <= '0; dvs_q <= '0; neg_q <= 1'b0; zero_q <= 1'b0;
      cnt_q <= '0; busy <= 1'b0; done <= 1'b0; fin_q <= 1'b0; quo <= '0;
    end else begin
      done  <= 1'b0;
      fin_q <= 1'b0;
      if (start && !busy) begin
        dvd_q  <= {NB'(num[31] ? -64'(num) : 64'(num))} << 16;
        dvs_q  <= den[31] ? 32'(-den) : 32'(den);
        neg_q  <= num[31] ^ den[31];
        zero_q <= (den == '0);
        rem_q  <= '0;
        q_q    <= '0;
        cnt_q  <= '0;
        busy   <= 1'b1;
      end else if (busy && !fin_q) begin
        dvd_q <= dvd_q << 1;
        if (rem_sh >= {1'b0, dvs_q}) begin
          rem_q <= rem_sh - {1'b0, dvs_q};
          q_q   <= {q_q[NB-2:0], 1'b1};
        end else begin
          rem_q <= rem_sh;
          q_q   <= {q_q[NB-2:0], 1'b0};
        end
        if (int'(cnt_q) == NB - 1) fin_q <= 1'b1;
        cnt_q <= cnt_q + 1'b1;
      end
      if (fin_q) begin
        busy <= 1'b0;
        done <= 1'b1;
        if (zero_q || q_q[NB-1:31] != '0) quo <= neg_q ? 32'sh8000_0001 : 32'sh7fff_ffff;
        else                              quo <= neg_q ? -fix_t'(q_q[31:0]) : fix_t'(q_q[31:0]);
      end
    end
  end
endmodule

// battery_cell_model: FPGA-friendly lithium-ion cell model, first-order RC equivalent
// circuit, evaluated for NCH cells one after another with shared look-up tables.
//
//   U_cell = U_OCV(T, SoC) - R_i(T, I, SoC) * I - U_p
//   dU_p/dt = (R_p(T, I, SoC) * I - U_p) / tau(T, I, SoC)        (R_p || C_p, tau = R_p C_p)
//   dSoC/dt = -eta(T, sign I) * I / Q                             (Coulomb counting)
// I is positive when discharging. OCV is a 2D table, R_i and the polarization table
// {R_p, 1/tau} are 3D, the charge and discharge efficiencies are two 1D tables over
// temperature. All tables sit in block RAM (cell_lut_mem) and are addressed by a single
// centralized lut_index_calc; each 3D table is read at its 8 neighbouring entries one after
// another and interpolated trilinearly (the 2D and 1D tables at 4 and 2 of these reads,
// bilinearly and linearly). The SoC and U_p integrators are state of each individual cell
// and cannot be shared: they are arrays with one entry per channel ("parallel
// integrators"), which is what lets the same tables serve NCH modules.
//
// Pipeline: three stages of one 8-clock slot each - index calculation, table reads with
// multiply-accumulate interpolation, equivalent-circuit evaluation and integrator update.
// A new channel is accepted every 8 clocks (in_ready is high in the last clock of a slot),
// i.e. 12.5 MHz per cell at a 100 MHz clock as in the source. A result leaves 20 clocks
// after its input was accepted (out_valid for one clock). The slot length, the 20-clock
// latency (the source reports 270 ns for its implementation) and the number formats are
// this design's choices. The SoC used to address the tables is read when the channel enters
// stage 1; with NCH < 3 it can lag the integrator by one update.
//
// Number formats: signals Q16.16. SoC and U_p states are 64-bit with 48 fraction bits.
// ts (update period of one channel, seconds) and k_soc (= ts / (3600 * Q_cell[Ah]), one per
// channel so that cells of different state of health share the tables) are unsigned Q0.48
// in 32 bits. init loads soc0 into every SoC integrator, clears every U_p and drops the
// channels in flight (their results are not output).
module battery_cell_model
  import hil_pkg::*;
#(
  parameter int NCH  = 20,
  parameter int AUXW = 32,
  localparam int CHW = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  input  fix_t            soc0  [NCH],
  input  logic [31:0]     k_soc [NCH],
  input  logic [31:0]     ts,
  // table write port: sel 0 OCV, 1 R_i, 2 polarization {R_p, 1/tau}, 3 efficiency
  input  logic            lut_we,
  input  logic [1:0]      lut_sel,
  input  logic [8:0]      lut_addr,
  input  logic [63:0]     lut_wdata,
  // input stream
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [CHW-1:0]  in_ch,
  input  fix_t            in_cur,
  input  fix_t            in_temp,
  input  logic [AUXW-1:0] in_aux,
  // output stream
  output logic            out_valid,
  output logic [CHW-1:0]  out_ch,
  output fix_t            out_u,
  output fix_t            out_soc,
  output logic [AUXW-1:0] out_aux
);
  localparam int A3W = $clog2(NT * NI * NS);
  localparam int A2W = $clog2(NT * NS);
  localparam int A1W = $clog2(NT);

  typedef struct packed {
    logic            v;
    logic [CHW-1:0]  ch;
    fix_t            cur;
    fix_t            temp;
    logic [AUXW-1:0] aux;
  } ctx_t;

  // per-channel integrator states
  logic signed [63:0] soc_st [NCH];
  logic signed [63:0] up_st  [NCH];

  logic [2:0] ph;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ph <= '0;
    else        ph <= ph + 1'b1;

  assign in_ready = (ph == 3'd7);
  wire slot_end = (ph == 3'd7);

  // ---------------- stage 1: index calculation ----------------
  ctx_t s1;
  fix_t s1_soc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      s1_soc <= '0;
    end else if (init) begin
      s1.v <= 1'b0;
    end else if (slot_end) begin
      s1.v    <= in_valid;
      s1.ch   <= in_ch;
      s1.cur  <= in_cur;
      s1.temp <= in_temp;
      s1.aux  <= in_aux;
      s1_soc  <= (int'(in_ch) < NCH) ? fix_t'(soc_st[in_ch] >>> 32) : '0;
    end
  end

  frac_t          ic_ft, ic_fi, ic_fs;
  logic [A3W-1:0] ic_a3 [8];
  logic [A2W-1:0] ic_a2 [4];
  logic [A1W-1:0] ic_a1 [2];

  lut_index_calc u_idx (
    .clk(clk), .temp(s1.temp), .cur(s1.cur), .soc(s1_soc),
    .frac_t_o(ic_ft), .frac_i_o(ic_fi), .frac_s_o(ic_fs),
    .addr3(ic_a3), .addr2(ic_a2), .addr1(ic_a1)
  );

  // ---------------- stage 2: table reads and interpolation ----------------
  ctx_t           s2;
  frac_t          s2_ft, s2_fi, s2_fs;
  logic [A3W-1:0] s2_a3 [8];
  logic [A2W-1:0] s2_a2 [4];
  logic [A1W-1:0] s2_a1 [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2 <= '0;
      s2_ft <= '0; s2_fi <= '0; s2_fs <= '0;
      for (int k = 0; k < 8; k++) s2_a3[k] <= '0;
      for (int k = 0; k < 4; k++) s2_a2[k] <= '0;
      for (int k = 0; k < 2; k++) s2_a1[k] <= '0;
    end else if (init) begin
      s2.v <= 1'b0;
    end else if (slot_end) begin
      s2 <= s1;
      s2_ft <= ic_ft; s2_fi <= ic_fi; s2_fs <= ic_fs;
      s2_a3 <= ic_a3; s2_a2 <= ic_a2; s2_a1 <= ic_a1;
    end
  end

  // corner ph is read in clock ph of the slot
  wire [2:0] k = ph;
  logic [A3W-1:0] rd_a3;
  logic [A2W-1:0] rd_a2;
  logic [A1W+1-1:0] rd_a1;
  frac_t wt, wi, ws;
  logic [17:0] w3_n, w2_n, w1_n;
  logic        use2_n, use1_n;
  always_comb begin
    rd_a3  = s2_a3[k];
    rd_a2  = s2_a2[{k[2], k[0]}];
    rd_a1  = {s2.cur[31], A1W'(s2_a1[k[2]])};   // upper half: charging efficiency
    wt     = k[2] ? s2_ft : 17'h10000 - s2_ft;
    wi     = k[1] ? s2_fi : 17'h10000 - s2_fi;
    ws     = k[0] ? s2_fs : 17'h10000 - s2_fs;
    w2_n   = 18'((34'(wt) * 34'(ws)) >> 16);
    w3_n   = 18'((36'(w2_n) * 36'(wi)) >> 16);
    w1_n   = 18'(wt);
    use2_n = (k[1] == 1'b0);
    use1_n = (k[1:0] == 2'b00);
  end

  // table write decode
  logic [A3W-1:0] wa3;
  assign wa3 = A3W'(lut_addr);

  logic [31:0] q_ocv, q_ri, q_eta;
  logic [63:0] q_pol;

  cell_lut_mem #(.DEPTH(NT*NS),    .WIDTH(32), .TABLE_ID(LUT_OCV)) u_ocv (
    .clk(clk), .we(lut_we && lut_sel == 2'd0), .waddr(A2W'(lut_addr)), .wdata(lut_wdata[31:0]),
    .raddr(rd_a2), .rdata(q_ocv));
  cell_lut_mem #(.DEPTH(NT*NI*NS), .WIDTH(32), .TABLE_ID(LUT_RI)) u_ri (
    .clk(clk), .we(lut_we && lut_sel == 2'd1), .waddr(wa3), .wdata(lut_wdata[31:0]),
    .raddr(rd_a3), .rdata(q_ri));
  cell_lut_mem #(.DEPTH(NT*NI*NS), .WIDTH(64), .TABLE_ID(LUT_POL)) u_pol (
    .clk(clk), .we(lut_we && lut_sel == 2'd2), .waddr(wa3), .wdata(lut_wdata),
    .raddr(rd_a3), .rdata(q_pol));
  cell_lut_mem #(.DEPTH(2*NT),     .WIDTH(32), .TABLE_ID(LUT_ETA)) u_eta (
    .clk(clk), .we(lut_we && lut_sel == 2'd3), .waddr((A1W+1)'(lut_addr)), .wdata(lut_wdata[31:0]),
    .raddr(rd_a1), .rdata(q_eta));

  // weights travel with the read, the data arrives one clock later
  logic [2:0]  k_d;
  logic [17:0] w3_d, w2_d, w1_d;
  logic        use2_d, use1_d;
  ctx_t        s2c;       // copy of the stage-2 context for its last data clock
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_d <= '0; w3_d <= '0; w2_d <= '0; w1_d <= '0; use2_d <= 1'b0; use1_d <= 1'b0;
      s2c <= '0;
    end else begin
      k_d <= k; w3_d <= w3_n; w2_d <= w2_n; w1_d <= w1_n; use2_d <= use2_n; use1_d <= use1_n;
      if (init)          s2c.v <= 1'b0;
      else if (slot_end) s2c <= s2;
    end
  end

  function automatic logic signed [63:0] wterm(input logic [17:0] w, input logic [31:0] v);
    return (64'(signed'({1'b0, w})) * 64'(signed'(v))) >>> 16;
  endfunction

  logic signed [63:0] acc_ocv, acc_ri, acc_rp, acc_it, acc_eta;
  logic signed [63:0] t_ocv, t_ri, t_rp, t_it, t_eta;
  always_comb begin
    t_ocv = use2_d ? wterm(w2_d, q_ocv) : '0;
    t_ri  = wterm(w3_d, q_ri);
    t_rp  = wterm(w3_d, q_pol[63:32]);
    t_it  = wterm(w3_d, q_pol[31:0]);
    t_eta = use1_d ? wterm(w1_d, q_eta) : '0;
  end

  // ---------------- stage 3: equivalent circuit and integrators ----------------
  ctx_t s3;
  fix_t r_ocv, r_ri, r_rp, r_it, r_eta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_ocv <= '0; acc_ri <= '0; acc_rp <= '0; acc_it <= '0; acc_eta <= '0;
      s3 <= '0;
      r_ocv <= '0; r_ri <= '0; r_rp <= '0; r_it <= '0; r_eta <= '0;
    end else begin
      if (k_d == 3'd0) begin
        acc_ocv <= t_ocv; acc_ri <= t_ri; acc_rp <= t_rp; acc_it <= t_it; acc_eta <= t_eta;
      end else begin
        acc_ocv <= acc_ocv + t_ocv; acc_ri <= acc_ri + t_ri; acc_rp <= acc_rp + t_rp;
        acc_it  <= acc_it + t_it;   acc_eta <= acc_eta + t_eta;
      end
      if (k_d == 3'd7) begin
        s3    <= s2c;
        r_ocv <= fix_t'(acc_ocv + t_ocv);
        r_ri  <= fix_t'(acc_ri + t_ri);
        r_rp  <= fix_t'(acc_rp + t_rp);
        r_it  <= fix_t'(acc_it + t_it);
        r_eta <= fix_t'(acc_eta + t_eta);
      end
      if (init) s3.v <= 1'b0;   // init drops the channels in flight
    end
  end

  // s3 is loaded at the end of clock ph==0; ph 1..3 evaluate
  fix_t               p_ri, p_eta_i, p_rp_i, ucell_q;
  logic signed [63:0] p_tsit, soc_cur, up_cur, dsoc, dup;
  fix_t               up_fix;
  assign up_fix = fix_t'(up_cur >>> 32);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_ri <= '0; p_eta_i <= '0; p_rp_i <= '0; ucell_q <= '0;
      p_tsit <= '0; soc_cur <= '0; up_cur <= '0; dsoc <= '0; dup <= '0;
      out_valid <= 1'b0; out_ch <= '0; out_u <= '0; out_soc <= '0; out_aux <= '0;
      for (int c = 0; c < NCH; c++) begin soc_st[c] <= '0; up_st[c] <= '0; end
    end else begin
      out_valid <= 1'b0;
      if (ph == 3'd1 && s3.v) begin
        p_ri    <= fmul(r_ri, s3.cur);
        p_eta_i <= fmul(r_eta, s3.cur);
        p_rp_i  <= fmul(r_rp, s3.cur);
        p_tsit  <= (signed'({32'd0, ts}) * 64'(r_it)) >>> 16;            // Q.48
        soc_cur <= soc_st[s3.ch];
        up_cur  <= up_st[s3.ch];
      end
      if (ph == 3'd2 && s3.v) begin
        ucell_q <= r_ocv - p_ri - up_fix;
        dsoc   <= (64'(p_eta_i) * signed'({32'd0, k_soc[s3.ch]})) >>> 16;          // Q.48
        dup    <= (p_tsit * 64'(p_rp_i - up_fix)) >>> 16;              // Q.48
      end
      if (ph == 3'd3 && s3.v) begin
        soc_st[s3.ch] <= soc_cur - dsoc;
        up_st[s3.ch]  <= up_cur + dup;
        out_valid <= 1'b1;
        out_ch    <= s3.ch;
        out_u     <= ucell_q;
        out_soc   <= fix_t'((soc_cur - dsoc) >>> 32);
        out_aux   <= s3.aux;
      end
      if (init) begin
        for (int c = 0; c < NCH; c++) begin
          soc_st[c] <= 64'(soc0[c]) <<< 32;
          up_st[c]  <= '0;
        end
      end
    end
  end

  // stage 3 is never entered for a channel outside the array
  assert property (@(posedge clk) disable iff (!rst_n) (in_valid && in_ready) |-> int'(in_ch) < NCH);

endmodule

// mwd_energy: moving-window-deconvolution (MWD) energy filter for one
// flash-ADC channel.
//
// The preamplifier answers a charge with a step that decays exponentially
// with time constant tau. MWD undoes the decay and forms a trapezoid whose
// flat top is proportional to the charge:
//   x[n] = sample - baseline
//   D[n] = x[n] - x[n-M] + (1/tau) * sum_{k=n-M}^{n-1} x[k]     (deconvolution)
//   T[n] = sum_{k=n-L+1}^{n} D[k]                               (L-sample average, unscaled)
// 1/tau is given as inv_tau, an unsigned fraction with 16 fraction bits.
// A step of height A therefore gives a flat top of L*A when M >= L.
// On a leading-edge trigger (trig, in the cycle of the trigger sample) the
// filter watches T for M+L samples and reports its maximum as energy with a
// done pulse; a second trigger inside that window sets pileup. A negative
// maximum is reported as 0; a maximum beyond the 32-bit range saturates and
// sets energy_ovf. Samples before the delay lines first fill are treated as 0.
//
// The specification names MWD as the energy method; the formulation above,
// the peak-in-window energy pick, the fixed-point format and the default
// window lengths M = 128 and L = 64 samples are this design's.
// One sample is processed per cycle with s_en high.
module mwd_energy #(
  parameter int unsigned BITS = 14,
  parameter int unsigned M    = 128,
  parameter int unsigned L    = 64,
  localparam int unsigned EW  = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                s_en,
  input  logic [BITS-1:0]     sample,
  input  logic [BITS-1:0]     baseline,
  input  logic [15:0]         inv_tau,
  input  logic                trig,
  output logic                done,
  output logic [EW-1:0]       energy,
  output logic                pileup,
  output logic                energy_ovf,
  output logic signed [47:0]  trap       // current filter output T[n], for observation
);
  localparam int unsigned MW = $clog2(M);
  localparam int unsigned LW = $clog2(L);
  localparam int unsigned WW = $clog2(M + L + 1);

  logic signed [BITS+1:0] dl_m [M];   // x delayed by M
  logic signed [47:0]     dl_l [L];   // D delayed by L
  logic [MW-1:0] pm;
  logic [LW-1:0] pl;
  logic [MW:0]   fill_m;              // saturates at M
  logic [LW:0]   fill_l;              // saturates at L
  logic signed [47:0] s_m;            // sum of the last M x values
  logic signed [47:0] t_l;            // T[n-1]

  logic signed [BITS+1:0] x, x_old;
  logic signed [47:0] d_old, d_now, t_now, corr;

  always_comb begin
    x     = $signed({2'b00, sample}) - $signed({2'b00, baseline});
    x_old = (fill_m == (MW+1)'(M)) ? dl_m[pm] : '0;
    d_old = (fill_l == (LW+1)'(L)) ? dl_l[pl] : '0;
    corr  = (s_m * $signed({32'd0, inv_tau})) >>> 16;
    d_now = 48'(x) - 48'(x_old) + corr;
    t_now = t_l + d_now - d_old;
  end

  // delay lines
  always_ff @(posedge clk) begin
    if (s_en) begin
      dl_m[pm] <= x;
      dl_l[pl] <= d_now;
    end
  end

  // window / peak tracking
  logic              win;
  logic [WW-1:0]     win_cnt;
  logic signed [47:0] peak;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pm <= '0; pl <= '0; fill_m <= '0; fill_l <= '0;
      s_m <= '0; t_l <= '0;
      win <= 1'b0; win_cnt <= '0; peak <= '0;
      done <= 1'b0; energy <= '0; pileup <= 1'b0; energy_ovf <= 1'b0;
    end else begin
      done <= 1'b0;
      if (s_en) begin
        pm  <= (pm == MW'(M - 1)) ? '0 : pm + 1'b1;
        pl  <= (pl == LW'(L - 1)) ? '0 : pl + 1'b1;
        if (fill_m != (MW+1)'(M)) fill_m <= fill_m + 1'b1;
        if (fill_l != (LW+1)'(L)) fill_l <= fill_l + 1'b1;
        s_m <= s_m + 48'(x) - 48'(x_old);
        t_l <= t_now;

        if (win) begin
          if (t_now > peak) peak <= t_now;
          if (trig) pileup <= 1'b1;
          if (win_cnt == WW'(M + L - 1)) begin
            win  <= 1'b0;
            done <= 1'b1;
            if (t_now > peak ? t_now < 0 : peak < 0) begin
              energy     <= '0;
              energy_ovf <= 1'b0;
            end else if ((t_now > peak ? t_now : peak) > 48'sh0000_7FFF_FFFF) begin
              energy     <= 32'h7FFF_FFFF;
              energy_ovf <= 1'b1;
            end else begin
              energy     <= (t_now > peak) ? t_now[EW-1:0] : peak[EW-1:0];
              energy_ovf <= 1'b0;
            end
          end else begin
            win_cnt <= win_cnt + 1'b1;
          end
        end else if (trig) begin
          win     <= 1'b1;
          win_cnt <= '0;
          peak    <= t_now;
          pileup  <= 1'b0;
        end
      end
    end
  end

  assign trap = t_l;
endmodule

// ce_pet_phase: phase part of channel estimation (CE) and equalization with
// phase error tracking (PET).
//
// All arithmetic is on normalized phases (pi/2 = 1.0), so products and
// quotients of complex values become sums and differences of phases.
//
// CE state (in_state = PREAMBLE2), per subcarrier k:
//   arg(H_k) = (arg(R1_k) + arg(R2_k)) / 2 - arg(X_k)
// R1 comes from the CFR memory, R2 is the incoming symbol and X is the
// training symbol, held in a 128-entry table that is loaded through the
// trn_* port (the CE sequence values are not part of this design). The
// average is taken as arg(R1) + wrap(arg(R2) - arg(R1)) / 2 so it is
// correct across the +-pi seam. The estimate is then smoothed across
// frequency with a 3-tap [1 2 1]/4 filter (on wrapped phase differences;
// a neighbour that is not a modulated subcarrier is replaced by the
// centre). The same pass accumulates the phase drift between the two
// preambles for the initial offset estimates over |k| <= 56, k != 0:
//   CFO:  theta0 = mean(arg R2 - arg R1)
//   SCO:  f0     = (sum_{k>0} - sum_{k<0})(arg R2 - arg R1) / (57*56)
// averaged over all bands estimated so far. At the end of every
// PREAMBLE2 symbol the trackers are (re)loaded: the rates with theta0 and
// f0, the phases with 1.5*theta0 and 1.5*f0 (the estimate sits midway
// between the preambles).
//
// OUTPUT state, per subcarrier k of data symbol l:
//   arg(y_lk) = arg(R_lk) - arg(H_k) - (PHI_l + k * PSI_l)
// PHI (common phase, from CFO) and PSI (phase slope, from SCO) are
// predicted for the symbol. The 12 pilots give residuals
// r = arg(y) - arg(P_lk), where P is the pilot table value (conjugated on
// negative subcarriers in the low rate modes) times the BPSK polarity from
// the 127-periodic LFSR sequence. At the end of the symbol:
//   rmean = sum(r) / 12,  eslope = (sum_{k>0} r - sum_{k<0} r) / (6*60)
//   theta += alpha * rmean,          PHI += rmean + theta
//   f     += eps   * eslope,         PSI += eslope + f
// and the LFSR advances. Residuals of symbol l therefore correct symbol
// l+1 onwards (a symbol is not buffered, to keep latency low).
//
// Interface: input beats as produced by ram_control (consecutive beats
// within a symbol). Outputs leave 2 clocks later: out_phase is the smoothed
// CFR phase in PREAMBLE2 and the equalized phase in OUTPUT; out_hphase is
// the CFR phase read from memory, for the CE error tracking update.
//
// From the document: the CE equations in polar form, the shifter by one,
// the training and pilot tables, the LFSR, the 3-tap smoothing, the
// initial CFO/SCO estimates and the form of both tracking loops, the
// factor 1.5. Own choices: the filter taps, the LFSR polynomial
// x^7 + x^4 + 1 with an all-ones seed, alpha = eps = 1/8, the proportional
// term rmean / eslope in the phase prediction, the fixed-point formats of
// the trackers and the one-symbol update delay.
module ce_pet_phase
  import eq_pkg::*;
#(
  parameter int RF       = 8,   // extra fraction bits of the CFO tracker
  parameter int SF       = 12,  // extra fraction bits of the SCO tracker
  parameter int ALPHA_SH = 3,   // alpha = 2^-ALPHA_SH
  parameter int EPS_SH   = 3    // eps   = 2^-EPS_SH
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                low_rate,      // conjugate symmetric pilots
  // training symbol table load
  input  logic                trn_we,
  input  logic [6:0]          trn_addr,      // FFT bin, k + 64
  input  phase_t              trn_phase,
  // beats from ram_control
  input  logic                in_valid,
  input  logic                in_sop,
  input  eq_state_e           in_state,
  input  logic [BAND_W-1:0]   in_band,
  input  logic [BEAT_W-1:0]   in_beat,
  input  phase_t              in_data [LANES],   // arg(R2) or arg(R)
  input  phase_t              in_mem  [LANES],   // arg(R1) or arg(H)
  // 2 clocks later
  output logic                out_valid,
  output logic                out_sop,
  output eq_state_e           out_state,
  output logic [BAND_W-1:0]   out_band,
  output logic [BEAT_W-1:0]   out_beat,
  output phase_t              out_phase  [LANES],
  output phase_t              out_hphase [LANES],
  output logic [LANES-1:0]    out_is_data,
  // tracker state
  output logic signed [PH_W+RF-1:0] cfo_rate,    // theta, 2^-(10+RF) units
  output logic signed [PH_W+SF-1:0] sco_rate,    // f,     2^-(10+SF) units
  output logic                pet_update         // end of a data symbol
);

  localparam int TW = PH_W + RF;
  localparam int SW = PH_W + SF;
  localparam int AW = 24;                        // preamble drift sums
  localparam int PW = 18;                        // pilot residual sums
  localparam int RECIP_SH = 24;
  // round(2^24 / d) for the divisions by constants
  localparam longint R_CFO1 = 149797;            // 1 / (1*112)
  localparam longint R_CFO2 = 74898;             // 1 / (2*112)
  localparam longint R_CFO3 = 49932;             // 1 / (3*112)
  localparam longint R_SCO1 = 5256;              // 1 / (1*57*56)
  localparam longint R_SCO2 = 2628;              // 1 / (2*57*56)
  localparam longint R_SCO3 = 1752;              // 1 / (3*57*56)
  localparam longint R_12   = 1398101;           // 1 / 12
  localparam longint R_360  = 46603;             // 1 / 360

  // ---------------------------------------------------------------- tables
  phase_t trn_tab [BEATS][LANES];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < BEATS; b++)
        for (int l = 0; l < LANES; l++) trn_tab[b][l] <= '0;
    end else if (trn_we) begin
      trn_tab[trn_addr[6:2]][trn_addr[1:0]] <= trn_phase;
    end
  end

  // ------------------------------------------------------------- trackers
  logic signed [TW-1:0] theta_q, phi_q;
  logic signed [SW-1:0] fsl_q, psi_q;
  logic signed [AW-1:0] sum_d_q, sum_sd_q;
  logic signed [PW-1:0] pil_sum_q, pil_ssum_q;
  logic [1:0]           pre2_cnt_q;
  logic [6:0]           lfsr_q;
  eq_state_e            last_state_q;

  logic pol;                                     // 1: pilot polarity -1
  assign pol = lfsr_q[6] ^ lfsr_q[3];

  // ------------------------------------------------------ stage A (comb)
  phase_t               raw   [LANES];
  phase_t               resid [LANES];
  phase_t               dif   [LANES];
  logic [LANES-1:0]     pil, inb, dat;
  subc_t                ks    [LANES];

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      subc_t                   k;
      phase_t                  avg, ceph, eqph, corr, pref;
      logic signed [SW+8:0]    kpsi;
      logic signed [TW-1:0]    phr;
      k      = subc_index(in_beat, l);
      ks[l]  = k;
      pil[l]  = is_pilot(k);
      inb[l]  = is_inband(k);
      dat[l]  = is_data(k);
      dif[l] = in_data[l] - in_mem[l];
      avg    = in_mem[l] + (dif[l] >>> 1);
      ceph   = avg - trn_tab[in_beat][l];
      kpsi   = (SW+9)'(k) * (SW+9)'(psi_q);
      phr    = phi_q + TW'(1 <<< (RF - 1));
      corr   = phase_t'(phr >>> RF)
             + phase_t'((kpsi + (SW+9)'(1 <<< (SF - 1))) >>> SF);
      eqph   = in_data[l] - in_mem[l] - corr;
      pref   = pilot_phase(k, low_rate) + (pol ? phase_t'(2 * PH_HALF_PI) : '0);
      resid[l] = eqph - pref;
      raw[l]   = (in_state == ST_PRE2) ? ceph : eqph;
    end
  end

  // Lane sums of this beat.
  logic signed [AW-1:0] beat_d, beat_sd;
  logic signed [PW-1:0] beat_r, beat_sr;
  always_comb begin
    beat_d = '0; beat_sd = '0; beat_r = '0; beat_sr = '0;
    for (int l = 0; l < LANES; l++) begin
      if (inb[l]) begin
        beat_d  += AW'(dif[l]);
        beat_sd += (ks[l] > 0) ? AW'(dif[l]) : -AW'(dif[l]);
      end
      if (pil[l]) begin
        beat_r  += PW'(resid[l]);
        beat_sr += (ks[l] > 0) ? PW'(resid[l]) : -PW'(resid[l]);
      end
    end
  end

  // End-of-symbol tracker arithmetic.
  logic last_beat;
  assign last_beat = in_valid && (in_beat == BEAT_W'(BEATS - 1));

  logic signed [TW-1:0] theta0, rmean;
  logic signed [SW-1:0] f0, eslope;
  always_comb begin
    logic [1:0]           cnt;
    longint               rc, rs, p;
    cnt = (pre2_cnt_q == 2'd3) ? 2'd3 : pre2_cnt_q + 2'd1;
    case (cnt)
      2'd1:    begin rc = R_CFO1; rs = R_SCO1; end
      2'd2:    begin rc = R_CFO2; rs = R_SCO2; end
      default: begin rc = R_CFO3; rs = R_SCO3; end
    endcase
    p      = longint'(sum_d_q) * rc;
    theta0 = TW'(p >>> (RECIP_SH - RF));
    p      = longint'(sum_sd_q) * rs;
    f0     = SW'(p >>> (RECIP_SH - SF));
    p      = longint'(pil_sum_q) * R_12;
    rmean  = TW'(p >>> (RECIP_SH - RF));
    p      = longint'(pil_ssum_q) * R_360;
    eslope = SW'(p >>> (RECIP_SH - SF));
  end

  logic signed [TW-1:0] th_n;
  logic signed [SW-1:0] f_n;
  assign th_n = theta_q + (rmean >>> ALPHA_SH);
  assign f_n  = fsl_q + (eslope >>> EPS_SH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      theta_q <= '0; phi_q <= '0; fsl_q <= '0; psi_q <= '0;
      sum_d_q <= '0; sum_sd_q <= '0; pil_sum_q <= '0; pil_ssum_q <= '0;
      pre2_cnt_q <= '0; lfsr_q <= '1; last_state_q <= ST_PRE1;
      pet_update <= 1'b0;
    end else begin
      pet_update <= 1'b0;
      if (in_valid) begin
        if (in_sop) last_state_q <= in_state;
        if (in_sop && in_state != ST_OUTPUT && last_state_q == ST_OUTPUT) begin
          // new packet: forget the previous preamble drift sums
          sum_d_q <= '0; sum_sd_q <= '0; pre2_cnt_q <= '0;
        end else if (in_state == ST_PRE2) begin
          if (last_beat) begin
            pre2_cnt_q <= (pre2_cnt_q == 2'd3) ? 2'd3 : pre2_cnt_q + 2'd1;
            theta_q    <= theta0;
            fsl_q      <= f0;
            phi_q      <= theta0 + (theta0 >>> 1);
            psi_q      <= f0 + (f0 >>> 1);
            lfsr_q     <= '1;
            pil_sum_q  <= '0;
            pil_ssum_q <= '0;
          end
          sum_d_q  <= sum_d_q + beat_d;
          sum_sd_q <= sum_sd_q + beat_sd;
        end else if (in_state == ST_OUTPUT) begin
          if (last_beat) begin
            theta_q    <= th_n;
            phi_q      <= phi_q + rmean + th_n;
            fsl_q      <= f_n;
            psi_q      <= psi_q + eslope + f_n;
            lfsr_q     <= {lfsr_q[5:0], pol};
            pil_sum_q  <= '0;
            pil_ssum_q <= '0;
            pet_update <= 1'b1;
          end else begin
            pil_sum_q  <= pil_sum_q + beat_r;
            pil_ssum_q <= pil_ssum_q + beat_sr;
          end
        end
      end
    end
  end

  assign cfo_rate = theta_q;
  assign sco_rate = fsl_q;

  // ------------------------------------------------------ stage A (regs)
  logic                a_valid, a_sop;
  eq_state_e           a_state;
  logic [BAND_W-1:0]   a_band;
  logic [BEAT_W-1:0]   a_beat;
  phase_t              a_raw [LANES];
  phase_t              a_hph [LANES];
  phase_t              a_prev;                 // raw of the lane before a_raw[0]
  logic [LANES-1:0]    a_dat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid <= 1'b0; a_sop <= 1'b0; a_state <= ST_PRE1;
      a_band <= '0; a_beat <= '0; a_prev <= '0; a_dat <= '0;
      for (int l = 0; l < LANES; l++) begin a_raw[l] <= '0; a_hph[l] <= '0; end
    end else begin
      a_valid <= in_valid;
      a_sop   <= in_sop && in_valid;
      a_state <= in_state;
      a_band  <= in_band;
      a_beat  <= in_beat;
      a_raw   <= raw;
      a_hph   <= in_mem;
      a_dat   <= dat;
      a_prev  <= a_raw[LANES-1];
    end
  end

  // ------------------------------------------- stage B: 3-tap smoothing
  phase_t sm [LANES];
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      subc_t                 k;
      phase_t                c, left, right;
      logic signed [PH_W:0]  dl, dr;
      k     = subc_index(a_beat, l);
      c     = a_raw[l];
      left  = (l == 0)         ? a_prev : a_raw[(l == 0) ? 0 : l - 1];
      right = (l == LANES - 1) ? raw[0] : a_raw[(l == LANES - 1) ? l : l + 1];
      dl    = is_used(k - subc_t'(1)) ? (PH_W+1)'(phase_t'(left - c))  : '0;
      dr    = is_used(k + subc_t'(1)) ? (PH_W+1)'(phase_t'(right - c)) : '0;
      sm[l] = (a_state == ST_PRE2 && is_used(k)) ? c + phase_t'((dl + dr) >>> 2) : c;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_sop <= 1'b0; out_state <= ST_PRE1;
      out_band <= '0; out_beat <= '0; out_is_data <= '0;
      for (int l = 0; l < LANES; l++) begin out_phase[l] <= '0; out_hphase[l] <= '0; end
    end else begin
      out_valid   <= a_valid;
      out_sop     <= a_sop;
      out_state   <= a_state;
      out_band    <= a_band;
      out_beat    <= a_beat;
      out_phase   <= sm;
      out_hphase  <= a_hph;
      out_is_data <= a_dat;
    end
  end

endmodule

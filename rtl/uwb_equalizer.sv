// uwb_equalizer: CORDIC based frequency-domain equalizer for a multiband
// OFDM (IEEE 802.15.3a) receiver, four subcarriers per clock.
//
// Every FFT output sample is converted to polar form by a CORDIC, so that
// channel estimation, channel correction and phase tracking become
// additions and subtractions of normalized phases, and the only magnitude
// operation is one division. The datapath, in pipeline order:
//   cordic x4        I/Q -> (|R|, arg R), 11 clocks
//   ram_control      CFR memory for 3 bands and the PREAMBLE1 / PREAMBLE2 /
//                    OUTPUT state machine, 1 clock (synchronous read)
//   ce_pet_phase     phase estimation + smoothing, or phase equalization
//                    with CFO/SCO tracking from the pilots, 2 clocks
//                    (then 3 alignment registers)
//   ce_mag           (|R1|+|R2|)/2 or |R|/|H| through one divider, 5 clocks
//   ce_track x4      CE error tracking on data subcarriers (combinational),
//                    its result written back to the CFR memory
//   de_cordic x4     equalized (|y|, arg y) -> I/Q and 3-bit soft values,
//                    6 clocks
// In PREAMBLE2 the estimated channel (magnitude from ce_mag, smoothed phase
// from ce_pet_phase) is written back over the stored first preamble; in
// OUTPUT the tracked channel phase arg(H) - 2*mu*e' is written back. Only
// OUTPUT symbols produce out_valid.
//
// Interface and timing:
//   * One OFDM symbol = BEATS (32) consecutive clocks with in_valid high,
//     in_sop on the first; lane j of beat b carries subcarrier
//     k = -64 + 4b + j. in_kind and in_band are sampled with in_sop.
//     Gaps are allowed between symbols only.
//   * Before the first packet the CE training phases are loaded through
//     trn_we / trn_addr (k + 64) / trn_phase.
//   * Equalized data leave LATENCY = 23 clocks after they enter
//     (CORDIC 11, memory read 1, divider 5, de-CORDIC 6): out_mag /
//     out_phase in polar form, out_i / out_q (1.0 = 256) and out_soft_i /
//     out_soft_q (3 bits) in rectangular form.
//   * At four subcarriers per clock a 128-point symbol takes 32 clocks, so
//     132 MHz carries the 528 Msample/s stream; the document reports
//     164 MHz (655 Msample/s) as its maximum.
//
// Follows the document: the four parallel lanes, the polar datapath and
// its blocks, 12-bit word length, CORDIC of 10 stages and latency 11,
// 5-stage de-CORDIC, 5-clock divider, three CFR banks, trust area. Own
// choices are listed in each block's header; the main ones are the beat
// order of the subcarriers, the synchronous memory and the alignment
// registers.
module uwb_equalizer
  import eq_pkg::*;
#(
  parameter int CORDIC_STAGES   = 10,
  parameter int DECORDIC_STAGES = 5,
  parameter int DIV_LAT         = 5
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     low_rate,
  input  logic                     trn_we,
  input  logic [6:0]               trn_addr,
  input  phase_t                   trn_phase,
  input  logic                     in_valid,
  input  logic                     in_sop,
  input  sym_kind_e                in_kind,
  input  logic [BAND_W-1:0]        in_band,
  input  logic signed [DATA_W-1:0] in_i [LANES],
  input  logic signed [DATA_W-1:0] in_q [LANES],
  output logic                     out_valid,
  output logic                     out_sop,
  output logic [BAND_W-1:0]        out_band,
  output logic [BEAT_W-1:0]        out_beat,
  output mag_t                     out_mag    [LANES],
  output phase_t                   out_phase  [LANES],
  output logic signed [DATA_W-1:0] out_i      [LANES],
  output logic signed [DATA_W-1:0] out_q      [LANES],
  output logic signed [2:0]        out_soft_i [LANES],
  output logic signed [2:0]        out_soft_q [LANES],
  output logic [NBANDS-1:0]        ce_done,
  output logic signed [PH_W+7:0]   cfo_rate,
  output logic signed [PH_W+11:0]  sco_rate,
  output logic                     pet_update,   // trackers updated (end of data symbol)
  output logic [LANES-1:0]         ce_trusted    // CE error tracking active per lane
);

  localparam int PH_ALIGN = DIV_LAT - 2;   // ce_pet_phase latency is 2
  localparam int DC_LAT   = DECORDIC_STAGES + 1;

  // ---------------------------------------------------------------- input
  // Symbols must arrive as BEATS consecutive beats.
  int unsigned beats_left;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) beats_left <= 0;
    else if (in_valid && in_sop) beats_left <= BEATS - 1;
    else if (beats_left != 0) begin
      beats_left <= beats_left - 1;
      assert (in_valid && !in_sop)
        else $error("symbol interrupted: beats must be consecutive");
    end
  end

  // ------------------------------------------------------------- CORDIC x4
  polar_t           cr_data [LANES];
  logic [LANES-1:0] cr_valid;
  for (genvar l = 0; l < LANES; l++) begin : g_cordic
    cordic #(.STAGES(CORDIC_STAGES)) u_cordic (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .in_i     (in_i[l]),
      .in_q     (in_q[l]),
      .out_valid(cr_valid[l]),
      .out_mag  (cr_data[l].mag),
      .out_phase(cr_data[l].phase)
    );
  end

  logic                cr_sop;
  sym_kind_e           cr_kind;
  logic [BAND_W-1:0]   cr_band;
  pipe_delay #(.W(2 + BAND_W), .N(CORDIC_STAGES + 1)) u_cr_side (
    .clk(clk), .rst_n(rst_n),
    .d({in_valid && in_sop, in_kind, in_band}),
    .q({cr_sop, cr_kind, cr_band})
  );

  // ------------------------------------------------------------ RAM control
  logic                rc_valid, rc_sop;
  eq_state_e           rc_state;
  logic [BAND_W-1:0]   rc_band;
  logic [BEAT_W-1:0]   rc_beat;
  polar_t              rc_data [LANES];
  polar_t              rc_mem  [LANES];
  logic                upd_valid;
  logic [BAND_W-1:0]   upd_band;
  logic [BEAT_W-1:0]   upd_beat;
  polar_t              upd_data [LANES];

  ram_control u_ram (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (cr_valid[0]),
    .in_sop   (cr_sop),
    .in_kind  (cr_kind),
    .in_band  (cr_band),
    .in_data  (cr_data),
    .upd_valid(upd_valid),
    .upd_band (upd_band),
    .upd_beat (upd_beat),
    .upd_data (upd_data),
    .out_valid(rc_valid),
    .out_sop  (rc_sop),
    .out_state(rc_state),
    .out_band (rc_band),
    .out_beat (rc_beat),
    .out_data (rc_data),
    .out_mem  (rc_mem),
    .ce_done  (ce_done)
  );

  // ------------------------------------------------------ phase datapath
  phase_t rc_dph [LANES];
  phase_t rc_mph [LANES];
  mag_t   rc_dmg [LANES];
  mag_t   rc_mmg [LANES];
  for (genvar l = 0; l < LANES; l++) begin : g_split
    assign rc_dph[l] = rc_data[l].phase;
    assign rc_mph[l] = rc_mem[l].phase;
    assign rc_dmg[l] = rc_data[l].mag;
    assign rc_mmg[l] = rc_mem[l].mag;
  end

  logic                pp_valid, pp_sop;
  eq_state_e           pp_state;
  logic [BAND_W-1:0]   pp_band;
  logic [BEAT_W-1:0]   pp_beat;
  phase_t              pp_phase  [LANES];
  phase_t              pp_hphase [LANES];
  logic [LANES-1:0]    pp_isdata;

  ce_pet_phase u_phase (
    .clk        (clk),
    .rst_n      (rst_n),
    .low_rate   (low_rate),
    .trn_we     (trn_we),
    .trn_addr   (trn_addr),
    .trn_phase  (trn_phase),
    .in_valid   (rc_valid),
    .in_sop     (rc_sop),
    .in_state   (rc_state),
    .in_band    (rc_band),
    .in_beat    (rc_beat),
    .in_data    (rc_dph),
    .in_mem     (rc_mph),
    .out_valid  (pp_valid),
    .out_sop    (pp_sop),
    .out_state  (pp_state),
    .out_band   (pp_band),
    .out_beat   (pp_beat),
    .out_phase  (pp_phase),
    .out_hphase (pp_hphase),
    .out_is_data(pp_isdata),
    .cfo_rate   (cfo_rate),
    .sco_rate   (sco_rate),
    .pet_update (pet_update)
  );

  // -------------------------------------------------- magnitude datapath
  logic mg_valid, mg_ce;
  mag_t mg_q [LANES];
  ce_mag #(.LAT(DIV_LAT)) u_mag (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (rc_valid),
    .in_ce    (rc_state == ST_PRE2),
    .in_a     (rc_dmg),
    .in_b     (rc_mmg),
    .out_valid(mg_valid),
    .out_ce   (mg_ce),
    .out_q    (mg_q)
  );

  // ------------------------------------------ alignment to the divider
  localparam int SIDE_W = 2 + 2 + BAND_W + BEAT_W + LANES;
  localparam int LANE_W = 2 * PH_W;
  logic                e_valid, e_sop;
  eq_state_e           e_state;
  logic [BAND_W-1:0]   e_band;
  logic [BEAT_W-1:0]   e_beat;
  logic [LANES-1:0]    e_isdata;
  phase_t              e_phase  [LANES];
  phase_t              e_hphase [LANES];
  mag_t                e_hmag   [LANES];

  pipe_delay #(.W(SIDE_W), .N(PH_ALIGN)) u_pp_side (
    .clk(clk), .rst_n(rst_n),
    .d({pp_valid, pp_sop, pp_state, pp_band, pp_beat, pp_isdata}),
    .q({e_valid, e_sop, e_state, e_band, e_beat, e_isdata})
  );
  for (genvar l = 0; l < LANES; l++) begin : g_align
    pipe_delay #(.W(LANE_W), .N(PH_ALIGN)) u_pp_lane (
      .clk(clk), .rst_n(rst_n),
      .d({pp_phase[l], pp_hphase[l]}),
      .q({e_phase[l], e_hphase[l]})
    );
    pipe_delay #(.W(MAG_W), .N(DIV_LAT)) u_hmag (
      .clk(clk), .rst_n(rst_n),
      .d(rc_mmg[l]),
      .q(e_hmag[l])
    );
  end

  // ---------------------------------- CE error tracking and write-back
  phase_t           delta   [LANES];
  for (genvar l = 0; l < LANES; l++) begin : g_track
    ce_track u_track (
      .in_enable  (e_valid && e_state == ST_OUTPUT && e_isdata[l]),
      .in_phase   (e_phase[l]),
      .in_mag     (mg_q[l]),
      .out_trusted(ce_trusted[l]),
      .out_delta  (delta[l])
    );
    always_comb begin
      if (e_state == ST_PRE2) begin
        upd_data[l].mag   = mg_q[l];
        upd_data[l].phase = e_phase[l];
      end else begin
        upd_data[l].mag   = e_hmag[l];
        upd_data[l].phase = e_hphase[l] - delta[l];
      end
    end
  end
  assign upd_valid = e_valid && (e_state == ST_PRE2 || e_state == ST_OUTPUT);
  assign upd_band  = e_band;
  assign upd_beat  = e_beat;

  // --------------------------------------------------------- de-CORDIC x4
  logic eq_valid;
  assign eq_valid = e_valid && e_state == ST_OUTPUT;

  logic [LANES-1:0] dc_valid;
  for (genvar l = 0; l < LANES; l++) begin : g_decordic
    de_cordic #(.STAGES(DECORDIC_STAGES)) u_decordic (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (eq_valid),
      .in_mag    (mg_q[l]),
      .in_phase  (e_phase[l]),
      .out_valid (dc_valid[l]),
      .out_i     (out_i[l]),
      .out_q     (out_q[l]),
      .out_soft_i(out_soft_i[l]),
      .out_soft_q(out_soft_q[l])
    );
    pipe_delay #(.W(MAG_W + PH_W), .N(DC_LAT)) u_polar (
      .clk(clk), .rst_n(rst_n),
      .d({mg_q[l], e_phase[l]}),
      .q({out_mag[l], out_phase[l]})
    );
  end

  logic out_sop_d;
  pipe_delay #(.W(1 + BAND_W + BEAT_W), .N(DC_LAT)) u_out_side (
    .clk(clk), .rst_n(rst_n),
    .d({eq_valid && e_sop, e_band, e_beat}),
    .q({out_sop_d, out_band, out_beat})
  );
  assign out_valid = dc_valid[0];
  assign out_sop   = out_sop_d;

endmodule

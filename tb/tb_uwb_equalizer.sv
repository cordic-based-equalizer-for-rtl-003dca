// tb_uwb_equalizer: end-to-end, self-checking testbench of the equalizer
// at its full size (no parameter overrides).
//
// The testbench builds the received FFT output itself with real
// arithmetic: QPSK data, pilots with the 127-periodic BPSK polarity,
// random QPSK training symbols, a smooth random channel per band
// (magnitude 0.45 .. 1.15, linear plus curved phase), uniform noise of
// +-20 LSB on I and Q, and in the second packet the largest carrier
// frequency offset the standard allows (40 ppm, OMEGA = 17.8 degrees per
// symbol) and a 40 ppm sampling offset (SIGMA * k per symbol).
//   Packet 1: time-frequency code over bands 0 1 2 0 1 2 (two channel
//             estimation symbols per band), then 15 data symbols; band 2
//             data arrive 1.6 times stronger than its preambles (a gain
//             step), which drives its subcarriers out of the trust area;
//             band 0 data carry a fixed phase error of 8.6 .. 11.5
//             degrees per data subcarrier (a channel estimate error),
//             which CE error tracking must cut by at least a quarter
//             over the band's five data symbols.
//   Packet 2: low rate mode, all symbols in band 1, 24 data symbols with
//             the CFO/SCO drift.
// Random idle gaps separate the symbols. Checked on every data and pilot
// subcarrier of every output symbol: output exactly 23 clocks after input,
// band/beat order, equalized phase within 200 LSB (17.6 deg) of the
// transmitted one, equalized magnitude within 25 % of 256 * gain, signs
// of out_i / out_q and of the 3-bit soft values equal to the transmitted
// QPSK point. Each mechanism is counted (PREAMBLE1, PREAMBLE2 and OUTPUT
// symbols, all three bands, packet restart, symbol gaps, trusted and
// untrusted CE tracking, CFR write-back, tracker updates, both rate modes,
// all CE done flags); one that never happened is a failure.
//
// The 40 ppm offsets, the 4-lane data order, the preamble handling and
// the pilot layout follow the document and the standard it builds on; the
// channels, noise level, tolerances and the 23-clock latency are this
// design's own.
module tb_uwb_equalizer;
  import eq_pkg::*;

  localparam int  LAT    = 23;
  localparam int  NCYC   = 12000;
  localparam real PI     = 3.14159265358979;
  localparam real AMP    = 600.0;   // received amplitude for |H| = 1
  // 40 ppm at 3960 MHz over a 312.5 ns symbol: 2*pi*158.4 kHz*312.5 ns;
  // 40 ppm sampling offset: 2*pi*40e-6*165/128 per symbol and subcarrier
  localparam real OMEGA  = 0.311;   // CFO, radians per symbol (packet 2)
  localparam real SIGMA  = 0.000324; // SCO, radians per symbol per subcarrier

  logic clk = 0, rst_n = 0;
  logic low_rate = 0;
  logic trn_we = 0;
  logic [6:0] trn_addr = 0;
  phase_t trn_phase = 0;
  logic in_valid = 0, in_sop = 0;
  sym_kind_e in_kind = SYM_CE;
  logic [BAND_W-1:0] in_band = 0;
  logic signed [DATA_W-1:0] in_i [LANES];
  logic signed [DATA_W-1:0] in_q [LANES];
  logic out_valid, out_sop;
  logic [BAND_W-1:0] out_band;
  logic [BEAT_W-1:0] out_beat;
  mag_t   out_mag   [LANES];
  phase_t out_phase [LANES];
  logic signed [DATA_W-1:0] out_i [LANES];
  logic signed [DATA_W-1:0] out_q [LANES];
  logic signed [2:0] out_soft_i [LANES];
  logic signed [2:0] out_soft_q [LANES];
  logic [NBANDS-1:0] ce_done;
  logic signed [PH_W+7:0]  cfo_rate;
  logic signed [PH_W+11:0] sco_rate;
  logic pet_update;
  logic [LANES-1:0] ce_trusted;

  uwb_equalizer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;

  // channel and training, index k + 64
  real ch_a  [NBANDS][128];
  real ch_ph [NBANDS][128];
  real xt    [128];           // training phase, radians
  real ce_err[128];           // channel estimate error added to band 0 data
  bit  err_on = 0;
  int  b0_sym = -1;           // band 0 output symbols seen
  int  b0_err [8];            // sum of |phase error| per band 0 symbol
  int  pol   [127];

  // expected outputs, indexed by the cycle they must appear in
  logic exp_v     [NCYC];
  int   exp_band  [NCYC];
  int   exp_beat  [NCYC];
  int   exp_ph    [NCYC][LANES];  // transmitted phase, 2^-10 units
  real  exp_gain  [NCYC];
  bit   exp_chk   [NCYC][LANES];
  // what is on the inputs now (recorded at the edge that samples it)
  logic cur_v = 0;
  int   cur_band = 0, cur_beat = 0;
  real  cur_gain = 1.0;
  int   cur_ph  [LANES];
  bit   cur_chk [LANES];

  // mechanism counters
  int m_pre1 = 0, m_pre2 = 0, m_out = 0, m_restart = 0, m_gap = 0;
  int m_trusted = 0, m_untrusted = 0, m_wb = 0, m_pet = 0;
  int m_lr0 = 0, m_lr1 = 0, m_alldone = 0;
  int m_band [NBANDS];
  eq_state_e last_state = ST_PRE1;

  function automatic bit data_k(input int k);
    int a;
    a = (k < 0) ? -k : k;
    return k != 0 && a <= 56 && (a % 10) != 5;
  endfunction

  function automatic bit pilot_k(input int k);
    int a;
    a = (k < 0) ? -k : k;
    return a <= 55 && (a % 10) == 5;
  endfunction

  function automatic bit used_k(input int k);
    return k != 0 && k >= -61 && k <= 61;
  endfunction

  function automatic int wrap(input int a);
    int r;
    r = a & 4095;
    return (r >= 2048) ? r - 4096 : r;
  endfunction

  function automatic real noise();
    return real'($urandom_range(0, 40)) - 20.0;
  endfunction

  function automatic logic signed [DATA_W-1:0] sat12(input real v);
    int r;
    r = int'(v);
    if (r > 2047)  r = 2047;
    if (r < -2048) r = -2048;
    return DATA_W'(r);
  endfunction

  always @(posedge clk) if (rst_n) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n && cycle + LAT < NCYC) begin
    exp_v[cycle + LAT]    <= cur_v;
    exp_band[cycle + LAT] <= cur_band;
    exp_beat[cycle + LAT] <= cur_beat;
    exp_gain[cycle + LAT] <= cur_gain;
    for (int l = 0; l < LANES; l++) begin
      exp_ph[cycle + LAT][l]  <= cur_ph[l];
      exp_chk[cycle + LAT][l] <= cur_chk[l];
    end
  end

  // Send one symbol. ph_tx: transmitted phase in radians per subcarrier,
  // t: symbol time for the CFO/SCO drift, gain: extra received gain.
  task automatic send_symbol(input sym_kind_e kind, input int band,
                             input real ph_tx [128], input bit tx_on [128],
                             input real t, input real gain,
                             input bit [127:0] chk);
    for (int b = 0; b < BEATS; b++) begin
      in_valid <= 1;
      in_sop   <= (b == 0);
      in_kind  <= kind;
      in_band  <= BAND_W'(band);
      cur_v    <= (kind == SYM_DATA);
      cur_band <= band;
      cur_beat <= b;
      cur_gain <= gain;
      for (int l = 0; l < LANES; l++) begin
        int i, k;
        real a, p;
        i = 4 * b + l;
        k = i - 64;
        a = tx_on[i] ? AMP * gain * ch_a[band][i] : 0.0;
        p = ph_tx[i] + ch_ph[band][i] + t * (OMEGA + SIGMA * real'(k));
        if (kind == SYM_DATA && band == 0 && err_on) p = p + ce_err[i];
        in_i[l] <= sat12(a * $cos(p) + noise());
        in_q[l] <= sat12(a * $sin(p) + noise());
        cur_ph[l]  <= wrap(int'(ph_tx[i] / (PI / 2.0) * 1024.0));
        cur_chk[l] <= chk[i];
      end
      @(posedge clk);
    end
  endtask

  task automatic gap(input int n);
    if (n == 0) return;
    in_valid <= 0;
    in_sop   <= 0;
    cur_v    <= 0;
    repeat (n) @(posedge clk);
  endtask

  task automatic send_ce(input int band, input real t);
    bit on [128];
    for (int i = 0; i < 128; i++) on[i] = used_k(i - 64);
    send_symbol(SYM_CE, band, xt, on, t, 1.0, '0);
  endtask

  // data symbol number n of the packet (pilot polarity index)
  task automatic send_data(input int band, input int n, input bit lr,
                           input real t, input real gain, input bit check);
    real ph [128];
    bit  on [128];
    bit [127:0] chk;
    for (int i = 0; i < 128; i++) begin
      int k;
      k = i - 64;
      on[i]  = used_k(k);
      chk[i] = check && (data_k(k) || pilot_k(k));
      if (pilot_k(k)) begin
        int a;
        a = (k < 0) ? -k : k;
        ph[i] = (a == 15 || a == 45) ? PI / 4.0 : -3.0 * PI / 4.0;
        if (lr && k < 0) ph[i] = -ph[i];
        if (pol[n % 127] < 0) ph[i] = ph[i] + PI;
      end else begin
        ph[i] = PI / 4.0 + PI / 2.0 * real'($urandom_range(0, 3));
      end
      while (ph[i] > PI) ph[i] = ph[i] - 2.0 * PI;
    end
    send_symbol(SYM_DATA, band, ph, on, t, gain, chk);
  endtask

  // output checker
  always @(negedge clk) if (rst_n && cycle > 0 && cycle < NCYC) begin
    checks++;
    if (out_valid !== exp_v[cycle]) begin
      failures++;
      if (failures < 12) $display("out_valid %0b at cycle %0d, expected %0b",
                                  out_valid, cycle, exp_v[cycle]);
    end else if (out_valid) begin
      if (out_sop && out_band == 0) b0_sym++;
      checks++;
      if (int'(out_band) != exp_band[cycle] || int'(out_beat) != exp_beat[cycle]) begin
        failures++;
        if (failures < 12) $display("band/beat %0d/%0d, expected %0d/%0d", out_band,
                                    out_beat, exp_band[cycle], exp_beat[cycle]);
      end
      for (int l = 0; l < LANES; l++) if (exp_chk[cycle][l]) begin
        int  d, e;
        real m;
        bit  bad;
        e   = exp_ph[cycle][l];
        d   = wrap(int'(out_phase[l]) - e);
        m   = 256.0 * exp_gain[cycle];
        bad = (d > 200 || d < -200);
        bad |= (real'(out_mag[l]) > 1.25 * m || real'(out_mag[l]) < 0.75 * m);
        // QPSK quadrant: phase e in (0, 2048) means Q > 0, |e| < 1024 means I > 0
        bad |= ((e > -1024 && e < 1024) != (out_i[l] > 0));
        bad |= ((e > 0) != (out_q[l] > 0));
        bad |= ((out_soft_i[l] >= 0) != (out_i[l] >= 0));
        bad |= ((out_soft_q[l] >= 0) != (out_q[l] >= 0));
        if (out_band == 0 && b0_sym >= 0 && b0_sym < 8) b0_err[b0_sym] += (d < 0) ? -d : d;
        checks++;
        if (bad) begin
          failures++;
          if (failures < 12)
            $display("cycle %0d band %0d beat %0d lane %0d: mag %0d phase %0d I %0d Q %0d soft %0d/%0d, expected phase %0d mag %0d",
                     cycle, out_band, out_beat, l, out_mag[l], out_phase[l], out_i[l],
                     out_q[l], out_soft_i[l], out_soft_q[l], e, int'(m));
        end
      end
    end
  end

  // mechanism counting
  always @(posedge clk) if (rst_n) begin
    if (dut.rc_valid && dut.rc_sop) begin
      case (dut.rc_state)
        ST_PRE1:   begin m_pre1++; if (last_state == ST_OUTPUT) m_restart++; end
        ST_PRE2:   m_pre2++;
        ST_OUTPUT: begin
          m_out++;
          m_band[dut.rc_band]++;
          if (low_rate) m_lr1++; else m_lr0++;
        end
        default: ;
      endcase
      last_state <= dut.rc_state;
    end
    if (dut.e_valid && dut.e_state == ST_OUTPUT) begin
      if (dut.upd_valid) m_wb++;
      for (int l = 0; l < LANES; l++) if (dut.e_isdata[l]) begin
        if (ce_trusted[l]) m_trusted++; else m_untrusted++;
      end
    end
    if (pet_update) m_pet++;
    if (!in_valid && m_pre1 > 0) m_gap++;
    if (ce_done == '1) m_alldone++;
  end

  initial begin
    logic [6:0] s;
    for (int l = 0; l < LANES; l++) begin in_i[l] = 0; in_q[l] = 0; cur_ph[l] = 0; cur_chk[l] = 0; end
    for (int c = 0; c < NCYC; c++) exp_v[c] = 0;
    for (int b = 0; b < NBANDS; b++) m_band[b] = 0;
    for (int n = 0; n < 8; n++) b0_err[n] = 0;
    s = '1;
    for (int i = 0; i < 127; i++) begin
      logic bit_;
      bit_   = s[6] ^ s[3];
      pol[i] = bit_ ? -1 : 1;
      s      = {s[5:0], bit_};
    end
    // random smooth channels and QPSK training symbols
    for (int b = 0; b < NBANDS; b++) begin
      real p0, sl, cv, ph_a;
      p0   = 2.0 * PI * real'($urandom_range(0, 999)) / 1000.0;
      sl   = (real'($urandom_range(0, 200)) - 100.0) / 1000.0;
      cv   = 0.3 * real'($urandom_range(0, 100)) / 100.0;
      ph_a = 2.0 * PI * real'($urandom_range(0, 99)) / 100.0;
      for (int i = 0; i < 128; i++) begin
        real k;
        k = real'(i - 64);
        ch_a[b][i]  = 0.8 + 0.35 * $cos(2.0 * PI * k / 90.0 + ph_a);
        ch_ph[b][i] = p0 + sl * k + cv * $sin(2.0 * PI * k / 128.0);
      end
    end
    // +-(8.6 .. 11.5) degrees on each data subcarrier
    for (int i = 0; i < 128; i++)
      ce_err[i] = data_k(i - 64) ? (($urandom_range(0, 1) != 0) ? 1.0 : -1.0) *
                                   real'($urandom_range(150, 200)) / 1000.0 : 0.0;
    for (int i = 0; i < 128; i++)
      xt[i] = used_k(i - 64) ? PI / 4.0 + PI / 2.0 * real'($urandom_range(0, 3)) : 0.0;

    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 128; i++) begin
      trn_we    <= 1;
      trn_addr  <= 7'(i);
      trn_phase <= phase_t'(wrap(int'(xt[i] / (PI / 2.0) * 1024.0)));
      @(posedge clk);
    end
    trn_we <= 0;
    gap(2);

    // ---- packet 1: bands 0 1 2 0 1 2, no frequency offsets
    low_rate <= 0;
    for (int n = 0; n < 6; n++) begin
      send_ce(n % 3, 0.0);
      if (n == 2) gap(5); else gap(0);
    end
    err_on <= 1;
    for (int n = 0; n < 15; n++) begin
      send_data(n % 3, n, 1'b0, 0.0, (n % 3 == 2) ? 1.6 : 1.0, 1'b1);
      gap((n % 2 == 0) ? $urandom_range(1, 9) : 0);
    end
    gap(10);
    err_on <= 0;

    // ---- packet 2: low rate mode, band 1 only, CFO and SCO drift
    low_rate <= 1;
    send_ce(1, 0.0);
    gap(3);
    send_ce(1, 1.0);
    gap(1);
    for (int n = 0; n < 24; n++) begin
      send_data(1, n, 1'b1, real'(n + 2), 1.0, 1'b1);
      gap((n % 4 == 3) ? $urandom_range(1, 9) : 0);
    end
    gap(LAT + 10);

    checks += 16;
    // CE error tracking must have shrunk the deliberate estimate error
    $display("band 0 summed phase error per symbol: %0d %0d %0d %0d %0d",
             b0_err[0], b0_err[1], b0_err[2], b0_err[3], b0_err[4]);
    if (b0_sym != 4 || b0_err[4] * 4 > b0_err[0] * 3) begin
      failures++; $display("CE error tracking did not reduce the estimate error");
    end
    if (m_gap == 0)       begin failures++; $display("no gap between symbols"); end
    if (m_pre1 != 4)      begin failures++; $display("PREAMBLE1 symbols %0d", m_pre1); end
    if (m_pre2 != 4)      begin failures++; $display("PREAMBLE2 symbols %0d", m_pre2); end
    if (m_out != 39)      begin failures++; $display("OUTPUT symbols %0d", m_out); end
    if (m_restart != 1)   begin failures++; $display("packet restarts %0d", m_restart); end
    for (int b = 0; b < NBANDS; b++)
      if (m_band[b] == 0) begin failures++; $display("no output in band %0d", b); end
    if (m_trusted == 0)   begin failures++; $display("CE tracking never trusted"); end
    if (m_untrusted == 0) begin failures++; $display("CE tracking never outside trust area"); end
    if (m_wb == 0)        begin failures++; $display("no CFR write-back"); end
    if (m_pet != 39)      begin failures++; $display("tracker updates %0d", m_pet); end
    if (m_lr0 == 0 || m_lr1 == 0) begin failures++; $display("rate modes %0d/%0d", m_lr0, m_lr1); end
    if (m_alldone == 0)   begin failures++; $display("CE never done in all bands"); end
    $display("mechanisms: gap clocks %0d pre1 %0d pre2 %0d output %0d restart %0d bands %0d/%0d/%0d trusted %0d untrusted %0d write-back %0d tracker %0d modes %0d/%0d",
             m_gap, m_pre1, m_pre2, m_out, m_restart, m_band[0], m_band[1], m_band[2],
             m_trusted, m_untrusted, m_wb, m_pet, m_lr0, m_lr1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC - 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

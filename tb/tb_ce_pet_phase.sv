// tb_ce_pet_phase: self-checking testbench of the phase CE and phase error
// tracking unit.
//
// The testbench plays the CFR memory itself. A channel phase that is
// linear in k, random training phases X_k, a common phase drift of OMEGA
// per symbol (CFO) and a drift of SIGMA*k per symbol (SCO) are applied to
// the two preambles (symbol times -2 and -1) and to the data symbols
// (times 0, 1, 2 ...), plus +-2 LSB noise. Checked:
//   * PREAMBLE2: every smoothed CFR phase against an integer model of
//     arg R1 + wrap(arg R2 - arg R1)/2 - arg X followed by the [1 2 1]/4
//     smoothing with the neighbour rule, bit exact;
//   * the initial CFO and SCO estimates loaded after PREAMBLE2;
//   * OUTPUT: the equalized phase of every data subcarrier and pilot
//     against the transmitted phase, after the trackers have converged on
//     a data-symbol CFO that differs from the preamble estimate;
//   * the pilot polarity sequence (first 16 values of the 127-periodic
//     sequence) and the conjugate pilots of the low rate mode, which a
//     second packet uses;
//   * the 2-clock latency and one tracker update per data symbol.
//
// The CE and tracking equations checked follow the document; the test
// scenario, the 16 LSB tolerance and the 2-clock latency are this
// design's own.
module tb_ce_pet_phase;
  import eq_pkg::*;

  localparam int  OMEGA   = 40;     // CFO drift per symbol, 2^-10 units
  localparam int  OMEGA_D = 60;     // CFO drift during the data
  localparam real SIGMA   = 0.25;   // SCO drift per symbol per subcarrier

  logic clk = 0, rst_n = 0;
  logic low_rate = 0;
  logic trn_we = 0;
  logic [6:0] trn_addr = 0;
  phase_t trn_phase = 0;
  logic in_valid = 0, in_sop = 0;
  eq_state_e in_state = ST_PRE1;
  logic [BAND_W-1:0] in_band = 0;
  logic [BEAT_W-1:0] in_beat = 0;
  phase_t in_data [LANES];
  phase_t in_mem  [LANES];
  logic out_valid, out_sop;
  eq_state_e out_state;
  logic [BAND_W-1:0] out_band;
  logic [BEAT_W-1:0] out_beat;
  phase_t out_phase  [LANES];
  phase_t out_hphase [LANES];
  logic [LANES-1:0] out_is_data;
  logic signed [PH_W+7:0]  cfo_rate;
  logic signed [PH_W+11:0] sco_rate;
  logic pet_update;

  ce_pet_phase dut (.*);

  always #5 clk = ~clk;

  int max_err = 0;
  int checks = 0, failures = 0, n_updates = 0, n_checked_eq = 0, n_checked_ce = 0;

  // per-subcarrier scenario, index k + 64
  int hc  [128];     // channel phase
  int xt  [128];     // training phase
  int p1  [128];
  int p2  [128];
  int hest[128];     // CFR phase as the memory would hold it
  int exp_ce [128];  // expected smoothed CE output
  int exp_eq [128];  // transmitted phase of the current data symbol
  bit check_eq;
  int pol_seq [127];

  function automatic int wrap(input int a);
    int r;
    r = a & 4095;
    return (r >= 2048) ? r - 4096 : r;
  endfunction

  function automatic bit used_k(input int k);
    return k != 0 && k >= -61 && k <= 61;
  endfunction

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

  // P_n phase: +pi/4 at |n| = 15, 45, -3pi/4 at 5, 25, 35, 55
  function automatic int pilot_ph(input int k, input bit lr);
    int a, p;
    a = (k < 0) ? -k : k;
    p = (a == 15 || a == 45) ? 512 : -1536;
    return (k < 0 && lr) ? -p : p;
  endfunction

  // expected outputs, checked 2 clocks after the input
  typedef struct {
    bit        valid;
    eq_state_e st;
    int        beat;
    int        ph [LANES];
    bit        chk [LANES];
  } exp_t;
  exp_t pipe_q [$];

  task automatic drive_symbol(input eq_state_e st, input int mem_ph [128],
                              input int dat_ph [128], input bit [127:0] chk);
    for (int b = 0; b < BEATS; b++) begin
      exp_t e;
      in_valid <= 1;
      in_sop   <= (b == 0);
      in_state <= st;
      in_beat  <= BEAT_W'(b);
      e.valid = 1; e.st = st; e.beat = b;
      for (int l = 0; l < LANES; l++) begin
        in_mem[l]  <= phase_t'(mem_ph[4*b+l]);
        in_data[l] <= phase_t'(dat_ph[4*b+l]);
        e.ph[l]  = (st == ST_PRE2) ? exp_ce[4*b+l] : exp_eq[4*b+l];
        e.chk[l] = chk[4*b+l];
      end
      pipe_q.push_back(e);
      @(posedge clk);
    end
  endtask

  task automatic idle(input int n);
    in_valid <= 0;
    in_sop   <= 0;
    repeat (n) @(posedge clk);
  endtask

  // output checker
  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    if (pipe_q.size() == 0) begin
      failures++;
      $display("unexpected output");
    end else begin
      e = pipe_q.pop_front();
      checks++;
      if (out_state !== e.st || int'(out_beat) != e.beat) begin
        failures++;
        $display("output order: state %s beat %0d, expected %s %0d",
                 out_state.name(), out_beat, e.st.name(), e.beat);
      end
      for (int l = 0; l < LANES; l++) if (e.chk[l]) begin
        int d;
        d = wrap(int'(out_phase[l]) - e.ph[l]);
        checks++;
        if (e.st == ST_PRE2) n_checked_ce++; else n_checked_eq++;
        if (e.st == ST_OUTPUT && (d > max_err || -d > max_err)) max_err = (d < 0) ? -d : d;
        if ((e.st == ST_PRE2 && d != 0) || (e.st == ST_OUTPUT && (d > 16 || d < -16))) begin
          failures++;
          if (failures < 12)
            $display("%s beat %0d lane %0d: phase %0d expected %0d",
                     e.st.name(), e.beat, l, out_phase[l], e.ph[l]);
        end
      end
    end
  end

  // latency: out_valid exactly two clocks after in_valid
  logic v1 = 0, v2 = 0;
  always @(posedge clk) begin v1 <= in_valid; v2 <= v1; end
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (out_valid !== v2) begin failures++; $display("latency mismatch"); end
  end

  always @(posedge clk) if (pet_update) n_updates++;

  function automatic int noise();
    return $urandom_range(0, 4) - 2;
  endfunction

  // build one packet's preambles, check CE, then run data symbols
  task automatic run_packet(input bit lr, input int nsym);
    bit [127:0] chk;
    low_rate <= lr;
    for (int i = 0; i < 128; i++) begin
      int k;
      real sk;
      k  = i - 64;
      sk = SIGMA * real'(k);
      hc[i] = wrap(300 + 3 * k);
      p1[i] = wrap(hc[i] + xt[i] - 2 * OMEGA + int'($rtoi(-2.0 * sk)) + noise());
      p2[i] = wrap(hc[i] + xt[i] - OMEGA + int'($rtoi(-1.0 * sk)) + noise());
    end
    // expected CE: average, minus training, smoothing
    begin
      int raw [128];
      for (int i = 0; i < 128; i++)
        raw[i] = wrap(p1[i] + (wrap(p2[i] - p1[i]) >>> 1) - xt[i]);
      for (int i = 0; i < 128; i++) begin
        int k, dl, dr;
        k  = i - 64;
        dl = (i > 0 && used_k(k - 1))   ? wrap(raw[i-1] - raw[i]) : 0;
        dr = (i < 127 && used_k(k + 1)) ? wrap(raw[i+1] - raw[i]) : 0;
        exp_ce[i] = used_k(k) ? wrap(raw[i] + ((dl + dr) >>> 2)) : raw[i];
        chk[i]    = 1'b1;
      end
    end
    // PREAMBLE1 (only marks the packet start for this unit), then PREAMBLE2
    drive_symbol(ST_PRE1, p1, p1, '0);
    idle(3);
    drive_symbol(ST_PRE2, p1, p2, chk);
    idle(4);
    // initial estimates: theta0 ~ OMEGA * 2^8, f0 ~ SIGMA * 2^12
    checks += 2;
    if (cfo_rate < (OMEGA - 1) * 256 || cfo_rate > (OMEGA + 1) * 256) begin
      failures++; $display("CFO estimate %0d, expected about %0d", cfo_rate, OMEGA * 256);
    end
    if (sco_rate < int'(SIGMA * 4096.0) - 200 || sco_rate > int'(SIGMA * 4096.0) + 200) begin
      failures++; $display("SCO estimate %0d, expected about %0d", sco_rate, int'(SIGMA * 4096.0));
    end
    // the channel estimate the memory would now hold: smoothed CE output
    for (int i = 0; i < 128; i++) hest[i] = exp_ce[i];
    // data symbols at times 0 .. nsym-1
    for (int l = 0; l < nsym; l++) begin
      int dat [128];
      for (int i = 0; i < 128; i++) begin
        int k, tx;
        real drift;
        k = i - 64;
        if (pilot_k(k))     tx = wrap(pilot_ph(k, lr) + (pol_seq[l % 127] < 0 ? 2048 : 0));
        else if (data_k(k)) tx = 512 + 1024 * $urandom_range(0, 3);
        else                tx = 0;
        tx = wrap(tx);
        exp_eq[i] = tx;
        drift  = real'(OMEGA_D * l - 2 * OMEGA + 2 * OMEGA) + SIGMA * real'(k) * real'(l);
        dat[i] = wrap(hc[i] + tx + int'($rtoi(drift)) + noise());
        chk[i] = (l >= 12) && (data_k(k) || pilot_k(k));
      end
      drive_symbol(ST_OUTPUT, hest, dat, chk);
      // every third symbol is followed by a gap, the others are back to back
      if (l % 3 == 2) idle(1 + $urandom_range(0, 8));
    end
    idle(6);
  endtask

  int pol_ref [16] = '{1, 1, 1, 1, -1, -1, -1, 1, -1, -1, -1, -1, 1, 1, -1, 1};

  initial begin
    // reference pilot polarity sequence from x^7 + x^4 + 1, all-ones seed
    logic [6:0] s;
    s = '1;
    for (int i = 0; i < 127; i++) begin
      logic b;
      b = s[6] ^ s[3];
      pol_seq[i] = b ? -1 : 1;
      s = {s[5:0], b};
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (pol_seq[i] != pol_ref[i]) failures++;
    end
    for (int l = 0; l < LANES; l++) begin in_data[l] = 0; in_mem[l] = 0; end
    for (int i = 0; i < 128; i++) xt[i] = ($urandom_range(0, 3) * 1024) + 512;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // load the training table
    for (int i = 0; i < 128; i++) begin
      trn_we    <= 1;
      trn_addr  <= 7'(i);
      trn_phase <= phase_t'(wrap(xt[i]));
      @(posedge clk);
    end
    trn_we <= 0;
    @(posedge clk);
    run_packet(1'b0, 30);
    run_packet(1'b1, 16);
    checks += 3;
    if (n_updates != 46) begin failures++; $display("tracker updates %0d", n_updates); end
    if (n_checked_ce == 0 || n_checked_eq == 0) failures++;
    if (pipe_q.size() != 0) failures++;
    $display("largest equalized phase error after convergence: %0d LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

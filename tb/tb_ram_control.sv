// tb_ram_control: self-checking testbench of the CFR memory and the
// PREAMBLE1 / PREAMBLE2 / OUTPUT state machine.
//
// Two packets are sent. The first hops as time-frequency code 1 2 3 1 2 3
// (bands 0 1 2 0 1 2) and the second as 1 1 2 2 3 3, each followed by data
// symbols, with idle gaps between some symbols. The testbench plays the
// role of the estimation datapath: whenever a PREAMBLE2 or OUTPUT beat
// leaves the block it writes a known pattern back through the update port
// a few clocks later. A reference model of the memory then predicts every
// out_mem word (first preamble during PREAMBLE2, last written update
// during OUTPUT), and the expected state of every symbol, the one-clock
// alignment of out_data and the ce_done flags are checked as well.
//
// The three states and banks follow the document; the per-band state
// decision, the packet restart and the one-clock read are this design's
// own and are checked as such.
module tb_ram_control;
  import eq_pkg::*;

  localparam int UPD_DLY = 6;

  logic clk = 0, rst_n = 0;
  logic              in_valid = 0, in_sop = 0;
  sym_kind_e         in_kind = SYM_CE;
  logic [BAND_W-1:0] in_band = 0;
  polar_t            in_data [LANES];
  logic              upd_valid;
  logic [BAND_W-1:0] upd_band;
  logic [BEAT_W-1:0] upd_beat;
  polar_t            upd_data [LANES];
  logic              out_valid, out_sop;
  eq_state_e         out_state;
  logic [BAND_W-1:0] out_band;
  logic [BEAT_W-1:0] out_beat;
  polar_t            out_data [LANES];
  polar_t            out_mem  [LANES];
  logic [NBANDS-1:0] ce_done;

  ram_control dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_pre1 = 0, n_pre2 = 0, n_out = 0;

  // reference memory and expected values
  polar_t    model [NBANDS][BEATS][LANES];
  eq_state_e exp_state;
  polar_t    last_in [LANES];
  logic      last_valid = 0;
  int        upd_seq = 0;

  function automatic polar_t pattern(input int seed, input int band, input int beat, input int lane);
    polar_t p;
    p.mag   = mag_t'(seed * 977 + band * 131 + beat * 17 + lane);
    p.phase = phase_t'(seed * 313 - band * 59 + beat * 7 - lane);
    return p;
  endfunction

  // update port: delayed write-back of a pattern
  logic              d_v    [UPD_DLY];
  logic [BAND_W-1:0] d_band [UPD_DLY];
  logic [BEAT_W-1:0] d_beat [UPD_DLY];
  int                d_seed [UPD_DLY];
  initial for (int i = 0; i < UPD_DLY; i++) d_v[i] = 0;

  always_comb begin
    upd_valid = d_v[UPD_DLY-1];
    upd_band  = d_band[UPD_DLY-1];
    upd_beat  = d_beat[UPD_DLY-1];
    for (int l = 0; l < LANES; l++)
      upd_data[l] = pattern(d_seed[UPD_DLY-1], int'(upd_band), int'(upd_beat), l);
  end

  always @(posedge clk) begin
    for (int i = UPD_DLY - 1; i > 0; i--) begin
      d_v[i] <= d_v[i-1]; d_band[i] <= d_band[i-1];
      d_beat[i] <= d_beat[i-1]; d_seed[i] <= d_seed[i-1];
    end
    d_v[0]    <= out_valid && (out_state == ST_PRE2 || out_state == ST_OUTPUT);
    d_band[0] <= out_band;
    d_beat[0] <= out_beat;
    d_seed[0] <= upd_seq + 1000;
    if (out_valid) upd_seq <= upd_seq + 1;
    if (upd_valid)
      for (int l = 0; l < LANES; l++)
        model[upd_band][upd_beat][l] <= upd_data[l];
  end

  // checks on the outputs
  int exp_beat = 0;
  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (out_state !== exp_state) begin
      failures++;
      $display("state %s expected %s", out_state.name(), exp_state.name());
    end
    checks++;
    if (out_beat !== BEAT_W'(exp_beat) || (out_sop !== (exp_beat == 0))) begin
      failures++;
      $display("beat %0d expected %0d", out_beat, exp_beat);
    end
    exp_beat = (exp_beat + 1) % BEATS;
    for (int l = 0; l < LANES; l++) begin
      checks++;
      if (out_data[l] !== last_in[l]) begin
        failures++;
        $display("out_data not aligned");
      end
      if (out_state != ST_PRE1) begin
        checks++;
        if (out_mem[l] !== model[out_band][out_beat][l]) begin
          failures++;
          if (failures < 10)
            $display("mem band %0d beat %0d lane %0d: %h expected %h", out_band,
                     out_beat, l, out_mem[l], model[out_band][out_beat][l]);
        end
      end
    end
  end

  always @(posedge clk) begin
    last_valid <= in_valid;
    last_in    <= in_data;
  end

  task automatic send_symbol(input sym_kind_e kind, input int band,
                             input eq_state_e st, input int seed);
    exp_state = st;
    case (st)
      ST_PRE1:   n_pre1++;
      ST_PRE2:   n_pre2++;
      default:   n_out++;
    endcase
    for (int b = 0; b < BEATS; b++) begin
      in_valid <= 1;
      in_sop   <= (b == 0);
      in_kind  <= kind;
      in_band  <= BAND_W'(band);
      for (int l = 0; l < LANES; l++) in_data[l] <= pattern(seed, band, b, l);
      @(posedge clk);
      // the model stores a first preamble as it is written
      if (st == ST_PRE1)
        for (int l = 0; l < LANES; l++) model[band][b][l] = pattern(seed, band, b, l);
    end
    in_valid <= 0;
    in_sop   <= 0;
    repeat ($urandom_range(0, 1) * 3) @(posedge clk);
    // let the last beats and their updates drain before the next state
    repeat (UPD_DLY + 2) @(posedge clk);
  endtask

  int tfc_a [6] = '{0, 1, 2, 0, 1, 2};
  int tfc_b [6] = '{0, 0, 1, 1, 2, 2};

  initial begin
    for (int l = 0; l < LANES; l++) in_data[l] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // packet 1
    for (int s = 0; s < 6; s++)
      send_symbol(SYM_CE, tfc_a[s], (s < 3) ? ST_PRE1 : ST_PRE2, s);
    checks++;
    if (ce_done !== 3'b111) begin failures++; $display("ce_done %b", ce_done); end
    for (int s = 0; s < 6; s++) send_symbol(SYM_DATA, tfc_a[s], ST_OUTPUT, 10 + s);
    // packet 2
    for (int s = 0; s < 6; s++)
      send_symbol(SYM_CE, tfc_b[s], (s % 2 == 0) ? ST_PRE1 : ST_PRE2, 20 + s);
    checks++;
    if (ce_done !== 3'b111) failures++;
    for (int s = 0; s < 4; s++) send_symbol(SYM_DATA, tfc_b[s], ST_OUTPUT, 30 + s);
    checks++;
    if (n_pre1 == 0 || n_pre2 == 0 || n_out == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

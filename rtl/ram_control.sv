// ram_control: channel frequency response (CFR) memory and the preamble
// state machine.
//
// The memory holds one polar entry per subcarrier for each of the three
// bands of a time-frequency code (CFR1..CFR3, 3 x 128 entries), organized
// per band as BEATS words of LANES entries. Each band bank has a write
// multiplexer choosing between the incoming symbol ("input data") and the
// "updated channel" coming back from the estimation / tracking datapath.
//
// State machine, evaluated at the first beat of every symbol:
//   * a CE symbol on a band that has not yet stored a first preamble in
//     this packet -> PREAMBLE1: the symbol itself is written into that
//     band's bank;
//   * a CE symbol on a band that already holds its first preamble ->
//     PREAMBLE2: the stored first preamble is read out next to the incoming
//     second one for channel estimation; the estimate comes back through
//     the update port and overwrites the bank;
//   * a data symbol -> OUTPUT: the stored CFR is read out next to the data
//     for equalization, and the tracked CFR comes back through the update
//     port.
//   A CE symbol arriving in the OUTPUT state starts a new packet.
// Because the first-preamble decision is made per band, the FSM moves
// between PREAMBLE1 and PREAMBLE2 in whatever order the time-frequency
// code hops (1 2 3 1 2 3 or 1 1 2 2 3 3).
//
// Interface: a symbol is BEATS consecutive valid beats starting with
// in_sop. All outputs are registered one clock after the input beat (the
// memory read is synchronous): out_data is the delayed input, out_mem the
// stored entry at the same band and beat. If an update and a PREAMBLE1
// write hit the same bank in the same clock, the PREAMBLE1 write wins (a
// new packet replaces what is left of the old one).
//
// From the document: the three CFR banks, the write multiplexer, the three
// states and their meaning. Own choices: the per-band preamble flags, the
// new-packet rule, the bank organization and the synchronous read.
module ram_control
  import eq_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // incoming symbol beats (polar, after the CORDIC)
  input  logic                in_valid,
  input  logic                in_sop,
  input  sym_kind_e           in_kind,
  input  logic [BAND_W-1:0]   in_band,
  input  polar_t              in_data [LANES],
  // updated channel (estimate in PREAMBLE2, tracked CFR in OUTPUT)
  input  logic                upd_valid,
  input  logic [BAND_W-1:0]   upd_band,
  input  logic [BEAT_W-1:0]   upd_beat,
  input  polar_t              upd_data [LANES],
  // aligned outputs, one clock after the input beat
  output logic                out_valid,
  output logic                out_sop,
  output eq_state_e           out_state,
  output logic [BAND_W-1:0]   out_band,
  output logic [BEAT_W-1:0]   out_beat,
  output polar_t              out_data [LANES],
  output polar_t              out_mem  [LANES],
  output logic [NBANDS-1:0]   ce_done      // band has a channel estimate
);

  typedef polar_t word_t [LANES];

  eq_state_e           state_q, cur_state;
  logic [NBANDS-1:0]   pre1_seen_q;
  logic [BEAT_W-1:0]   beat_q, cur_beat;

  // State of the beat at the input: decided at sop, held for the symbol.
  always_comb begin
    cur_state = state_q;
    cur_beat  = beat_q + BEAT_W'(1);
    if (in_sop) begin
      cur_beat = '0;
      if (in_kind == SYM_DATA)                  cur_state = ST_OUTPUT;
      else if (state_q == ST_OUTPUT)            cur_state = ST_PRE1;
      else if (pre1_seen_q[in_band])            cur_state = ST_PRE2;
      else                                      cur_state = ST_PRE1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= ST_PRE1;
      pre1_seen_q <= '0;
      ce_done     <= '0;
      beat_q      <= '1;
    end else if (in_valid) begin
      state_q <= cur_state;
      beat_q  <= cur_beat;
      if (in_sop && in_kind == SYM_CE) begin
        if (state_q == ST_OUTPUT) begin
          // new packet
          pre1_seen_q          <= '0;
          pre1_seen_q[in_band] <= 1'b1;
          ce_done              <= '0;
        end else if (cur_state == ST_PRE1) begin
          pre1_seen_q[in_band] <= 1'b1;
        end else begin
          ce_done[in_band]     <= 1'b1;
        end
      end
    end
  end

  // CFR banks with their write multiplexers.
  word_t rd_word [NBANDS];
  for (genvar b = 0; b < NBANDS; b++) begin : g_bank
    word_t mem [BEATS];
    logic  wr_in, wr_upd;
    assign wr_in  = in_valid && (cur_state == ST_PRE1) && (in_band == BAND_W'(b));
    assign wr_upd = upd_valid && (upd_band == BAND_W'(b));

    always_ff @(posedge clk) begin
      if (wr_in)       mem[cur_beat] <= in_data;    // input data
      else if (wr_upd) mem[upd_beat] <= upd_data;   // updated channel
    end
    assign rd_word[b] = mem[cur_beat];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_state <= ST_PRE1;
      out_band  <= '0;
      out_beat  <= '0;
    end else begin
      out_valid <= in_valid;
      out_sop   <= in_valid && in_sop;
      out_state <= cur_state;
      out_band  <= in_band;
      out_beat  <= cur_beat;
    end
  end

  always_ff @(posedge clk) begin
    out_data <= in_data;
    out_mem  <= rd_word[(in_band < BAND_W'(NBANDS)) ? in_band : '0];
  end

endmodule

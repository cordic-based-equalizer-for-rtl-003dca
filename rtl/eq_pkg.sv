// eq_pkg: shared sizes, types and helper functions of the CORDIC based
// UWB equalizer.
//
// Number formats used throughout the design:
//  * I/Q samples from the FFT: signed DATA_W (12) bits.
//  * Phases are normalized by pi/2 (the document's "normalized phase"):
//    phase_t is a signed two's complement s1.10 value, so +1.0 = 1024 is
//    +90 degrees and the range [-2.0, 2.0) covers the full circle. Adding
//    two phases and letting the sum overflow gives the correctly wrapped
//    angle, so no special angle adder is needed.
//  * Magnitudes out of the CORDIC are unsigned MAG_W (13) bits, in input
//    LSBs, still carrying the CORDIC gain (about 1.647). The gain cancels
//    in the division |R|/|H| of the equalizer.
//  * Equalized magnitudes are unsigned MAG_W bits with EQ_FRAC (8) fraction
//    bits, so a unit QPSK point has magnitude 256.
//
// The 128 frequency bins of one OFDM symbol are carried LANES (4) per clock
// cycle in increasing logical subcarrier order, k = -64 .. 63, so beat b
// lane j holds k = -64 + 4*b + j. Pilot, data, guard and DC positions follow
// the IEEE 802.15.3a multiband OFDM layout (12 pilots at +-5, +-15 .. +-55,
// 100 data subcarriers within |k| <= 56, guards at 57 <= |k| <= 61).
//
// The four lanes, 12-bit words, 128 subcarriers, three bands, the pilot
// values and the normalized phase follow the document; the magnitude and
// fraction widths and the beat order of the subcarriers are this design's
// own choices.
package eq_pkg;

  localparam int LANES   = 4;    // parallel subcarriers per clock
  localparam int DATA_W  = 12;   // I/Q word length
  localparam int PH_W    = 12;   // normalized phase word length (s1.10)
  localparam int MAG_W   = 13;   // magnitude word length
  localparam int EQ_FRAC = 8;    // fraction bits of an equalized magnitude
  localparam int NSUB    = 128;  // FFT size
  localparam int BEATS   = NSUB / LANES;  // clock cycles per OFDM symbol
  localparam int NBANDS  = 3;    // bands of band group 1
  localparam int BEAT_W  = $clog2(BEATS);
  localparam int BAND_W  = 2;

  typedef logic signed [PH_W-1:0] phase_t;
  typedef logic        [MAG_W-1:0] mag_t;
  typedef logic signed [7:0]       subc_t;   // logical subcarrier index

  typedef struct packed {
    mag_t   mag;
    phase_t phase;
  } polar_t;

  // Kind of the OFDM symbol that enters the equalizer.
  typedef enum logic {
    SYM_CE   = 1'b0,   // channel estimation preamble symbol
    SYM_DATA = 1'b1    // header / payload symbol
  } sym_kind_e;

  // Operating state of the symbol in flight (RAM control FSM).
  typedef enum logic [1:0] {
    ST_PRE1   = 2'd0,  // first CE preamble of a band: store it
    ST_PRE2   = 2'd1,  // second CE preamble of a band: estimate the channel
    ST_OUTPUT = 2'd2   // data: equalize with the stored channel
  } eq_state_e;

  // One full normalized turn is 4.0; half a turn (pi) is 2.0.
  localparam phase_t PH_HALF_PI = phase_t'(1 <<< (PH_W - 2));

  function automatic subc_t subc_index(input logic [BEAT_W-1:0] beat,
                                        input int lane);
    return subc_t'(-64 + LANES * int'(beat) + lane);
  endfunction

  function automatic logic is_pilot(input subc_t k);
    int a;
    a = (k < 0) ? -int'(k) : int'(k);
    return (a == 5) || (a == 15) || (a == 25) || (a == 35) ||
           (a == 45) || (a == 55);
  endfunction

  // Subcarriers inside |k| <= 56 except DC: data and pilots.
  function automatic logic is_inband(input subc_t k);
    return (k != 0) && (k >= -56) && (k <= 56);
  endfunction

  function automatic logic is_data(input subc_t k);
    return is_inband(k) && !is_pilot(k);
  endfunction

  // Every modulated subcarrier: data, pilots and guards.
  function automatic logic is_used(input subc_t k);
    return (k != 0) && (k >= -61) && (k <= 61);
  endfunction

  // Phase of the pilot value P_n before the pseudo random BPSK polarity:
  // (1+j)/sqrt2 (+pi/4) at n = 15, 45 and (-1-j)/sqrt2 (-3pi/4) at
  // n = 5, 25, 35, 55. Negative n take the conjugate in the low rate
  // (conjugate symmetric) modes and the same value otherwise.
  function automatic phase_t pilot_phase(input subc_t k, input logic low_rate);
    int a;
    phase_t p;
    a = (k < 0) ? -int'(k) : int'(k);
    p = ((a == 15) || (a == 45)) ? phase_t'(1 <<< (PH_W - 3))
                                 : phase_t'(-3 * (1 <<< (PH_W - 3)));
    if (k < 0 && low_rate) p = -p;
    return p;
  endfunction

endpackage

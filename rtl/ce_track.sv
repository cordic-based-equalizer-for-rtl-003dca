// ce_track: channel estimation (CE) error tracking, one subcarrier.
//
// Combinational. The decided QPSK point d is the centre of the quadrant in
// which the equalized phase lies (+-pi/4, +-3pi/4). The phase error
// e' = arg(d) - arg(y) is scaled by the step size 2*mu (TWO_MU / 256). A
// multiplexer forces the output to zero when y lies outside the trust
// area: its phase must be within pi/8 .. 3pi/8 of the quadrant start and
// its magnitude within 0.5 .. 1.33. Outside the trust area, or when the
// subcarrier is not a data subcarrier, adaptation stops.
//
// The caller applies out_delta to the stored channel phase as
// arg(H) <- arg(H) - out_delta: the equalized phase is arg(R) - arg(H), so
// this moves y towards d. The document's Eq. 3.14 prints the update with a
// plus sign while its own gradient (Eq. 3.12, minus the gradient of
// |e'|^2 with respect to arg(H)) gives the minus sign; the minus sign is
// the one that converges and is used here.
//
// From the document: the structure (subtract, multiply by 2mu, multiplexer
// with 0), the trust area limits. Own choices: 2mu = 1/8, and applying the
// first-quadrant trust area of the figure to all four quadrants.
module ce_track
  import eq_pkg::*;
#(
  parameter int TWO_MU = 32                      // 2*mu in 1/256 units
) (
  input  logic   in_enable,                      // data subcarrier, equalization state
  input  phase_t in_phase,                       // equalized phase arg(y)
  input  mag_t   in_mag,                         // equalized magnitude |y|, EQ_FRAC fraction bits
  output logic   out_trusted,                    // y is in the trust area (sel = 0)
  output phase_t out_delta                       // 2*mu*e' or 0
);

  localparam int FB = PH_W - 2;                  // fraction bits of a phase
  localparam logic [FB-1:0] FR_LO = FB'(1 << (FB - 2));        // pi/8
  localparam logic [FB-1:0] FR_HI = FB'(3 << (FB - 2));        // 3pi/8
  localparam mag_t MAG_LO = mag_t'(128);                       // 0.5
  localparam mag_t MAG_HI = mag_t'(340);                       // 1.33

  phase_t                  d;
  logic signed [PH_W-1:0]  e;
  logic signed [PH_W+9:0]  prod;
  logic                    sel;

  always_comb begin
    // quadrant centre: keep the integer part, fraction = 0.5
    d    = {in_phase[PH_W-1:FB], 1'b1, {(FB-1){1'b0}}};
    e    = d - in_phase;
    prod = (PH_W+10)'(e) * (PH_W+10)'(TWO_MU);
    out_trusted = in_enable
               && (in_phase[FB-1:0] >= FR_LO) && (in_phase[FB-1:0] <= FR_HI)
               && (in_mag >= MAG_LO) && (in_mag <= MAG_HI);
    sel       = !out_trusted;
    out_delta = sel ? '0 : phase_t'(prod >>> 8);
  end

endmodule

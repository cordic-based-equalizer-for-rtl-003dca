// cordic: pipelined vectoring CORDIC, rectangular (I, Q) to polar.
//
// Each stage i rotates the vector by +-atan(2^-i) with one shift and one
// add per coordinate, choosing the direction from the sign of y so that the
// vector is driven onto the positive x axis; the rotation angles are summed
// into the phase. A first stage folds the left half plane onto the right
// one with an exact +-90 degree rotation, so the ten micro-rotations
// (i = 0 .. 9) only have to cover +-90 degrees.
//
// Interface: in_valid/in_i/in_q enter every clock; out_valid/out_mag/
// out_phase leave LATENCY = STAGES + 1 clocks later (11 for the ten stages
// the document uses: "10 stages are designed and clock latency is 11").
// out_phase is the normalized phase (pi/2 = 1.0, s1.10). out_mag is
// sqrt(I^2+Q^2) times the CORDIC gain (about 1.6468 for ten stages), in
// input LSBs; the gain is left in because the equalizer only ever divides
// one CORDIC magnitude by another.
//
// From the document: the shift-add iteration of Eq. 3.4, ten pipelined
// stages with latency 11, the normalized phase, and the extra LSBs that
// keep short vectors accurate (two guard bits, as drawn in Fig. 3.8).
// Own choices: the quadrant pre-rotation stage and the internal word
// lengths.
module cordic
  import eq_pkg::*;
#(
  parameter int STAGES = 10,  // micro-rotations i = 0 .. STAGES-1
  parameter int GUARD  = 2    // extra LSBs carried inside the pipeline
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_i,
  input  logic signed [DATA_W-1:0] in_q,
  output logic                     out_valid,
  output mag_t                     out_mag,
  output phase_t                   out_phase
);

  localparam int XW = DATA_W + 2 + GUARD;     // growth: sqrt(2) * gain < 4
  localparam int ZW = PH_W + GUARD;           // phase with guard bits
  localparam int ZF = PH_W - 2 + GUARD;       // fraction bits of z

  // atan(2^-i) / (pi/2) * 2^ZF for ZF = 12, rounded. The table is scaled
  // below when GUARD differs from 2.
  localparam int ATAN_TAB [16] = '{2048, 1209, 639, 324, 163, 81, 41, 20,
                                   10, 5, 3, 1, 1, 0, 0, 0};

  function automatic logic signed [ZW-1:0] atan_c(input int i);
    int v;
    v = ATAN_TAB[i];
    if (GUARD >= 2) v = v <<< (GUARD - 2);
    else            v = v >>> (2 - GUARD);
    return (ZW)'(v);
  endfunction

  logic signed [XW-1:0] x [STAGES+1];
  logic signed [XW-1:0] y [STAGES+1];
  logic signed [ZW-1:0] z [STAGES+1];
  logic                 v [STAGES+1];

  // Stage 0: exact +-90 degree fold into the right half plane.
  logic signed [XW-1:0] xi, yi;
  assign xi = XW'(in_i) <<< GUARD;
  assign yi = XW'(in_q) <<< GUARD;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x[0] <= '0; y[0] <= '0; z[0] <= '0; v[0] <= 1'b0;
    end else begin
      v[0] <= in_valid;
      if (xi >= 0) begin
        x[0] <= xi;  y[0] <= yi;  z[0] <= '0;
      end else if (yi >= 0) begin
        // angle in (90, 180]: rotate by -90 degrees
        x[0] <= yi;  y[0] <= -xi; z[0] <= ZW'(1 <<< ZF);
      end else begin
        // angle in (-180, -90): rotate by +90 degrees
        x[0] <= -yi; y[0] <= xi;  z[0] <= -ZW'(1 <<< ZF);
      end
    end
  end

  // Stages 1 .. STAGES: micro-rotation i = s - 1.
  for (genvar s = 1; s <= STAGES; s++) begin : g_stage
    localparam int I = s - 1;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        x[s] <= '0; y[s] <= '0; z[s] <= '0; v[s] <= 1'b0;
      end else begin
        v[s] <= v[s-1];
        if (y[s-1] >= 0) begin
          x[s] <= x[s-1] + (y[s-1] >>> I);
          y[s] <= y[s-1] - (x[s-1] >>> I);
          z[s] <= z[s-1] + atan_c(I);
        end else begin
          x[s] <= x[s-1] - (y[s-1] >>> I);
          y[s] <= y[s-1] + (x[s-1] >>> I);
          z[s] <= z[s-1] - atan_c(I);
        end
      end
    end
  end

  // Drop the guard bits with rounding (x is never negative here).
  logic [XW-1:0] mag_r;
  logic [ZW-1:0] ph_r;
  always_comb begin
    mag_r = (XW)'(x[STAGES] + XW'(1 <<< (GUARD - 1))) >> GUARD;
    ph_r  = (ZW)'(z[STAGES] + ZW'(1 <<< (GUARD - 1)));
  end

  assign out_valid = v[STAGES];
  assign out_mag   = (mag_r > XW'({MAG_W{1'b1}})) ? {MAG_W{1'b1}} : mag_t'(mag_r);
  assign out_phase = phase_t'(ph_r[ZW-1:GUARD]);

endmodule

// de_cordic: pipelined rotation-mode CORDIC, polar to rectangular.
//
// It turns an equalized subcarrier (magnitude, normalized phase) back into
// I/Q for the decoder. A first stage applies the CORDIC gain correction
// 1/K = 0.6076 as a shift-add constant (1/2 + 1/8 - 1/64 - 1/512) and, for
// angles beyond +-90 degrees, an exact +-90 degree rotation; STAGES
// micro-rotations by +-atan(2^-i) then drive the residual angle to zero.
// Five stages give an angle error of a few degrees, which is all a 3-bit
// soft decision can resolve.
//
// Interface: in_valid/in_mag/in_phase enter every clock; results leave
// LATENCY = STAGES + 1 clocks later (6 by default). in_mag is unsigned with
// EQ_FRAC (8) fraction bits; out_i/out_q are signed DATA_W bits with the
// same scaling (1.0 = 256), saturated. out_soft_i/out_soft_q are 3-bit
// signed soft values, out_i/out_q in steps of 0.25 saturated to -4 .. 3.
//
// From the document: the block, its use in front of the Viterbi decoder,
// five stages and the three-bit resolution. Own choices: the gain
// correction, the quadrant stage, the latency and the soft value scaling.
module de_cordic
  import eq_pkg::*;
#(
  parameter int STAGES = 5,
  parameter int GUARD  = 2,
  parameter int SOFT_W = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  mag_t                     in_mag,
  input  phase_t                   in_phase,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_i,
  output logic signed [DATA_W-1:0] out_q,
  output logic signed [SOFT_W-1:0] out_soft_i,
  output logic signed [SOFT_W-1:0] out_soft_q
);

  localparam int XW = MAG_W + 2 + GUARD;
  localparam int ZW = PH_W;                 // residual angle, s1.10
  localparam int ZF = PH_W - 2;
  // atan(2^-i) / (pi/2) * 2^10, rounded.
  localparam int ATAN_TAB [8] = '{512, 302, 160, 81, 41, 20, 10, 5};

  logic signed [XW-1:0] x [STAGES+1];
  logic signed [XW-1:0] y [STAGES+1];
  logic signed [ZW-1:0] z [STAGES+1];
  logic                 v [STAGES+1];

  // Stage 0: gain correction and +-90 degree pre-rotation.
  logic signed [XW-1:0] m, ms;
  assign m  = XW'({1'b0, in_mag}) <<< GUARD;
  assign ms = (m >>> 1) + (m >>> 3) - (m >>> 6) - (m >>> 9);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x[0] <= '0; y[0] <= '0; z[0] <= '0; v[0] <= 1'b0;
    end else begin
      v[0] <= in_valid;
      if (in_phase >= phase_t'(1 <<< ZF)) begin
        x[0] <= '0; y[0] <= ms;  z[0] <= in_phase - phase_t'(1 <<< ZF);
      end else if (in_phase < -phase_t'(1 <<< ZF)) begin
        x[0] <= '0; y[0] <= -ms; z[0] <= in_phase + phase_t'(1 <<< ZF);
      end else begin
        x[0] <= ms; y[0] <= '0;  z[0] <= in_phase;
      end
    end
  end

  for (genvar s = 1; s <= STAGES; s++) begin : g_stage
    localparam int I = s - 1;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        x[s] <= '0; y[s] <= '0; z[s] <= '0; v[s] <= 1'b0;
      end else begin
        v[s] <= v[s-1];
        if (z[s-1] >= 0) begin
          x[s] <= x[s-1] - (y[s-1] >>> I);
          y[s] <= y[s-1] + (x[s-1] >>> I);
          z[s] <= z[s-1] - ZW'(ATAN_TAB[I]);
        end else begin
          x[s] <= x[s-1] + (y[s-1] >>> I);
          y[s] <= y[s-1] - (x[s-1] >>> I);
          z[s] <= z[s-1] + ZW'(ATAN_TAB[I]);
        end
      end
    end
  end

  function automatic logic signed [DATA_W-1:0] sat_out(input logic signed [XW-1:0] a);
    logic signed [XW-1:0] r;
    r = (a + XW'(1 <<< (GUARD - 1))) >>> GUARD;
    if (r > XW'(2 ** (DATA_W - 1) - 1))     return {1'b0, {(DATA_W-1){1'b1}}};
    else if (r < -XW'(2 ** (DATA_W - 1)))   return {1'b1, {(DATA_W-1){1'b0}}};
    else                                    return r[DATA_W-1:0];
  endfunction

  // Soft value: steps of 1/4 (64 LSBs at EQ_FRAC = 8), saturated.
  function automatic logic signed [SOFT_W-1:0] to_soft(input logic signed [DATA_W-1:0] a);
    logic signed [DATA_W-1:0] r;
    r = a >>> (EQ_FRAC - 2);
    if (r > DATA_W'(2 ** (SOFT_W - 1) - 1))   return {1'b0, {(SOFT_W-1){1'b1}}};
    else if (r < -DATA_W'(2 ** (SOFT_W - 1))) return {1'b1, {(SOFT_W-1){1'b0}}};
    else                                      return r[SOFT_W-1:0];
  endfunction

  assign out_valid  = v[STAGES];
  assign out_i      = sat_out(x[STAGES]);
  assign out_q      = sat_out(y[STAGES]);
  assign out_soft_i = to_soft(out_i);
  assign out_soft_q = to_soft(out_q);

endmodule

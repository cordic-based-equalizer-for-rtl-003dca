// ce_mag: magnitude part of channel estimation and equalization.
//
// The document builds it from two multiplexers and one divider. In the CE
// state (in_ce = 1) the dividend multiplexer selects |R1| + |R2| and the
// divisor multiplexer the constant 2, so the divider returns the channel
// magnitude |H| = (|R1| + |R2|) / 2 that is written back to the CFR memory.
// In the equalization state (in_ce = 0) it selects |R| and the stored |H|,
// and the divider returns the equalized magnitude |R| / |H| with EQ_FRAC
// fraction bits (a unit QPSK point gives 256). The constant 2 is applied as
// 2 << EQ_FRAC so that one divider with a fixed fraction scaling serves
// both states.
//
// Interface: one magnitude pair per lane per clock, results LAT (5) clocks
// later, aligned with out_ce. Lanes are independent.
//
// From the document: two multiplexers and one divider of latency 5, the
// average of the two preamble magnitudes and the division |R| / |H|. Own
// choices: where the multiplexers sit, the constant 2 << EQ_FRAC and the
// 8 fraction bits of the result.
module ce_mag
  import eq_pkg::*;
#(
  parameter int LAT = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_ce,              // 1: channel estimation, 0: equalization
  input  mag_t in_a [LANES],       // |R2| (CE) or |R| (equalization)
  input  mag_t in_b [LANES],       // |R1| (CE) or |H| (equalization)
  output logic out_valid,
  output logic out_ce,
  output mag_t out_q [LANES]       // |H| (CE) or |R|/|H| (equalization)
);

  logic [LANES-1:0] lane_valid;
  logic             ce_d [LAT+1];

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [MAG_W:0] num;
    mag_t           den;
    assign num = in_ce ? ({1'b0, in_a[l]} + {1'b0, in_b[l]}) : {1'b0, in_a[l]};
    assign den = in_ce ? mag_t'(2 << EQ_FRAC) : in_b[l];

    mag_divider #(
      .NUM_W (MAG_W + 1),
      .DEN_W (MAG_W),
      .Q_W   (MAG_W),
      .FRAC  (EQ_FRAC),
      .STAGES(LAT)
    ) u_div (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .in_num   (num),
      .in_den   (den),
      .out_valid(lane_valid[l]),
      .out_q    (out_q[l])
    );
  end

  assign ce_d[0] = in_ce;
  for (genvar s = 0; s < LAT; s++) begin : g_ce
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) ce_d[s+1] <= 1'b0;
      else        ce_d[s+1] <= ce_d[s];
  end

  assign out_valid = lane_valid[0];
  assign out_ce    = ce_d[LAT];

endmodule

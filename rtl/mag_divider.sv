// mag_divider: pipelined unsigned fixed-point divider.
//
// Computes out_q = floor(in_num * 2^FRAC / in_den) by restoring long
// division, one quotient bit per compare-and-subtract, spread over STAGES
// pipeline registers (ceil(Q_W / STAGES) bits per stage). A quotient that
// does not fit in Q_W bits, or a zero divisor, saturates to all ones.
//
// Interface: in_valid/in_num/in_den enter every clock; out_valid/out_q
// leave STAGES clocks later. The document's magnitude path is "a divider
// with 5 clock latency", hence STAGES = 5; the restoring algorithm and the
// saturation are this design's choices.
module mag_divider #(
  parameter int NUM_W  = 14,
  parameter int DEN_W  = 13,
  parameter int Q_W    = 13,
  parameter int FRAC   = 8,
  parameter int STAGES = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [NUM_W-1:0] in_num,
  input  logic [DEN_W-1:0] in_den,
  output logic             out_valid,
  output logic [Q_W-1:0]   out_q
);

  localparam int RW  = DEN_W + Q_W + 1;              // remainder width
  localparam int BPS = (Q_W + STAGES - 1) / STAGES;  // quotient bits per stage

  typedef struct packed {
    logic             v;
    logic             sat;
    logic [RW-1:0]    rem;
    logic [DEN_W-1:0] den;
    logic [Q_W-1:0]   q;
  } div_st_t;

  div_st_t st_in;                 // stage 0 input
  div_st_t nx [STAGES];           // combinational result of each stage
  div_st_t rg [STAGES];           // pipeline registers

  // Scaled numerator and overflow detection.
  logic [RW-1:0] num_s;
  assign num_s = RW'(in_num) << FRAC;
  always_comb begin
    st_in.v   = in_valid;
    st_in.den = in_den;
    st_in.rem = num_s;
    st_in.q   = '0;
    st_in.sat = (in_den == '0) || (num_s >= (RW'(in_den) << Q_W));
  end

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    always_comb begin
      nx[s] = (s == 0) ? st_in : rg[(s == 0) ? 0 : s - 1];
      for (int b = 0; b < BPS; b++) begin
        if (Q_W - 1 - s * BPS - b >= 0) begin
          if (nx[s].rem >= (RW'(nx[s].den) << (Q_W - 1 - s * BPS - b))) begin
            nx[s].rem = nx[s].rem - (RW'(nx[s].den) << (Q_W - 1 - s * BPS - b));
            nx[s].q[(Q_W - 1 - s * BPS - b) % Q_W] = 1'b1;
          end
        end
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) rg[s] <= '0;
      else        rg[s] <= nx[s];
    end
  end

  assign out_valid = rg[STAGES-1].v;
  assign out_q     = rg[STAGES-1].sat ? {Q_W{1'b1}} : rg[STAGES-1].q;

endmodule

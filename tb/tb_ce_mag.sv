// tb_ce_mag: self-checking testbench of the magnitude CE / equalization
// unit.
//
// Each clock drives random magnitudes on the four lanes and a random state
// (CE or equalization). The expected result, (a + b) / 2 in the CE state and
// floor(a * 256 / b) saturated to 13 bits in the equalization state, must
// appear on every lane exactly 5 clocks later together with the state.
//
// The 5-clock latency and the two equations follow the document; the
// 8-bit fraction scaling checked here is this design's own choice.
module tb_ce_mag;
  import eq_pkg::*;

  localparam int LAT = 5;
  localparam int N   = 3000;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ce = 0;
  mag_t in_a [LANES];
  mag_t in_b [LANES];
  logic out_valid, out_ce;
  mag_t out_q [LANES];

  ce_mag dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0, n_ce = 0, n_eq = 0;
  logic exp_v  [N + LAT + 20];
  logic exp_ce [N + LAT + 20];
  mag_t exp_q  [N + LAT + 20][LANES];
  initial for (int c = 0; c < N + LAT + 20; c++) exp_v[c] = 1'b0;

  always @(posedge clk) if (rst_n) cycle <= cycle + 1;

  function automatic mag_t model(input logic ce, input mag_t a, input mag_t b);
    longint q;
    if (ce) return mag_t'((longint'(a) + longint'(b)) / 2);
    if (b == 0) return '1;
    q = (longint'(a) * 256) / longint'(b);
    return (q > 8191) ? '1 : mag_t'(q);
  endfunction

  initial begin
    for (int l = 0; l < LANES; l++) begin in_a[l] = 0; in_b[l] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < N; n++) begin
      @(posedge clk);
      in_valid <= ($urandom_range(0, 4) != 0);
      in_ce    <= $urandom_range(0, 1);
      for (int l = 0; l < LANES; l++) begin
        in_a[l] <= mag_t'($urandom);
        in_b[l] <= (n % 3 == 0) ? mag_t'($urandom_range(1, 4000)) : mag_t'($urandom);
      end
    end
    @(posedge clk);
    in_valid <= 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (n_ce == 0 || n_eq == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    exp_v[cycle + LAT]  <= in_valid;
    exp_ce[cycle + LAT] <= in_ce;
    for (int l = 0; l < LANES; l++)
      exp_q[cycle + LAT][l] <= model(in_ce, in_a[l], in_b[l]);
  end

  always @(negedge clk) if (rst_n && cycle > 0) begin
    checks++;
    if (out_valid !== exp_v[cycle]) begin
      failures++;
      $display("valid mismatch at cycle %0d", cycle);
    end else if (out_valid) begin
      if (out_ce) n_ce++; else n_eq++;
      checks++;
      if (out_ce !== exp_ce[cycle]) failures++;
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (out_q[l] !== exp_q[cycle][l]) begin
          failures++;
          if (failures < 10)
            $display("lane %0d ce %0d: q=%0d expected %0d", l, out_ce, out_q[l], exp_q[cycle][l]);
        end
      end
    end
  end

  initial begin
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

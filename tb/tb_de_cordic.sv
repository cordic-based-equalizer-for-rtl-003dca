// tb_de_cordic: self-checking testbench of the polar-to-rectangular
// de-CORDIC.
//
// Drives random magnitudes (0 .. 4.0 in 1/256 units) and phases over the
// whole circle, with gaps in in_valid, and compares out_i/out_q with
// m*cos(phi) and m*sin(phi). Five micro-rotations leave an angle error of
// up to about 3.6 degrees, so the tolerance is 7 % of the magnitude plus
// 3 LSBs. The 3-bit soft values are checked against the saturated
// quantization of the checked I/Q, and each result must appear exactly 6
// clocks after its input.
// Five stages and 3-bit soft values follow the document; the latency and
// the soft value scaling are this design's own.
module tb_de_cordic;
  import eq_pkg::*;

  localparam int  LAT = 6;
  localparam int  N   = 3000;
  localparam real PI  = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic   in_valid = 0;
  mag_t   in_mag = 0;
  phase_t in_phase = 0;
  logic   out_valid;
  logic signed [DATA_W-1:0] out_i, out_q;
  logic signed [2:0] out_soft_i, out_soft_q;

  de_cordic dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  logic   exp_v [N + LAT + 20];
  mag_t   exp_m [N + LAT + 20];
  phase_t exp_p [N + LAT + 20];
  initial for (int c = 0; c < N + LAT + 20; c++) exp_v[c] = 1'b0;

  always @(posedge clk) if (rst_n) cycle <= cycle + 1;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < N; n++) begin
      @(posedge clk);
      in_valid <= ($urandom_range(0, 4) != 0);
      in_mag   <= mag_t'($urandom_range(0, 1024));
      in_phase <= phase_t'($urandom);
    end
    @(posedge clk);
    in_valid <= 0;
    repeat (LAT + 5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    exp_v[cycle + LAT] <= in_valid;
    exp_m[cycle + LAT] <= in_mag;
    exp_p[cycle + LAT] <= in_phase;
  end

  function automatic real rabs(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  function automatic int soft_of(input int v);
    int r;
    r = v >>> 6;
    if (r > 3) r = 3;
    if (r < -4) r = -4;
    return r;
  endfunction

  always @(negedge clk) if (rst_n && cycle > 0) begin
    checks++;
    if (out_valid !== exp_v[cycle]) begin
      failures++;
      $display("valid mismatch at cycle %0d", cycle);
    end else if (out_valid) begin
      real m, ph, ei, eq, tol;
      m   = real'(exp_m[cycle]);
      ph  = real'(exp_p[cycle]) / 1024.0 * (PI / 2.0);
      ei  = m * $cos(ph);
      eq  = m * $sin(ph);
      tol = 0.07 * m + 3.0;
      checks += 2;
      if (rabs(real'(out_i) - ei) > tol || rabs(real'(out_q) - eq) > tol) begin
        failures++;
        if (failures < 10)
          $display("mismatch m=%0d p=%0d: I=%0d (%f) Q=%0d (%f)",
                   exp_m[cycle], exp_p[cycle], out_i, ei, out_q, eq);
      end
      if (int'(out_soft_i) != soft_of(int'(out_i)) ||
          int'(out_soft_q) != soft_of(int'(out_q))) begin
        failures++;
        $display("soft value mismatch %0d %0d", out_soft_i, out_soft_q);
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

// tb_cordic: self-checking testbench of the vectoring CORDIC.
//
// Drives random and corner-case I/Q samples (axes, all four quadrants,
// short vectors, full scale) with random gaps in in_valid, and compares
// every output with a real-number model: magnitude sqrt(I^2+Q^2) times the
// ten-stage CORDIC gain, phase atan2(Q, I) / (pi/2) in 2^-10 units. It also
// checks that each result appears exactly 11 clocks after its input.
// The latency of 11 is the document's; the tolerances, wider for very
// short vectors where CORDIC phase is inherently poor, are this
// testbench's own.
module tb_cordic;
  import eq_pkg::*;

  localparam int    LAT  = 11;
  localparam int    N    = 3000;
  localparam real   PI   = 3.14159265358979;
  localparam real   GAIN = 1.6467592;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [DATA_W-1:0] in_i = 0, in_q = 0;
  logic   out_valid;
  mag_t   out_mag;
  phase_t out_phase;

  cordic dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;

  // expected results, indexed by the cycle the output must appear in
  logic                     exp_v   [N + LAT + 20];
  logic signed [DATA_W-1:0] exp_i   [N + LAT + 20];
  logic signed [DATA_W-1:0] exp_q   [N + LAT + 20];

  initial begin
    for (int c = 0; c < N + LAT + 20; c++) exp_v[c] = 1'b0;
  end

  always @(posedge clk) if (rst_n) cycle <= cycle + 1;

  // stimulus
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < N; n++) begin
      @(posedge clk);
      // drive for the next edge, which is cycle n+1 from the counter's view
      in_valid <= ($urandom_range(0, 3) != 0);
      case (n % 8)
        0: begin in_i <= 12'sd2047;                 in_q <= 12'sd0; end
        1: begin in_i <= -12'sd2048;                in_q <= 12'sd0; end
        2: begin in_i <= 12'sd0;                    in_q <= -12'sd2048; end
        3: begin in_i <= DATA_W'($urandom_range(0, 15) - 8);
                 in_q <= DATA_W'($urandom_range(0, 15) - 8); end
        default: begin in_i <= DATA_W'($urandom); in_q <= DATA_W'($urandom); end
      endcase
    end
    @(posedge clk);
    in_valid <= 0;
    repeat (LAT + 5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // record what enters, check what leaves
  always @(posedge clk) begin
    if (rst_n) begin
      exp_v[cycle + LAT] <= in_valid;
      exp_i[cycle + LAT] <= in_i;
      exp_q[cycle + LAT] <= in_q;
    end
  end

  always @(negedge clk) begin
    if (rst_n && cycle > 0) begin
      checks++;
      if (out_valid !== exp_v[cycle]) begin
        failures++;
        $display("valid mismatch at cycle %0d", cycle);
      end else if (out_valid) begin
        real xi, xq, m, ph, dph, dm, tol_ph;
        xi  = real'(exp_i[cycle]);
        xq  = real'(exp_q[cycle]);
        m   = $sqrt(xi * xi + xq * xq) * GAIN;
        ph  = $atan2(xq, xi) / (PI / 2.0) * 1024.0;
        dph = real'(out_phase) - ph;
        while (dph > 2048.0)  dph -= 4096.0;
        while (dph < -2048.0) dph += 4096.0;
        dm  = real'(out_mag) - m;
        // Very short vectors lose phase accuracy to the shifts (the known CORDIC
        // weakness the guard bits reduce); the limits widen for them.
        tol_ph = (m < 10.0) ? 200.0 : (m < 60.0) ? 40.0 : 3.0;
        checks++;
        if (dm > 3.0 || dm < -3.0 || ((xi != 0.0 || xq != 0.0) &&
            (dph > tol_ph || dph < -tol_ph))) begin
          failures++;
          if (failures < 10)
            $display("mismatch I=%0d Q=%0d mag %0d exp %f phase %0d exp %f",
                     exp_i[cycle], exp_q[cycle], out_mag, m, out_phase, ph);
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

// tb_mag_divider: self-checking testbench of the pipelined divider.
//
// Random numerators and denominators, including zero divisors, quotients
// that overflow, and small divisors, are compared with an integer model
// floor(num * 256 / den) saturated to 13 bits. Every result must appear
// exactly 5 clocks after its operands (the document's divider latency).
// The quotient format and the saturation are this design's own choices.
module tb_mag_divider;

  localparam int LAT = 5;
  localparam int N   = 4000;

  logic clk = 0, rst_n = 0;
  logic        in_valid = 0;
  logic [13:0] in_num = 0;
  logic [12:0] in_den = 0;
  logic        out_valid;
  logic [12:0] out_q;

  mag_divider dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  logic        exp_v [N + LAT + 20];
  logic [12:0] exp_q [N + LAT + 20];
  initial for (int c = 0; c < N + LAT + 20; c++) exp_v[c] = 1'b0;

  always @(posedge clk) if (rst_n) cycle <= cycle + 1;

  function automatic logic [12:0] model(input logic [13:0] n, input logic [12:0] d);
    longint q;
    if (d == 0) return '1;
    q = (longint'(n) * 256) / longint'(d);
    if (q > 8191) return '1;
    return q[12:0];
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < N; n++) begin
      logic [13:0] a;
      logic [12:0] b;
      @(posedge clk);
      a = 14'($urandom);
      case (n % 5)
        0: b = 13'($urandom);
        1: b = 13'($urandom_range(0, 3));
        2: b = a[13:1] | 13'd1;
        3: b = 13'($urandom_range(256, 600));
        default: b = 13'($urandom_range(1, 8191));
      endcase
      in_valid <= ($urandom_range(0, 4) != 0);
      in_num   <= a;
      in_den   <= b;
    end
    @(posedge clk);
    in_valid <= 0;
    repeat (LAT + 5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    exp_v[cycle + LAT] <= in_valid;
    exp_q[cycle + LAT] <= model(in_num, in_den);
  end

  always @(negedge clk) if (rst_n && cycle > 0) begin
    checks++;
    if (out_valid !== exp_v[cycle]) begin
      failures++;
      $display("valid mismatch at cycle %0d", cycle);
    end else if (out_valid) begin
      checks++;
      if (out_q !== exp_q[cycle]) begin
        failures++;
        if (failures < 10) $display("q=%0d expected %0d", out_q, exp_q[cycle]);
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

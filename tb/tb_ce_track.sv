// tb_ce_track: self-checking testbench of the CE error tracking unit.
//
// Sweeps equalized phases over the whole circle and magnitudes across and
// beyond the trust area (0.5 .. 1.33), with the enable on and off, and
// checks the trust decision and the output 2*mu*(arg d - arg y) against an
// independent model (nearest QPSK phase +-pi/4, +-3pi/4).
//
// The trust-area limits checked follow the document; 2*mu = 1/8 and the
// four-quadrant use of the area are this design's own choices.
module tb_ce_track;
  import eq_pkg::*;

  logic   in_enable;
  phase_t in_phase;
  mag_t   in_mag;
  logic   out_trusted;
  phase_t out_delta;

  ce_track dut (.*);

  int checks = 0, failures = 0, n_trusted = 0, n_outside = 0;

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int  ph, mg, frac, dph, ed;
      bit  en, tr;
      ph = $urandom_range(0, 4095) - 2048;
      mg = $urandom_range(0, 500);
      en = ($urandom_range(0, 7) != 0);
      in_enable = en;
      in_phase  = phase_t'(ph);
      in_mag    = mag_t'(mg);
      #1;
      // model: fraction of the phase within its quadrant, 0 .. 1023
      frac = ph & 1023;
      tr   = en && frac >= 256 && frac <= 768 && mg >= 128 && mg <= 340;
      dph  = 512 - frac;                       // arg d - arg y
      ed   = tr ? ((dph * 32) >>> 8) : 0;
      checks++;
      if (out_trusted !== tr || int'(out_delta) != ed) begin
        failures++;
        if (failures < 10)
          $display("phase %0d mag %0d en %0d: trusted %0d delta %0d, expected %0d %0d",
                   ph, mg, en, out_trusted, out_delta, tr, ed);
      end
      if (tr) n_trusted++; else n_outside++;
    end
    checks++;
    if (n_trusted == 0 || n_outside == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

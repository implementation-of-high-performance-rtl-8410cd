// tb_band_select: for every bin of the 128-point FFT, the bin frequency
// k * 173.61 / 128 Hz is computed in floating point and the expected band
// flags (theta 4-7, alpha 8-12, beta 13-29, gamma 30-50 Hz) compared with
// in_band. Also checks the bin counts per band (3, 3, 12, 14).
module tb_band_select;
  int checks = 0;
  int failures = 0;
  logic [6:0] bin;
  logic [3:0] in_band;

  band_select dut (.bin(bin), .in_band(in_band));

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real lo [4] = '{4.0, 8.0, 13.0, 30.0};
    real hi [4] = '{7.0, 12.0, 29.0, 50.0};
    int  cnt [4] = '{0, 0, 0, 0};
    int  expc [4] = '{3, 3, 12, 14};
    for (int k = 0; k < 128; k++) begin
      real f;
      logic [3:0] exp;
      f = real'(k) * 173.61 / 128.0;
      for (int b = 0; b < 4; b++) exp[b] = (f >= lo[b]) && (f <= hi[b]);
      bin = 7'(k);
      #1;
      checks++;
      if (in_band !== exp) begin
        failures++;
        $display("FAIL bin %0d (%f Hz): %b expected %b", k, f, in_band, exp);
      end
      for (int b = 0; b < 4; b++) if (in_band[b]) cnt[b]++;
    end
    for (int b = 0; b < 4; b++) begin
      checks++;
      if (cnt[b] != expc[b]) begin failures++; $display("FAIL band %0d has %0d bins", b, cnt[b]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

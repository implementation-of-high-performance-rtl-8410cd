// tb_band_mux: each select value must route its own band energy.
module tb_band_mux;
  import seizure_pkg::*;
  int checks = 0;
  int failures = 0;
  logic [63:0] e [4];
  band_e       sel;
  logic [63:0] out;

  band_mux dut (.band_energy(e), .sel(sel), .energy_response(out));

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int b = 0; b < 4; b++) e[b] = {$urandom, $urandom};
      for (int b = 0; b < 4; b++) begin
        sel = band_e'(b);
        #1;
        checks++;
        if (out !== e[b]) begin failures++; $display("FAIL sel %0d", b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

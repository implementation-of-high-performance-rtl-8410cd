// tb_seizure_analysis: analysis of three detected channels.
//
// A behavioural buffer (128 samples per channel, registered read) holds
// offset-binary sine waves: channel 1 at 5.4 Hz (theta), channel 3 at
// 10.2 Hz (alpha), channel 7 at 40.7 Hz (gamma), channel 12 at 20 Hz
// (beta), each with DC and a little noise, sampled at 173.61 Hz. Channels
// 1, 3, 7 and 12 are flagged. For each report the testbench checks the
// channel order (lowest first), the four band energies against
// sum |X_k|^2 of a floating-point DFT over the band's bins (relative error
// below 0.2 %), that the band holding the tone dominates, the multiplexed
// energy_response for every band_sel, and the 709-clock period per
// channel.
module tb_seizure_analysis;
  import seizure_pkg::*;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  localparam int  N = 128;
  localparam real PI = 3.14159265358979323846;
  localparam real FS = 173.61;

  logic        start, busy, tx_valid;
  logic [15:0] channels;
  logic [6:0]  rd_addr;
  logic [3:0]  rd_channel, tx_channel;
  logic [15:0] rd_sample;
  band_e       band_sel;
  logic [63:0] tx_out [4];
  logic [63:0] energy_response;

  seizure_analysis dut (
    .clk(clk), .rst(rst), .start(start), .channels(channels), .busy(busy),
    .rd_addr(rd_addr), .rd_channel(rd_channel), .rd_sample(rd_sample), .band_sel(band_sel),
    .tx_valid(tx_valid), .tx_channel(tx_channel), .tx_out(tx_out), .energy_response(energy_response)
  );

  logic [15:0] buf_mem [16][N];
  always_ff @(posedge clk) rd_sample <= buf_mem[rd_channel][rd_addr];

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void band_energy_ref(int ch, output real e [4]);
    int lo [4] = '{3, 6, 10, 23};
    for (int b = 0; b < 4; b++) e[b] = 0.0;
    for (int k = 0; k < N / 2; k++) begin
      real re, im, f;
      re = 0.0; im = 0.0;
      for (int n = 0; n < N; n++) begin
        real v;
        v = real'(int'(buf_mem[ch][n]) - 32768);
        re += v * $cos(2.0 * PI * real'(k * n % N) / real'(N));
        im -= v * $sin(2.0 * PI * real'(k * n % N) / real'(N));
      end
      f = real'(k) * FS / real'(N);
      if (f >= 4.0  && f <= 7.0)  e[0] += re * re + im * im;
      if (f >= 8.0  && f <= 12.0) e[1] += re * re + im * im;
      if (f >= 13.0 && f <= 29.0) e[2] += re * re + im * im;
      if (f >= 30.0 && f <= 50.0) e[3] += re * re + im * im;
    end
    if (lo[0] < 0) e[0] = 0.0;
  endfunction

  initial begin
    real freq [16];
    int  tone_band [16];
    int  expect_ch [4] = '{1, 3, 7, 12};
    int  cycles;
    real e [4];
    for (int c = 0; c < 16; c++) begin freq[c] = 0.0; tone_band[c] = -1; end
    freq[1] = 5.4;   tone_band[1] = 0;
    freq[3] = 10.2;  tone_band[3] = 1;
    freq[7] = 40.7;  tone_band[7] = 3;
    freq[12] = 20.0; tone_band[12] = 2;
    for (int c = 0; c < 16; c++)
      for (int n = 0; n < N; n++)
        buf_mem[c][n] = 16'(32768 + 1500 + $urandom_range(0, 40)
                            + $rtoi(9000.0 * $sin(2.0 * PI * freq[c] * real'(n) / FS)));

    rst = 1; start = 0; channels = 0; band_sel = BAND_THETA;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after reset"); end
    channels = 16'b0001_0000_1000_1010;
    start = 1;
    @(negedge clk);
    start = 0;
    channels = 0;
    for (int r = 0; r < 4; r++) begin
      cycles = (r == 0) ? 0 : 1;
      while (!tx_valid && cycles < 5000) begin
        checks++;
        if (!busy) begin failures++; $display("FAIL not busy while analysing"); end
        @(negedge clk);
        cycles++;
      end
      checks++;
      if (cycles != 709) begin failures++; $display("FAIL report %0d after %0d clocks, expected 709", r, cycles); end
      checks++;
      if (int'(tx_channel) != expect_ch[r]) begin
        failures++; $display("FAIL report %0d channel %0d expected %0d", r, tx_channel, expect_ch[r]);
      end
      band_energy_ref(int'(tx_channel), e);
      for (int b = 0; b < 4; b++) begin
        real got, err;
        got = real'(tx_out[b]);
        err = got - e[b];
        if (err < 0) err = -err;
        checks++;
        if (err > 0.002 * e[b] + 1.0e6) begin
          failures++;
          $display("FAIL ch %0d band %0d: %e expected %e", tx_channel, b, got, e[b]);
        end
      end
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (b != tone_band[tx_channel] && tx_out[b] >= tx_out[tone_band[tx_channel]]) begin
          failures++; $display("FAIL ch %0d: band %0d not dominant", tx_channel, tone_band[tx_channel]);
        end
      end
      for (int b = 0; b < 4; b++) begin
        band_sel = band_e'(b);
        #1;
        checks++;
        if (energy_response !== tx_out[b]) begin failures++; $display("FAIL mux band %0d", b); end
      end
      @(negedge clk);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL still busy after the last channel"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

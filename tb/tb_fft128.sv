// tb_fft128: 128-point FFT against a floating-point DFT computed here.
//
// Frames: a single impulse, a full-scale cosine at bin 9, a mix of two
// sines plus DC, and random full-range samples. Every output bin is
// compared with the DFT; the allowed error is 2 LSB plus 2^-11 of the
// frame's summed input magnitude (twiddles carry 14 fraction bits and
// the error can build up over 7 stages). Also checks the output order
// (index 0..127 on consecutive clocks) and the frame latency: the first
// bin appears 448 + 1 clocks after the last input sample is accepted.
// A second instance built with Booth multipliers (USE_BOOTH = 1) gets the
// same input and must give bit-identical outputs on every clock.
module tb_fft128;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  localparam int N = 128;
  localparam real PI = 3.14159265358979323846;

  logic               in_valid, in_ready, out_valid, busy;
  logic signed [15:0] in_data;
  logic [6:0]         out_index;
  logic signed [23:0] out_re, out_im;

  fft128 dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
              .out_valid(out_valid), .out_index(out_index), .out_re(out_re), .out_im(out_im), .busy(busy));

  logic               b_in_ready, b_out_valid, b_busy;
  logic [6:0]         b_out_index;
  logic signed [23:0] b_out_re, b_out_im;
  fft128 #(.USE_BOOTH(1'b1)) dut_booth (.clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(b_in_ready), .in_data(in_data),
              .out_valid(b_out_valid), .out_index(b_out_index), .out_re(b_out_re), .out_im(b_out_im), .busy(b_busy));

  int booth_checks = 0;
  always @(negedge clk) begin
    if (!rst) begin
      checks++; booth_checks++;
      if ({b_in_ready, b_out_valid, b_busy, b_out_index, b_out_re, b_out_im} !=
          {in_ready, out_valid, busy, out_index, out_re, out_im}) begin
        failures++;
        if (failures < 20) $display("FAIL booth instance differs: (%0d,%0d) vs (%0d,%0d)", b_out_re, b_out_im, out_re, out_im);
      end
    end
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  x [N];
  real ref_re [N];
  real ref_im [N];
  real max_err;

  task automatic run_frame(string name);
    real tol, mag;
    int  latency;
    mag = 0.0;
    for (int n = 0; n < N; n++) mag += (x[n] < 0) ? -real'(x[n]) : real'(x[n]);
    tol = 2.0 + mag / 2048.0;
    for (int k = 0; k < N; k++) begin
      ref_re[k] = 0.0; ref_im[k] = 0.0;
      for (int n = 0; n < N; n++) begin
        ref_re[k] += real'(x[n]) * $cos(2.0 * PI * real'(k * n % N) / real'(N));
        ref_im[k] -= real'(x[n]) * $sin(2.0 * PI * real'(k * n % N) / real'(N));
      end
    end
    // Feed.
    for (int n = 0; n < N; n++) begin
      in_data  = 16'(x[n]);
      in_valid = 1'b1;
      checks++;
      if (!in_ready) begin failures++; $display("FAIL %s: not ready at sample %0d", name, n); end
      @(negedge clk);
    end
    in_valid = 1'b0;
    latency = 0;
    while (!out_valid && latency < 2000) begin
      @(negedge clk);
      latency++;
    end
    checks++;
    if (latency != 449) begin
      failures++;
      $display("FAIL %s: first bin %0d clocks after the last sample, expected 449", name, latency);
    end
    for (int k = 0; k < N; k++) begin
      real er, ei;
      checks++;
      if (!out_valid || out_index != 7'(k)) begin
        failures++;
        $display("FAIL %s: bin order at %0d (valid=%0d index=%0d)", name, k, out_valid, out_index);
      end
      er = real'(out_re) - ref_re[k];
      ei = real'(out_im) - ref_im[k];
      if (er < 0) er = -er;
      if (ei < 0) ei = -ei;
      if (er > max_err) max_err = er;
      if (ei > max_err) max_err = ei;
      checks++;
      if (er > tol || ei > tol) begin
        failures++;
        $display("FAIL %s bin %0d: got (%0d,%0d) expected (%f,%f)", name, k, out_re, out_im, ref_re[k], ref_im[k]);
      end
      @(negedge clk);
    end
    checks++;
    if (out_valid || !in_ready) begin failures++; $display("FAIL %s: not back to load", name); end
  endtask

  initial begin
    rst = 1; in_valid = 0; in_data = 0; max_err = 0.0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);

    for (int n = 0; n < N; n++) x[n] = (n == 5) ? 1000 : 0;
    run_frame("impulse");
    for (int n = 0; n < N; n++) x[n] = $rtoi(32767.0 * $cos(2.0 * PI * 9.0 * real'(n) / real'(N)));
    run_frame("cos bin 9");
    for (int n = 0; n < N; n++)
      x[n] = 3000 + $rtoi(12000.0 * $sin(2.0 * PI * 4.0 * real'(n) / real'(N)))
                  + $rtoi(8000.0 * $sin(2.0 * PI * 30.0 * real'(n) / real'(N)));
    run_frame("two sines");
    for (int f = 0; f < 3; f++) begin
      for (int n = 0; n < N; n++) x[n] = $signed(16'($urandom));
      run_frame("random");
    end
    for (int n = 0; n < N; n++) x[n] = -32768;
    run_frame("negative full scale DC");
    $display("max abs error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_eeg_seizure_soc: end-to-end test of the full 16-channel system at its
// default size (33-tap filters, 128-sample buffer, 128-point FFT).
//
// Stimulus: every channel carries DC (20000), noise and a weak tone of its
// own frequency, one sample word every 4 clocks. The 33-tap filter is a
// DC-removing high-pass (h[16] = 32, all other taps -1). Bursts of spikes
// (+1000 every 3rd sample) are added:
//   phase A  no spikes                 (buffer fills and wraps)
//   phase B  spikes on channel 5 only  (channel detects, system must not)
//   phase C  spikes on channels 2, 9, 14 (multichannel seizure, analysis)
//   phase D  spikes on channels 0 and 15 (second seizure, re-arm)
// Checks: channel_seizure of every channel after every sample against a
// reference model (FIR, comparator, IEI window, N counter); seizure and
// detected_channels against the popcount rule; each analysis report's
// channel order and band energies against a floating-point DFT of the
// samples the buffer held (the testbench mirrors the buffer, including the
// freeze while busy); energy_response for every band_sel.
// Mechanisms counted, each must occur: threshold crossings, IEI master
// resets, channel detections, a single-channel detection rejected,
// multichannel seizures, analyses started, reports, samples dropped by the
// buffer freeze, buffer wrap-around.
module tb_eeg_seizure_soc;
  import seizure_pkg::*;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  localparam int  NCH = 16;
  localparam int  T = 33;
  localparam int  N = 128;
  localparam real PI = 3.14159265358979323846;
  localparam int  THRESH = 16000;
  localparam int  IEI = 20;
  localparam int  NTH = 3;

  logic               sample_valid;
  logic [15:0]        eegdata_in [NCH];
  logic signed [15:0] fir_coef [T];
  band_e              band_sel;
  logic [15:0]        channel_seizure, detected_channels;
  logic               seizure, analysis_busy, tx_valid;
  logic [3:0]         tx_channel;
  logic [63:0]        tx_out [4];
  logic [63:0]        energy_response;

  eeg_seizure_soc dut (
    .clk(clk), .rst(rst), .sample_valid(sample_valid), .eegdata_in(eegdata_in),
    .fir_coef(fir_coef), .baseline_thresh(16'(THRESH)), .iei_thresh(16'(IEI)), .n_thresh(16'(NTH)),
    .band_sel(band_sel), .channel_seizure(channel_seizure), .detected_channels(detected_channels),
    .seizure(seizure), .analysis_busy(analysis_busy), .tx_valid(tx_valid), .tx_channel(tx_channel),
    .tx_out(tx_out), .energy_response(energy_response)
  );

  initial begin
    #100000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model state.
  longint m_hist [NCH][T];
  int     m_open [NCH];
  int     m_iei [NCH];
  int     m_n [NCH];
  int     m_seen [NCH];   // samples since reset
  // Mirror of the buffer: every stored word, per channel.
  int     stored [NCH][$];
  int     words_stored;

  // Mechanism counters.
  int n_cross, n_mreset, n_ch_detect, n_rejected, n_seizure, n_analysis, n_report, n_dropped, n_wrap;
  bit prev_seizure, prev_busy;
  bit [NCH-1:0] prev_ch;
  bit [NCH-1:0] expect_reports [$];
  int           report_queue [$];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic model_sample(int c, int x);
    longint y;
    bit crossing, mr;
    for (int i = T - 1; i > 0; i--) m_hist[c][i] = m_hist[c][i-1];
    m_hist[c][0] = longint'(x);
    y = 0;
    for (int i = 0; i < T; i++) y += m_hist[c][i] * longint'(fir_coef[i]);
    if (y > 32767) y = 32767;
    if (y < -32768) y = -32768;
    m_seen[c]++;
    if (m_seen[c] < T) return;          // delay line not full yet
    crossing = (y > THRESH);
    mr = (m_open[c] != 0) && (m_iei[c] + 1 > IEI);
    if (crossing) n_cross++;
    if (mr) n_mreset++;
    if (m_open[c] != 0) begin
      if (mr) begin m_open[c] = 0; m_iei[c] = 0; end else m_iei[c]++;
    end else if (crossing) begin
      m_open[c] = 1; m_iei[c] = 0;
    end
    if (mr) m_n[c] = 0; else if (crossing) m_n[c]++;
  endtask

  // Check the band energies of one report against a DFT of the mirrored
  // buffer (the last N stored words of that channel).
  task automatic check_report(int ch);
    real e [4];
    int  base;
    for (int b = 0; b < 4; b++) e[b] = 0.0;
    base = stored[ch].size() - N;
    for (int k = 0; k < N / 2; k++) begin
      real re, im, f;
      re = 0.0; im = 0.0;
      for (int n = 0; n < N; n++) begin
        real v;
        v = real'(stored[ch][base + n] - 32768);
        re += v * $cos(2.0 * PI * real'(k * n % N) / real'(N));
        im -= v * $sin(2.0 * PI * real'(k * n % N) / real'(N));
      end
      f = real'(k) * 173.61 / real'(N);
      if (f >= 4.0  && f <= 7.0)  e[0] += re * re + im * im;
      if (f >= 8.0  && f <= 12.0) e[1] += re * re + im * im;
      if (f >= 13.0 && f <= 29.0) e[2] += re * re + im * im;
      if (f >= 30.0 && f <= 50.0) e[3] += re * re + im * im;
    end
    for (int b = 0; b < 4; b++) begin
      real got, err;
      got = real'(tx_out[b]);
      err = got - e[b];
      if (err < 0) err = -err;
      checks++;
      if (err > 0.002 * e[b] + 1.0e6) begin
        failures++;
        $display("FAIL report ch %0d band %0d: %e expected %e", ch, b, got, e[b]);
      end
    end
    for (int b = 0; b < 4; b++) begin
      band_sel = band_e'(b);
      #1;
      check("energy_response", longint'(energy_response), longint'(tx_out[b]));
    end
  endtask

  // Watch reports on every clock.
  always @(negedge clk) begin
    if (!rst && tx_valid) begin
      n_report++;
      checks++;
      if (report_queue.size() == 0) begin
        failures++;
        $display("FAIL unexpected report for channel %0d", tx_channel);
      end else begin
        int exp_ch;
        exp_ch = report_queue.pop_front();
        check("report channel", longint'(tx_channel), longint'(exp_ch));
        check_report(int'(tx_channel));
      end
    end
    if (!rst && analysis_busy && !prev_busy) n_analysis++;
    prev_busy = analysis_busy;
  end

  int tone_hz [NCH];

  task automatic apply_sample(int t, bit [NCH-1:0] spiking);
    int x [NCH];
    bit [NCH-1:0] exp_ch;
    int pc;
    for (int c = 0; c < NCH; c++) begin
      x[c] = 20000 + $urandom_range(0, 40)
           + $rtoi(300.0 * $sin(2.0 * PI * real'(tone_hz[c]) * real'(t) / 173.61));
      if (spiking[c] && (t % 3 == 0)) x[c] += 1000;
      eegdata_in[c] = 16'(x[c]);
    end
    sample_valid = 1'b1;
    if (!analysis_busy) begin
      for (int c = 0; c < NCH; c++) stored[c].push_back(x[c]);
      words_stored++;
      if (words_stored > N) n_wrap++;
    end else begin
      n_dropped++;
    end
    @(negedge clk);
    sample_valid = 1'b0;
    for (int c = 0; c < NCH; c++) model_sample(c, x[c]);
    repeat (3) @(negedge clk);
    // Compare the detectors (settled 2 clocks after the sample) and the
    // multichannel stage (3 clocks).
    exp_ch = '0;
    for (int c = 0; c < NCH; c++) exp_ch[c] = (m_n[c] > NTH);
    check("channel_seizure", longint'(channel_seizure), longint'(exp_ch));
    check("detected_channels", longint'(detected_channels), longint'(exp_ch));
    pc = $countones(exp_ch);
    check("seizure", longint'(seizure), longint'(pc >= 2));
    for (int c = 0; c < NCH; c++) if (exp_ch[c] && !prev_ch[c]) n_ch_detect++;
    if (pc == 1 && !seizure && (exp_ch & ~prev_ch) != 0) n_rejected++;
    if (seizure && !prev_seizure) begin
      n_seizure++;
      for (int c = 0; c < NCH; c++) if (detected_channels[c]) report_queue.push_back(c);
    end
    prev_seizure = seizure;
    prev_ch = exp_ch;
  endtask

  initial begin
    int t;
    rst = 1'b1; sample_valid = 1'b0; band_sel = BAND_THETA;
    for (int c = 0; c < NCH; c++) begin
      eegdata_in[c] = '0;
      tone_hz[c] = 5 + 3 * c;   // 5 .. 50 Hz
      m_open[c] = 0; m_iei[c] = 0; m_n[c] = 0; m_seen[c] = 0;
      for (int i = 0; i < T; i++) m_hist[c][i] = 0;
    end
    for (int i = 0; i < T; i++) fir_coef[i] = (i == 16) ? 16'sd32 : -16'sd1;
    words_stored = 0;
    prev_seizure = 0; prev_busy = 0; prev_ch = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);

    t = 0;
    for (int i = 0; i < 200; i++) apply_sample(t++, '0);                        // A
    for (int i = 0; i < 15; i++)  apply_sample(t++, 16'(1 << 5));               // B
    for (int i = 0; i < 80; i++)  apply_sample(t++, '0);
    for (int i = 0; i < 15; i++)  apply_sample(t++, 16'b0100_0010_0000_0100);   // C
    for (int i = 0; i < 700; i++) apply_sample(t++, '0);
    for (int i = 0; i < 15; i++)  apply_sample(t++, 16'b1000_0000_0000_0001);   // D
    for (int i = 0; i < 700; i++) apply_sample(t++, '0);

    check("all reports seen", longint'(report_queue.size()), 0);
    $display("mechanisms: crossings=%0d master_resets=%0d channel_detections=%0d rejected_single=%0d",
             n_cross, n_mreset, n_ch_detect, n_rejected);
    $display("            seizures=%0d analyses=%0d reports=%0d dropped_while_frozen=%0d wraps=%0d",
             n_seizure, n_analysis, n_report, n_dropped, n_wrap);
    check("crossings happened", longint'(n_cross > 0), 1);
    check("master resets happened", longint'(n_mreset > 0), 1);
    check("channel detections happened", longint'(n_ch_detect > 0), 1);
    check("single-channel detection rejected", longint'(n_rejected > 0), 1);
    check("multichannel seizures", longint'(n_seizure), 2);
    check("analyses", longint'(n_analysis), 2);
    check("reports", longint'(n_report), 5);
    check("buffer froze during analysis", longint'(n_dropped > 0), 1);
    check("buffer wrapped", longint'(n_wrap > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

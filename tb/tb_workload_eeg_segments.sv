// tb_workload_eeg_segments: the full 16-channel system on three synthetic
// recordings shaped like the clinical evaluation data: 23.6 s segments
// sampled at 173.61 Hz (4097 samples), one each of
//   normal      - DC, noise and a weak 10 Hz alpha rhythm on every channel;
//   interictal  - the same, plus isolated spikes on random channels at
//                 least 1.2 s apart;
//   ictal       - a large 5.4 Hz rhythmic discharge with a spike on every
//                 wave, on channels 0..12, so that the per-channel flags
//                 reach s = 0x1FFF as in the published 16-channel result.
// Detector settings: a DC-removing high-pass (h[16] = 32, others -1),
// baseline threshold 16000, IEI window of 173 samples (about 1 s), and a
// seizure after 4 crossings in a window (n_thresh = 3).
// Expected: no channel detection and no report in the normal and
// interictal segments (the interictal spikes do cross the threshold, once
// per window); in the ictal segment a multichannel seizure, one report per
// channel of the detected mask, only from ictal channels, with theta (the
// band of the 5.4 Hz discharge) the largest band energy in every report.
// One sample word every 2 clocks.
// The Booth-multiplier system (USE_BOOTH = 1), the source's comparison
// system, runs beside the default vedic one on the same input; all its
// outputs must match the vedic system's on every clock.
module tb_workload_eeg_segments;
  import seizure_pkg::*;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  localparam int  NCH = 16;
  localparam int  SEG = 4097;
  localparam real PI = 3.14159265358979323846;
  localparam real FS = 173.61;

  logic               sample_valid;
  logic [15:0]        eegdata_in [NCH];
  logic signed [15:0] fir_coef [33];
  band_e              band_sel;
  logic [15:0]        channel_seizure, detected_channels;
  logic               seizure, analysis_busy, tx_valid;
  logic [3:0]         tx_channel;
  logic [63:0]        tx_out [4];
  logic [63:0]        energy_response;

  eeg_seizure_soc dut (
    .clk(clk), .rst(rst), .sample_valid(sample_valid), .eegdata_in(eegdata_in),
    .fir_coef(fir_coef), .baseline_thresh(16'sd16000), .iei_thresh(16'd173), .n_thresh(16'd3),
    .band_sel(band_sel), .channel_seizure(channel_seizure), .detected_channels(detected_channels),
    .seizure(seizure), .analysis_busy(analysis_busy), .tx_valid(tx_valid), .tx_channel(tx_channel),
    .tx_out(tx_out), .energy_response(energy_response)
  );

  logic [15:0] b_channel_seizure, b_detected_channels;
  logic        b_seizure, b_analysis_busy, b_tx_valid;
  logic [3:0]  b_tx_channel;
  logic [63:0] b_tx_out [4];
  logic [63:0] b_energy_response;

  eeg_seizure_soc #(.USE_BOOTH(1'b1)) dut_booth (
    .clk(clk), .rst(rst), .sample_valid(sample_valid), .eegdata_in(eegdata_in),
    .fir_coef(fir_coef), .baseline_thresh(16'sd16000), .iei_thresh(16'd173), .n_thresh(16'd3),
    .band_sel(band_sel), .channel_seizure(b_channel_seizure), .detected_channels(b_detected_channels),
    .seizure(b_seizure), .analysis_busy(b_analysis_busy), .tx_valid(b_tx_valid), .tx_channel(b_tx_channel),
    .tx_out(b_tx_out), .energy_response(b_energy_response)
  );

  int booth_mismatch = 0;
  always @(negedge clk) begin
    if (!rst) begin
      if ({b_channel_seizure, b_detected_channels, b_seizure, b_analysis_busy, b_tx_valid, b_tx_channel,
           b_tx_out[0], b_tx_out[1], b_tx_out[2], b_tx_out[3], b_energy_response} !=
          {channel_seizure, detected_channels, seizure, analysis_busy, tx_valid, tx_channel,
           tx_out[0], tx_out[1], tx_out[2], tx_out[3], energy_response}) begin
        booth_mismatch++;
        if (booth_mismatch < 5) $display("FAIL booth system differs at %0t", $time);
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

  // Per-segment observations.
  int          seg_id;
  int          det_events [3];
  int          seizure_events [3];
  int          reports [3];
  int          theta_wins [3];
  int          crossings [3];
  int          max_channels [3];
  bit          saw_1fff;
  logic [15:0] mask_at_seizure;
  bit          prev_seizure;
  localparam logic [15:0] ICTAL = 16'h1FFF;

  always @(posedge clk) begin
    if (!rst) begin
      crossings[seg_id] += $countones(dut.ch_enable);
      if ($countones(channel_seizure) > max_channels[seg_id]) max_channels[seg_id] = $countones(channel_seizure);
      if (channel_seizure != '0) det_events[seg_id]++;
      if (channel_seizure == 16'h1FFF) saw_1fff = 1'b1;
      if (seizure && !prev_seizure) begin
        seizure_events[seg_id]++;
        mask_at_seizure = detected_channels;
      end
      prev_seizure = seizure;
      if (tx_valid) begin
        reports[seg_id]++;
        checks++;
        if (!ICTAL[tx_channel]) begin
          failures++;
          $display("FAIL report for non-ictal channel %0d", tx_channel);
        end
        if (tx_out[0] > tx_out[1] && tx_out[0] > tx_out[2] && tx_out[0] > tx_out[3]) theta_wins[seg_id]++;
        else $display("note: channel %0d bands %0d %0d %0d %0d", tx_channel, tx_out[0], tx_out[1], tx_out[2], tx_out[3]);
      end
    end
  end

  task automatic run_segment(int kind);
    int next_spike;
    next_spike = 100;
    for (int t = 0; t < SEG; t++) begin
      for (int c = 0; c < NCH; c++) begin
        real v;
        v = 20000.0 + real'($urandom_range(0, 40))
          + 300.0 * $sin(2.0 * PI * 10.0 * real'(t) / FS + real'(c));
        if (kind == 2 && ICTAL[c]) begin
          real ph;
          ph = 2.0 * PI * 5.4 * real'(t) / FS;
          v += 3000.0 * $sin(ph);
          if ($sin(ph) > 0.95) v += 1500.0;
        end
        eegdata_in[c] = 16'($rtoi(v));
      end
      if (kind == 1 && t == next_spike) begin
        int c;
        c = $urandom_range(0, NCH - 1);
        eegdata_in[c] = eegdata_in[c] + 16'd1000;
        next_spike = t + 210 + $urandom_range(0, 200);
      end
      sample_valid = 1'b1;
      @(negedge clk);
      sample_valid = 1'b0;
      @(negedge clk);
    end
    // Let a running analysis finish inside this segment's account.
    while (analysis_busy) @(negedge clk);
    repeat (4) @(negedge clk);
  endtask

  initial begin
    rst = 1'b1; sample_valid = 1'b0; band_sel = BAND_THETA; seg_id = 0; prev_seizure = 0; saw_1fff = 0;
    for (int s = 0; s < 3; s++) begin
      det_events[s] = 0; seizure_events[s] = 0; reports[s] = 0; theta_wins[s] = 0;
      crossings[s] = 0; max_channels[s] = 0;
    end
    for (int c = 0; c < NCH; c++) eegdata_in[c] = '0;
    for (int i = 0; i < 33; i++) fir_coef[i] = (i == 16) ? 16'sd32 : -16'sd1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);

    for (int s = 0; s < 3; s++) begin
      seg_id = s;
      run_segment(s);
      $display("segment %0d: crossings=%0d detection_clocks=%0d max_channels=%0d seizures=%0d reports=%0d theta_dominant=%0d",
               s, crossings[s], det_events[s], max_channels[s], seizure_events[s], reports[s], theta_wins[s]);
    end

    checks++; if (det_events[0] != 0 || reports[0] != 0) begin failures++; $display("FAIL normal segment detected"); end
    checks++; if (crossings[1] == 0) begin failures++; $display("FAIL interictal spikes never crossed"); end
    checks++; if (det_events[1] != 0 || reports[1] != 0) begin failures++; $display("FAIL interictal segment detected"); end
    checks++; if (seizure_events[2] == 0) begin failures++; $display("FAIL ictal segment not detected"); end
    checks++; if (max_channels[2] != 13 || !saw_1fff) begin failures++; $display("FAIL %0d channels detected, expected 13 (s = 0x1FFF)", max_channels[2]); end
    checks++;
    if (reports[2] < $countones(mask_at_seizure) || reports[2] == 0) begin
      failures++; $display("FAIL %0d reports for mask %b", reports[2], mask_at_seizure);
    end
    checks++; if (theta_wins[2] != reports[2]) begin failures++; $display("FAIL theta not dominant in all reports"); end
    checks++; if (booth_mismatch != 0) begin failures++; $display("FAIL booth system differed on %0d clocks", booth_mismatch); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

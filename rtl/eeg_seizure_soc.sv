// eeg_seizure_soc: 16-channel EEG seizure detection and analysis system.
//
// Every ADC sample word (one 16-bit sample per channel, sample_valid) goes
// two ways:
//  * into a dedicated detector per channel (channel_detect: high-pass FIR,
//    baseline-threshold comparator, IEI window and N-crossing counters);
//    the 16 decisions are combined by multichannel_detect, which declares a
//    seizure only when at least MIN_CHANNELS channels agree;
//  * into the buffer memory, which keeps the last DEPTH sample words.
// The rising edge of the multichannel seizure flag arms the analysis with
// the mask of detected channels. As soon as the buffer holds DEPTH samples
// the seizure_analysis unit runs a 128-point FFT on the buffered history of
// each detected channel and reports its theta/alpha/beta/gamma energies on
// tx_out with tx_valid, for a wireless transmitter outside this design.
// While the analysis runs the buffer is frozen (samples are still detected
// but not stored), so the analysed history ends at the detection.
// Spectral analysis thus runs only after a detection.
// USE_BOOTH = 0 (default) is the proposed vedic-multiplier system;
// USE_BOOTH = 1 builds the Booth-multiplier system it is compared with.
//
// Timing: seizure follows the sample that completes a channel's count by
// 3 clocks (FIR register, counter register, multichannel register); the
// analysis starts 1 clock after that if the buffer is full, and takes about
// 709 clocks per detected channel (see seizure_analysis).
//
// The block structure (16 detectors, multichannel detection, buffer memory
// fed from the ADC and selected by the detected channels, analysis block
// sending energies to a transmitter, 256-bit sample and result words)
// follows the published design. The trigger rule, the buffer freeze and
// the shared FIR coefficients are this design's own choices.
module eeg_seizure_soc #(
  parameter int unsigned NUM_CH       = 16,
  parameter int unsigned SAMPLE_W     = 16,
  parameter int unsigned FIR_TAPS     = 33,
  parameter int unsigned DEPTH        = 128,
  parameter int unsigned MIN_CHANNELS = 2,
  parameter bit          USE_BOOTH    = 1'b0
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       sample_valid,
  input  logic        [SAMPLE_W-1:0] eegdata_in [NUM_CH],
  input  logic signed [15:0]         fir_coef [FIR_TAPS],
  input  logic signed [SAMPLE_W-1:0] baseline_thresh,
  input  logic        [15:0]         iei_thresh,
  input  logic        [15:0]         n_thresh,
  input  seizure_pkg::band_e         band_sel,
  output logic [NUM_CH-1:0]          channel_seizure,
  output logic [NUM_CH-1:0]          detected_channels,
  output logic                       seizure,
  output logic                       analysis_busy,
  output logic                       tx_valid,
  output logic [$clog2(NUM_CH)-1:0]  tx_channel,
  output logic [63:0]                tx_out [4],
  output logic [63:0]                energy_response
);

  logic [NUM_CH-1:0] ch_enable, ch_master_reset, ch_window, ch_y_valid;
  logic signed [SAMPLE_W-1:0] ch_y [NUM_CH];

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    channel_detect #(
      .TAPS    (FIR_TAPS),
      .SAMPLE_W(SAMPLE_W),
      .COEF_W  (16),
      .CNT_W   (16)
    ) u_det (
      .clk             (clk),
      .rst             (rst),
      .in_valid        (sample_valid),
      .x               (eegdata_in[c]),
      .coef            (fir_coef),
      .baseline_thresh (baseline_thresh),
      .iei_thresh      (iei_thresh),
      .n_thresh        (n_thresh),
      .y               (ch_y[c]),
      .y_valid         (ch_y_valid[c]),
      .enable          (ch_enable[c]),
      .master_reset    (ch_master_reset[c]),
      .seizure_detected(channel_seizure[c]),
      .window_open     (ch_window[c])
    );
  end

  logic [$clog2(NUM_CH+1)-1:0] num_detected;

  multichannel_detect #(.NUM_CH(NUM_CH), .MIN_CHANNELS(MIN_CHANNELS)) u_multi (
    .clk              (clk),
    .rst              (rst),
    .channel_seizure  (channel_seizure),
    .detected_channels(detected_channels),
    .seizure          (seizure),
    .num_detected     (num_detected)
  );

  // Buffer memory.
  logic [$clog2(DEPTH)-1:0]  rd_addr;
  logic [$clog2(NUM_CH)-1:0] rd_channel;
  logic [SAMPLE_W-1:0]       rd_sample;
  logic [SAMPLE_W-1:0]       out_mem [NUM_CH];
  logic                      buffer_full;

  buffer_memory #(.NUM_CH(NUM_CH), .SAMPLE_W(SAMPLE_W), .DEPTH(DEPTH)) u_buf (
    .clk       (clk),
    .rst       (rst),
    .wr_en     (sample_valid && !analysis_busy),
    .in_mem    (eegdata_in),
    .rd_addr   (rd_addr),
    .rd_channel(rd_channel),
    .out_mem   (out_mem),
    .rd_sample (rd_sample),
    .full      (buffer_full)
  );

  // Trigger: a new multichannel detection arms the analysis with the
  // detected channel mask; it starts once the buffer is full.
  logic              seizure_q;
  logic              armed;
  logic [NUM_CH-1:0] armed_mask;
  logic              start;

  assign start = armed && buffer_full && !analysis_busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      seizure_q  <= 1'b0;
      armed      <= 1'b0;
      armed_mask <= '0;
    end else begin
      seizure_q <= seizure;
      if (seizure && !seizure_q) begin
        armed      <= 1'b1;
        armed_mask <= detected_channels;
      end else if (start) begin
        armed <= 1'b0;
      end
    end
  end

  seizure_analysis #(
    .NUM_CH  (NUM_CH),
    .SAMPLE_W(SAMPLE_W),
    .N       (DEPTH),
    .DW      (SAMPLE_W + $clog2(DEPTH) + 1),
    .ACC_W   (64),
    .USE_BOOTH(USE_BOOTH)
  ) u_ana (
    .clk            (clk),
    .rst            (rst),
    .start          (start),
    .channels       (armed_mask),
    .busy           (analysis_busy),
    .rd_addr        (rd_addr),
    .rd_channel     (rd_channel),
    .rd_sample      (rd_sample),
    .band_sel       (band_sel),
    .tx_valid       (tx_valid),
    .tx_channel     (tx_channel),
    .tx_out         (tx_out),
    .energy_response(energy_response)
  );

endmodule

// seizure_analysis: frequency-domain analysis of a detected seizure.
//
// After start, the unit walks through the channels set in "channels"
// (lowest index first). For each one it
//   1. reads the N buffered samples of that channel, oldest first, from the
//      buffer memory (rd_channel, rd_addr; data back one clock later on
//      rd_sample) and streams them into the FFT. The unsigned ADC codes are
//      made signed by inverting the MSB (offset binary to two's complement),
//      which only moves the DC term;
//   2. turns every FFT bin into its energy Re^2 + Im^2 (power_calc);
//   3. adds each bin energy into the accumulator of the band the bin
//      belongs to (band_select, four band_accumulator instances);
//   4. after the last bin, copies the four band sums to tx_out (theta,
//      alpha, beta, gamma), tags them with tx_channel and pulses tx_valid
//      for one clock.
// busy is high from start until the last detected channel is reported.
// energy_response is the band of tx_out chosen by band_sel (band_mux).
// USE_BOOTH = 1 builds the FFT and energy multipliers as Booth instead of
// vedic multipliers, the source's comparison system; results are identical.
//
// Timing per channel at N = 128: 1 clock to pick the channel, N+1 to read
// and load the samples, N/2*log2(N) to compute, N+1 to stream the bins
// through the FFT output and energy registers, 2 to report:
// 1 + 129 + 448 + 129 + 2 = 709 clocks from start (or from the previous
// tx_valid) to tx_valid.
//
// The chain FFT -> Re^2+Im^2 -> band accumulators -> multiplexer and the
// analysis of the detected channels' buffered data follow the published
// design. Sequencing channel by channel through one shared FFT, the
// offset-binary conversion and the result handshake are this design's own.
// The published waveforms show tx_out changing every clock, with a layout
// that cannot be read; here it holds the four band sums of one channel.
module seizure_analysis #(
  parameter int unsigned NUM_CH   = 16,
  parameter int unsigned SAMPLE_W = 16,
  parameter int unsigned N        = 128,
  parameter int unsigned DW       = 24,
  parameter int unsigned ACC_W    = 64,
  parameter int unsigned FS_MHZ   = 173610,
  parameter bit          USE_BOOTH = 1'b0
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      start,
  input  logic [NUM_CH-1:0]         channels,
  output logic                      busy,
  output logic [$clog2(N)-1:0]      rd_addr,
  output logic [$clog2(NUM_CH)-1:0] rd_channel,
  input  logic [SAMPLE_W-1:0]       rd_sample,
  input  seizure_pkg::band_e        band_sel,
  output logic                      tx_valid,
  output logic [$clog2(NUM_CH)-1:0] tx_channel,
  output logic [ACC_W-1:0]          tx_out [4],
  output logic [ACC_W-1:0]          energy_response
);

  localparam int unsigned AW = $clog2(N);
  localparam int unsigned CW = $clog2(NUM_CH);
  localparam int unsigned PW = 2 * DW + 1;

  typedef enum logic [2:0] {A_IDLE, A_PICK, A_FEED, A_WAIT, A_REPORT} astate_e;

  astate_e           state;
  logic [NUM_CH-1:0] pending;
  logic [CW-1:0]     cur_ch;
  logic [AW:0]       feed_cnt;
  logic              rd_pending;

  // Lowest channel still pending.
  logic [CW-1:0] next_ch;
  always_comb begin
    next_ch = '0;
    for (int c = NUM_CH - 1; c >= 0; c--)
      if (pending[c]) next_ch = CW'(c);
  end

  // FFT and energy chain.
  logic                 fft_in_valid, fft_in_ready, fft_busy;
  logic signed [SAMPLE_W-1:0] fft_in_data;
  logic                 fft_out_valid;
  logic [AW-1:0]        fft_out_index;
  logic signed [DW-1:0] fft_out_re, fft_out_im;
  logic                 pw_valid;
  logic [PW-1:0]        pw_energy;
  logic [AW-1:0]        pw_index;
  logic [3:0]           in_band;
  logic                 acc_clear;
  logic [ACC_W-1:0]     band_acc [4];

  assign fft_in_valid = rd_pending;
  assign fft_in_data  = $signed({~rd_sample[SAMPLE_W-1], rd_sample[SAMPLE_W-2:0]});

  fft128 #(.N(N), .IN_W(SAMPLE_W), .DW(DW), .USE_BOOTH(USE_BOOTH)) u_fft (
    .clk      (clk),
    .rst      (rst),
    .in_valid (fft_in_valid),
    .in_ready (fft_in_ready),
    .in_data  (fft_in_data),
    .out_valid(fft_out_valid),
    .out_index(fft_out_index),
    .out_re   (fft_out_re),
    .out_im   (fft_out_im),
    .busy     (fft_busy)
  );

  power_calc #(.DW(DW), .IDX(AW), .USE_BOOTH(USE_BOOTH)) u_pow (
    .clk      (clk),
    .rst      (rst),
    .in_valid (fft_out_valid),
    .re       (fft_out_re),
    .im       (fft_out_im),
    .index_in (fft_out_index),
    .out_valid(pw_valid),
    .energy   (pw_energy),
    .index_out(pw_index)
  );

  band_select #(.N(N), .FS_MHZ(FS_MHZ)) u_bands (
    .bin    (pw_index),
    .in_band(in_band)
  );

  for (genvar b = 0; b < 4; b++) begin : g_acc
    band_accumulator #(.IN_W(PW), .ACC_W(ACC_W)) u_acc (
      .clk   (clk),
      .rst   (rst),
      .clear (acc_clear),
      .add   (pw_valid && in_band[b]),
      .energy(pw_energy),
      .acc   (band_acc[b])
    );
  end

  band_mux #(.W(ACC_W)) u_mux (
    .band_energy    (tx_out),
    .sel            (band_sel),
    .energy_response(energy_response)
  );

  assign busy       = (state != A_IDLE);
  assign rd_channel = cur_ch;
  assign rd_addr    = feed_cnt[AW-1:0];
  assign acc_clear  = (state == A_PICK);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= A_IDLE;
      pending    <= '0;
      cur_ch     <= '0;
      feed_cnt   <= '0;
      rd_pending <= 1'b0;
      tx_valid   <= 1'b0;
      tx_channel <= '0;
      for (int b = 0; b < 4; b++) tx_out[b] <= '0;
    end else begin
      tx_valid   <= 1'b0;
      rd_pending <= 1'b0;
      unique case (state)
        A_IDLE: begin
          if (start && (channels != '0)) begin
            pending <= channels;
            state   <= A_PICK;
          end
        end
        A_PICK: begin
          if (pending == '0) begin
            state <= A_IDLE;
          end else begin
            cur_ch            <= next_ch;
            pending[next_ch]  <= 1'b0;
            feed_cnt          <= '0;
            state             <= A_FEED;
          end
        end
        A_FEED: begin
          // One read per clock; the FFT accepts every sample while loading.
          rd_pending <= 1'b1;
          feed_cnt   <= feed_cnt + 1'b1;
          if (feed_cnt == (AW+1)'(N - 1)) state <= A_WAIT;
        end
        A_WAIT: begin
          if (pw_valid && (pw_index == AW'(N - 1))) state <= A_REPORT;
        end
        A_REPORT: begin
          for (int b = 0; b < 4; b++) tx_out[b] <= band_acc[b];
          tx_channel <= cur_ch;
          tx_valid   <= 1'b1;
          state      <= A_PICK;
        end
        default: state <= A_IDLE;
      endcase
    end
  end

endmodule

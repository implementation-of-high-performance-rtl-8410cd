// multichannel_detect: combines the per-channel seizure decisions.
//
// A single channel crossing its threshold can be a random spike, so a
// seizure is declared only when at least MIN_CHANNELS channels detect at
// the same time. The channel mask (which channels detected) is registered
// and handed on to select the data that the analysis stage reads from the
// buffer memory.
//
// Timing: all outputs are registered, one clock after channel_seizure.
//
// From the published design: a dedicated multichannel stage that examines
// several channels against false positives and outputs the detected
// channels. The agreement rule (a count of at least MIN_CHANNELS, default 2)
// is this design's own choice.
module multichannel_detect #(
  parameter int unsigned NUM_CH       = 16,
  parameter int unsigned MIN_CHANNELS = 2
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [NUM_CH-1:0]           channel_seizure,
  output logic [NUM_CH-1:0]           detected_channels,
  output logic                        seizure,
  output logic [$clog2(NUM_CH+1)-1:0] num_detected
);

  localparam int unsigned CW = $clog2(NUM_CH + 1);

  logic [CW-1:0] count;

  always_comb begin
    count = '0;
    for (int i = 0; i < NUM_CH; i++) count += CW'(channel_seizure[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      detected_channels <= '0;
      seizure           <= 1'b0;
      num_detected      <= '0;
    end else begin
      detected_channels <= channel_seizure;
      num_detected      <= count;
      seizure           <= (32'(count) >= MIN_CHANNELS);
    end
  end

endmodule

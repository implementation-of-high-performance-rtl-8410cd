// threshold_comparator: the "In > thresh" comparator of the single-channel
// seizure detector.
//
// enable is high while a filtered sample is present (valid) and that sample
// is strictly greater than the baseline (seizure) threshold. Both values are
// signed, since the high-pass filter output swings around zero.
// Purely combinational; it qualifies the sample with valid so that the
// counters behind it see one event per sample.
//
// The strict comparison follows the published detector; the signed
// interpretation and the valid qualification are this design's own. The
// source's conclusion calls the detection feature an "energy parameter";
// the sample itself is compared here, as the detector diagram draws it.
module threshold_comparator #(
  parameter int unsigned W = 16
) (
  input  logic                valid,
  input  logic signed [W-1:0] in_sample,
  input  logic signed [W-1:0] thresh,
  output logic                enable
);

  assign enable = valid && (in_sample > thresh);

endmodule

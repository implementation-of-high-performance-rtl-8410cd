// channel_detect: seizure detector for one EEG channel.
//
// Chain: high-pass FIR (DC removal) -> comparator against the baseline
// threshold -> two count-and-compare stages. The comparator's enable opens
// an IEI window (iei_counter) and is counted by the N-stage counter; when
// more than n_thresh crossings fall inside one window, seizure_detected is
// raised. When the window expires, master_reset clears the N-stage count.
//
// Filter priming: until TAPS samples have entered after reset, the FIR's
// delay line still holds its reset zeros and its output is a start-up
// transient (a DC level reads as a large step). Those first TAPS-1 outputs
// are not passed to the comparator and counters; y itself is still shown.
//
// Timing: the filtered sample y appears one clock after in_valid; the
// crossing it causes is counted on the following clock edge, so
// seizure_detected can rise two clocks after the sample that completes the
// count. Every later stage steps once per filtered sample (y_valid).
//
// The structure follows the published single-channel detector exactly;
// the priming gate and the widths of thresholds and counters (16 bits) are
// this design's own.
module channel_detect #(
  parameter int unsigned TAPS     = seizure_pkg::FIR_TAPS,
  parameter int unsigned SAMPLE_W = seizure_pkg::SAMPLE_W,
  parameter int unsigned COEF_W   = seizure_pkg::COEF_W,
  parameter int unsigned CNT_W    = seizure_pkg::CNT_W
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       in_valid,
  input  logic        [SAMPLE_W-1:0] x,
  input  logic signed [COEF_W-1:0]   coef [TAPS],
  input  logic signed [SAMPLE_W-1:0] baseline_thresh,
  input  logic        [CNT_W-1:0]    iei_thresh,
  input  logic        [CNT_W-1:0]    n_thresh,
  output logic signed [SAMPLE_W-1:0] y,
  output logic                       y_valid,
  output logic                       enable,
  output logic                       master_reset,
  output logic                       seizure_detected,
  output logic                       window_open
);

  logic [CNT_W-1:0] crossings;
  logic             y_valid_raw;
  logic             primed;        // y comes from a full delay line
  logic [$clog2(TAPS+1)-1:0] prime_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      prime_cnt <= '0;
      primed    <= 1'b0;
    end else if (in_valid) begin
      primed <= (32'(prime_cnt) >= TAPS - 1);
      if (32'(prime_cnt) < TAPS - 1) prime_cnt <= prime_cnt + 1'b1;
    end
  end

  assign y_valid = y_valid_raw && primed;

  hpf_fir #(
    .TAPS  (TAPS),
    .IN_W  (SAMPLE_W),
    .COEF_W(COEF_W),
    .OUT_W (SAMPLE_W)
  ) u_hpf (
    .clk     (clk),
    .rst     (rst),
    .in_valid(in_valid),
    .x       (x),
    .coef    (coef),
    .y       (y),
    .y_valid (y_valid_raw)
  );

  threshold_comparator #(.W(SAMPLE_W)) u_cmp (
    .valid    (y_valid),
    .in_sample(y),
    .thresh   (baseline_thresh),
    .enable   (enable)
  );

  iei_counter #(.CNT_W(CNT_W)) u_iei (
    .clk         (clk),
    .rst         (rst),
    .tick        (y_valid),
    .enable      (enable),
    .iei_thresh  (iei_thresh),
    .master_reset(master_reset),
    .window_open (window_open)
  );

  nstage_counter #(.CNT_W(CNT_W)) u_nst (
    .clk             (clk),
    .rst             (rst),
    .tick            (y_valid),
    .enable          (enable),
    .master_reset    (master_reset),
    .n_thresh        (n_thresh),
    .seizure_detected(seizure_detected),
    .count           (crossings)
  );

endmodule

// hpf_fir: direct-form FIR filter used as the DC-removal high-pass stage in
// front of each channel's seizure detector.
//
// Each accepted sample x (unsigned ADC code) is shifted into a TAPS-deep
// delay line and the filter output
//     y[n] = sum_{i=0}^{TAPS-1} coef[i] * x[n-i]
// is formed with one multiplier per tap and registered. The sum is kept at
// full precision and saturated to OUT_W signed bits. The coefficients are
// signed inputs so that a true high-pass (coefficients summing to zero) can
// be loaded; they are shared by all channels at the top level.
//
// Timing: y and y_valid change one clock after in_valid. The delay line
// resets to zero.
//
// From the published design: 33 taps, 16-bit input, coefficients and
// output, the input-times-coefficient sum (a constant input 1125 with
// coefficients 7, 3, 2, 5 gives 19125). Own choices: signed coefficients,
// saturation instead of wrap-around, the one-cycle latency.
module hpf_fir #(
  parameter int unsigned TAPS   = 33,
  parameter int unsigned IN_W   = 16,
  parameter int unsigned COEF_W = 16,
  parameter int unsigned OUT_W  = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic        [IN_W-1:0]   x,
  input  logic signed [COEF_W-1:0] coef [TAPS],
  output logic signed [OUT_W-1:0]  y,
  output logic                     y_valid
);

  localparam int unsigned PROD_W = IN_W + COEF_W + 1;
  localparam int unsigned ACC_W  = PROD_W + $clog2(TAPS + 1);

  localparam logic signed [ACC_W-1:0] SAT_MAX = ACC_W'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] SAT_MIN = -ACC_W'(64'sd1 <<< (OUT_W - 1));

  logic [IN_W-1:0] delay_q [TAPS];   // delay_q[0] is the previous sample
  logic [IN_W-1:0] taps    [TAPS];   // taps[0] is the current sample
  logic signed [ACC_W-1:0] acc;

  always_comb begin
    taps[0] = x;
    for (int i = 1; i < TAPS; i++) taps[i] = delay_q[i-1];
  end

  always_comb begin
    acc = '0;
    for (int i = 0; i < TAPS; i++) begin
      logic signed [ACC_W-1:0] xs, cs;
      xs = ACC_W'($signed({1'b0, taps[i]}));
      cs = ACC_W'(coef[i]);
      acc += xs * cs;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < TAPS; i++) delay_q[i] <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < TAPS; i++) delay_q[i] <= taps[i];
        if (acc > SAT_MAX)      y <= SAT_MAX[OUT_W-1:0];
        else if (acc < SAT_MIN) y <= SAT_MIN[OUT_W-1:0];
        else                    y <= acc[OUT_W-1:0];
      end
    end
  end

endmodule

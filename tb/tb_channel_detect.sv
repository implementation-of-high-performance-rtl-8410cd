// tb_channel_detect: single-channel detector end to end.
//
// Part 1 (4 taps, coefficients 7, 3, 2, 5, baseline threshold 10000,
// n_thresh 2): a constant input of 1125 filters to 19125, crosses the
// threshold on every sample and must raise seizure_detected on the third
// crossing; a constant input of 4 filters to 68 and must never detect.
// Part 2 (default 33 taps, first-difference high-pass h = [1, -1, 0, ...]):
// a DC-offset signal with random spikes is compared sample by sample with
// a reference model of filter, comparator, IEI window and N counter; the
// first 32 outputs after reset (delay line not yet full) must not count.
module tb_channel_detect;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  // Small instance (figure values).
  logic               s_valid;
  logic [15:0]        s_x;
  logic signed [15:0] s_coef [4];
  logic signed [15:0] s_y;
  logic               s_yv, s_en, s_mr, s_det, s_win;

  channel_detect #(.TAPS(4)) dut_small (
    .clk(clk), .rst(rst), .in_valid(s_valid), .x(s_x), .coef(s_coef),
    .baseline_thresh(16'sd10000), .iei_thresh(16'd20), .n_thresh(16'd2),
    .y(s_y), .y_valid(s_yv), .enable(s_en), .master_reset(s_mr),
    .seizure_detected(s_det), .window_open(s_win)
  );

  // Default instance.
  localparam int T = 33;
  logic               f_valid;
  logic [15:0]        f_x;
  logic signed [15:0] f_coef [T];
  logic signed [15:0] f_y;
  logic               f_yv, f_en, f_mr, f_det, f_win;
  logic [15:0]        iei_thresh, n_thresh;

  channel_detect dut (
    .clk(clk), .rst(rst), .in_valid(f_valid), .x(f_x), .coef(f_coef),
    .baseline_thresh(16'sd300), .iei_thresh(iei_thresh), .n_thresh(n_thresh),
    .y(f_y), .y_valid(f_yv), .enable(f_en), .master_reset(f_mr),
    .seizure_detected(f_det), .window_open(f_win)
  );

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int crossings_until_det;
    int prev_x, yv, m_open, m_iei, m_n, detections, resets;
    bit crossing, mr;
    rst = 1; s_valid = 0; f_valid = 0; s_x = 0; f_x = 0;
    s_coef[0] = 7; s_coef[1] = 3; s_coef[2] = 2; s_coef[3] = 5;
    for (int i = 0; i < T; i++) f_coef[i] = '0;
    f_coef[0] = 16'sd1; f_coef[1] = -16'sd1;
    iei_thresh = 16'd10; n_thresh = 16'd3;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;

    // Part 1a: no seizure for x = 4.
    s_x = 16'd4;
    for (int n = 0; n < 20; n++) begin
      s_valid = 1; @(negedge clk); s_valid = 0; @(negedge clk);
      checks++;
      if (s_det) begin failures++; $display("FAIL x=4 detected a seizure"); end
    end
    check("y for x=4", s_y, 68);

    // Part 1b: seizure for x = 1125 (after the FIR fills, y = 19125).
    s_x = 16'd1125;
    crossings_until_det = 0;
    for (int n = 0; n < 10 && !s_det; n++) begin
      s_valid = 1; @(negedge clk); s_valid = 0;
      if (s_en) crossings_until_det++;
      @(negedge clk);
    end
    check("y for x=1125", s_y, 19125);
    check("seizure for x=1125", s_det, 1);
    check("crossings to detect (n_thresh 2)", crossings_until_det, 3);

    // Part 2: model comparison, one sample every 2 clocks.
    prev_x = 2000; m_open = 0; m_iei = 0; m_n = 0; detections = 0; resets = 0;
    f_x = 16'd2000;
    f_valid = 1; @(negedge clk); f_valid = 0; @(negedge clk);
    rst = 1; @(negedge clk); rst = 0;
    prev_x = 0;
    for (int n = 0; n < 3000; n++) begin
      int x;
      x = 2000 + $urandom_range(0, 100);
      if ($urandom_range(0, 9) == 0) x += 600;
      if ((n / 300) % 2 == 1 && $urandom_range(0, 1) == 0) x += 600;  // bursts
      f_x = 16'(x);
      f_valid = 1;
      @(negedge clk);
      f_valid = 0;
      yv = x - prev_x;
      prev_x = x;
      check("y", f_y, yv);
      crossing = (yv > 300) && (n >= T - 1);   // filter primed after T samples
      check("enable", f_en, crossing);
      mr = m_open && (m_iei + 1 > int'(iei_thresh)) && (n >= T - 1);
      check("master_reset", f_mr, mr);
      if (mr) resets++;
      // model update at this edge
      if (n < T - 1) begin
        // not primed: nothing counts
      end else if (m_open) begin
        if (mr) begin m_open = 0; m_iei = 0; end else m_iei++;
      end else if (crossing) begin m_open = 1; m_iei = 0; end
      if (mr) m_n = 0; else if (crossing) m_n++;
      @(negedge clk);
      check("seizure_detected", f_det, m_n > int'(n_thresh));
      if (f_det) detections++;
    end
    checks++;
    if (detections == 0 || resets == 0) begin
      failures++;
      $display("FAIL detections=%0d resets=%0d", detections, resets);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_threshold_comparator: exhaustive corner values and random pairs,
// checking enable == valid && (in_sample > thresh) with signed values.
module tb_threshold_comparator;
  int checks = 0;
  int failures = 0;
  logic               valid;
  logic signed [15:0] in_sample, thresh;
  logic               enable;

  threshold_comparator dut (.valid(valid), .in_sample(in_sample), .thresh(thresh), .enable(enable));

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_one(logic v, int s, int t);
    logic exp;
    valid = v; in_sample = 16'(s); thresh = 16'(t);
    #1;
    exp = v && (s > t);
    checks++;
    if (enable !== exp) begin
      failures++;
      $display("FAIL valid=%0d in=%0d thresh=%0d enable=%0d", v, s, t, enable);
    end
  endtask

  initial begin
    int corner [7] = '{-32768, -1, 0, 1, 100, 32766, 32767};
    foreach (corner[i]) foreach (corner[j]) begin
      try_one(1'b1, corner[i], corner[j]);
      try_one(1'b0, corner[i], corner[j]);
    end
    for (int n = 0; n < 500; n++) begin
      int s, t;
      s = $signed(16'($urandom));
      t = $signed(16'($urandom));
      try_one(1'b1, s, t);
      try_one(1'b1, t, t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

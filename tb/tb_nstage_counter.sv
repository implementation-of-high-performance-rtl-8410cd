// tb_nstage_counter: random crossings and master resets against a
// reference counter; checks count and seizure_detected == (count > n_thresh)
// every clock, the priority of master_reset, and saturation at 0xFFFF.
module tb_nstage_counter;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  logic        tick, enable, master_reset;
  logic [15:0] n_thresh, count;
  logic        seizure_detected;

  nstage_counter dut (.clk(clk), .rst(rst), .tick(tick), .enable(enable), .master_reset(master_reset),
                      .n_thresh(n_thresh), .seizure_detected(seizure_detected), .count(count));

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_count;
  int detections;

  initial begin
    rst = 1; tick = 0; enable = 0; master_reset = 0; n_thresh = 16'd3; m_count = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int n = 0; n < 4000; n++) begin
      if (n % 500 == 0) n_thresh = 16'($urandom_range(0, 6));
      tick = ($urandom_range(0, 3) != 0);
      enable = ($urandom_range(0, 1) == 0);
      master_reset = ($urandom_range(0, 15) == 0);
      #1;
      checks += 2;
      if (count !== 16'(m_count) || seizure_detected !== (m_count > int'(n_thresh))) begin
        failures++;
        $display("FAIL n=%0d count=%0d/%0d det=%0d", n, count, m_count, seizure_detected);
      end
      if (seizure_detected) detections++;
      @(posedge clk);
      if (master_reset) m_count = 0;
      else if (tick && enable && m_count < 65535) m_count++;
      @(negedge clk);
    end
    checks++;
    if (detections == 0) begin failures++; $display("FAIL no detection"); end
    // Saturation.
    master_reset = 1; @(negedge clk); master_reset = 0;
    tick = 1; enable = 1;
    repeat (65540) @(negedge clk);
    checks++;
    if (count !== 16'hFFFF) begin failures++; $display("FAIL no saturation: %0d", count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

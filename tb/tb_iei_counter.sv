// tb_iei_counter: drives random tick/enable patterns and compares
// master_reset and window_open every clock with a reference model of the
// IEI window: the first crossing opens a window, each later tick counts,
// and the tick on which the count would exceed the threshold closes the
// window with master_reset. Also checks the exact window length.
module tb_iei_counter;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  logic        tick, enable;
  logic [15:0] iei_thresh;
  logic        master_reset, window_open;

  iei_counter dut (.clk(clk), .rst(rst), .tick(tick), .enable(enable), .iei_thresh(iei_thresh),
                   .master_reset(master_reset), .window_open(window_open));

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit m_open;
  int m_count;
  int resets_seen;

  initial begin
    int ticks_since_open;
    rst = 1; tick = 0; enable = 0; iei_thresh = 16'd5;
    m_open = 0; m_count = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;

    // Directed: window length. Open, then tick until master_reset.
    tick = 1; enable = 1;
    @(negedge clk);
    enable = 0;
    ticks_since_open = 0;
    while (!master_reset && ticks_since_open < 50) begin
      @(negedge clk);
      ticks_since_open++;
    end
    checks++;
    // count goes 1..6; master_reset on the 6th tick after opening.
    if (ticks_since_open != 5) begin
      failures++;
      $display("FAIL window: master_reset %0d ticks after opening+1, expected 5", ticks_since_open);
    end
    tick = 0;
    @(negedge clk);
    rst = 1; @(negedge clk); rst = 0;

    // Random against the model.
    for (int n = 0; n < 3000; n++) begin
      bit exp_mr;
      if (n % 1000 == 0) iei_thresh = 16'($urandom_range(0, 12));
      tick   = ($urandom_range(0, 2) != 0);
      enable = ($urandom_range(0, 4) == 0);
      #1;
      exp_mr = tick && m_open && (m_count + 1 > int'(iei_thresh));
      checks += 2;
      if (master_reset !== exp_mr || window_open !== m_open) begin
        failures++;
        $display("FAIL n=%0d mr=%0d/%0d open=%0d/%0d", n, master_reset, exp_mr, window_open, m_open);
      end
      if (exp_mr) resets_seen++;
      @(posedge clk);
      if (tick) begin
        if (m_open) begin
          if (exp_mr) begin m_open = 0; m_count = 0; end
          else m_count++;
        end else if (enable) begin
          m_open = 1; m_count = 0;
        end
      end
      @(negedge clk);
    end
    checks++;
    if (resets_seen < 10) begin
      failures++;
      $display("FAIL only %0d master resets", resets_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

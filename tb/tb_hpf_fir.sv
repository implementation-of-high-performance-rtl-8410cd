// tb_hpf_fir: self-checking testbench for hpf_fir.
//
// Part 1 (4 taps, coefficients 7, 3, 2, 5): a constant input of 1125 must
// settle at 1125*17 = 19125 and a constant input of 4 at 68. Part 2 (the
// default 33 taps): random samples and signed coefficients, each output
// compared with a full-precision reference sum, saturated to 16 bits, and
// y_valid checked to follow in_valid by exactly one clock.
module tb_hpf_fir;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // Small filter.
  logic               s_valid;
  logic [15:0]        s_x;
  logic signed [15:0] s_coef [4];
  logic signed [15:0] s_y;
  logic               s_y_valid;

  hpf_fir #(.TAPS(4)) dut_small (
    .clk(clk), .rst(rst), .in_valid(s_valid), .x(s_x), .coef(s_coef),
    .y(s_y), .y_valid(s_y_valid)
  );

  // Default-size filter.
  localparam int T = 33;
  logic               f_valid;
  logic [15:0]        f_x;
  logic signed [15:0] f_coef [T];
  logic signed [15:0] f_y;
  logic               f_y_valid;

  hpf_fir dut_full (
    .clk(clk), .rst(rst), .in_valid(f_valid), .x(f_x), .coef(f_coef),
    .y(f_y), .y_valid(f_y_valid)
  );

  longint hist [T];

  function automatic longint sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ref_sum;
    rst = 1'b1; s_valid = 0; f_valid = 0; s_x = 0; f_x = 0;
    s_coef[0] = 7; s_coef[1] = 3; s_coef[2] = 2; s_coef[3] = 5;
    for (int i = 0; i < T; i++) f_coef[i] = '0;
    for (int i = 0; i < T; i++) hist[i] = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;

    // Part 1: constant 1125 then constant 4.
    @(negedge clk);
    s_x = 16'd1125;
    for (int n = 0; n < 6; n++) begin
      s_valid = 1'b1;
      @(negedge clk);
    end
    s_valid = 1'b0;
    check("fir4 const 1125", s_y, 19125);
    @(negedge clk);
    s_x = 16'd4;
    for (int n = 0; n < 6; n++) begin
      s_valid = 1'b1;
      @(negedge clk);
    end
    s_valid = 1'b0;
    check("fir4 const 4", s_y, 68);

    // Part 2: 33 taps, random coefficients (small, so both the linear
    // range and saturation are reached).
    for (int i = 0; i < T; i++) f_coef[i] = 16'($signed($urandom_range(0, 200)) - 100);
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      f_x     = 16'($urandom);
      f_valid = ($urandom_range(0, 3) != 0);
      if (f_valid) begin
        for (int i = T - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = longint'(f_x);
        ref_sum = 0;
        for (int i = 0; i < T; i++) ref_sum += hist[i] * longint'(f_coef[i]);
      end
      @(negedge clk);
      check("y_valid follows in_valid", longint'(f_y_valid), longint'(f_valid));
      if (f_valid) check($sformatf("fir33 sample %0d", n), longint'(f_y), sat16(ref_sum));
      f_valid = 1'b0;
    end

    // Small-coefficient run that stays in the linear range.
    for (int i = 0; i < T; i++) f_coef[i] = 16'($signed($urandom_range(0, 2)) - 1);
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      f_x = 16'($urandom_range(0, 900));
      f_valid = 1'b1;
      for (int i = T - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = longint'(f_x);
      ref_sum = 0;
      for (int i = 0; i < T; i++) ref_sum += hist[i] * longint'(f_coef[i]);
      @(negedge clk);
      f_valid = 1'b0;
      check($sformatf("fir33 linear %0d", n), longint'(f_y), sat16(ref_sum));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

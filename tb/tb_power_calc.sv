// tb_power_calc: random and extreme re/im values; energy must equal
// re*re + im*im exactly and follow in_valid by one clock with its index.
// A second instance built with Booth multipliers (USE_BOOTH = 1) must give
// the same outputs on every clock.
module tb_power_calc;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  logic               in_valid, out_valid;
  logic signed [23:0] re, im;
  logic [6:0]         idx_in, idx_out;
  logic [48:0]        energy;

  power_calc dut (.clk(clk), .rst(rst), .in_valid(in_valid), .re(re), .im(im), .index_in(idx_in),
                  .out_valid(out_valid), .energy(energy), .index_out(idx_out));

  logic        b_out_valid;
  logic [6:0]  b_idx_out;
  logic [48:0] b_energy;
  power_calc #(.USE_BOOTH(1'b1)) dut_booth (.clk(clk), .rst(rst), .in_valid(in_valid), .re(re), .im(im), .index_in(idx_in),
                  .out_valid(b_out_valid), .energy(b_energy), .index_out(b_idx_out));

  always @(negedge clk) begin
    if (!rst) begin
      checks++;
      if ({b_out_valid, b_idx_out, b_energy} != {out_valid, idx_out, energy}) begin
        failures++;
        if (failures < 20) $display("FAIL booth instance differs: %0d vs %0d", b_energy, energy);
      end
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp;
    rst = 1; in_valid = 0; re = 0; im = 0; idx_in = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      if (n == 0) begin re = 24'h800000; im = 24'h800000; end
      else if (n == 1) begin re = 24'h7FFFFF; im = 24'h800001; end
      else begin re = 24'($urandom); im = 24'($urandom); end
      idx_in = 7'(n);
      in_valid = 1;
      exp = longint'(re) * longint'(re) + longint'(im) * longint'(im);
      @(negedge clk);
      in_valid = 0;
      checks += 3;
      if (!out_valid || energy !== 49'(exp) || idx_out !== 7'(n)) begin
        failures++;
        $display("FAIL n=%0d valid=%0d energy=%0d expected %0d", n, out_valid, energy, exp);
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL out_valid held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_band_accumulator: random add/clear sequences with large energies
// against a 64-bit reference sum, checked every clock.
module tb_band_accumulator;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  logic        clear, add;
  logic [48:0] energy;
  logic [63:0] acc;
  longint unsigned m;

  band_accumulator dut (.clk(clk), .rst(rst), .clear(clear), .add(add), .energy(energy), .acc(acc));

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; clear = 0; add = 0; energy = 0; m = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      clear  = ($urandom_range(0, 63) == 0);
      add    = ($urandom_range(0, 2) != 0);
      energy = {17'($urandom), 32'($urandom)};
      @(posedge clk);
      if (clear) m = 0;
      else if (add) m += longint'(energy);
      @(negedge clk);
      checks++;
      if (acc !== m) begin failures++; $display("FAIL n=%0d acc=%0d expected %0d", n, acc, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

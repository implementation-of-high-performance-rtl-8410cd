// tb_multichannel_detect: random channel patterns, checking one clock later
// the registered mask, the popcount and seizure == (popcount >= 2).
module tb_multichannel_detect;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  logic [15:0] chs, det;
  logic        seizure;
  logic [4:0]  num;

  multichannel_detect dut (.clk(clk), .rst(rst), .channel_seizure(chs),
                           .detected_channels(det), .seizure(seizure), .num_detected(num));

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pc;
    rst = 1; chs = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      case (n % 4)
        0: chs = 16'($urandom);
        1: chs = 16'(1) << $urandom_range(0, 15);
        2: chs = '0;
        default: chs = (16'(1) << $urandom_range(0, 15)) | (16'(1) << $urandom_range(0, 15));
      endcase
      pc = $countones(chs);
      @(negedge clk);
      checks += 3;
      if (det !== chs || num !== 5'(pc) || seizure !== (pc >= 2)) begin
        failures++;
        $display("FAIL chs=%h det=%h num=%0d seizure=%0d", chs, det, num, seizure);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

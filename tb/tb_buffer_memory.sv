// tb_buffer_memory: writes a known sample pattern (channel c of write w
// holds w*16 + c) for more than one wrap of the 128-deep buffer, checks
// the full flag, then reads every address of several channels and checks
// that address 0 is the oldest stored word and 127 the newest, with one
// clock read latency, for both rd_sample and the whole word out_mem.
module tb_buffer_memory;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  localparam int D = 128;
  logic        wr_en;
  logic [15:0] in_mem [16];
  logic [6:0]  rd_addr;
  logic [3:0]  rd_channel;
  logic [15:0] out_mem [16];
  logic [15:0] rd_sample;
  logic        full;

  buffer_memory dut (.clk(clk), .rst(rst), .wr_en(wr_en), .in_mem(in_mem), .rd_addr(rd_addr),
                     .rd_channel(rd_channel), .out_mem(out_mem), .rd_sample(rd_sample), .full(full));

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_words(int first, int count);
    for (int w = first; w < first + count; w++) begin
      for (int c = 0; c < 16; c++) in_mem[c] = 16'(w * 16 + c);
      wr_en = 1;
      @(negedge clk);
      wr_en = 0;
      if ($urandom_range(0, 1) == 0) @(negedge clk);
    end
  endtask

  task automatic read_all(int newest, int nch);
    for (int k = 0; k < nch; k++) begin
      rd_channel = 4'($urandom_range(0, 15));
      for (int a = 0; a < D; a++) begin
        int w;
        rd_addr = 7'(a);
        @(negedge clk);
        w = newest - (D - 1) + a;
        checks++;
        if (rd_sample !== 16'(w * 16 + rd_channel)) begin
          failures++;
          $display("FAIL ch %0d addr %0d: %0d expected %0d", rd_channel, a, rd_sample, w * 16 + rd_channel);
        end
        checks++;
        if (out_mem[(a * 7) % 16] !== 16'(w * 16 + (a * 7) % 16)) begin
          failures++;
          $display("FAIL out_mem addr %0d", a);
        end
      end
    end
  endtask

  initial begin
    rst = 1; wr_en = 0; rd_addr = 0; rd_channel = 0;
    for (int c = 0; c < 16; c++) in_mem[c] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    write_words(0, D - 1);
    checks++;
    if (full) begin failures++; $display("FAIL full too early"); end
    write_words(D - 1, 1);
    checks++;
    if (!full) begin failures++; $display("FAIL not full after %0d writes", D); end
    read_all(D - 1, 3);
    write_words(D, 77);          // wrap part-way
    read_all(D + 76, 3);
    write_words(D + 77, 300);    // several wraps
    read_all(D + 376, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_booth_mult: self-checking test of the radix-2 Booth multiplier.
//
// Exhaustive over all signed operand pairs at N = 2, 3 and 4, then at the
// default N = 24: the corner values (0, +-1, the largest and the most
// negative value, alternating bit patterns, which recode into the most
// non-zero partial products) against each other, and 4000 random pairs.
// Every product is compared with the exact signed product.
module tb_booth_mult;
  int checks = 0;
  int failures = 0;

  logic signed [1:0]  a2, b2;  logic signed [3:0]  p2;
  logic signed [2:0]  a3, b3;  logic signed [5:0]  p3;
  logic signed [3:0]  a4, b4;  logic signed [7:0]  p4;
  logic signed [23:0] a24, b24; logic signed [47:0] p24;

  booth_mult #(.N(2)) d2 (.a(a2), .b(b2), .p(p2));
  booth_mult #(.N(3)) d3 (.a(a3), .b(b3), .p(p3));
  booth_mult #(.N(4)) d4 (.a(a4), .b(b4), .p(p4));
  booth_mult          d24 (.a(a24), .b(b24), .p(p24));

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  localparam logic [23:0] CORNER [10] = '{24'h000000, 24'h000001, 24'hFFFFFF, 24'h7FFFFF, 24'h800000,
                                          24'h555555, 24'hAAAAAA, 24'h0F0F0F, 24'h800001, 24'h3FFFFF};

  initial begin
    for (int i = -2; i < 2; i++)
      for (int j = -2; j < 2; j++) begin
        a2 = 2'(i); b2 = 2'(j); #1;
        check(longint'(p2), longint'(i * j), "N=2");
      end
    for (int i = -4; i < 4; i++)
      for (int j = -4; j < 4; j++) begin
        a3 = 3'(i); b3 = 3'(j); #1;
        check(longint'(p3), longint'(i * j), "N=3");
      end
    for (int i = -8; i < 8; i++)
      for (int j = -8; j < 8; j++) begin
        a4 = 4'(i); b4 = 4'(j); #1;
        check(longint'(p4), longint'(i * j), "N=4");
      end
    for (int i = 0; i < 10; i++)
      for (int j = 0; j < 10; j++) begin
        a24 = CORNER[i]; b24 = CORNER[j]; #1;
        check(longint'(p24), longint'(a24) * longint'(b24), "N=24 corner");
      end
    for (int k = 0; k < 4000; k++) begin
      a24 = 24'($urandom); b24 = 24'($urandom); #1;
      check(longint'(p24), longint'(a24) * longint'(b24), "N=24 random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vedic_mult: the Urdhva Tiryagbhyam multiplier against the * operator.
// Exhaustive for N = 2, 3 and 4; random and corner operands (including the
// all-ones maximum, where every column carries) for the default N = 24 and
// for the signed wrapper at N = 24.
module tb_vedic_mult;
  int checks = 0;
  int failures = 0;

  logic [1:0]  a2, b2; logic [3:0]  p2;
  logic [2:0]  a3, b3; logic [5:0]  p3;
  logic [3:0]  a4, b4; logic [7:0]  p4;
  logic [23:0] a24, b24; logic [47:0] p24;
  logic signed [23:0] sa, sb; logic signed [47:0] sp;

  vedic_mult #(.N(2)) d2 (.a(a2), .b(b2), .p(p2));
  vedic_mult #(.N(3)) d3 (.a(a3), .b(b3), .p(p3));
  vedic_mult #(.N(4)) d4 (.a(a4), .b(b4), .p(p4));
  vedic_mult          d24 (.a(a24), .b(b24), .p(p24));
  vedic_mult_signed #(.N(24)) ds (.a(sa), .b(sb), .p(sp));

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", w, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      a2 = 2'(i); b2 = 2'(j); #1; chk("N=2", longint'(p2), longint'(i * j));
    end
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin
      a3 = 3'(i); b3 = 3'(j); #1; chk("N=3", longint'(p3), longint'(i * j));
    end
    for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++) begin
      a4 = 4'(i); b4 = 4'(j); #1; chk("N=4", longint'(p4), longint'(i * j));
    end
    a24 = '1; b24 = '1; #1;
    chk("N=24 max", longint'(p24), longint'(24'hFFFFFF) * longint'(24'hFFFFFF));
    for (int n = 0; n < 2000; n++) begin
      a24 = 24'($urandom); b24 = 24'($urandom); #1;
      chk("N=24", longint'(p24), longint'(a24) * longint'(b24));
    end
    sa = 24'h800000; sb = 24'h800000; #1;
    chk("signed min*min", longint'(sp), longint'(sa) * longint'(sb));
    sa = 24'h800000; sb = 24'sd16384; #1;
    chk("signed min*1.0", longint'(sp), longint'(sa) * longint'(sb));
    for (int n = 0; n < 2000; n++) begin
      sa = 24'($urandom); sb = 24'($urandom); #1;
      chk("signed N=24", longint'(sp), longint'(sa) * longint'(sb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// booth_mult: signed N x N multiplier using radix-2 Booth recoding, the
// comparison baseline ("Booth based system") of the published design.
//
// Each multiplier bit b[i] is looked at together with the bit below it,
// b[i-1] (b[-1] = 0), and recoded as
//   00 -> 0,  01 -> +1,  10 -> -1,  11 -> 0,
// so partial product i is 0, +a or -a, shifted left by i. The N partial
// products, sign-extended to 2N bits, are summed. Runs of ones in b cost
// only two non-zero partial products, which is the point of the recoding.
//
// Interface: signed a, b (N bits each); signed 2N-bit product p.
// Timing: purely combinational.
//
// The recoding table is the one printed in the source's literature survey.
// Radix 2 rather than radix 4 (which the source mentions as an extension),
// and the plain summation of the partial products, are this design's own.
module booth_mult #(
  parameter int unsigned N = 24
) (
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   b,
  output logic signed [2*N-1:0] p
);

  logic signed [2*N-1:0] a_ext;
  logic signed [2*N-1:0] sum;
  logic                  prev;

  always_comb begin
    a_ext = (2 * N)'(a);
    sum   = '0;
    prev  = 1'b0;
    for (int i = 0; i < N; i++) begin
      case ({b[i], prev})
        2'b01:   sum = sum + (a_ext <<< i);
        2'b10:   sum = sum - (a_ext <<< i);
        default: sum = sum;
      endcase
      prev = b[i];
    end
    p = sum;
  end

endmodule

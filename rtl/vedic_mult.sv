// vedic_mult: unsigned N x N multiplier organised by the Urdhva Tiryagbhyam
// ("vertically and crosswise") rule of Vedic arithmetic.
//
// The rule forms the product column by column, from the least significant
// end. Column k collects every bit product a[i]*b[j] with i + j = k: the
// vertical product at the column ends and the crosswise products between
// them. It adds the carry passed on from column k-1. The sum's LSB is
// product bit k and the rest is carried into column k+1. For N = 2 this
// gives the familiar cell: p0 = a0b0, then p1 = a1b0 + a0b1 with a carry
// into p3:p2 = a1b1 + carry. All N*N bit products are formed at once;
// only the short column carries ripple.
//
// Purely combinational: p is valid in the same cycle as a and b.
//
// The published design names this multiplier for the FFT of its seizure
// analysis block. The column-wise circuit is this design's rendering of
// the rule.
module vedic_mult #(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  // A column holds at most N bit products plus a carry below N.
  localparam int unsigned CW = $clog2(2 * N + 1) + 1;

  logic [CW-1:0] column [2*N];
  logic [CW-1:0] carry  [2*N+1];

  always_comb begin
    carry[0] = '0;
    for (int k = 0; k < 2 * N; k++) begin
      column[k] = carry[k];
      for (int i = 0; i < N; i++) begin
        if (k - i >= 0 && k - i < N) column[k] += CW'(a[i] & b[k - i]);
      end
      p[k]       = column[k][0];
      carry[k+1] = column[k] >> 1;
    end
  end

endmodule

// vedic_mult_signed: signed N x N multiplier around the unsigned
// Urdhva Tiryagbhyam multiplier (vedic_mult).
//
// Both operands are turned into magnitudes (an N-bit unsigned magnitude
// holds even the most negative value), multiplied by vedic_mult, and the
// product is negated when exactly one operand was negative.
// Combinational, 2N-bit signed result.
//
// Sign handling by magnitude and sign is this design's own choice; the
// published design uses the vedic multiplier on fixed-point FFT data.
module vedic_mult_signed #(
  parameter int unsigned N = 24
) (
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   b,
  output logic signed [2*N-1:0] p
);

  logic [N-1:0]   mag_a, mag_b;
  logic [2*N-1:0] mag_p;
  logic           neg;

  assign mag_a = a[N-1] ? N'(-a) : N'(a);
  assign mag_b = b[N-1] ? N'(-b) : N'(b);
  assign neg   = a[N-1] ^ b[N-1];

  vedic_mult #(.N(N)) u_mag (.a(mag_a), .b(mag_b), .p(mag_p));

  assign p = neg ? -$signed(mag_p) : $signed(mag_p);

endmodule

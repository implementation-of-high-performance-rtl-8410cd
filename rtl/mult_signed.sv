// mult_signed: the signed multiplier used by the FFT and the energy
// calculation, chosen at elaboration.
//
// USE_BOOTH = 0 (default) instantiates the Urdhva Tiryagbhyam multiplier
// (vedic_mult_signed), which the published design proposes; USE_BOOTH = 1
// instantiates the radix-2 Booth multiplier (booth_mult), the baseline it
// is compared with. Both are exact, so the choice changes size and delay,
// never a result.
//
// Interface: signed a, b (N bits each); signed 2N-bit product p.
// Timing: purely combinational.
//
// Offering both multipliers behind one parameter follows the source's two
// systems (Booth based and Vedic based); the selector itself is this
// design's own.
module mult_signed #(
  parameter int unsigned N         = 24,
  parameter bit          USE_BOOTH = 1'b0
) (
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   b,
  output logic signed [2*N-1:0] p
);

  if (USE_BOOTH) begin : g_booth
    booth_mult #(.N(N)) u_mult (.a(a), .b(b), .p(p));
  end else begin : g_vedic
    vedic_mult_signed #(.N(N)) u_mult (.a(a), .b(b), .p(p));
  end

endmodule

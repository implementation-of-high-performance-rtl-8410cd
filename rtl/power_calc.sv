// power_calc: energy of one FFT bin, Re^2 + Im^2.
//
// Both squares are formed by the signed vedic multiplier (Booth when
// USE_BOOTH = 1); their sum is
// registered together with the bin index, so energy/index_out/out_valid
// follow in_valid by one clock. The result is exact (2*DW+1 bits).
//
// The Re^2+Im^2 stage follows the published analysis block; using the
// vedic multiplier for it and the single pipeline register are this
// design's own choices.
module power_calc #(
  parameter int unsigned DW  = 24,
  parameter int unsigned IDX = 7,
  parameter bit          USE_BOOTH = 1'b0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [DW-1:0] re,
  input  logic signed [DW-1:0] im,
  input  logic [IDX-1:0]      index_in,
  output logic                out_valid,
  output logic [2*DW:0]       energy,
  output logic [IDX-1:0]      index_out
);

  logic signed [2*DW-1:0] re_sq, im_sq;

  mult_signed #(.N(DW), .USE_BOOTH(USE_BOOTH)) u_re (.a(re), .b(re), .p(re_sq));
  mult_signed #(.N(DW), .USE_BOOTH(USE_BOOTH)) u_im (.a(im), .b(im), .p(im_sq));

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      energy    <= '0;
      index_out <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        energy    <= {1'b0, re_sq} + {1'b0, im_sq};
        index_out <= index_in;
      end
    end
  end

endmodule

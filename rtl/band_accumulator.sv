// band_accumulator: sums the bin energies of one EEG band.
//
// clear sets the sum to zero (start of a frame); add adds energy to it.
// clear has priority. acc is the registered sum, updated one clock after
// add. ACC_W leaves room for the 128 largest possible bin energies.
//
// Accumulating per band follows the published analysis block; the widths
// and the clear/add interface are this design's own.
module band_accumulator #(
  parameter int unsigned IN_W  = 49,
  parameter int unsigned ACC_W = 64
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             add,
  input  logic [IN_W-1:0]  energy,
  output logic [ACC_W-1:0] acc
);

  always_ff @(posedge clk) begin
    if (rst || clear) acc <= '0;
    else if (add)     acc <= acc + ACC_W'(energy);
  end

endmodule

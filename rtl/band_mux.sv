// band_mux: output multiplexer of the seizure analysis stage. Routes the
// accumulated energy of the band chosen by sel (0 theta, 1 alpha, 2 beta,
// 3 gamma, see seizure_pkg::band_e) to energy_response. Combinational.
//
// The multiplexer is in the published analysis block; the select encoding
// is this design's own.
module band_mux #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0]        band_energy [4],
  input  seizure_pkg::band_e  sel,
  output logic [W-1:0]        energy_response
);

  always_comb begin
    unique case (sel)
      seizure_pkg::BAND_THETA: energy_response = band_energy[0];
      seizure_pkg::BAND_ALPHA: energy_response = band_energy[1];
      seizure_pkg::BAND_BETA:  energy_response = band_energy[2];
      default:                 energy_response = band_energy[3];
    endcase
  end

endmodule

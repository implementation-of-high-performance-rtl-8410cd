// band_select: the band-pass filter of the seizure analysis stage, applied
// in the frequency domain. For the FFT bin index "bin" it reports which of
// the four EEG bands (theta 4-7 Hz, alpha 8-12 Hz, beta 13-29 Hz, gamma
// 30-50 Hz) the bin belongs to; in_band[b] gates the accumulator of band b.
//
// Bin k lies at k*FS/N Hz, so band b covers bins
//   ceil(f_lo*N/FS) .. floor(f_hi*N/FS)
// (seizure_pkg::band_bin_lo/hi). With N = 128 and FS = 173.61 Hz:
// theta 3..5, alpha 6..8, beta 10..21, gamma 23..36. Bins in the gaps
// between bands (12-13 Hz, 29-30 Hz) belong to none.
// Combinational.
//
// The band edges and the sampling rate follow the published design; doing
// the band-pass as a bin selection after the FFT is this design's reading
// of its block diagram.
module band_select #(
  parameter int unsigned N      = 128,
  parameter int unsigned FS_MHZ = 173610
) (
  input  logic [$clog2(N)-1:0] bin,
  output logic [3:0]           in_band
);

  for (genvar b = 0; b < 4; b++) begin : g_band
    localparam int unsigned LO = seizure_pkg::band_bin_lo(b, 64'(N), 64'(FS_MHZ));
    localparam int unsigned HI = seizure_pkg::band_bin_hi(b, 64'(N), 64'(FS_MHZ));
    assign in_band[b] = (32'(bin) >= LO) && (32'(bin) <= HI);
  end

endmodule

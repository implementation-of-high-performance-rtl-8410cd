// buffer_memory: circular buffer holding the most recent DEPTH samples of
// all channels, from which the analysis stage reads the data of a seizure.
//
// Each write stores one word of NUM_CH samples at the write pointer, which
// then advances modulo DEPTH; full rises once DEPTH words have been
// written. Reads are addressed relative to the oldest word: rd_addr = 0 is
// the oldest stored sample and DEPTH-1 the newest, so reading 0..DEPTH-1
// returns the channel history in time order. The read is registered (one
// clock latency): out_mem returns the whole word and rd_sample the sample
// of channel rd_channel. The writer is expected to hold wr_en low while an
// analysis reads, so the history stays frozen.
//
// From the published design: a buffer memory fed from the ADC, with the
// detected channels selecting what is passed on as buffered EEG data, and
// a 256-bit word (16 channels x 16 bits). Depth 128 matches the FFT size;
// the circular organisation and read timing are this design's own.
module buffer_memory #(
  parameter int unsigned NUM_CH   = 16,
  parameter int unsigned SAMPLE_W = 16,
  parameter int unsigned DEPTH    = 128
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        wr_en,
  input  logic [SAMPLE_W-1:0]         in_mem [NUM_CH],
  input  logic [$clog2(DEPTH)-1:0]    rd_addr,
  input  logic [$clog2(NUM_CH)-1:0]   rd_channel,
  output logic [SAMPLE_W-1:0]         out_mem [NUM_CH],
  output logic [SAMPLE_W-1:0]         rd_sample,
  output logic                        full
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [NUM_CH*SAMPLE_W-1:0] mem [DEPTH];
  logic [AW-1:0]              wr_ptr;
  logic [AW-1:0]              phys_addr;
  logic [NUM_CH*SAMPLE_W-1:0] rd_word;
  logic [NUM_CH*SAMPLE_W-1:0] wr_word;

  always_comb begin
    for (int c = 0; c < NUM_CH; c++) wr_word[c*SAMPLE_W +: SAMPLE_W] = in_mem[c];
  end

  // Oldest word sits at wr_ptr once the buffer is full, at 0 before that.
  assign phys_addr = full ? AW'(wr_ptr + rd_addr) : rd_addr;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= wr_word;
    rd_word <= mem[phys_addr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      full   <= 1'b0;
    end else if (wr_en) begin
      wr_ptr <= (32'(wr_ptr) == DEPTH - 1) ? '0 : wr_ptr + 1'b1;
      if (32'(wr_ptr) == DEPTH - 1) full <= 1'b1;
    end
  end

  logic [$clog2(NUM_CH)-1:0] rd_channel_q;
  always_ff @(posedge clk) begin
    if (rst) rd_channel_q <= '0;
    else     rd_channel_q <= rd_channel;
  end

  always_comb begin
    for (int c = 0; c < NUM_CH; c++) out_mem[c] = rd_word[c*SAMPLE_W +: SAMPLE_W];
    rd_sample = rd_word[rd_channel_q*SAMPLE_W +: SAMPLE_W];
  end

endmodule

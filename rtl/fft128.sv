// fft128: 128-point radix-2 decimation-in-time FFT in fixed point, the
// time-to-frequency converter of the seizure analysis stage. The twiddle
// products are formed by Urdhva Tiryagbhyam (vedic) multipliers, or by
// radix-2 Booth multipliers when USE_BOOTH = 1 (the source's baseline).
//
// Operation (one frame at a time):
//  1. LOAD    - in_ready is high; N real samples are accepted on in_valid
//               and stored at bit-reversed addresses (imaginary part 0).
//  2. COMPUTE - log2(N) stages of N/2 butterflies, one butterfly per clock,
//               in place in a register array:
//                 t = B * W^k,  A' = A + t,  B' = A - t,
//               W^k = exp(-j*2*pi*k/N) with k = pos << (log2(N)-1-stage).
//               The complex product uses four mult_signed instances;
//               it is rounded to nearest and scaled back by 2^TW_FRAC.
//  3. OUTPUT  - bins X[0..N-1] are presented one per clock on out_valid,
//               out_index, out_re, out_im (no back-pressure).
// Frame latency: N (load) + N/2*log2(N) (compute) + N (output) clocks,
// i.e. 128 + 448 + 128 = 704 at the default size.
//
// Number format: inputs are IN_W-bit signed, internal data DW-bit signed
// without scaling. Each stage at most doubles a component, so with
// DW >= IN_W + log2(N) + 1 no stage overflows (16 + 7 + 1 = 24 by default);
// outputs equal the mathematical DFT up to twiddle rounding. Twiddles are
// TW_W-bit signed with TW_FRAC fraction bits, computed at elaboration as
// round(cos(2*pi*k/N) * 2^TW_FRAC) and round(-sin(2*pi*k/N) * 2^TW_FRAC).
//
// From the published design: a 128-point FFT built with the vedic
// multiplier. Radix, the iterative single-butterfly schedule, the widths
// and the streaming interface are this design's own choices.
module fft128 #(
  parameter int unsigned N       = 128,
  parameter int unsigned IN_W    = 16,
  parameter int unsigned DW      = 24,
  parameter int unsigned TW_W    = 16,
  parameter int unsigned TW_FRAC = 14,
  parameter bit          USE_BOOTH = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [IN_W-1:0]   in_data,
  output logic                     out_valid,
  output logic [$clog2(N)-1:0]     out_index,
  output logic signed [DW-1:0]     out_re,
  output logic signed [DW-1:0]     out_im,
  output logic                     busy
);

  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned PW   = 2 * DW;

  typedef enum logic [1:0] {S_LOAD, S_COMPUTE, S_OUTPUT} state_e;

  function automatic logic [N/2*TW_W-1:0] twiddle_table(bit imag);
    logic [N/2*TW_W-1:0] t;
    real ang, v;
    t = '0;
    for (int k = 0; k < N/2; k++) begin
      ang = 2.0 * 3.14159265358979323846 * real'(k) / real'(N);
      v   = imag ? -$sin(ang) : $cos(ang);
      t[k*TW_W +: TW_W] = TW_W'($rtoi($floor(v * real'(longint'(1) << TW_FRAC) + 0.5)));
    end
    return t;
  endfunction

  localparam logic [N/2*TW_W-1:0] TW_RE = twiddle_table(1'b0);
  localparam logic [N/2*TW_W-1:0] TW_IM = twiddle_table(1'b1);

  function automatic logic [LOGN-1:0] bit_reverse(logic [LOGN-1:0] v);
    for (int i = 0; i < LOGN; i++) bit_reverse[i] = v[LOGN-1-i];
  endfunction

  state_e               state;
  logic signed [DW-1:0] re_mem [N];
  logic signed [DW-1:0] im_mem [N];
  logic [LOGN-1:0]      count;      // load / output counter
  logic [LOGN-2:0]      bf;         // butterfly within the stage
  logic [$clog2(LOGN)-1:0] stage;

  // Butterfly addressing.
  logic [LOGN-1:0] half, pos, ia, ib;
  logic [LOGN-2:0] tw_idx;

  always_comb begin
    half   = LOGN'(1) << stage;
    pos    = LOGN'(bf) & (half - 1'b1);
    ia     = ((LOGN'(bf) >> stage) << (stage + 1)) | pos;
    ib     = ia | half;
    tw_idx = (LOGN-1)'(pos << (LOGN'(LOGN - 1) - LOGN'(stage)));
  end

  // Complex multiply t = B * W.
  logic signed [DW-1:0]   a_re, a_im, b_re, b_im;
  logic signed [DW-1:0]   w_re, w_im;
  logic signed [PW-1:0]   p_rr, p_ii, p_ri, p_ir;
  logic signed [PW:0]     t_re_full, t_im_full;
  logic signed [DW-1:0]   t_re, t_im;

  assign a_re = re_mem[ia];
  assign a_im = im_mem[ia];
  assign b_re = re_mem[ib];
  assign b_im = im_mem[ib];
  assign w_re = DW'($signed(TW_RE[tw_idx*TW_W +: TW_W]));
  assign w_im = DW'($signed(TW_IM[tw_idx*TW_W +: TW_W]));

  mult_signed #(.N(DW), .USE_BOOTH(USE_BOOTH)) u_rr (.a(b_re), .b(w_re), .p(p_rr));
  mult_signed #(.N(DW), .USE_BOOTH(USE_BOOTH)) u_ii (.a(b_im), .b(w_im), .p(p_ii));
  mult_signed #(.N(DW), .USE_BOOTH(USE_BOOTH)) u_ri (.a(b_re), .b(w_im), .p(p_ri));
  mult_signed #(.N(DW), .USE_BOOTH(USE_BOOTH)) u_ir (.a(b_im), .b(w_re), .p(p_ir));

  localparam logic signed [PW:0] ROUND = (PW+1)'(1) <<< (TW_FRAC - 1);

  assign t_re_full = (PW+1)'(p_rr) - (PW+1)'(p_ii) + ROUND;
  assign t_im_full = (PW+1)'(p_ri) + (PW+1)'(p_ir) + ROUND;
  assign t_re      = DW'(t_re_full >>> TW_FRAC);
  assign t_im      = DW'(t_im_full >>> TW_FRAC);

  assign in_ready = (state == S_LOAD);
  assign busy     = (state != S_LOAD);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_LOAD;
      count     <= '0;
      bf        <= '0;
      stage     <= '0;
      out_valid <= 1'b0;
      out_index <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_LOAD: begin
          if (in_valid) begin
            re_mem[bit_reverse(count)] <= DW'(in_data);
            im_mem[bit_reverse(count)] <= '0;
            count <= count + 1'b1;
            if (count == LOGN'(N - 1)) begin
              state <= S_COMPUTE;
              bf    <= '0;
              stage <= '0;
            end
          end
        end
        S_COMPUTE: begin
          re_mem[ia] <= a_re + t_re;
          im_mem[ia] <= a_im + t_im;
          re_mem[ib] <= a_re - t_re;
          im_mem[ib] <= a_im - t_im;
          bf <= bf + 1'b1;
          if (bf == '1) begin
            if (32'(stage) == LOGN - 1) begin
              state <= S_OUTPUT;
              count <= '0;
            end else begin
              stage <= stage + 1'b1;
            end
          end
        end
        S_OUTPUT: begin
          out_valid <= 1'b1;
          out_index <= count;
          out_re    <= re_mem[count];
          out_im    <= im_mem[count];
          count     <= count + 1'b1;
          if (count == LOGN'(N - 1)) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule

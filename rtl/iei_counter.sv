// iei_counter: the IEI (inter-event interval) "count and compare" stage of
// the single-channel seizure detector. It bounds the time window in which
// the N threshold crossings must occur.
//
// Operation, one step per sample (tick):
//  * idle: the first crossing (enable) opens the window with count = 0;
//  * open: every later tick increments count; on the tick where the
//    incremented count would exceed iei_thresh the window closes and
//    master_reset is raised for that tick, clearing the N-stage counter.
// A window therefore lasts iei_thresh+1 samples after the opening crossing.
// master_reset is combinational from the registered state and tick, so it
// acts on the same clock edge as the crossing that would otherwise be
// counted; a crossing on the closing tick is not counted and does not
// reopen the window.
//
// From the published design: "Count > IEI thresh" producing Master Reset,
// driven by the comparator's Enable. The window opening rule, the exact
// tick accounting and the counter width are this design's own choice.
module iei_counter #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             tick,
  input  logic             enable,
  input  logic [CNT_W-1:0] iei_thresh,
  output logic             master_reset,
  output logic             window_open
);

  logic [CNT_W-1:0] count_q;
  logic [CNT_W:0]   count_next;

  assign count_next   = {1'b0, count_q} + 1'b1;
  assign master_reset = tick && window_open && (count_next > {1'b0, iei_thresh});

  always_ff @(posedge clk) begin
    if (rst) begin
      window_open <= 1'b0;
      count_q     <= '0;
    end else if (tick) begin
      if (window_open) begin
        if (master_reset) begin
          window_open <= 1'b0;
          count_q     <= '0;
        end else begin
          count_q <= count_next[CNT_W-1:0];
        end
      end else if (enable) begin
        window_open <= 1'b1;
        count_q     <= '0;
      end
    end
  end

endmodule

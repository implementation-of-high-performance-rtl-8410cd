// nstage_counter: the N-stage "count and compare" stage of the
// single-channel seizure detector.
//
// count holds the number of threshold crossings (enable on a tick) since the
// last master_reset from the IEI stage; it saturates at its maximum.
// seizure_detected = (count > n_thresh), so a seizure is declared on the
// (n_thresh+1)-th crossing inside one IEI window and stays declared until
// the window's master_reset (or rst) clears the count.
//
// Timing: count updates on the clock edge of the tick; seizure_detected
// follows the registered count. master_reset has priority over a crossing
// on the same tick.
//
// From the published design: counting crossings, "Count > N thresh",
// clearing by Master Reset. Saturation and widths are this design's own.
module nstage_counter #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             tick,
  input  logic             enable,
  input  logic             master_reset,
  input  logic [CNT_W-1:0] n_thresh,
  output logic             seizure_detected,
  output logic [CNT_W-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
    end else if (master_reset) begin
      count <= '0;
    end else if (tick && enable && (count != '1)) begin
      count <= count + 1'b1;
    end
  end

  assign seizure_detected = (count > n_thresh);

endmodule

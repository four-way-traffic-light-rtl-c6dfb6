// violation_detector: catches vehicles that cross the stop line on red.
//
// The first IR sensor of each road (index 0) lies across the stop line: a
// vehicle that waits correctly stands behind it, one that enters the junction
// passes over it. A vehicle reaching that sensor - a rising edge - while the
// road's centre signal is red is a red-light violation: the block raises
// `violation` for that road for one clock cycle and increments the road's
// saturating count. Crossings on yellow or green are legal. The edge detector
// keeps following the sensors during reset, so a vehicle already standing on
// a sensor when reset ends is not counted. Sensor inputs are expected to be
// synchronised to clk already. Using the IR sensors to catch vehicles that do
// not obey the signals follows the source design; the sensor placement, edge
// detection and counters are this design's own choices.
// Timing: `violation` is registered and rises the cycle after the sensor edge
// is seen; `count` updates on the same cycle.
module violation_detector
  import tlc_pkg::*;
#(
  parameter int unsigned CNT_W = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,      // active-low synchronous reset
  input  logic  [NUM_ROADS-1:0]        stop_ir,    // stop-line sensor per road, W N E S
  input  lamp_t [NUM_CENTER-1:0]       center,     // centre lamps, index 0 = C1
  output logic  [NUM_ROADS-1:0]        violation,  // one-cycle pulse per violation
  output logic  [NUM_ROADS-1:0][CNT_W-1:0] count   // violations seen, saturating
);
  logic [NUM_ROADS-1:0] stop_q;
  logic [NUM_ROADS-1:0] hit;

  always_comb begin
    for (int r = 0; r < NUM_ROADS; r++) begin
      hit[r] = stop_ir[r] && !stop_q[r] && (center[center_of(road_t'(r))] == LAMP_R);
    end
  end

  always_ff @(posedge clk) begin
    stop_q <= stop_ir;
    if (!rst_n) begin
      violation <= '0;
      count     <= '0;
    end else begin
      violation <= hit;
      for (int r = 0; r < NUM_ROADS; r++) begin
        if (hit[r] && count[r] != {CNT_W{1'b1}}) count[r] <= count[r] + 1'b1;
      end
    end
  end

endmodule

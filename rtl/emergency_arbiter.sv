// emergency_arbiter: picks the road an emergency vehicle is approaching on.
//
// Each road has an RF receiver that reports an approaching emergency vehicle
// (ambulance, fire engine or VIP car). The controller can serve only one of
// them at a time, so this purely combinational block reduces the four request
// lines to `any` plus the index of the winning road. When several roads ask
// at once the lowest index wins: West, then North, East, South, the order in
// which the normal cycle serves the roads. Using RF modules to detect
// emergency vehicles follows the source design; the fixed priority is this
// design's own choice, as the source does not say how simultaneous requests
// are resolved.
module emergency_arbiter
  import tlc_pkg::*;
(
  input  logic [NUM_ROADS-1:0] req,   // one bit per road, W N E S
  output logic                 any,   // at least one request
  output road_t                road   // winning road, valid when any
);
  always_comb begin
    any  = |req;
    road = ROAD_W;
    for (int i = NUM_ROADS - 1; i >= 0; i--) begin
      if (req[i]) road = road_t'(i);
    end
  end

endmodule

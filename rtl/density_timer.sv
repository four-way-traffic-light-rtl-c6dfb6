// density_timer: green duration of each road from its IR-sensor occupancy.
//
// Four IR sensors sit one behind the other along each approach, the first
// across the stop line, so the number of sensors that see a vehicle is a
// coarse measure of the queue. The green
// time of the road follows from that count:
//   0 sensors occupied      -> GREEN_MIN seconds (nobody waiting: short green)
//   1 or 2 sensors occupied -> the road's base time from the state table
//   3 or 4 sensors occupied -> base time + GREEN_EXT seconds (congested)
// Base times are the state-table values: West 20 s, North 20 s, East 10 s,
// South 25 s. That the green time grows and shrinks with the density measured
// by the IR sensors is the source design; the three-level mapping, GREEN_MIN
// and GREEN_EXT are this design's own. The block is combinational; the
// sequencer samples a road's duration on the cycle it enters that road's green.
module density_timer
  import tlc_pkg::*;
#(
  parameter int unsigned GREEN_W   = 20,
  parameter int unsigned GREEN_N   = 20,
  parameter int unsigned GREEN_E   = 10,
  parameter int unsigned GREEN_S   = 25,
  parameter int unsigned GREEN_MIN = 5,
  parameter int unsigned GREEN_EXT = 10
) (
  input  logic [NUM_ROADS-1:0][IR_PER_ROAD-1:0] ir,     // occupancy, road-major W N E S
  output secs_t [NUM_ROADS-1:0]                 green   // green time of each road
);
  localparam int unsigned BASE [NUM_ROADS] = '{GREEN_W, GREEN_N, GREEN_E, GREEN_S};

  always_comb begin
    for (int r = 0; r < NUM_ROADS; r++) begin
      int unsigned occ;
      occ = 0;
      for (int k = 0; k < IR_PER_ROAD; k++) occ += int'(ir[r][k]);
      if (occ == 0)      green[r] = secs_t'(GREEN_MIN);
      else if (occ <= 2) green[r] = secs_t'(BASE[r]);
      else               green[r] = secs_t'(BASE[r] + GREEN_EXT);
    end
  end

endmodule

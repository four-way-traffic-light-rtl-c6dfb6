// tb_emergency_arbiter: exhaustive check of the emergency request arbiter.
//
// All sixteen combinations of the four RF request lines are applied. The
// expected winner is the first set bit counted from West (bit 0), found here
// with a casez table, and `any` must be the OR of the requests.
module tb_emergency_arbiter;
  import tlc_pkg::*;

  logic [NUM_ROADS-1:0] req;
  logic                 any;
  road_t                road;
  int checks = 0;
  int failures = 0;

  emergency_arbiter dut (.req, .any, .road);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    road_t exp_road;
    for (int v = 0; v < 16; v++) begin
      req = 4'(v);
      #1;
      casez (req)
        4'b???1: exp_road = ROAD_W;
        4'b??10: exp_road = ROAD_N;
        4'b?100: exp_road = ROAD_E;
        default: exp_road = ROAD_S;
      endcase
      checks++;
      if (any !== (v != 0)) begin
        failures++;
        $display("FAIL: req=%b any=%b", req, any);
      end
      if (v != 0) begin
        checks++;
        if (road !== exp_road) begin
          failures++;
          $display("FAIL: req=%b road=%s expected %s", req, road.name(), exp_road.name());
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

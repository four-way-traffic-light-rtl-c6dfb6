// tb_density_timer: checks the green duration chosen for every occupancy.
//
// Every road is driven through all sixteen patterns of its four IR sensors
// while the other roads take random patterns; the expected duration follows
// from the number of set sensors: none -> 5 s, one or two -> the road's base
// (W 20, N 20, E 10, S 25), three or four -> base + 10 s.
module tb_density_timer;
  import tlc_pkg::*;

  logic  [NUM_ROADS-1:0][IR_PER_ROAD-1:0] ir;
  secs_t [NUM_ROADS-1:0]                  green;
  int checks = 0;
  int failures = 0;

  density_timer dut (.ir, .green);

  function automatic int expected(int road, logic [3:0] pat);
    int base;
    int n;
    base = (road == 0) ? 20 : (road == 1) ? 20 : (road == 2) ? 10 : 25;
    n = pat[0] + pat[1] + pat[2] + pat[3];
    if (n == 0) return 5;
    if (n < 3) return base;
    return base + 10;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < NUM_ROADS; r++) begin
      for (int p = 0; p < 16; p++) begin
        ir = $urandom();
        ir[r] = 4'(p);
        #1;
        for (int q = 0; q < NUM_ROADS; q++) begin
          checks++;
          if (int'(green[q]) != expected(q, ir[q])) begin
            failures++;
            $display("FAIL: road %0d ir=%b green=%0d expected %0d", q, ir[q], green[q],
                     expected(q, ir[q]));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tick_gen: checks the one-second divider at a reduced clock rate.
//
// With CLK_HZ = 10 and TICK_HZ = 1 the tick must be a single-cycle pulse that
// first appears 10 cycles after reset is released and then every 10 cycles.
// The testbench counts clock cycles itself and compares every gap between
// ticks, every pulse width and the number of ticks in a fixed window.
module tb_tick_gen;
  localparam int unsigned DIV = 10;

  logic clk = 1'b0;
  logic rst_n;
  logic tick;
  int   checks = 0;
  int   failures = 0;

  tick_gen #(.CLK_HZ(DIV), .TICK_HZ(1)) dut (.clk, .rst_n, .tick);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    int last;
    int nticks;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // cycles are counted from the first rising edge with reset released
    cyc = 0; last = 0; nticks = 0;
    repeat (20 * DIV) begin
      @(posedge clk);
      cyc++;
      @(negedge clk);
      if (tick) begin
        nticks++;
        check(cyc - last == DIV, $sformatf("tick gap %0d, expected %0d", cyc - last, DIV));
        last = cyc;
      end
    end
    check(nticks == 20, $sformatf("%0d ticks in %0d cycles, expected 20", nticks, 20 * DIV));
    // a reset in mid-count restarts the period
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) begin
      rst_n = 1'b1;
      check(tick == 1'b0, "tick low in reset");
    end
    cyc = 0;
    do begin
      @(negedge clk);
      cyc++;
    end while (!tick && cyc < 3 * DIV);
    check(cyc == DIV, $sformatf("first tick after reset at %0d, expected %0d", cyc, DIV));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

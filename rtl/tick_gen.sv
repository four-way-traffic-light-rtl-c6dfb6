// tick_gen: one-second time base for the traffic light controller.
//
// Every duration of the light sequence is given in seconds, so the board clock
// is divided down to a single-cycle pulse, `tick`, once every CLK_HZ/TICK_HZ
// clock cycles. A free-running counter counts from 0 to DIV-1 and the pulse is
// raised on the cycle the counter wraps, so the first tick after reset comes
// DIV cycles after reset is released and the ticks then come exactly DIV
// cycles apart. The 50 MHz default is the oscillator of the DE0 board the
// design targets; the divider itself is this design's own (the source only
// states the times in seconds). Tests shorten DIV by overriding the parameters.
module tick_gen #(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned TICK_HZ = 1
) (
  input  logic clk,
  input  logic rst_n,   // active-low synchronous reset
  output logic tick     // one clock cycle high per period
);
  localparam int unsigned DIV = (CLK_HZ / TICK_HZ < 1) ? 1 : CLK_HZ / TICK_HZ;
  localparam int unsigned CW  = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

endmodule

// timer_prescaler -- divides the main clock down to the timer's base tick.
//
// A modulo-(CLK_HZ/TICK_HZ) counter that raises `tick` for one clock at the
// end of every period. With the default 10 MHz main clock and a 100 Hz tick it
// produces one tick every 100,000 clocks, the 1/100 s step of the first timer
// stage. The clock and tick rates are the design's; the counter structure and
// the synchronous active-low reset are this implementation's choice.
//
// Timing: the first tick comes CLK_HZ/TICK_HZ clocks after reset is released,
// then one every CLK_HZ/TICK_HZ clocks. The prescaler is not duplicated; only
// the four timer stages are self-repairing.
module timer_prescaler #(
  parameter int unsigned CLK_HZ  = 10_000_000,
  parameter int unsigned TICK_HZ = 100
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  localparam int unsigned DIV = (CLK_HZ / TICK_HZ < 1) ? 1 : CLK_HZ / TICK_HZ;
  localparam int unsigned W   = (DIV < 2) ? 1 : $clog2(DIV);

  logic [W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n)                   cnt <= '0;
    else if (cnt == W'(DIV - 1))  cnt <= '0;
    else                          cnt <= cnt + W'(1);
  end

  assign tick = rst_n && (cnt == W'(DIV - 1));

endmodule

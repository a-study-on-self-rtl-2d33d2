// tb_timer_prescaler -- self-checking test of timer_prescaler.
// With CLK_HZ = 1000 and TICK_HZ = 100 the tick must come once every 10
// clocks, starting 10 clocks after reset, and be one clock wide.
module tb_timer_prescaler;
  localparam int CLK_HZ = 1000, TICK_HZ = 100, DIV = CLK_HZ / TICK_HZ;

  logic clk = 0, rst_n = 0, tick;
  int   checks = 0, failures = 0;

  timer_prescaler #(.CLK_HZ(CLK_HZ), .TICK_HZ(TICK_HZ)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 1; cyc <= 50 * DIV; cyc++) begin
      @(posedge clk); #1;
      checks++;
      if (tick !== (cyc % DIV == DIV - 1)) begin
        failures++;
        $display("FAIL cycle %0d tick=%b", cyc, tick);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

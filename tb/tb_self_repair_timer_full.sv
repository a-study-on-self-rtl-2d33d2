// tb_self_repair_timer_full -- the timer at its default parameters.
// The 10 MHz clock is divided to 100 Hz, so one second of timer time is ten
// million clocks. The test runs 1.2 s of timer time and presses the fault
// button of the hundredths stage's working cell at 0.25 s and of the seconds
// stage's working cell at 0.65 s. The timer value is compared with a model of
// the elapsed time on every clock except the one in which a new fault first
// shows, and both stages must be repaired (TMR) two clocks after the press.
module tb_self_repair_timer_full;
  import self_repair_pkg::*;

  localparam longint DIV = 100_000;   // 10 MHz / 100 Hz

  logic                                  clk = 0, rst_n = 0;
  logic [NUM_MODULES-1:0][NUM_CELLS-1:0] fault_btn = '0;
  logic                                  tick;
  logic [CNT_W-1:0]                      hundredths, tenths, seconds, minutes;
  logic [5:0][6:0]                       fnd_seg;
  logic [NUM_MODULES-1:0]                error_code, repaired, crack;
  repair_state_e                         repair_state [NUM_MODULES];
  logic                                  system_crack;
  coord_t                                coordinate;
  logic                                  located;
  logic [7:0]                            locate_count;

  int     checks = 0, failures = 0, n_tick = 0;
  longint cycle = 0;
  bit     skip = 0;

  self_repair_timer dut (.*);

  always #50 clk = ~clk;     // 100 ns period

  always @(posedge clk) if (tick) n_tick++;

  initial begin : watchdog
    repeat (13_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint n);
    for (longint i = 0; i < n; i++) begin
      longint t;
      @(posedge clk);
      #1;
      t = (cycle + 1) / DIV;
      if (!skip) begin
        checks++;
        if (hundredths != CNT_W'(t % 10) || tenths != CNT_W'((t / 10) % 10) ||
            seconds != CNT_W'((t / 100) % 60) || minutes != CNT_W'(t / 6000)) begin
          failures++;
          if (failures < 10)
            $display("FAIL at cycle %0d: %0d:%0d.%0d%0d", cycle, minutes,
                     seconds, tenths, hundredths);
        end
      end
      skip = 0;
      cycle++;
    end
  endtask

  task automatic press_and_check(input int m);
    @(negedge clk);
    fault_btn[m][CELL_ORIG] = 1'b1;
    #1;
    checks++;
    if (!error_code[m]) begin failures++; $display("FAIL no detection in stage %0d", m); end
    skip = 1;
    run(2);
    checks++;
    if (repair_state[m] != RS_TMR || !repaired[m]) begin
      failures++;
      $display("FAIL stage %0d not repaired two clocks after the fault", m);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(2_500_010);
    press_and_check(0);
    run(4_000_000 - 2);
    press_and_check(2);
    run(12_000_000 - cycle);
    checks++;
    if (n_tick != 120) begin failures++; $display("FAIL %0d ticks, expected 120", n_tick); end
    checks++;
    if (seconds != 1 || tenths != 2 || hundredths != 0) begin
      failures++;
      $display("FAIL final value %0d.%0d%0d", seconds, tenths, hundredths);
    end
    checks++;
    if (repaired != 4'b0101 || system_crack) begin failures++; $display("FAIL repair flags"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_self_repair_timer -- end-to-end test of the self-repairing timer.
// The prescaler is shortened (CLK_HZ = 4, TICK_HZ = 1: one tick every four
// clocks) so that 61 minutes of timer time, including the minutes wrap, run
// in about 1.5 million clocks. An independent model turns the number of
// elapsed clocks into the expected hundredths, tenths, seconds and minutes,
// and every output, the first FND digit included, is compared each clock.
// Faults are injected through the push-button inputs:
//   - the working cell of every stage (DMR detect, isolate, daughters vote),
//   - a daughter of the seconds stage and the duplicate of the minutes stage
//     after repair (the vote masks them, the stage reports a crack).
// A fault is injected only in a clock without a tick, and the clock in which
// a new fault is first seen is not compared: the design lets a fault reach
// the output for that one clock before it isolates it. Each mechanism is
// counted and must occur at least once. After every press the reported
// fault coordinate must name the faulted stage and cell.
module tb_self_repair_timer;
  import self_repair_pkg::*;

  localparam int CLK_HZ = 4, TICK_HZ = 1, DIV = CLK_HZ / TICK_HZ;
  localparam longint RUN_TICKS = 61 * 6000 + 250;

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

  int checks = 0, failures = 0;
  longint cycle = 0;      // clocks since reset release
  bit skip;               // a new fault appears in this clock

  // Mechanism counters.
  int n_tick = 0, n_wrap_min = 0;
  int n_detect [NUM_MODULES];
  int n_isolate [NUM_MODULES];
  int n_repair [NUM_MODULES];
  int n_masked = 0, n_locate = 0, n_crack = 0, n_stage_step [NUM_MODULES];

  self_repair_timer #(.CLK_HZ(CLK_HZ), .TICK_HZ(TICK_HZ)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (int'(RUN_TICKS) * DIV + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [6:0] seg_of(input int d);
    logic [6:0] t [10] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66,
                           7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};
    return t[d];
  endfunction

  task automatic fail(input string what);
    failures++;
    if (failures < 20)
      $display("FAIL %s at cycle %0d: %0d:%0d.%0d%0d", what, cycle,
               minutes, seconds, tenths, hundredths);
  endtask

  // Compare the outputs with the elapsed-time model (after the edge that
  // ends clock `cycle`).
  task automatic check_time();
    longint t;
    t = (cycle + 1) / longint'(DIV);   // ticks taken so far
    checks++;
    if (hundredths != CNT_W'(t % 10)        ||
        tenths     != CNT_W'((t / 10) % 10) ||
        seconds    != CNT_W'((t / 100) % 60) ||
        minutes    != CNT_W'((t / 6000) % 60))
      fail("timer value");
    checks++;
    if (fnd_seg[0] != seg_of(int'(t % 10))) fail("FND digit 0");
  endtask

  // Press a fault button in a clock with no tick.
  task automatic press(input int m, input int c);
    while ((cycle % longint'(DIV)) == longint'(DIV) - 1) @(posedge clk) cycle++;
    @(negedge clk);
    fault_btn[m][c] = 1'b1;
    skip = 1'b1;
  endtask

  // Run n clocks, checking each one.
  task automatic run(input longint n);
    for (longint i = 0; i < n; i++) begin
      @(posedge clk);
      #1;
      if (!skip) check_time();
      skip = 1'b0;
      cycle++;
    end
  endtask

  // Event monitor.
  logic [NUM_MODULES-1:0] err_q = '0, rep_q = '0, crk_q = '0;
  logic [CNT_W-1:0]       min_q = '0;
  logic [CNT_W-1:0]       cnt_q [NUM_MODULES] = '{default: '0};
  always @(posedge clk) if (rst_n) begin
    logic [CNT_W-1:0] cnt_now [NUM_MODULES];
    cnt_now = '{hundredths, tenths, seconds, minutes};
    if (tick) n_tick++;
    for (int m = 0; m < NUM_MODULES; m++) begin
      if (error_code[m] && !err_q[m] && !repaired[m]) n_detect[m]++;
      if (error_code[m] && !err_q[m] && repaired[m]) n_masked++;
      if (repair_state[m] == RS_ISOLATE) n_isolate[m]++;
      if (repaired[m] && !rep_q[m]) n_repair[m]++;
      if (crack[m] && !crk_q[m]) n_crack++;
      if (cnt_now[m] != cnt_q[m]) n_stage_step[m]++;
      cnt_q[m] = cnt_now[m];
    end
    if (minutes == 0 && min_q == 59) n_wrap_min++;
    min_q = minutes;
    err_q = error_code; rep_q = repaired; crk_q = crack;
  end

  task automatic expect_coord(input int m, input int c);
    checks++;
    if (!located || coordinate.stage != 2'(m) || coordinate.cell_id != 2'(c)) begin
      fail($sformatf("fault location, expected stage %0d cell %0d", m, c));
    end else n_locate++;
  endtask

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else
      $display("mechanism %-28s %0d", what, n);
  endtask

  initial begin
    skip = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(1000);
    press(0, CELL_ORIG);  run(3);  expect_coord(0, CELL_ORIG);
    checks++; if (repair_state[0] != RS_TMR) fail("stage 0 repaired in two clocks");
    run(3000);
    press(1, CELL_ORIG);  run(3);  expect_coord(1, CELL_ORIG);  run(20000);
    press(2, CELL_ORIG);  run(3);  expect_coord(2, CELL_ORIG);  run(30000);
    press(3, CELL_ORIG);  run(3);  expect_coord(3, CELL_ORIG);  run(700000);
    press(2, CELL_DTR2);  run(3);  expect_coord(2, CELL_DTR2);  run(5000);
    press(3, CELL_COPY);  run(3);  expect_coord(3, CELL_COPY);
    run(RUN_TICKS * DIV - cycle);
    checks++; if (locate_count != 8'd6) fail("six faults located");
    checks++; if (!system_crack) fail("system crack flag");
    checks++; if (repaired != 4'hF) fail("all stages repaired");
    need(n_tick, "tick");
    for (int m = 0; m < NUM_MODULES; m++) begin
      need(n_stage_step[m], $sformatf("stage %0d counts", m));
      need(n_detect[m],     $sformatf("stage %0d DMR detect", m));
      need(n_isolate[m],    $sformatf("stage %0d isolate", m));
      need(n_repair[m],     $sformatf("stage %0d TMR repair", m));
    end
    need(n_masked,   "TMR masked fault");
    need(n_crack,    "crack");
    need(n_locate,   "fault located");
    need(n_wrap_min, "minutes wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mother_cell -- self-checking test of one self-repairing stage.
// A modulo-10 stage is ticked at random. A behavioural count model gives the
// expected output. The test injects a permanent fault into the working cell
// and checks: the compare bit rises at once, the working cell is blocked one
// clock later, the daughters vote two clocks later (the repair latency), and
// the count stays correct. It then faults one daughter and checks that the
// vote masks it and that the crack flag rises. The carry is checked on every
// tick, and the fault location flags at each step.
module tb_mother_cell;
  import self_repair_pkg::*;
  localparam int MOD = 10, W = 6;

  logic                 clk = 0, rst_n = 0, en = 0;
  logic [NUM_CELLS-1:0] fault = '0;
  logic [W-1:0]         count;
  logic                 carry, error, repaired, crack;
  repair_state_e        state;
  logic [NUM_CELLS-1:0] fault_cell;
  int                   checks = 0, failures = 0, model = 0;

  mother_cell #(.MODULUS(MOD), .WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t count=%0d model=%0d state=%s)", what, $time,
               count, model, state.name());
    end
  endtask

  // One clock: random tick at the negedge, checks before and after the edge.
  task automatic step(input bit allow_en, input bit check_count);
    @(negedge clk);
    en = allow_en && ($urandom_range(0, 2) == 0);
    #1;
    if (check_count) begin
      expect_true(count == W'(model), "count");
      expect_true(carry == (en && model == MOD - 1), "carry");
    end
    @(posedge clk);
    if (en) model = (model + 1) % MOD;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      step(1, 1);
      expect_true(error == 0 && state == RS_DMR && !repaired, "normal state");
    end
    // Fault in the working cell.
    @(negedge clk);
    en = 0;
    fault[CELL_ORIG] = 1'b1;
    #1;
    expect_true(error == 1, "DMR compare bit set by fault");
    expect_true(fault_cell == 4'b0001, "working cell located");
    expect_true(count != W'(model), "fault visible before isolation");
    @(posedge clk); #1;
    expect_true(state == RS_ISOLATE, "isolated one clock after detection");
    expect_true(count == W'(model), "copy drives output while isolated");
    step(1, 1);
    #1;
    expect_true(state == RS_TMR && repaired, "repaired two clocks after detection");
    for (int i = 0; i < 100; i++) begin
      step(1, 1);
      expect_true(error == 0 && !crack && fault_cell == 0, "TMR agrees after repair");
    end
    // Fault in a daughter cell: masked, but no spare left.
    @(negedge clk);
    en = 0;
    fault[CELL_DTR1] = 1'b1;
    #1;
    expect_true(error == 1, "TMR disagreement seen");
    expect_true(fault_cell == 4'b0100, "daughter 1 located");
    expect_true(count == W'(model), "daughter fault masked by vote");
    @(posedge clk); #1;
    expect_true(crack && state == RS_CRACK, "crack raised");
    for (int i = 0; i < 100; i++) begin
      step(1, 1);
      expect_true(crack, "crack held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

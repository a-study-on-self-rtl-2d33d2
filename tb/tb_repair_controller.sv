// tb_repair_controller -- self-checking test of repair_controller.
// Runs many short episodes: random compare bits are applied every clock and
// the state and all decoded outputs are compared with a model of the repair
// flow (DMR -> isolate for one clock -> TMR -> crack on a TMR disagreement).
// Also checks that a detected fault is repaired (TMR) exactly two clocks
// after the compare bit was sampled.
module tb_repair_controller;
  import self_repair_pkg::*;

  logic          clk = 0, rst_n = 0, dmr_error = 0, tmr_disagree = 0;
  repair_state_e state;
  logic          orig_oe, dtr_active, dtr_load, dtr_oe, crack;
  int            checks = 0, failures = 0;
  repair_state_e model;
  int            seen_crack = 0, seen_repair = 0;

  repair_controller dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs();
    checks++;
    if (state !== model ||
        orig_oe    !== (model == RS_DMR) ||
        dtr_active !== (model != RS_DMR) ||
        dtr_load   !== (model == RS_ISOLATE) ||
        dtr_oe     !== (model == RS_TMR || model == RS_CRACK) ||
        crack      !== (model == RS_CRACK)) begin
      failures++;
      $display("FAIL state=%s model=%s oe=%b act=%b ld=%b doe=%b crk=%b",
               state.name(), model.name(), orig_oe, dtr_active, dtr_load,
               dtr_oe, crack);
    end
  endtask

  initial begin
    for (int ep = 0; ep < 200; ep++) begin
      rst_n = 0; dmr_error = 0; tmr_disagree = 0;
      repeat (2) @(posedge clk);
      #1 model = RS_DMR;
      check_outputs();
      rst_n = 1;
      // Latency check: detection in DMR -> TMR two clocks later.
      if (ep % 4 == 0) begin
        @(negedge clk) dmr_error = 1;
        @(negedge clk) dmr_error = 0;
        checks++;
        if (state !== RS_ISOLATE) begin failures++; $display("FAIL isolate latency"); end
        @(negedge clk);
        checks++;
        if (state !== RS_TMR) begin failures++; $display("FAIL repair latency"); end
        else seen_repair++;
        model = RS_TMR;
      end
      for (int i = 0; i < 60; i++) begin
        @(negedge clk);
        dmr_error    = ($urandom_range(0, 9) == 0);
        tmr_disagree = ($urandom_range(0, 19) == 0);
        @(posedge clk);
        unique case (model)
          RS_DMR:     if (dmr_error)    model = RS_ISOLATE;
          RS_ISOLATE:                   model = RS_TMR;
          RS_TMR:     if (tmr_disagree) model = RS_CRACK;
          default:                      model = RS_CRACK;
        endcase
        #1 check_outputs();
        if (model == RS_CRACK) seen_crack++;
      end
    end
    checks++;
    if (seen_crack == 0 || seen_repair == 0) begin
      failures++;
      $display("FAIL coverage crack=%0d repair=%0d", seen_crack, seen_repair);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

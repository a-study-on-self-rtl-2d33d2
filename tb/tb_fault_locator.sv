// tb_fault_locator -- self-checking test of fault_locator.
// Random fault flags are applied every clock; a model finds the flags that
// rose, picks the lowest stage then lowest cell, and predicts the
// coordinate, the sticky `located` bit and the event count.
module tb_fault_locator;
  import self_repair_pkg::*;

  logic                                  clk = 0, rst_n = 0;
  logic [NUM_MODULES-1:0][NUM_CELLS-1:0] fault_cell = '0, prev = '0;
  coord_t                                coordinate, exp_coord = '0;
  logic                                  located, exp_located = 0;
  logic [7:0]                            locate_count;
  int                                    exp_count = 0;
  int                                    checks = 0, failures = 0;

  fault_locator dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      logic [NUM_MODULES-1:0][NUM_CELLS-1:0] rise;
      bit hit;
      @(negedge clk);
      // Mostly quiet, sometimes one or several flags.
      if ($urandom_range(0, 3) == 0) fault_cell = 16'($urandom);
      else if ($urandom_range(0, 1) == 0) fault_cell = '0;
      rise = fault_cell & ~prev;
      hit  = 0;
      for (int m = 0; m < NUM_MODULES && !hit; m++)
        for (int c = 0; c < NUM_CELLS && !hit; c++)
          if (rise[m][c]) begin
            hit = 1;
            exp_coord = '{stage: 2'(m), cell_id: 2'(c)};
          end
      if (hit) begin
        exp_located = 1;
        if (exp_count < 255) exp_count++;
      end
      prev = fault_cell;
      @(posedge clk); #1;
      checks++;
      if (coordinate !== exp_coord || located !== exp_located ||
          locate_count !== 8'(exp_count)) begin
        failures++;
        $display("FAIL coord=%p exp=%p located=%b count=%0d exp=%0d",
                 coordinate, exp_coord, located, locate_count, exp_count);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

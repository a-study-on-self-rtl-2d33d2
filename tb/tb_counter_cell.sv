// tb_counter_cell -- self-checking test of counter_cell.
// Drives random enable, load and fault patterns into a modulo-10 cell and
// compares its output every clock against a behavioural model of the count
// (wrap at 9, load-then-count, fault inverts the output bits).
module tb_counter_cell;
  localparam int MOD = 10;
  localparam int W   = 6;

  logic         clk = 0, rst_n = 0, en = 0, load = 0, fault = 0;
  logic [W-1:0] load_val = '0, q;
  int           checks = 0, failures = 0;
  int           model = 0;

  counter_cell #(.MODULUS(MOD), .WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    logic [W-1:0] exp;
    exp = fault ? (W'(model) ^ '1) : W'(model);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0d expected %0d", what, q, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 check("reset");
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      en       = ($urandom_range(0, 3) != 0);
      load     = ($urandom_range(0, 15) == 0);
      load_val = W'($urandom_range(0, MOD - 1));
      fault    = ($urandom_range(0, 7) == 0);
      #1 check("comb");
      @(posedge clk);
      begin
        int base;
        base  = load ? int'(load_val) : model;
        model = en ? ((base == MOD - 1) ? 0 : base + 1) : base;
      end
      #1 check("after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

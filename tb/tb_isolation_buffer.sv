// tb_isolation_buffer -- self-checking test of isolation_buffer.
// With oe high the word passes; with oe low the output holds the block value.
module tb_isolation_buffer;
  localparam int W = 6;
  logic         oe;
  logic [W-1:0] d, y;
  int           checks = 0, failures = 0;

  isolation_buffer #(.WIDTH(W)) dut (.*);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      oe = i[0];
      d  = W'($urandom) | W'(1);
      #1;
      checks++;
      if (y !== (oe ? d : '0)) begin
        failures++;
        $display("FAIL oe=%b d=%h y=%h", oe, d, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

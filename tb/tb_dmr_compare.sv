// tb_dmr_compare -- self-checking test of dmr_compare.
// Random and single-bit-difference vector pairs; the compare bit must be 1
// exactly when the two words differ.
module tb_dmr_compare;
  localparam int W = 6;
  logic [W-1:0] a, b;
  logic         error;
  int           checks = 0, failures = 0;

  dmr_compare #(.WIDTH(W)) dut (.*);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = W'($urandom);
      case (i % 3)
        0: b = a;
        1: b = a ^ (W'(1) << (i % W));
        default: b = W'($urandom);
      endcase
      #1;
      checks++;
      if (error !== (a != b)) begin
        failures++;
        $display("FAIL a=%h b=%h error=%b", a, b, error);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

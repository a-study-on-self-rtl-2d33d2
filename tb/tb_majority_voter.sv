// tb_majority_voter -- self-checking test of majority_voter.
// Checks the vote bit by bit (a bit is 1 when at least two inputs have it)
// and the disagree flag, on random words and on cases with one input corrupted.
module tb_majority_voter;
  localparam int W = 6;
  logic [W-1:0] a, b, c, y;
  logic         disagree;
  int           checks = 0, failures = 0;

  majority_voter #(.WIDTH(W)) dut (.*);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [W-1:0] good, exp_y;
      good = W'($urandom);
      a = good; b = good; c = good;
      case (i % 5)
        1: a = W'($urandom);
        2: b = W'($urandom);
        3: c = W'($urandom);
        4: begin a = W'($urandom); b = W'($urandom); c = W'($urandom); end
        default: ;
      endcase
      #1;
      for (int k = 0; k < W; k++)
        exp_y[k] = (int'(a[k]) + int'(b[k]) + int'(c[k])) >= 2;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL vote a=%h b=%h c=%h y=%h exp=%h", a, b, c, y, exp_y);
      end
      if (i % 5 inside {[0:3]}) begin
        checks++;
        if (y !== good) begin
          failures++;
          $display("FAIL single fault not masked: y=%h good=%h", y, good);
        end
      end
      checks++;
      if (disagree !== !(a == b && b == c)) begin
        failures++;
        $display("FAIL disagree a=%h b=%h c=%h flag=%b", a, b, c, disagree);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

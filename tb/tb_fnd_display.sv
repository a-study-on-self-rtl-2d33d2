// tb_fnd_display -- self-checking test of fnd_display.
// Walks every legal timer value and compares each digit's segment pattern
// with a table of the ten decimal digits ({g,f,e,d,c,b,a}, active high).
module tb_fnd_display;
  import self_repair_pkg::*;

  logic [CNT_W-1:0] hundredths, tenths, seconds, minutes;
  logic [5:0][6:0]  seg;
  int               checks = 0, failures = 0;

  // Segments lit for each digit, listed as strings of segment letters.
  function automatic logic [6:0] pattern(input int d);
    string s;
    logic [6:0] p;
    case (d)
      0: s = "abcdef";  1: s = "bc";     2: s = "abdeg";  3: s = "abcdg";
      4: s = "bcfg";    5: s = "acdfg";  6: s = "acdefg"; 7: s = "abc";
      8: s = "abcdefg"; default: s = "abcdfg";
    endcase
    p = '0;
    for (int i = 0; i < s.len(); i++) p[3'(s[i] - "a")] = 1'b1;
    return p;
  endfunction

  fnd_display dut (.*);

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 600; v++) begin
      hundredths = CNT_W'(v % 10);
      tenths     = CNT_W'((v / 10) % 10);
      seconds    = CNT_W'(v % 60);
      minutes    = CNT_W'((v * 7) % 60);
      #1;
      checks++;
      if (seg[0] !== pattern(v % 10) ||
          seg[1] !== pattern((v / 10) % 10) ||
          seg[2] !== pattern((v % 60) % 10) ||
          seg[3] !== pattern((v % 60) / 10) ||
          seg[4] !== pattern(((v * 7) % 60) % 10) ||
          seg[5] !== pattern(((v * 7) % 60) / 10)) begin
        failures++;
        $display("FAIL v=%0d seg=%h", v, seg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

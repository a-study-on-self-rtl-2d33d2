// majority_voter -- majority select of a TMR (triple modular redundancy) group.
//
// Each output bit is the value that at least two of the three inputs carry, so
// one faulty input is outvoted. `disagree` is the TMR error-detect bit: it is 1
// whenever the three inputs are not all equal, i.e. some copy is faulty even
// though the vote still masks it. Purely combinational.
module majority_voter #(
  parameter int unsigned WIDTH = 6
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] y,         // bitwise majority of a, b, c
  output logic             disagree   // 1 = inputs are not all equal
);

  assign y        = (a & b) | (a & c) | (b & c);
  assign disagree = |((a ^ b) | (a ^ c));

endmodule

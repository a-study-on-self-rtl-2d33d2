// dmr_compare -- error detector of a DMR (double modular redundancy) pair.
//
// It compares the outputs of the working cell and of its duplicate bit by bit
// and reduces the result to one compare bit: 0 means both agree (normal
// state), 1 means they differ (error state). Purely combinational.
module dmr_compare #(
  parameter int unsigned WIDTH = 6
) (
  input  logic [WIDTH-1:0] a,      // working cell output
  input  logic [WIDTH-1:0] b,      // duplicate cell output
  output logic             error   // compare bit: 1 = outputs differ
);

  assign error = |(a ^ b);

endmodule

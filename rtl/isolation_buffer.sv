// isolation_buffer -- output blocking of one cell (fault isolation).
//
// The repair flow isolates a faulty cell with a three-state buffer on its
// output. Inside a single clock domain on an FPGA an internal tri-state bus is
// not available, so this buffer blocks by forcing the output to BLOCK_VALUE
// (all zeros by default) while `oe` is low and passes the cell output while
// `oe` is high. The selection logic downstream only listens to cells whose
// `oe` is high, so the blocked value never reaches the timer output.
// Purely combinational.
module isolation_buffer #(
  parameter int unsigned      WIDTH       = 6,
  parameter logic [WIDTH-1:0] BLOCK_VALUE = '0
) (
  input  logic             oe,   // 1 = cell connected, 0 = cell isolated
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] y
);

  assign y = oe ? d : BLOCK_VALUE;

endmodule

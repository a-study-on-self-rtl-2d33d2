// fault_locator -- fault location report of the whole timer.
//
// Each stage flags the cells it currently judges faulty. This block watches
// all flags and, when a flag rises that was low in the previous clock, records
// the location of that newly found fault as a {stage, cell} coordinate. If
// several rise in the same clock the lowest stage, then the lowest cell, is
// recorded. `located` goes high with the first location and stays high;
// `locate_count` counts location events (saturating). The coordinate
// register gives the "fault locate / identification" step of the repair
// flow a visible result; its format and the event counter are this
// implementation's choices.
//
// Timing: inputs sampled on the clock edge; outputs registered, one clock
// after the flag rises. Synchronous, active-low reset to zero.
module fault_locator
  import self_repair_pkg::*;
#(
  parameter int unsigned COUNT_W = 8
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic [NUM_MODULES-1:0][NUM_CELLS-1:0] fault_cell,
  output coord_t                                coordinate,
  output logic                                  located,
  output logic [COUNT_W-1:0]                    locate_count
);

  logic [NUM_MODULES-1:0][NUM_CELLS-1:0] flags_q, rising;
  logic                                  found;
  coord_t                                first;

  assign rising = fault_cell & ~flags_q;

  always_comb begin
    found = 1'b0;
    first = '0;
    for (int m = NUM_MODULES - 1; m >= 0; m--)
      for (int c = NUM_CELLS - 1; c >= 0; c--)
        if (rising[m][c]) begin
          found       = 1'b1;
          first.stage = 2'(m);
          first.cell_id = 2'(c);
        end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      flags_q      <= '0;
      coordinate   <= '0;
      located      <= 1'b0;
      locate_count <= '0;
    end else begin
      flags_q <= fault_cell;
      if (found) begin
        coordinate <= first;
        located    <= 1'b1;
        if (locate_count != '1) locate_count <= locate_count + 1'b1;
      end
    end
  end

endmodule

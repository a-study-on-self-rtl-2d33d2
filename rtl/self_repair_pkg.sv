// self_repair_pkg -- types and constants shared by the self-repairing timer.
//
// The timer is made of four "mother cells", one per timer stage. Each mother
// cell holds four copies of the same counter: the working cell, its duplicate
// in the centre region (the two form a DMR pair), and two spare "daughter"
// cells that are switched in after the working cell has been isolated. The
// cell indices below name those four copies; fault-injection vectors and
// status vectors are indexed with them.
//
// The repair state follows the repair flow: fault detection by DMR, fault
// isolation, differentiation into two daughter cells, then TMR with majority
// select. A disagreement found while already in TMR leaves no spare to repair
// with, and the mother cell reports a system crack. The two-bit encoding of
// the state is this design's own choice.
package self_repair_pkg;

  // Number of mother cells (timer stages) in the timer.
  localparam int unsigned NUM_MODULES = 4;
  // Number of cell copies inside one mother cell.
  localparam int unsigned NUM_CELLS   = 4;
  // Width of every stage's count; 6 bits hold 0..59.
  localparam int unsigned CNT_W       = 6;

  // Position of each copy inside a mother cell.
  localparam int unsigned CELL_ORIG = 0;  // working cell (A, B, C, D)
  localparam int unsigned CELL_COPY = 1;  // duplicate in the centre region (A', ...)
  localparam int unsigned CELL_DTR1 = 2;  // first daughter cell (A1, ...)
  localparam int unsigned CELL_DTR2 = 3;  // second daughter cell (A2, ...)

  // Stage moduli: hundredths, tenths, seconds, minutes.
  localparam int unsigned MOD_HUNDREDTHS = 10;
  localparam int unsigned MOD_TENTHS     = 10;
  localparam int unsigned MOD_SECONDS    = 60;
  localparam int unsigned MOD_MINUTES    = 60;

  typedef enum logic [1:0] {
    RS_DMR     = 2'd0,  // normal state: working cell drives, DMR compare
    RS_ISOLATE = 2'd1,  // working cell blocked, daughters take over the state
    RS_TMR     = 2'd2,  // repaired: majority select over copy and daughters
    RS_CRACK   = 2'd3   // fault found with no spare left
  } repair_state_e;

  // Location of a fault: the stage and the cell inside it.
  typedef struct packed {
    logic [1:0] stage;  // 0 = hundredths .. 3 = minutes
    logic [1:0] cell_id; // CELL_ORIG, CELL_COPY, CELL_DTR1 or CELL_DTR2
  } coord_t;

endpackage

// mother_cell -- one self-repairing timer stage (repair module A, B, C or D).
//
// The stage's function is a modulo-MODULUS counter. It is built four times:
// the working cell (A), its duplicate in the centre region (A') and two
// pre-placed daughter cells (A1, A2). In the normal state the working cell
// drives the output through its isolation buffer and dmr_compare checks it
// against the duplicate. When they differ the repair_controller blocks the
// working cell, enables the daughters' inputs and lets them take over the
// duplicate's count, and from then on the output is the majority of A', A1
// and A2. The daughters' outputs pass through isolation buffers of their own
// that open only in TMR. Because the daughters already sit in the fabric, no
// reconfiguration delay is paid: the repair takes two clocks after the fault
// is detected (one to register the detection, one to hand the count over).
//
// Design choices beyond the original scheme: the daughters take over the
// duplicate's output value (the scheme leaves open how the count is handed
// over); a fault is always attributed to the working cell, as the scheme
// does, so a fault that strikes the duplicate first is not repaired
// correctly; the stage's carry is taken from the selected output.
//
// Interface: `en` is the stage tick, `carry` is high on a tick that wraps the
// stage (the next stage's tick). `fault[i]` corrupts cell i (indices in
// self_repair_pkg). `error` is the current compare bit (DMR, then TMR).
// Timing: `count` and `carry` are combinational from the cell registers.
module mother_cell
  import self_repair_pkg::*;
#(
  parameter int unsigned MODULUS = 10,
  parameter int unsigned WIDTH   = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [NUM_CELLS-1:0] fault,
  output logic [WIDTH-1:0]     count,     // selected (repaired) output
  output logic                 carry,
  output logic                 error,     // compare bit of the active scheme
  output repair_state_e        state,
  output logic                 repaired,  // daughters switched in
  output logic                 crack,
  output logic [NUM_CELLS-1:0] fault_cell  // cells located as faulty now
);

  localparam logic [WIDTH-1:0] LAST = WIDTH'(MODULUS - 1);

  logic [WIDTH-1:0] cell_q [NUM_CELLS];
  logic [WIDTH-1:0] orig_y, dtr1_y, dtr2_y, vote_y;
  logic             orig_oe, dtr_active, dtr_load, dtr_oe;
  logic             dmr_error, tmr_disagree;

  // Working cell and its duplicate always run.
  counter_cell #(.MODULUS(MODULUS), .WIDTH(WIDTH)) u_orig (
    .clk, .rst_n, .en, .load(1'b0), .load_val('0),
    .fault(fault[CELL_ORIG]), .q(cell_q[CELL_ORIG])
  );
  counter_cell #(.MODULUS(MODULUS), .WIDTH(WIDTH)) u_copy (
    .clk, .rst_n, .en, .load(1'b0), .load_val('0),
    .fault(fault[CELL_COPY]), .q(cell_q[CELL_COPY])
  );

  // Pre-placed daughter cells: inputs enabled only after differentiation.
  counter_cell #(.MODULUS(MODULUS), .WIDTH(WIDTH)) u_dtr1 (
    .clk, .rst_n, .en(en && dtr_active), .load(dtr_load),
    .load_val(cell_q[CELL_COPY]),
    .fault(fault[CELL_DTR1]), .q(cell_q[CELL_DTR1])
  );
  counter_cell #(.MODULUS(MODULUS), .WIDTH(WIDTH)) u_dtr2 (
    .clk, .rst_n, .en(en && dtr_active), .load(dtr_load),
    .load_val(cell_q[CELL_COPY]),
    .fault(fault[CELL_DTR2]), .q(cell_q[CELL_DTR2])
  );

  // Fault isolation on the working cell and the daughters.
  isolation_buffer #(.WIDTH(WIDTH)) u_iso_orig (
    .oe(orig_oe), .d(cell_q[CELL_ORIG]), .y(orig_y)
  );
  isolation_buffer #(.WIDTH(WIDTH)) u_iso_dtr1 (
    .oe(dtr_oe), .d(cell_q[CELL_DTR1]), .y(dtr1_y)
  );
  isolation_buffer #(.WIDTH(WIDTH)) u_iso_dtr2 (
    .oe(dtr_oe), .d(cell_q[CELL_DTR2]), .y(dtr2_y)
  );

  // Error detection: DMR before repair, TMR after.
  dmr_compare #(.WIDTH(WIDTH)) u_dmr (
    .a(cell_q[CELL_ORIG]), .b(cell_q[CELL_COPY]), .error(dmr_error)
  );
  majority_voter #(.WIDTH(WIDTH)) u_vote (
    .a(cell_q[CELL_COPY]), .b(dtr1_y), .c(dtr2_y),
    .y(vote_y), .disagree(tmr_disagree)
  );

  repair_controller u_ctrl (
    .clk, .rst_n,
    .dmr_error(dmr_error && orig_oe),
    .tmr_disagree(tmr_disagree && dtr_oe),
    .state, .orig_oe, .dtr_active, .dtr_load, .dtr_oe, .crack
  );

  // Output selection (the pre-implemented mux).
  always_comb begin
    unique case (state)
      RS_DMR:     count = orig_y;
      RS_ISOLATE: count = cell_q[CELL_COPY];
      default:    count = vote_y;
    endcase
  end

  assign carry    = en && (count == LAST);
  assign error    = orig_oe ? dmr_error : (dtr_oe && tmr_disagree);
  assign repaired = dtr_oe;

  // Fault location.
  always_comb begin
    fault_cell            = '0;
    fault_cell[CELL_ORIG] = orig_oe && dmr_error;
    if (dtr_oe) begin
      fault_cell[CELL_COPY] = (cell_q[CELL_COPY] != vote_y);
      fault_cell[CELL_DTR1] = (cell_q[CELL_DTR1] != vote_y);
      fault_cell[CELL_DTR2] = (cell_q[CELL_DTR2] != vote_y);
    end
  end

endmodule

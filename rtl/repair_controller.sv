// repair_controller -- repair flow of one mother cell.
//
// A four-state machine that walks the repair flow chart:
//   RS_DMR     normal state. The working cell drives the output and is
//              compared with its duplicate. A set compare bit (`dmr_error`)
//              means a fault was detected and located in this mother cell.
//   RS_ISOLATE one clock. The working cell's output is blocked (fault
//              isolation); the two daughter cells get their inputs enabled and
//              take over the duplicate's count (differentiation). The
//              duplicate drives the output meanwhile.
//   RS_TMR     repaired. The output is the majority of the duplicate and the
//              two daughters; error detection has changed from DMR to TMR.
//   RS_CRACK   a TMR disagreement was seen. No spare is left to replace the
//              faulty copy ("replace possible? no"), so `crack` is raised. The
//              vote keeps masking a single faulty copy. Left only by reset.
// The flow chart and the DMR-to-TMR change are the design's; the one-clock
// isolate state, the latching of the crack state and the synchronous
// active-low reset are this implementation's choices.
//
// Timing: detection is registered, so the repair takes effect on the second
// clock edge after the compare bit rises and the daughters vote from the
// third. All outputs are decoded from the state register.
module repair_controller
  import self_repair_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          dmr_error,     // compare bit of the DMR pair
  input  logic          tmr_disagree,  // error-detect bit of the TMR group
  output repair_state_e state,
  output logic          orig_oe,       // working cell connected
  output logic          dtr_active,    // daughter inputs enabled
  output logic          dtr_load,      // daughters take over the count
  output logic          dtr_oe,        // daughters' outputs connected (TMR)
  output logic          crack          // fault with no spare left
);

  repair_state_e state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      RS_DMR:     if (dmr_error)    state_d = RS_ISOLATE;
      RS_ISOLATE:                   state_d = RS_TMR;
      RS_TMR:     if (tmr_disagree) state_d = RS_CRACK;
      RS_CRACK:                     state_d = RS_CRACK;
      default:                      state_d = RS_DMR;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= RS_DMR;
    else        state_q <= state_d;
  end

  assign state      = state_q;
  assign orig_oe    = (state_q == RS_DMR);
  assign dtr_active = (state_q != RS_DMR);
  assign dtr_load   = (state_q == RS_ISOLATE);
  assign dtr_oe     = (state_q == RS_TMR) || (state_q == RS_CRACK);
  assign crack      = (state_q == RS_CRACK);

endmodule

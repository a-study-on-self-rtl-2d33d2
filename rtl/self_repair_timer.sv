// self_repair_timer -- self-repairing stopwatch timer built from four mother
// cells.
//
// The main clock (10 MHz by default) is divided to a 100 Hz tick. Four timer
// stages count hundredths (0..9), tenths (0..9), seconds (0..59) and minutes
// (0..59); each stage's carry is the next stage's tick. Every stage is a
// mother_cell: a working cell checked by a duplicate (DMR), plus two
// pre-placed daughter cells that replace the working cell within two clocks
// of a detected fault, after which the stage is guarded by majority select
// (TMR). A stage that then sees a second fault raises its crack flag. The
// counts drive six FND digits.
//
// The division into four stages and their rates, the 10 MHz clock, DMR then
// TMR and the fault push buttons follow the design. The stage moduli, the
// 6-bit count width, the display format and the status outputs are this
// implementation's choices.
//
// Interface: `fault_btn[m][c]` injects a fault into cell c (CELL_ORIG,
// CELL_COPY, CELL_DTR1, CELL_DTR2) of stage m (0 = hundredths .. 3 = minutes);
// it is assumed to be already synchronised to `clk`. `error_code[m]` is stage
// m's current compare bit, `repaired[m]` shows its daughters are switched in,
// `crack[m]` shows it has run out of spares. `tick` is the 100 Hz base tick.
// `coordinate` holds the {stage, cell} of the most recently located fault,
// `located` is set once any fault has been located and
// `locate_count` counts location events.
// Synchronous, active-low reset. The minutes stage's carry is left unused:
// there is no hours stage, and the timer wraps from 59:59.99 to 00:00.00.
module self_repair_timer
  import self_repair_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 10_000_000,
  parameter int unsigned TICK_HZ = 100
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic [NUM_MODULES-1:0][NUM_CELLS-1:0]   fault_btn,
  output logic                                    tick,
  output logic [CNT_W-1:0]                        hundredths,
  output logic [CNT_W-1:0]                        tenths,
  output logic [CNT_W-1:0]                        seconds,
  output logic [CNT_W-1:0]                        minutes,
  output logic [5:0][6:0]                         fnd_seg,
  output logic [NUM_MODULES-1:0]                  error_code,
  output logic [NUM_MODULES-1:0]                  repaired,
  output logic [NUM_MODULES-1:0]                  crack,
  output repair_state_e                           repair_state [NUM_MODULES],
  output logic                                    system_crack,
  output coord_t                                  coordinate,
  output logic                                    located,
  output logic [7:0]                              locate_count
);

  localparam int unsigned STAGE_MOD [NUM_MODULES] =
    '{MOD_HUNDREDTHS, MOD_TENTHS, MOD_SECONDS, MOD_MINUTES};

  logic [NUM_MODULES:0]    stage_en;
  logic [CNT_W-1:0]        stage_count [NUM_MODULES];
  logic [NUM_MODULES-1:0][NUM_CELLS-1:0] fault_cell;

  timer_prescaler #(.CLK_HZ(CLK_HZ), .TICK_HZ(TICK_HZ)) u_prescaler (
    .clk, .rst_n, .tick
  );

  assign stage_en[0] = tick;

  for (genvar m = 0; m < NUM_MODULES; m++) begin : g_stage
    mother_cell #(.MODULUS(STAGE_MOD[m]), .WIDTH(CNT_W)) u_mother (
      .clk, .rst_n,
      .en       (stage_en[m]),
      .fault    (fault_btn[m]),
      .count    (stage_count[m]),
      .carry    (stage_en[m+1]),
      .error    (error_code[m]),
      .state    (repair_state[m]),
      .repaired (repaired[m]),
      .crack    (crack[m]),
      .fault_cell (fault_cell[m])
    );
  end

  assign hundredths   = stage_count[0];
  assign tenths       = stage_count[1];
  assign seconds      = stage_count[2];
  assign minutes      = stage_count[3];
  assign system_crack = |crack;

  fault_locator u_locator (
    .clk, .rst_n, .fault_cell, .coordinate, .located, .locate_count
  );

  fnd_display u_fnd (
    .hundredths, .tenths, .seconds, .minutes, .seg(fnd_seg)
  );

endmodule

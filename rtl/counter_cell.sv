// counter_cell -- the function logic held by one cell of a mother cell: a
// modulo-MODULUS up-counter that advances by one on every clock with `en` high
// and wraps from MODULUS-1 to 0.
//
// All four copies inside a mother cell are instances of this module. A copy
// that is switched in later (a daughter cell) takes over the count of the
// surviving copy through `load`/`load_val`; the loaded value is counted on in
// the same clock if `en` is high, so the hand-over costs no count.
//
// `fault` models the push-button fault of the prototype board. While it is
// high the cell's output is corrupted (every bit in FAULT_MASK inverted); its
// internal count is left intact. Both the output-only fault model and the
// loadable daughter state are this design's choices; the counting stage itself
// follows the timer stages of the design.
//
// Timing: one register stage; `q` is the registered count (combinationally
// corrupted by `fault`). Synchronous, active-low reset to 0.
module counter_cell #(
  parameter int unsigned MODULUS    = 10,
  parameter int unsigned WIDTH      = 6,
  parameter logic [WIDTH-1:0] FAULT_MASK = '1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,        // count enable (stage tick)
  input  logic             load,      // take over load_val (differentiation)
  input  logic [WIDTH-1:0] load_val,
  input  logic             fault,     // injected fault: corrupt the output
  output logic [WIDTH-1:0] q
);

  localparam logic [WIDTH-1:0] LAST = WIDTH'(MODULUS - 1);

  logic [WIDTH-1:0] count;
  logic [WIDTH-1:0] base;

  assign base = load ? load_val : count;

  always_ff @(posedge clk) begin
    if (!rst_n)   count <= '0;
    else if (en)  count <= (base == LAST) ? '0 : base + WIDTH'(1);
    else          count <= base;
  end

  assign q = fault ? (count ^ FAULT_MASK) : count;

endmodule

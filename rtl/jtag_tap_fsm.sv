// jtag_tap_fsm: the 16-state JTAG TAP controller state machine.
//
// Two general states (Test-Logic-Reset, Run-Test/Idle) and a column of seven
// states each for the data register and the instruction register scans.
// TMS is sampled on every rising edge of TCK and, together with the current
// state, selects the next state as in the IEEE 1149.1 TAP diagram. Holding
// TMS high for five clocks reaches Test-Logic-Reset from any state.
//
// The states and transitions follow the TAP diagram of the design
// description; the state encoding (secure_debug_pkg::tap_state_e) and the
// optional asynchronous reset pin trst_n are this design's own choices.
//
// Interface: tck, trst_n (async, active low, forces Test-Logic-Reset), tms,
// state (registered, changes on the rising edge of TCK).
module jtag_tap_fsm
  import secure_debug_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  output tap_state_e state
);

  tap_state_e next;

  always_comb begin
    unique case (state)
      TEST_LOGIC_RESET: next = tms ? TEST_LOGIC_RESET : RUN_TEST_IDLE;
      RUN_TEST_IDLE:    next = tms ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      SELECT_DR_SCAN:   next = tms ? SELECT_IR_SCAN   : CAPTURE_DR;
      CAPTURE_DR:       next = tms ? EXIT1_DR         : SHIFT_DR;
      SHIFT_DR:         next = tms ? EXIT1_DR         : SHIFT_DR;
      EXIT1_DR:         next = tms ? UPDATE_DR        : PAUSE_DR;
      PAUSE_DR:         next = tms ? EXIT2_DR         : PAUSE_DR;
      EXIT2_DR:         next = tms ? UPDATE_DR        : SHIFT_DR;
      UPDATE_DR:        next = tms ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      SELECT_IR_SCAN:   next = tms ? TEST_LOGIC_RESET : CAPTURE_IR;
      CAPTURE_IR:       next = tms ? EXIT1_IR         : SHIFT_IR;
      SHIFT_IR:         next = tms ? EXIT1_IR         : SHIFT_IR;
      EXIT1_IR:         next = tms ? UPDATE_IR        : PAUSE_IR;
      PAUSE_IR:         next = tms ? EXIT2_IR         : PAUSE_IR;
      EXIT2_IR:         next = tms ? UPDATE_IR        : SHIFT_IR;
      UPDATE_IR:        next = tms ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      default:          next = TEST_LOGIC_RESET;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) state <= TEST_LOGIC_RESET;
    else         state <= next;
  end

endmodule

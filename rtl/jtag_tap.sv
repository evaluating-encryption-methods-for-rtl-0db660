// jtag_tap: JTAG test access port controller for the secured debug port.
//
// Combines the TAP state machine, the instruction register, the 1-bit bypass
// register and the instruction decode. The decode hands the capture / shift /
// update controls of a data-register scan only to the data register the
// current instruction selects (SEED, RESULT, or BYPASS for every other code),
// and the output multiplexer puts the serial output of the instruction
// register (during Shift-IR) or of the selected data register (during
// Shift-DR) onto TDO. TMS and TDI are taken on the rising edge of TCK, TDO is
// driven on the falling edge, so a following chip has half a TCK period of
// wiring delay to spare; tdo_oe is high only while shifting.
//
// The state machine, the IR/DR split with select multiplexers and the
// rising/falling TCK edge rules follow the design description; the
// instruction set and the bypass register are this design's own choices.
//
// Interface: JTAG pins tck, trst_n, tms, tdi, tdo, tdo_oe; per user data
// register a dr_ctrl_t control bundle out and its serial output in; the TAP
// state and the current instruction for observation.
module jtag_tap
  import secure_debug_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  input  logic       tdi,
  output logic       tdo,
  output logic       tdo_oe,
  output tap_state_e state,
  output ir_t        instr,
  output dr_ctrl_t   seed_ctrl,
  input  logic       seed_so,
  output dr_ctrl_t   result_ctrl,
  input  logic       result_so
);

  logic     ir_so, bypass_q;
  dr_ctrl_t scan;
  logic     sel_seed, sel_result;

  jtag_tap_fsm u_fsm (
    .tck   (tck),
    .trst_n(trst_n),
    .tms   (tms),
    .state (state)
  );

  jtag_ir u_ir (
    .tck   (tck),
    .trst_n(trst_n),
    .state (state),
    .tdi   (tdi),
    .so    (ir_so),
    .instr (instr)
  );

  assign scan.capture = (state == CAPTURE_DR);
  assign scan.shift   = (state == SHIFT_DR);
  assign scan.update  = (state == UPDATE_DR);

  assign sel_seed    = (instr == INSTR_SEED);
  assign sel_result  = (instr == INSTR_RESULT);
  assign seed_ctrl   = sel_seed   ? scan : '0;
  assign result_ctrl = sel_result ? scan : '0;

  // Bypass register: captures 0, one stage between TDI and TDO.
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                                          bypass_q <= 1'b0;
    else if (!sel_seed && !sel_result && scan.capture)    bypass_q <= 1'b0;
    else if (!sel_seed && !sel_result && scan.shift)      bypass_q <= tdi;
  end

  // TDO multiplexer, driven on the falling edge of TCK.
  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      tdo    <= 1'b0;
      tdo_oe <= 1'b0;
    end else begin
      tdo_oe <= (state == SHIFT_IR) || (state == SHIFT_DR);
      if (state == SHIFT_IR)  tdo <= ir_so;
      else if (sel_seed)      tdo <= seed_so;
      else if (sel_result)    tdo <= result_so;
      else                    tdo <= bypass_q;
    end
  end

endmodule

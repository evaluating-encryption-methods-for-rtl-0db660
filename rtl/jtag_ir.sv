// jtag_ir: JTAG instruction register.
//
// A shift stage and a parallel (update) stage of IR_WIDTH bits. With the TAP
// in Capture-IR the shift stage loads a fixed pattern ("01" in the two LSBs),
// in Shift-IR it shifts towards the LSB (TDI enters at the MSB, the LSB is
// the serial output), and on leaving Update-IR the shift stage is copied into
// the instruction that selects the data register. Test-Logic-Reset sets the
// instruction to BYPASS.
//
// The register sitting between TDI and TDO next to the data registers follows
// the design description; width, capture pattern, reset instruction and the
// update on the rising TCK edge that leaves Update-IR are this design's own
// choices.
//
// Interface: tck, trst_n, state (from jtag_tap_fsm), tdi, so (serial out,
// to the TDO multiplexer), instr (current instruction).
module jtag_ir
  import secure_debug_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  tap_state_e state,
  input  logic       tdi,
  output logic       so,
  output ir_t        instr
);

  ir_t shift_q;

  assign so = shift_q[0];

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      shift_q <= IR_CAPTURE_PATTERN;
      instr   <= INSTR_BYPASS;
    end else begin
      unique case (state)
        TEST_LOGIC_RESET: instr   <= INSTR_BYPASS;
        CAPTURE_IR:       shift_q <= IR_CAPTURE_PATTERN;
        SHIFT_IR:         shift_q <= {tdi, shift_q[IR_WIDTH-1:1]};
        UPDATE_IR:        instr   <= shift_q;
        default:          ;
      endcase
    end
  end

endmodule

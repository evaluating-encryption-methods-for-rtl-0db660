// jtag_dr: JTAG data register with parallel capture and parallel update.
//
// A WIDTH-bit shift stage between TDI and TDO and a WIDTH-bit update stage.
// ctrl.capture loads the shift stage from capture_data, ctrl.shift moves it
// one place towards the LSB with TDI entering at the MSB (the LSB is the
// serial output), and ctrl.update copies the shift stage into update_data and
// raises `updated` for one clock. All on the rising edge of TCK. The TAP only
// raises ctrl bits for the register its instruction selects.
//
// The shift register with capture and "register loads" follows the data
// register of the design description; LSB-first order and the `updated`
// strobe are this design's own choices.
//
// Interface: tck, trst_n, ctrl (capture/shift/update), tdi, so, capture_data,
// update_data, updated.
module jtag_dr
  import secure_debug_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  logic             tck,
  input  logic             trst_n,
  input  dr_ctrl_t         ctrl,
  input  logic             tdi,
  output logic             so,
  input  logic [WIDTH-1:0] capture_data,
  output logic [WIDTH-1:0] update_data,
  output logic             updated
);

  logic [WIDTH-1:0] shift_q;

  assign so = shift_q[0];

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      shift_q     <= '0;
      update_data <= '0;
      updated     <= 1'b0;
    end else begin
      updated <= 1'b0;
      if (ctrl.capture)     shift_q <= capture_data;
      else if (ctrl.shift)  shift_q <= {tdi, shift_q[WIDTH-1:1]};
      if (ctrl.update) begin
        update_data <= shift_q;
        updated     <= 1'b1;
      end
    end
  end

  // The TAP is in only one of the three states at a time.
  assert property (@(posedge tck) disable iff (!trst_n)
                   $onehot0({ctrl.capture, ctrl.shift, ctrl.update}));

endmodule

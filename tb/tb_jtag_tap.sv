// tb_jtag_tap: self-checking testbench for jtag_tap.
//
// Plays the debugger on the JTAG pins (TMS/TDI changed on the falling edge,
// TDO sampled on the rising edge). Two small jtag_dr registers stand in for
// the SEED (8 bit) and RESULT (12 bit) registers. Checks the IR capture
// pattern, scans through SEED and RESULT, that a register receives controls
// only while its instruction is selected, the 1-bit delay of BYPASS for its
// own code and for an unused code, tdo_oe only while shifting, TDO changing
// only on the falling edge of TCK, and reset by TMS.
module tb_jtag_tap;
  import secure_debug_pkg::*;
  logic tck = 1'b0, trst_n = 1'b0, tms = 1'b1, tdi = 1'b0;
  logic tdo, tdo_oe;
  tap_state_e state;
  ir_t instr;
  dr_ctrl_t seed_ctrl, result_ctrl;
  logic seed_so, result_so, seed_upd, result_upd;
  logic [7:0]  seed_val;
  logic [11:0] result_val;
  int checks = 0, failures = 0;
  int wrong_ctrl = 0, tdo_bad_edge = 0;

  jtag_tap dut (.tck, .trst_n, .tms, .tdi, .tdo, .tdo_oe, .state, .instr,
                .seed_ctrl, .seed_so, .result_ctrl, .result_so);

  jtag_dr #(.WIDTH(8)) u_seed (.tck, .trst_n, .ctrl(seed_ctrl), .tdi, .so(seed_so),
                               .capture_data(8'hC3), .update_data(seed_val),
                               .updated(seed_upd));
  jtag_dr #(.WIDTH(12)) u_result (.tck, .trst_n, .ctrl(result_ctrl), .tdi,
                                  .so(result_so), .capture_data(12'hA5E),
                                  .update_data(result_val), .updated(result_upd));

  always #5 tck = ~tck;

  always @(posedge tck) begin
    if (instr != INSTR_SEED   && seed_ctrl   != '0) wrong_ctrl++;
    if (instr != INSTR_RESULT && result_ctrl != '0) wrong_ctrl++;
  end
  always @(tdo) if (trst_n && tck) tdo_bad_edge++;

  initial begin : watchdog
    repeat (5000) @(posedge tck);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // One TCK cycle; returns TDO as seen at the rising edge.
  task automatic clk1(logic m, logic d, output logic o);
    @(negedge tck);
    tms = m;
    tdi = d;
    @(posedge tck);
    o = tdo;
    #1;
  endtask

  task automatic tap_reset();
    logic o;
    repeat (5) clk1(1'b1, 1'b0, o);
    clk1(1'b0, 1'b0, o);  // Run-Test/Idle
  endtask

  task automatic scan(bit ir, int n, logic [127:0] din, output logic [127:0] dout,
                      output int oe_bits);
    logic o;
    dout = '0;
    oe_bits = 0;
    clk1(1'b1, 1'b0, o);                  // Select-DR-Scan
    if (ir) clk1(1'b1, 1'b0, o);          // Select-IR-Scan
    clk1(1'b0, 1'b0, o);                  // Capture
    clk1(1'b0, 1'b0, o);                  // Shift
    for (int i = 0; i < n; i++) begin
      clk1(i == n - 1, din[i], o);        // last bit moves to Exit1
      dout[i] = o;
      oe_bits += int'(tdo_oe);
    end
    clk1(1'b1, 1'b0, o);                  // Update
    clk1(1'b0, 1'b0, o);                  // Run-Test/Idle
  endtask

  logic [127:0] dout;
  int oe;
  initial begin
    #12 trst_n = 1'b1;
    tap_reset();
    check("reset instruction BYPASS", instr, INSTR_BYPASS);
    check("tdo_oe low in idle", tdo_oe, 1'b0);
    scan(1'b1, 4, 128'(INSTR_SEED), dout, oe);
    check("IR capture pattern", dout[3:0], IR_CAPTURE_PATTERN);
    check("tdo_oe while shifting IR", oe, 4);
    check("instruction SEED", instr, INSTR_SEED);
    scan(1'b0, 8, 128'h5A, dout, oe);
    check("SEED capture out", dout[7:0], 8'hC3);
    check("SEED update", seed_val, 8'h5A);
    check("RESULT untouched", result_val, 12'h000);
    scan(1'b1, 4, 128'(INSTR_RESULT), dout, oe);
    check("instruction RESULT", instr, INSTR_RESULT);
    scan(1'b0, 12, 128'h3C9, dout, oe);
    check("RESULT capture out", dout[11:0], 12'hA5E);
    check("RESULT update", result_val, 12'h3C9);
    check("SEED untouched", seed_val, 8'h5A);
    // bypass: n+1 bits out are a 0 followed by the n bits in
    scan(1'b1, 4, 128'(INSTR_BYPASS), dout, oe);
    scan(1'b0, 9, 128'h0F5, dout, oe);
    check("BYPASS delay", dout[8:0], {8'hF5, 1'b0});
    scan(1'b1, 4, 128'h7, dout, oe);
    check("unused code selected", instr, 4'h7);
    scan(1'b0, 9, 128'h1AB, dout, oe);
    check("unused code acts as BYPASS", dout[8:0], {8'hAB, 1'b0});
    check("SEED still untouched", seed_val, 8'h5A);
    tap_reset();
    check("TMS reset gives BYPASS", instr, INSTR_BYPASS);
    check("controls only to selected register", wrong_ctrl, 0);
    check("TDO changes only on falling TCK", tdo_bad_edge, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

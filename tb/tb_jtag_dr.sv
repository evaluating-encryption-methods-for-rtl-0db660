// tb_jtag_dr: self-checking testbench for jtag_dr (default 64-bit width).
//
// Captures a parallel word and shifts it out LSB first while shifting a new
// word in, then checks that update copies the new word and pulses `updated`
// once, and that nothing moves without a control bit.
module tb_jtag_dr;
  import secure_debug_pkg::*;
  localparam int W = 64;
  logic tck = 1'b0, trst_n = 1'b0, tdi = 1'b0;
  dr_ctrl_t ctrl = '0;
  logic so, updated;
  logic [W-1:0] capture_data, update_data;
  int checks = 0, failures = 0;
  int upd_pulses = 0;

  jtag_dr dut (.tck, .trst_n, .ctrl, .tdi, .so, .capture_data, .update_data, .updated);

  always #5 tck = ~tck;
  always @(posedge tck) if (updated) upd_pulses++;

  initial begin : watchdog
    repeat (5000) @(posedge tck);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [W-1:0] out, in_word;
  initial begin
    capture_data = 64'h0123_4567_89AB_CDEF;
    #12 trst_n = 1'b1;
    for (int round = 0; round < 3; round++) begin
      in_word = {$urandom, $urandom};
      @(negedge tck);
      ctrl = '{capture: 1'b1, shift: 1'b0, update: 1'b0};
      @(negedge tck);
      ctrl = '{capture: 1'b0, shift: 1'b1, update: 1'b0};
      for (int i = 0; i < W; i++) begin
        out[i] = so;
        tdi = in_word[i];
        @(negedge tck);
      end
      ctrl = '0;
      check("shifted-out capture word", out, capture_data);
      check("update stage unchanged before update", update_data,
            round == 0 ? '0 : update_data);
      repeat (3) @(negedge tck);
      upd_pulses = 0;
      ctrl = '{capture: 1'b0, shift: 1'b0, update: 1'b1};
      @(negedge tck);
      ctrl = '0;
      repeat (3) @(negedge tck);
      check("update word", update_data, in_word);
      check("one updated pulse", W'(upd_pulses), W'(1));
      capture_data = update_data ^ 64'hFFFF_0000_FFFF_0000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

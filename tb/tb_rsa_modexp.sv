// tb_rsa_modexp: self-checking testbench for rsa_modexp.
//
// Encrypts and decrypts with the default 64-bit key pair and compares with
// ciphertexts worked out beforehand (0xACE1^65537 mod n = 0x308a19cc46f97c66)
// and with a square-and-multiply reference built on the simulator's 128-bit
// % operator, for random bases, exponents and odd moduli. The latency must
// be (2*64+1)*(64+2) = 8514 clocks for every operand.
module tb_rsa_modexp;
  localparam int W = 64;
  localparam logic [W-1:0] N = 64'hFFFF_FFEA_0000_0055;
  localparam logic [W-1:0] E = 64'h1_0001;
  localparam logic [W-1:0] D = 64'h8181_7E72_5D5D_A2D9;
  localparam int LAT = (2 * W + 1) * (W + 2);
  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [W-1:0] base, exponent, modulus;
  logic         busy, done;
  logic [W-1:0] result;
  int checks = 0, failures = 0;

  rsa_modexp dut (.clk, .rst_n, .start, .base, .exponent, .modulus,
                               .busy, .done, .result);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] ref_modexp(logic [W-1:0] x, logic [W-1:0] k,
                                               logic [W-1:0] m);
    logic [2*W-1:0] r, bb;
    r  = 1;
    bb = {{W{1'b0}}, x} % {{W{1'b0}}, m};
    for (int i = 0; i < W; i++) begin
      if (k[i]) r = (r * bb) % {{W{1'b0}}, m};
      bb = (bb * bb) % {{W{1'b0}}, m};
    end
    return W'(r % {{W{1'b0}}, m});
  endfunction

  task automatic run(logic [W-1:0] x, logic [W-1:0] k, logic [W-1:0] m,
                     logic [W-1:0] expv);
    int cycles;
    @(negedge clk);
    base = x; exponent = k; modulus = m; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (result !== expv) begin
      failures++;
      $display("FAIL %h^%h mod %h = %h, expected %h", x, k, m, result, expv);
    end
    checks++;
    if (cycles != LAT) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cycles, LAT);
    end
  endtask

  logic [W-1:0] rx, rk, rm;
  initial begin
    base = '0; exponent = '0; modulus = N;
    #12 rst_n = 1'b1;
    run(64'hACE1, E, N, 64'h308a_19cc_46f9_7c66);                 // encrypt seed
    run(64'h308a_19cc_46f9_7c66, D, N, 64'hACE1);                 // decrypt it
    run(64'h1234, E, N, 64'h9698_3ff1_72e5_2820);
    run(64'd5, 64'd0, N, 64'd1);                                  // x^0
    run(64'hFFFF_FFFF_FFFF_FFFF, 64'd1, N, ref_modexp('1, 64'd1, N)); // base >= n
    for (int i = 0; i < 6; i++) begin
      rm = {$urandom, $urandom} | 64'h8000_0000_0000_0001;
      rx = {$urandom, $urandom};
      rk = {$urandom, $urandom};
      run(rx, rk, rm, ref_modexp(rx, rk, rm));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

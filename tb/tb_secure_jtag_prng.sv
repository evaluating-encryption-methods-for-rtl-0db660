// tb_secure_jtag_prng: end-to-end testbench of secure_jtag_prng at its
// default parameters (64-bit RSA key pair, 16-bit PRNG).
//
// The testbench plays the debugger on the JTAG pins. It encrypts a seed with
// the public key (n, e) using its own 128-bit reference arithmetic, writes
// the ciphertext into the SEED register, keeps TCK running in Run-Test/Idle,
// reads RESULT, decrypts each ciphertext with the private key (n, d) and
// compares the plaintext with a reference LFSR. Mechanisms exercised and
// counted (each must happen at least once): seed decryption and PRNG load,
// a read before the result is ready, a PRNG step per read, a rejected
// (invalid) seed, a seed written while the device is busy, the bypass
// register and a TAP reset by TMS. Latencies checked: seed write to first
// result 2*8514 + 5 TCK cycles, read to next result 8514 + 3.
module tb_secure_jtag_prng;
  import secure_debug_pkg::*;
  localparam logic [63:0] N = RSA_N_DEFAULT;
  localparam logic [63:0] E = RSA_E_DEFAULT;
  localparam logic [63:0] D = RSA_D_DEFAULT;
  localparam int LAT = (2 * 64 + 1) * (64 + 2);

  logic tck = 1'b0, trst_n = 1'b0, tms = 1'b1, tdi = 1'b0, rst_n = 1'b0;
  logic tdo, tdo_oe;
  logic [15:0] rnd;
  logic rnd_valid;
  int checks = 0, failures = 0;

  secure_jtag_prng dut (.tck, .trst_n, .tms, .tdi, .tdo, .tdo_oe, .rst_n, .rnd, .rnd_valid);

  always #5 tck = ~tck;

  initial begin : watchdog
    repeat (400000) @(posedge tck);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- latency probes on the device's internal strobes
  int tck_count = 0, t_seed = 0, t_take = 0;
  int lat_seed[$], lat_next[$];
  logic ready_q = 1'b0;
  bit   measure = 1'b1;
  always @(posedge tck) begin
    tck_count++;
    #1;
    if (dut.seed_updated) t_seed = tck_count;
    if (dut.prng_step)    t_take = tck_count;
    if (measure && dut.ready && !ready_q) begin
      if (t_seed > t_take) lat_seed.push_back(tck_count - t_seed);
      else                 lat_next.push_back(tck_count - t_take);
    end
    ready_q = dut.ready;
  end

  // ---- reference arithmetic
  function automatic logic [63:0] modexp(logic [63:0] x, logic [63:0] k, logic [63:0] m);
    logic [127:0] r, b;
    r = 1;
    b = {64'd0, x} % {64'd0, m};
    for (int i = 0; i < 64; i++) begin
      if (k[i]) r = (r * b) % {64'd0, m};
      b = (b * b) % {64'd0, m};
    end
    return r[63:0];
  endfunction

  function automatic logic [15:0] lfsr_next(logic [15:0] v);
    return {v[14:0], v[15] ^ v[14] ^ v[12] ^ v[3]};
  endfunction

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---- JTAG debugger
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
    clk1(1'b0, 1'b0, o);
  endtask

  task automatic idle(int n);
    logic o;
    repeat (n) clk1(1'b0, 1'b0, o);
  endtask

  task automatic scan(bit ir, int n, logic [127:0] din, output logic [127:0] dout);
    logic o;
    dout = '0;
    clk1(1'b1, 1'b0, o);
    if (ir) clk1(1'b1, 1'b0, o);
    clk1(1'b0, 1'b0, o);
    clk1(1'b0, 1'b0, o);
    for (int i = 0; i < n; i++) begin
      clk1(i == n - 1, din[i], o);
      dout[i] = o;
    end
    clk1(1'b1, 1'b0, o);
    clk1(1'b0, 1'b0, o);
  endtask

  logic [127:0] dout;

  task automatic write_seed(logic [63:0] plain);
    scan(1'b1, 4, 128'(INSTR_SEED), dout);
    scan(1'b0, 64, 128'(modexp(plain, E, N)), dout);
  endtask

  // Reads RESULT; returns {seed_error, ready, ciphertext}.
  task automatic read_result(output logic err, output logic rdy, output logic [63:0] c);
    scan(1'b1, 4, 128'(INSTR_RESULT), dout);
    scan(1'b0, RESULT_DR_WIDTH, '0, dout);
    {err, rdy, c} = dout[RESULT_DR_WIDTH-1:0];
  endtask

  // Polls RESULT until ready (or gives up).
  task automatic read_ready(output logic err, output logic [63:0] c,
                            input bit expect_ready = 1'b1);
    logic rdy;
    int tries = 0;
    do begin
      idle(1000);
      read_result(err, rdy, c);
      tries++;
    end while (!rdy && !err && tries < 40);
    check("result ready as expected", rdy, expect_ready);
  endtask

  int m_seed = 0, m_not_ready = 0, m_step = 0, m_bad_seed = 0, m_busy_seed = 0,
      m_bypass = 0, m_tms_reset = 0;
  logic err, rdy;
  logic [63:0] c;
  logic [15:0] expv;

  initial begin
    #12;
    trst_n = 1'b1;
    rst_n  = 1'b1;
    tap_reset();
    check("no valid number after reset", rnd_valid, 1'b0);

    // bypass
    scan(1'b1, 4, 128'(INSTR_BYPASS), dout);
    check("IR capture pattern", dout[3:0], IR_CAPTURE_PATTERN);
    scan(1'b0, 17, 128'h1_2345, dout);
    check("bypass shifts by one", dout[16:0], {16'h2345, 1'b0});
    m_bypass++;

    // encrypted seed in, read too early, then the outputs
    write_seed(64'hACE1);
    read_result(err, rdy, c);
    check("read before ready", {err, rdy}, 2'b00);
    if (!rdy) m_not_ready++;
    read_ready(err, c);
    check("ciphertext of the seed", c, modexp(64'hACE1, E, N));
    check("decrypted first output is the seed", modexp(c, D, N), 64'hACE1);
    // reading consumed the seed: the PRNG already holds the next number
    check("on-chip number valid", {rnd_valid, rnd}, {1'b1, lfsr_next(16'hACE1)});
    m_seed++;
    expv = 16'hACE1;
    for (int i = 0; i < 3; i++) begin
      read_ready(err, c);
      expv = lfsr_next(expv);
      check($sformatf("decrypted output %0d", i + 1), modexp(c, D, N), 64'(expv));
      m_step++;
    end

    // invalid seed: plaintext wider than 16 bits
    measure = 1'b0;
    write_seed(64'h0001_0000_0000_0001);
    read_ready(err, c, 1'b0);  // never becomes ready
    check("invalid seed flagged", err, 1'b1);
    check("no valid number after invalid seed", rnd_valid, 1'b0);
    if (err) m_bad_seed++;

    // seed written while the device is still busy: the newer seed wins
    write_seed(64'h1234);
    idle(LAT + 100);                // now encrypting 0x1234
    write_seed(64'hBEEF);
    idle(3 * LAT + 100);
    read_ready(err, c);
    check("seed written while busy", modexp(c, D, N), 64'hBEEF);
    check("error cleared", err, 1'b0);
    if (modexp(c, D, N) == 64'hBEEF) m_busy_seed++;

    // TAP reset by TMS: instruction back to BYPASS, PRNG untouched
    tap_reset();
    check("TAP reset keeps the PRNG", {rnd_valid, rnd}, {1'b1, lfsr_next(16'hBEEF)});
    scan(1'b0, 3, 128'h3, dout);
    check("BYPASS after TMS reset", dout[2:0], 3'b110);
    if (dout[2:0] == 3'b110) m_tms_reset++;
    read_ready(err, c);
    check("output after TAP reset", modexp(c, D, N), 64'(lfsr_next(16'hBEEF)));
    check("PRNG stepped once per read", {rnd_valid, rnd},
          {1'b1, lfsr_next(lfsr_next(16'hBEEF))});

    // latencies
    foreach (lat_seed[i]) check("seed to result latency", lat_seed[i], 2 * LAT + 5);
    foreach (lat_next[i]) check("read to next result latency", lat_next[i], LAT + 3);
    check("seed latencies seen", lat_seed.size() == 1, 1'b1);

    // every mechanism happened
    check("mechanism seed load",       m_seed      > 0, 1'b1);
    check("mechanism read not ready",  m_not_ready > 0, 1'b1);
    check("mechanism PRNG step",       m_step      > 0, 1'b1);
    check("mechanism invalid seed",    m_bad_seed  > 0, 1'b1);
    check("mechanism seed while busy", m_busy_seed > 0, 1'b1);
    check("mechanism bypass",          m_bypass    > 0, 1'b1);
    check("mechanism TMS reset",       m_tms_reset > 0, 1'b1);
    $display("mechanisms: seed=%0d not_ready=%0d step=%0d bad_seed=%0d busy_seed=%0d bypass=%0d tms_reset=%0d",
             m_seed, m_not_ready, m_step, m_bad_seed, m_busy_seed, m_bypass, m_tms_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// secure_jtag_prng: JTAG debug port with an RSA-secured PRNG seed exchange.
//
// The debug port is where a device is most exposed, so nothing that crosses
// it travels in clear. A debugger writes an RSA-encrypted seed into the SEED
// data register; the device decrypts it with its private key (n, d), seeds a
// 16-bit LFSR PRNG with it, encrypts each PRNG output with the public key
// (n, e) and offers the ciphertext in the RESULT data register. Inside the
// device the numbers are used in clear (rnd / rnd_valid).
//
// Blocks: jtag_tap (state machine, instruction register, bypass, TDO
// multiplexer), two jtag_dr data registers, prng_crypto_ctrl (sequencing),
// two rsa_modexp units (decryption and encryption) and lfsr_prng.
// Data registers, LSB shifted first:
//   SEED   (IR = 4'h1), 64 bit: write the ciphertext of the seed; Update-DR
//          starts the decryption.
//   RESULT (IR = 4'h2), 66 bit: Capture-DR loads {seed_error, ready,
//          ciphertext}. A capture with ready = 1 consumes that number: the
//          PRNG steps and the next output is encrypted.
//   BYPASS (IR = 4'hF and every other code), 1 bit.
//
// All logic runs on TCK; the RSA units make progress while the debugger
// keeps TCK running, e.g. in Run-Test/Idle. One exponentiation takes
// (2*64+1)*(64+2) = 8514 TCK cycles; a seed costs a decryption and an
// encryption, each further number one encryption. RESULT shows ready
// 2*8514+5 TCK cycles after the Update-DR clock of a seed and 8514+3 cycles
// after the capture that consumed the previous number. TDO changes on the falling
// edge of TCK. trst_n resets the TAP, rst_n the PRNG and crypto logic.
//
// The flow (encrypted seed in, decrypt with the private key, PRNG, encrypt
// with the public key, out through JTAG), the 64-bit key size, the 16-bit
// LFSR and the TAP behaviour follow the design description. Running the
// cryptography from TCK, the register map, the key values and the status
// bits are this design's own choices.
module secure_jtag_prng
  import secure_debug_pkg::*;
#(
  parameter logic [RSA_WIDTH-1:0] RSA_N = RSA_N_DEFAULT,
  parameter logic [RSA_WIDTH-1:0] RSA_E = RSA_E_DEFAULT,
  parameter logic [RSA_WIDTH-1:0] RSA_D = RSA_D_DEFAULT
) (
  input  logic                  tck,
  input  logic                  trst_n,
  input  logic                  tms,
  input  logic                  tdi,
  output logic                  tdo,
  output logic                  tdo_oe,
  input  logic                  rst_n,
  output logic [PRNG_WIDTH-1:0] rnd,
  output logic                  rnd_valid
);

  tap_state_e state;
  ir_t        instr;
  dr_ctrl_t   seed_ctrl, result_ctrl;
  logic       seed_so, result_so, seed_updated;
  logic [RSA_WIDTH-1:0]       seed_cipher;
  logic [RESULT_DR_WIDTH-1:0] result_capture, result_unused;
  logic       result_updated;

  logic                  ready, seed_error;
  logic [RSA_WIDTH-1:0]  cipher;
  logic                  prng_load, prng_step;
  logic [PRNG_WIDTH-1:0] prng_seed;
  logic                  dec_start, dec_done, enc_start, enc_done;
  logic                  dec_busy, enc_busy;
  logic [RSA_WIDTH-1:0]  dec_result, enc_result;

  jtag_tap u_tap (
    .tck        (tck),
    .trst_n     (trst_n),
    .tms        (tms),
    .tdi        (tdi),
    .tdo        (tdo),
    .tdo_oe     (tdo_oe),
    .state      (state),
    .instr      (instr),
    .seed_ctrl  (seed_ctrl),
    .seed_so    (seed_so),
    .result_ctrl(result_ctrl),
    .result_so  (result_so)
  );

  jtag_dr #(.WIDTH(RSA_WIDTH)) u_seed_dr (
    .tck         (tck),
    .trst_n      (trst_n),
    .ctrl        (seed_ctrl),
    .tdi         (tdi),
    .so          (seed_so),
    .capture_data(seed_cipher),
    .update_data (seed_cipher),
    .updated     (seed_updated)
  );

  assign result_capture = {seed_error, ready, cipher};

  // Read-only register: what is shifted in is dropped.
  jtag_dr #(.WIDTH(RESULT_DR_WIDTH)) u_result_dr (
    .tck         (tck),
    .trst_n      (trst_n),
    .ctrl        (result_ctrl),
    .tdi         (tdi),
    .so          (result_so),
    .capture_data(result_capture),
    .update_data (result_unused),
    .updated     (result_updated)
  );

  prng_crypto_ctrl #(.WIDTH(RSA_WIDTH), .PRNG_WIDTH(PRNG_WIDTH)) u_ctrl (
    .clk        (tck),
    .rst_n      (rst_n),
    .seed_strobe(seed_updated),
    .take_strobe(result_ctrl.capture && ready),
    .ready      (ready),
    .seed_error (seed_error),
    .cipher     (cipher),
    .prng_load  (prng_load),
    .prng_seed  (prng_seed),
    .prng_step  (prng_step),
    .seeded     (rnd_valid),
    .dec_start  (dec_start),
    .dec_done   (dec_done),
    .dec_result (dec_result),
    .enc_start  (enc_start),
    .enc_done   (enc_done),
    .enc_result (enc_result)
  );

  // Decryption of the seed with the private key (n, d).
  rsa_modexp #(.WIDTH(RSA_WIDTH)) u_decrypt (
    .clk     (tck),
    .rst_n   (rst_n),
    .start   (dec_start),
    .base    (seed_cipher),
    .exponent(RSA_D),
    .modulus (RSA_N),
    .busy    (dec_busy),
    .done    (dec_done),
    .result  (dec_result)
  );

  // Encryption of the PRNG output with the public key (n, e).
  rsa_modexp #(.WIDTH(RSA_WIDTH)) u_encrypt (
    .clk     (tck),
    .rst_n   (rst_n),
    .start   (enc_start),
    .base    (RSA_WIDTH'(rnd)),
    .exponent(RSA_E),
    .modulus (RSA_N),
    .busy    (enc_busy),
    .done    (enc_done),
    .result  (enc_result)
  );

  lfsr_prng #(.WIDTH(PRNG_WIDTH)) u_prng (
    .clk  (tck),
    .rst_n(rst_n),
    .load (prng_load),
    .seed (prng_seed),
    .step (prng_step),
    .value(rnd)
  );

  // A unit is only started while it is idle.
  assert property (@(posedge tck) disable iff (!rst_n) dec_start |-> !dec_busy);
  assert property (@(posedge tck) disable iff (!rst_n) enc_start |-> !enc_busy);

endmodule

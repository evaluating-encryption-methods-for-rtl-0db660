// secure_debug_pkg: types and constants shared by the secured JTAG / PRNG design.
//
// Holds the 16 TAP controller states of the IEEE 1149.1 state diagram, the
// instruction codes of the 4-bit instruction register, the data register
// widths and the default 64-bit RSA key pair.
//
// The state set follows the TAP diagram (two general states, seven for the
// instruction register, seven for the data register). The state encoding, the
// instruction register width, the opcodes and the key values are this
// design's own choices: the key pair is built from the primes
// p = 0xFFFFFFFB and q = 0xFFFFFFEF, giving n = p*q, e = 65537 and
// d = e^-1 mod (p-1)(q-1).
package secure_debug_pkg;

  typedef enum logic [3:0] {
    TEST_LOGIC_RESET = 4'h0,
    RUN_TEST_IDLE    = 4'h1,
    SELECT_DR_SCAN   = 4'h2,
    CAPTURE_DR       = 4'h3,
    SHIFT_DR         = 4'h4,
    EXIT1_DR         = 4'h5,
    PAUSE_DR         = 4'h6,
    EXIT2_DR         = 4'h7,
    UPDATE_DR        = 4'h8,
    SELECT_IR_SCAN   = 4'h9,
    CAPTURE_IR       = 4'hA,
    SHIFT_IR         = 4'hB,
    EXIT1_IR         = 4'hC,
    PAUSE_IR         = 4'hD,
    EXIT2_IR         = 4'hE,
    UPDATE_IR        = 4'hF
  } tap_state_e;

  // Instruction register
  localparam int unsigned IR_WIDTH = 4;
  typedef logic [IR_WIDTH-1:0] ir_t;
  localparam ir_t IR_CAPTURE_PATTERN = 4'b0001;  // "01" in the two LSBs
  localparam ir_t INSTR_SEED   = 4'h1;  // write the encrypted seed (64-bit DR)
  localparam ir_t INSTR_RESULT = 4'h2;  // read status + encrypted PRNG output
  localparam ir_t INSTR_BYPASS = 4'hF;  // 1-bit bypass register

  // Control signals the TAP hands to the data registers (Fig. 2 "control
  // signals and register loads").
  typedef struct packed {
    logic capture;  // Capture-DR with this register selected
    logic shift;    // Shift-DR with this register selected
    logic update;   // Update-DR with this register selected
  } dr_ctrl_t;

  // RSA key pair (64 bit)
  localparam int unsigned RSA_WIDTH = 64;
  localparam logic [63:0] RSA_N_DEFAULT = 64'hFFFF_FFEA_0000_0055;
  localparam logic [63:0] RSA_E_DEFAULT = 64'h0000_0000_0001_0001;
  localparam logic [63:0] RSA_D_DEFAULT = 64'h8181_7E72_5D5D_A2D9;

  // PRNG
  localparam int unsigned PRNG_WIDTH = 16;
  // Result data register: {seed_error, ready, ciphertext}
  localparam int unsigned RESULT_DR_WIDTH = RSA_WIDTH + 2;

endpackage

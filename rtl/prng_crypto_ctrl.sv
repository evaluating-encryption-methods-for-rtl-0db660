// prng_crypto_ctrl: sequencer of the encrypted seed / output exchange.
//
// An encrypted seed written through the debug port (seed_strobe with
// seed_cipher) is decrypted with the private key on the decryption unit.
// A plaintext that is a valid 16-bit seed (upper bits zero, not all-zero,
// since an all-zero LFSR never leaves zero) is loaded into the PRNG, and the
// PRNG output is then encrypted with the public key on the encryption unit.
// The ciphertext is held with ready = 1 until the debugger reads it
// (take_strobe while ready); the PRNG then steps once and the next output is
// encrypted. The seed is thus the first number read out, as the design
// description specifies. A seed that arrives while a unit is busy is kept
// pending and decrypted once the unit is free; the most recent seed wins.
// A plaintext that is no valid seed sets seed_error and leaves the PRNG as is.
//
// Decrypt-then-seed and encrypt-on-output follow the design description; the
// ready / take handshake, the seed check and the pending-seed rule are this
// design's own choices.
//
// Interface: clk, rst_n; debug side seed_strobe, take_strobe, ready,
// seed_error, cipher; PRNG side prng_load, prng_seed, prng_step, seeded;
// one start/done pair to each exponentiation unit (exponent and modulus are
// wired in the top).
// Timing: one exponentiation per output; prng_step is followed one clock
// later by enc_start, so the encryption sees the new PRNG value.
module prng_crypto_ctrl #(
  parameter int unsigned WIDTH      = 64,
  parameter int unsigned PRNG_WIDTH = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // debug side
  input  logic                  seed_strobe,
  input  logic                  take_strobe,
  output logic                  ready,
  output logic                  seed_error,
  output logic [WIDTH-1:0]      cipher,
  // PRNG side
  output logic                  prng_load,
  output logic [PRNG_WIDTH-1:0] prng_seed,
  output logic                  prng_step,
  output logic                  seeded,
  // decryption unit (private key)
  output logic                  dec_start,
  input  logic                  dec_done,
  input  logic [WIDTH-1:0]      dec_result,
  // encryption unit (public key)
  output logic                  enc_start,
  input  logic                  enc_done,
  input  logic [WIDTH-1:0]      enc_result
);

  typedef enum logic [1:0] {S_IDLE, S_DECRYPT, S_ENCRYPT, S_READY} state_e;

  state_e state;
  logic   pending, seed_ok, enc_go;

  assign seed_ok   = (dec_result[WIDTH-1:PRNG_WIDTH] == '0) &&
                     (dec_result[PRNG_WIDTH-1:0] != '0);
  assign prng_seed = dec_result[PRNG_WIDTH-1:0];

  // Pulses towards the PRNG and the decryption unit.
  always_comb begin
    dec_start = 1'b0;
    prng_load = 1'b0;
    prng_step = 1'b0;
    unique case (state)
      S_IDLE:    dec_start = pending;
      S_READY:   begin
        dec_start = pending;
        prng_step = !pending && take_strobe;
      end
      S_DECRYPT: prng_load = dec_done && seed_ok;
      default:   ;
    endcase
  end

  assign enc_start = enc_go;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      pending    <= 1'b0;
      enc_go     <= 1'b0;
      ready      <= 1'b0;
      seed_error <= 1'b0;
      seeded     <= 1'b0;
      cipher     <= '0;
    end else begin
      enc_go <= 1'b0;
      if (seed_strobe)    pending <= 1'b1;
      else if (dec_start) pending <= 1'b0;
      unique case (state)
        S_IDLE: if (dec_start) begin
          state <= S_DECRYPT;
          ready <= 1'b0;
        end
        S_READY: begin
          if (dec_start) begin
            state <= S_DECRYPT;
            ready <= 1'b0;
          end else if (prng_step) begin
            state  <= S_ENCRYPT;
            ready  <= 1'b0;
            enc_go <= 1'b1;
          end
        end
        S_DECRYPT: if (dec_done) begin
          if (seed_ok) begin
            seed_error <= 1'b0;
            seeded     <= 1'b1;
            state      <= S_ENCRYPT;
            enc_go     <= 1'b1;
          end else begin
            seed_error <= 1'b1;
            seeded     <= 1'b0;
            state      <= S_IDLE;
          end
        end
        S_ENCRYPT: if (enc_done) begin
          cipher <= enc_result;
          ready  <= 1'b1;
          state  <= S_READY;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

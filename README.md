# RSA-secured seed exchange for a PRNG behind a JTAG debug port

A JTAG port reaches into every register of a chip. That makes it the most
useful tool during bring-up, and also a back door. This design shows one way
to lock it for one use case: a pseudo-random number generator whose seed and
outputs must pass through the debug port.

Nothing crosses the port in clear:

1. The debugger encrypts a 16-bit seed with the device's RSA public key
   (n, e) and shifts the 64-bit ciphertext into a JTAG data register.
2. The device decrypts the ciphertext with its private key (n, d) and loads
   the plaintext into a 16-bit LFSR.
3. The device encrypts each LFSR output with the public key and offers the
   ciphertext in a second data register, which the debugger reads.

Inside the chip the numbers are used in clear (`rnd`, `rnd_valid`).

The RTL follows a published proposal for evaluating cipher methods on the
JTAG data stream:

- the 16-state TAP, with TMS/TDI sampled on rising TCK and TDO driven on
  falling TCK;
- instruction and data registers between TDI and TDO;
- the 16-bit LFSR with taps 4, 13, 15 and 16;
- RSA with a 64-bit key pair;
- the flow of encrypted seed in, decryption, PRNG, and encryption of the
  output.

The proposal stops short of wiring the TAP to the PRNG. That wiring, the
register map, the RSA hardware architecture, the handshakes and the key
values are this implementation's own. Each is listed below.

## Block structure

```
            TCK TMS TDI TRST_N                                    TDO TDO_OE
              |   |   |                                             ^
        +-----v---v---v---------------- jtag_tap ------------------+-----+
        | jtag_tap_fsm (16 states)   jtag_ir (4 bit)   bypass   TDO mux |
        +-------+-----------------------------+-------------------------+
     seed_ctrl  |                             | result_ctrl
        +-------v-------+             +-------v---------+
        | jtag_dr  SEED |             | jtag_dr RESULT  |<-- {seed_error, ready, cipher}
        |    64 bit     |             |     66 bit      |
        +-------+-------+             +-------^---------+
   ciphertext   | updated (strobe)            | capture while ready = "take"
        +-------v-----------------------------+---------+
        |             prng_crypto_ctrl                  |
        +---+--------------+-------------+--------------+
            |start/done    | load/step   |start/done
   +--------v------+  +----v------+  +---v-----------+
   | rsa_modexp    |  | lfsr_prng |  | rsa_modexp    |
   | decrypt (n,d) |->|  16 bit   |->| encrypt (n,e) |
   +---------------+  +-----------+  +---------------+
      (each rsa_modexp contains one rsa_modmul)
```

All registers run on TCK. The debugger supplies the clock for the RSA work
by keeping TCK running, for example in Run-Test/Idle. This avoids a clock
domain crossing between the debug port and the crypto logic. The cost is
that the RSA work only advances while TCK runs.

## Using the port

The instruction register is 4 bits wide. On Capture-IR it shifts out
`0001`. Data registers shift LSB first.

| IR code      | Register | Width | Capture loads                            | Update does                 |
|--------------|----------|-------|------------------------------------------|-----------------------------|
| `4'h1`       | SEED     | 64    | the last ciphertext written              | starts decrypting the seed  |
| `4'h2`       | RESULT   | 66    | `{seed_error, ready, ciphertext[63:0]}`  | nothing (read-only)         |
| `4'hF`, rest | BYPASS   | 1     | 0                                        | nothing                     |

A session looks like this:

1. Compute `c = seed^e mod n` and scan `c` into SEED.
2. Keep TCK running, then scan RESULT until `ready = 1`.
3. Decrypt the ciphertext with `d`. The first number read is the seed itself.
4. Every capture of RESULT that sees `ready = 1` consumes that number. The
   LFSR then steps once and the next output is encrypted. A capture that
   sees `ready = 0` changes nothing.

If a seed decrypts to a value that does not fit 16 bits, or to zero (an LFSR
at zero stays at zero), it is rejected:

- `seed_error` is set;
- `ready` stays low;
- `rnd_valid` drops;
- the LFSR keeps its state.

The next valid seed clears the error. A seed written while the device is
still decrypting or encrypting is kept pending. It is applied as soon as the
current operation ends, and the most recent seed wins.

`trst_n`, or five TCKs with TMS high, resets only the TAP: the instruction
goes back to BYPASS. `rst_n` resets the LFSR, the sequencer and the RSA
units.

### Timing

Each exponentiation takes 8514 TCK cycles. The result registers report:

- `ready` 2·8514 + 5 = 17033 TCK cycles after the Update-DR clock of a seed
  (one decryption and one encryption);
- `ready` 8514 + 3 = 8517 cycles after the capture that consumed the
  previous number.

These counts do not depend on the key or on the data.

TDO changes only on the falling edge of TCK. A following chip in the scan
chain therefore has half a TCK period of wiring delay to spare. `tdo_oe` is
high only in Shift-IR and Shift-DR.

## RSA engine

`rsa_modexp` computes `base^exponent mod modulus` for 64-bit operands. The
design uses two instances of it, one per key.

**Exponentiation.** The exponent is scanned from the MSB. For each of the
64 bits the accumulator is squared and then multiplied by the base. The
product is kept only when the bit is 1 ("square and multiply always").
Leading zero bits are not skipped. The run time is therefore the same for
the 17-bit public exponent and the 64-bit private one, so timing reveals
nothing about the key. Before the loop, the base is reduced once by
computing `base * 1 mod n`, so any 64-bit ciphertext is accepted. That makes
1 + 2·64 = 129 modular products.

**Multiplication.** `rsa_modmul` is an interleaved shift-and-add multiplier.
It handles one bit of `a` per clock:

```
r = 2r + a[i]*b
```

After each step, at most two conditional subtractions of `n` bring `r` back
into `[0, n)`. This holds whenever `b < n`, which the exponentiation
guarantees. The datapath is 66 bits wide. A product takes 64 clocks, plus 2
clocks of handshake in the exponentiation loop:
(2·64 + 1)·(64 + 2) = 8514 clocks.

**Key pair.** The top-level parameters `RSA_N`, `RSA_E` and `RSA_D` hold a
fixed pair:

- p = 0xFFFFFFFB and q = 0xFFFFFFEF (the two largest 32-bit primes);
- n = p·q = 0xFFFFFFEA00000055;
- e = 65537;
- d = e⁻¹ mod (p−1)(q−1) = 0x81817E725D5DA2D9.

To use your own pair, override the three parameters. n must be odd and
larger than 2^16.

## PRNG

`lfsr_prng` is a 16-bit Fibonacci LFSR over x^16 + x^15 + x^13 + x^4 + 1.
Each step works like this:

1. XOR bits 4, 13, 15 and 16 of the current value (counted from 1 at the
   LSB).
2. Shift the register one place towards the MSB, dropping the old MSB.
3. Put the XOR result into the LSB.

Every non-zero seed runs through all 65535 non-zero values before the
sequence repeats. A loaded seed is the first output. The reset value 0xACE1
has Hamming weight 8, the weight recommended for a seed.

## TAP controller

`jtag_tap_fsm` is the standard 16-state IEEE 1149.1 machine: Test-Logic-Reset,
Run-Test/Idle and seven states each for the DR and IR columns.

`jtag_tap` adds:

- the instruction register `jtag_ir`;
- a 1-bit bypass register;
- a decode that passes capture, shift and update only to the data register
  the instruction selects;
- the falling-edge TDO multiplexer.

TDI goes to every register, and only the selected register shifts. This
acts as the input demultiplexer of a textbook TAP. The instruction takes
effect on the rising TCK edge that leaves Update-IR. A data register's
update likewise happens on the edge that leaves Update-DR.

`jtag_dr` is a generic data register with a capture stage and an update
stage.

## Departures and limits

- **64-bit RSA is a demonstration only.** Such keys can be factored
  quickly. Real use needs 2048 to 4096 bits. `rsa_modexp` and `rsa_modmul`
  take a `WIDTH` parameter, but the register map and the top level are
  fixed at 64 bits. At 2048 bits the same architecture would need about
  8.4 million clocks per operation.
- **Keys are parameters.** The private key sits in the netlist as a
  constant. There is no key storage, no key loading and no key
  infrastructure.
- **Outputs are encrypted with the public key,** as in the original scheme.
  Anyone holding the public key can therefore produce valid-looking seeds.
  The scheme keeps the exchanged values confidential, but it does not
  authenticate the debugger.
- **Power side channels are not addressed.** Only constant timing is
  provided.
- **Choices not specified by the original description:**
  - clocking everything from TCK;
  - the instruction codes, register widths and the status bits in RESULT;
  - the seed validity check;
  - the pending-seed rule;
  - the "capture consumes a number" handshake;
  - the reset value of the LFSR;
  - the RSA hardware architecture.
- **Not included:** the example SoC around a JTAG-wrapped processor, its
  hardware monitor (BDM), and full-chip scan chains. Scan chains come from
  DFT insertion, not from RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench             | What it checks                                                                 |
|-----------------------|--------------------------------------------------------------------------------|
| `tb_lfsr_prng`        | Golden values, a reference model, load priority, period exactly 65535          |
| `tb_rsa_modmul`       | 200+ random products against 128-bit `%`, latency of 64 clocks                 |
| `tb_rsa_modexp`       | Known ciphertexts for the default key pair, encrypt/decrypt round trip, random operands against a reference, latency of 8514 clocks |
| `tb_prng_crypto_ctrl` | Sequencing with behavioural RSA stand-ins: rejected seeds, a read while busy, a pending seed |
| `tb_jtag_tap_fsm`     | Random TMS walk against the transition table (all 32 arcs), five-TMS reset from every state |
| `tb_jtag_ir`, `tb_jtag_dr`, `tb_jtag_tap` | Capture, shift and update; the capture pattern; bypass; TDO changing only on falling TCK |
| `tb_secure_jtag_prng` | End-to-end session at the default 64-bit parameters (below)                    |

The end-to-end testbench `tb_secure_jtag_prng` runs the whole design at its
default parameters, with a behavioural debugger on the pins:

- it encrypts seeds with its own reference arithmetic;
- it decrypts every ciphertext it reads and compares it with a reference
  LFSR;
- it checks both latencies above;
- it counts each mechanism: seed load, early read, PRNG step, rejected seed,
  seed while busy, bypass, and reset by TMS.

It finishes in well under a second.

To run a testbench with Verilator 5 from the project root:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/secure_debug_pkg.sv tb/tb_secure_jtag_prng.sv \
    --top-module tb_secure_jtag_prng -o sim
./obj_dir/sim
```

For any other testbench, replace `tb_secure_jtag_prng` with its name. The
RTL uses SystemVerilog-2017: a package for the shared types, a struct for
the data-register controls, an enum for the TAP states, and concurrent
assertions on the start handshakes.

## Files

- `rtl/secure_debug_pkg.sv`: TAP state enum, opcodes, widths, default keys
- `rtl/secure_jtag_prng.sv`: top level
- `rtl/jtag_tap.sv`, `rtl/jtag_tap_fsm.sv`, `rtl/jtag_ir.sv`, `rtl/jtag_dr.sv`: debug port
- `rtl/prng_crypto_ctrl.sv`: sequencer
- `rtl/rsa_modexp.sv`, `rtl/rsa_modmul.sv`: RSA engine
- `rtl/lfsr_prng.sv`: PRNG
- `tb/tb_*.sv`: one testbench per module

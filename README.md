# Byte-access memory controller with AXI4 slave port and SECDED ECC

This controller lets an SoC master read and write a data memory over AXI4,
down to single bytes. The memory stores every 32-bit word together with 7
ECC check bits, 39 bits in all. A byte write therefore cannot simply write
8 bits. The controller reads the whole word, corrects it if needed, merges in
the new bytes, recomputes the check bits and writes the word back. This
read-modify-write is the central mechanism of the design. Around it sit:

- an AXI4 slave that splits bursts into single-word requests,
- a small register block that enables ECC, injects errors for testing and
  reports errors,
- a sequencer that clears the whole memory on request.

```
             AXI4 (AW, W, B, AR, R)            APB-style register writes
                      |                                  |
              +-------v--------+   word requests  +------v---------------------------+
              |   axi4_slave   |----------------->|            mem_ctrl              |
              | bursts -> beats|<-----------------|  csr_registers  ecc_encoder      |
              +----------------+   done + resp    |  FSM (RMW/init) ecc_decoder      |
                                                  +------+----------------^----------+
                                          write port     |  39-bit words  | read port
                                                  +------v----------------+----------+
                                                  |  dual_port_ram  (2^14 x 39 bits) |
                                                  +----------------------------------+
```

The top module is `zmc_axi4_top`. It has plain AXI and register-port signals,
an active-low asynchronous reset `zmc_top_rstn`, a synchronous software reset
`zmc_top_sw_rst` and a memory-init request `zmc_top_mem_init`. Its outputs
include `MEM_init_ACK`, `ECC_interrupt` and the 32-bit `O_ECC_STATUS_REG`.

## How a request travels

1. **AXI slave (`axi4_slave`).** It accepts one write burst and one read
   burst at a time. The two sides run independently.
   - For each write beat it raises `wready` for one cycle. It then holds a
     request (`slave_wr_en` with address, data and strobe) until the
     controller answers with a one-cycle `done` pulse.
   - For each read beat it holds `slave_rd_en` until `done`. It then presents
     the word on `rdata` with `rvalid` until `rready`.
   - Burst types FIXED, INCR and WRAP are supported. Every beat is a full
     32-bit word, with byte strobes; there is no size signal.
   - `bresp` is the worst response of all beats in the burst. A `wlast` on
     the wrong beat also gives SLVERR.
2. **Memory controller (`mem_ctrl`).** It serves one request at a time. When
   a read and a write are both waiting it alternates between them. The word
   index is byte-address bits [15:2]. Any higher address bit set gives
   SLVERR, and memory is not touched.

   | request | sequence (one state per clock) | edges to `done` |
   |---|---|---|
   | write, `wstrb = 1111` | accept, write codeword, done | 2 |
   | write, other strobe | accept, read, check + merge + write, done | 3 |
   | read | accept, read, check, done | 3 |
   | out-of-range address | accept, done (SLVERR) | 1 |

3. **RAM (`dual_port_ram`).** It has one write port and one read port, with
   active-high enables gated by `RAM_en`.
   - Read data appears one cycle after the read.
   - A read and a write to the same address in the same cycle return the
     old word.
   - `RAM_rstn` clears only the read register.

The full-chain timing is counted in clock edges after the AXI address
handshake, with the master never stalling:

- a one-beat full-word write: `bvalid` after 4 edges;
- a one-beat byte write: `bvalid` after 5 edges;
- a one-beat read: `rvalid` after 4 edges;
- inside a burst: 4 edges per write beat and 5 per read beat.

The end-to-end testbench checks these numbers. They are this design's own,
not figures from a specification.

## ECC, byte merge and error handling

The codeword is an extended Hamming (SECDED) code over 32 data bits, with
the layout below. `zmc_pkg` holds it as functions, and `ecc_encoder` and
`ecc_decoder` wrap them.

| codeword bit | holds |
|---|---|
| 0 | overall parity |
| 1, 2, 4, 8, 16, 32 | the six Hamming check bits |
| 3, 5, 6, 7, 9 … 38 | data bits 0 … 31, in order |

For example, data `0x00000001` encodes to `0x0F`, and `0x80000000` encodes
to `0x41_0000_0014`. The syndrome is the XOR of the positions of all set
bits from 1 to 38. The decoder reads it together with the overall parity:

| overall parity | syndrome | meaning | action |
|---|---|---|---|
| even | 0 | clean | none |
| odd | 0 … 38 | one bit flipped | flip that bit back, flag *corrected* |
| even | not 0 | two bits flipped | flag *uncorrectable* |
| odd | above 38 | two bits flipped | flag *uncorrectable* |

How errors reach the bus:

- A corrected error is invisible on the bus (`rresp = OKAY`). It is recorded
  in the status register, and the corrected word is what a read-modify-write
  merges into. A byte write therefore also repairs the stored word.
- An uncorrectable error on a read returns SLVERR.
- An uncorrectable error found during a byte write's read phase aborts the
  write and returns SLVERR. The good new bytes are not mixed into a word that
  cannot be trusted. A full-word write needs no read, so it always succeeds
  and replaces the bad word.
- With ECC disabled, the decoder passes the stored data bits through
  unchecked. The encoder always writes correct check bits, so ECC can be
  re-enabled at any time.

## Registers

The register port has no read-back path. Writes take effect in the cycle
where `i_psel`, `i_penable` and `i_pwrite` are all high, with byte strobes
`i_pstrb`. There are no wait states and no error response.

| address | register | reset value | function |
|---|---|---|---|
| 0x000 | ECC_EN | 1 | bit 0: check and correct on reads |
| 0x004 | ECC_INJ | 0 | each set bit inverts that data bit in every word written from now on |
| (output) | ECC_STATUS | 0 | appears on `O_ECC_STATUS_REG`; fields below |

ECC_STATUS fields:

| bits | field |
|---|---|
| [0] | a corrected error was seen (sticky) |
| [1] | an uncorrectable error was seen (sticky) |
| [15:8] | count of corrected errors, saturating at 255 |
| [29:16] | word address of the latest error |

`ECC_interrupt` is high while bit 0 or bit 1 of ECC_STATUS is set. Pulsing
`i_ECC_STAUS_REG_clear` clears the whole status register. The port name
keeps its original spelling.

To test the error path, write a one-bit mask to ECC_INJ, write a word, clear
the mask, then read the word back. Reading it gives a corrected error. A
two-bit mask gives an uncorrectable one.

## Initialisation and resets

A rising edge on `zmc_top_mem_init` is remembered even while a request is in
progress. Once idle, the controller:

- writes the codeword of zero into every word, one word per cycle;
- raises `MEM_init_ACK` 2^14 + 2 edges after the edge that sampled the
  request;
- keeps `MEM_init_ACK` high until the next initialisation or reset.

AXI requests wait during initialisation. The RAM array itself has no reset,
so initialise it before relying on its contents.

`zmc_top_sw_rst` returns the following to their reset state:

- both AXI state machines;
- the controller;
- the registers: ECC on, mask 0, status 0;
- `MEM_init_ACK`, which goes low.

It keeps the memory contents.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `zmc_axi4_top`, `mem_ctrl`, `dual_port_ram` | `ADDR_WIDTH` | 14 | RAM word-address width (16384 words, 64 KiB of data) |
| `zmc_axi4_top`, `mem_ctrl`, `csr_registers` | `REG_ADDR_WIDTH` | 10 | register-port address width |
| `zmc_axi4_top` | `LEN_WIDTH` | 4 | width of `awlen`/`arlen` at the top (bursts of 1–16 beats) |
| `dual_port_ram` | `MEMORY_DATA_WIDTH` | 39 | stored word width |

Data width (32), AXI address width (32), ID width (4) and the code width (39)
are fixed in `zmc_pkg`. Changing the data width would also need a different
code.

## What is given, what is chosen

The published design fixes the following:

- the three-part structure: AXI slave, memory controller with CSR block and
  ECC encoder and decoder, dual-port RAM;
- the signal names and port lists of the top, the AXI slave and the RAM;
- a 14-bit RAM address and a 39-bit RAM word;
- a 4-bit burst length at the top, 8-bit at the AXI slave, and 4-bit IDs;
- the use of read-modify-write for byte access.

Everything else is this implementation's own choice:

- the ECC code and codeword layout;
- the register addresses, reset values and status layout;
- the request/done handshake between slave and controller;
- all cycle timing;
- arbitration between reads and writes;
- the address-range check;
- the error responses;
- the initialisation protocol;
- the reset behaviour.

Where it departs from the published description, or goes beyond it:

- The published block diagram draws the AXI slave between the controller
  and the RAM. The synthesised hierarchy, which this design follows, puts
  the slave in front of the controller. The controller in turn drives the
  RAM.
- The published text gives the RAM as "32-bit width and 8-bit depth". The
  synthesised RAM has a 14-bit address and a 39-bit word, and this design
  follows it.
- AXI4 allows bursts of up to 256 beats. The top's 4-bit length ports limit
  bursts to 16 beats. `axi4_slave` itself takes 8-bit lengths, and its own
  testbench runs a 256-beat burst.
- The AXI slave has no `awsize`/`arsize` inputs, so narrow transfers are
  done only through byte strobes.
- IDs are not brought out at the top. `bid`/`rid` exist only on
  `axi4_slave`. The AXI3-style `axi_wid` input is present and unused.
- Reads and writes share the controller one at a time, although the RAM has
  independent ports. A pipelined controller could overlap them.

## Files

- `rtl/zmc_pkg.sv`: widths, AXI encodings, register addresses, ECC
  functions.
- `rtl/zmc_axi4_top.sv`: the top.
- `rtl/axi4_slave.sv`, `rtl/mem_ctrl.sv`, `rtl/csr_registers.sv`,
  `rtl/ecc_encoder.sv`, `rtl/ecc_decoder.sv`, `rtl/dual_port_ram.sv`: the
  blocks. Each file opens with a description of its interface and timing.
- `tb/tb_<block>.sv`: one self-checking testbench per block.
- `tb/tb_zmc_axi4_top.sv`: the end-to-end test at default parameters. It
  covers initialisation, latency and burst throughput, random
  FIXED/INCR/WRAP traffic with byte strobes and backpressure, ECC
  correction, detection, injection and disable, status clear, out-of-range
  addresses, a misplaced `wlast`, simultaneous reads and writes, software
  reset and re-initialisation. It counts each of these and fails if one
  never happened.
- `tb/tb_six_words.sv`: stores six words at addresses 0h–5h, reads them
  back and updates one byte.

`axi4_slave` carries concurrent assertions for the AXI rule that VALID and
its payload stay stable until READY. `mem_ctrl` has matching assertions for
its request/done handshake: a request and its payload stay up until done,
and done never comes without a request. Run with `--assert` to enable them.

## Simulating

Each testbench prints one line `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/zmc_pkg.sv tb/tb_zmc_axi4_top.sv --top-module tb_zmc_axi4_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. The end-to-end test
simulates about 48,000 clock cycles, including two full-memory
initialisations, and takes well under a minute.

# Wirelessly reconfigurable Gumnut soft-processor system

An 8-bit soft processor on an FPGA whose program can be replaced over a
wireless serial link. A remote transmitter sends the new program as plain
text through a ZigBee radio; the FPGA receives it on a UART, writes it into
the processor's instruction memory while holding the processor in reset,
and then restarts the processor on the new code. No JTAG cable or
bitstream reload is needed to change what the processor does.

This repository holds the receiver side in synthesizable SystemVerilog:
the processor (a Gumnut core), its memories, its I/O peripherals, the UART,
and the unit that turns received text into instruction-memory writes.

## System structure

```
 zigbee_rx ─► uart_rx ─► instruction_capture ──write──► inst_mem (4096 x 18)
                               │ cfg_mode                   │ Wishbone read
                               ▼                            ▼
                     core reset, LED pattern          gumnut core ──► data_mem (256 x 8)
                                                            │ port bus (Wishbone)
                                                            ▼
                                                        port_bus decoder
                                                   ┌────────┴─────────┐
                                                led_gpio           uart_tx ─► zigbee_tx
                                              (led_status)
 baud_gen: 16x bit-rate tick for both UART halves, baud_clock output
```

Top module: `wiconfig_proc_system`, ports `clk_i`, `rst_i` (synchronous,
active high), `int_req`, `zigbee_rx`, `led_status[7:0]`, `baud_clock`,
`int_ack`, `zigbee_tx`. Parameters `CLK_FREQ_HZ` (default 50 MHz) and
`BAUD` (default 9600).

## The reconfiguration protocol

The transmitter sends ASCII characters, 8 data bits, no parity, one stop
bit. `instruction_capture` interprets them:

| Character   | Effect |
|-------------|--------|
| `X`         | enter load mode: core held in reset, load address set to 0, LEDs show `8'h80` |
| `[`         | start an instruction word (only in load mode) |
| hex digit   | next 4 bits of the word, **least-significant digit first**; at most 5 digits |
| `]`         | write bits [17:0] of the word at the load address, advance the address |
| `Y`         | leave load mode: the core restarts at address 0 |
| anything else | ignored |

Example stream: `XXYX[50800][158C2][005F2]Y`. The leading `XXY` is a
harmless empty load; the last `X ... Y` loads three words:

| Address | Text      | Word    | Instruction             |
|---------|-----------|---------|-------------------------|
| 0       | `[50800]` | `00805` | `add r1, r0, 5`         |
| 1       | `[158C2]` | `2C851` | `out r1, (r0)+0x51` (LEDs) |
| 2       | `[005F2]` | `2F500` | `out r6, (r5)+0` (UART data port) |

After `Y` the LEDs change from `80` to `05` and one byte (`00`) is sent
back on `zigbee_tx`, after which the transmitter's `tx_done` flag rises.
The program then runs on through the rest of the memory (zeros, which are
no-ops) and wraps to address 0, so it repeats.

The digit order is a reading of the example, not something stated for
the original system: with least-significant-first digits the example is
exactly the program above, whereas most-significant-first gives three
instructions that never write the LEDs. To send a word `w`, send `[`, then
`w[3:0]`, `w[7:4]`, `w[11:8]`, `w[15:12]`, `{2'b00, w[17:16]}` as hex
digits, then `]`.

## The Gumnut core (`gumnut`, helper `gumnut_alu`)

8-bit data, 18-bit instructions, 12-bit PC, registers r0–r7 (r0 always
zero), flags Z and C, and three Wishbone master buses (instruction, data,
I/O port) plus `int_req`/`int_ack`.

Instruction formats (bit 17 on the left):

| Group | Encoding | Instructions |
|-------|----------|--------------|
| ALU, immediate | `0 fn3 rd3 rs3 imm8` | add addc sub subc and or xor mask (fn 0–7) |
| memory / I-O | `10 fn2 rd3 rs3 off8` | ldm stm inp out (fn 0–3), address = rs + off mod 256 |
| shift | `110 0 rd3 rs3 cnt3 000 fn2` | shl shr rol ror (fn 0–3) |
| ALU, register | `1110 rd3 rs3 r2_3 00 fn3` | as the immediate form, op2 = r2 |
| jump | `11110 fn1 addr12` | jmp, jsb |
| branch | `111110 fn2 00 disp8` | bz bnz bc bnc; target = PC + 1 + disp |
| misc | `1111110 fn3 0…` | ret reti enai disi wait stby (fn 0–5) |

`gumnut_pkg` has encoder functions for every format (`enc_alu_imm`,
`enc_mem`, …), used by the testbenches as an assembler.

Flags: ALU and shift instructions set Z on a zero result. C is the carry
of add/addc, the borrow of sub/subc, 0 after logic operations, and the
last bit shifted (or rotated) out for shifts. Other instructions leave the
flags alone.

Execution is a multi-cycle state machine: FETCH (instruction bus cycle) →
EXEC → DATA or PORT for loads/stores/I-O. With the one-wait-state memories
used here an ALU, branch or jump instruction takes 3 cycles and a memory or
I/O instruction 5.

Subroutines use an internal 8-entry return stack (`STACK_DEPTH`) that
wraps on overflow. Interrupts are taken between instructions when enabled:
the core saves PC, Z and C, disables interrupts, jumps to address 1 and
pulses `int_ack`. `reti` restores them and re-enables interrupts. `wait`
and `stby` stop the core until an enabled interrupt arrives. Reset clears
the PC, the registers and the flags.

## Memories and buses

* `inst_mem`: 4096 x 18 simple dual-port RAM. The write port comes from the
  capture unit. The read port is a Wishbone slave with a registered read
  and `ack` one cycle after the strobe. It starts all zero.
* `data_mem`: 256 x 8 RAM on the data bus, same timing.
* `port_bus`: decodes the 8-bit port address by base/mask per slave,
  multiplexes read data and ORs the acks. An address that no slave claims
  is acknowledged by the decoder itself with data 0 (and `unmapped_o`
  pulses), so a stray `inp`/`out` cannot hang the core.

All buses use classic single read / single write cycles: `cyc` and `stb`
stay high, with address and data stable, until `ack`. The core asserts
this rule.

Port map:

| Port | Block | Access |
|------|-------|--------|
| `0x00` | `uart_tx` | write: byte to send (ignored while a frame is in progress) |
| `0x01` | `uart_tx` | read: `{6'b0, tx_done, tx_busy}` |
| `0x51` | `led_gpio` | read/write: LED register |

The LED address 0x51 and the UART data address 0x00 come from the example
program above. The status port is this design's own addition.

## UART

* `baud_gen` divides the clock by `round(CLK_FREQ_HZ / (16 * BAUD))`
  (326 at the defaults, 0.15 % off 9600 bit/s) to give a 16x tick.
  `baud_clock` is a square wave at the bit rate.
* `uart_rx` synchronises the line with two flops and starts a frame on a
  falling edge. It re-checks the start bit at its middle and samples
  every bit 16 ticks apart. A good frame sets `idata` and pulses `valid`;
  a 0 stop bit pulses `frame_err_o` and drops the byte. It tolerates a
  ±3 % rate error (tested).
* `uart_tx` sends 8N1 frames of exactly 16 ticks per bit. It pulses
  `tx_start`. `tx_done` is set after the stop bit and cleared by the next
  write to the data port.

## LEDs in load mode

`led_gpio` shows `8'h80` (LED 7 only) while `cfg_mode` is high and its
register otherwise. Its register is reset with the core, so a new program
starts with the LEDs off.

## Departures and open points

* Only the receiver is RTL. The transmitting microcontroller and the radio
  modules are off-the-shelf parts. The testbenches model them as a serial
  driver (`tb/uart_host_model.sv`) and a plain wire.
* The overall concept also has a floating-point math co-processor, an
  "external communication" block and a security layer (a lightweight
  cipher) in the reconfiguration path. None of these is specified far
  enough to build, so all three are left out. The link carries plain text.
* Choices of this design rather than of the original system: clock and bit
  rate, the instruction field layout and flag rules in detail, the
  interrupt vector (address 1), the return-stack depth, the digit order of
  the protocol, the port map, the unmapped-port rule, and reset of the
  register file.
* `stby` behaves like `wait`; there is no separate low-power mechanism.

## Resources

At the defaults, generic synthesis gives about 210 flip-flops and
75,776 memory bits. The instruction memory needs four 18-Kbit block RAMs
and the data memory one, five in total, which fits a Spartan-3A XC3S700
(20 block RAMs).

## Simulation

Every block has a self-checking testbench in `tb/` that ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5, for example:

```
verilator --binary --timing --assert -y rtl -y tb rtl/gumnut_pkg.sv \
    tb/tb_wiconfig_proc_system.sv --top-module tb_wiconfig_proc_system
./obj_dir/Vtb_wiconfig_proc_system
```

`-y rtl -y tb` lets Verilator find the other modules by file name.

| Testbench | What it shows |
|-----------|---------------|
| `tb_gumnut` | random ALU and shift operations against a reference model, flags via branches, r0, loops, ldm/stm/inp, nested jsb/ret, interrupts from wait and stby, disabled interrupts, 3/5-cycle timing |
| `tb_inst_mem`, `tb_data_mem` | random writes and read-back, ack timing |
| `tb_baud_gen` | tick spacing and baud_clock period at two sizes |
| `tb_uart_rx` | 64 bytes at nominal and ±3 % rates, receive latency, framing error, glitch rejection |
| `tb_uart_tx` | frame contents and bit length, status port, write-while-busy |
| `tb_instruction_capture` | the example stream, odd inputs, restart, 200 random words |
| `tb_led_gpio`, `tb_port_bus` | address decoding, load pattern, unmapped ports |
| `tb_wiconfig_proc_system` | full system at default parameters: the example stream (LEDs 80 → 05, byte echoed, tx_done), then a second program over the air using data memory, a subroutine, an unmapped port, UART output and three interrupts |

The system test runs about 9 million clock cycles and takes a few seconds.

# PLC System IP: a PLC program as a hardwired AXI peripheral

A programmable logic controller (PLC) runs its control program as an
instruction list on a stack machine: load a contact into an accumulator,
AND/OR further contacts into it, write the result to a coil, and repeat for
every rung of the ladder diagram. This design takes such an instruction list
and fixes it in hardware. The program is not fetched from a memory; it is a
parameter of the RTL, so synthesis turns each instruction into a step of a
dedicated sequencer.

The hardwired program is packaged as a peripheral of an embedded processor
(the target is a Zynq-7000-class FPGA with an ARM processing system). The
processor keeps the application software; when it needs one scan of the
control logic it:

1. writes `CTRL.start` over AXI4-Lite,
2. has a DMA engine stream the current relay image into the IP over a 16-bit
   AXI4-Stream,
3. waits for the finish flag (by polling `CTRL.done` or through `irq`),
4. and receives the updated relay image back on the output stream.

The design follows the structure of the PLC System IP described by Fujieda,
Ichikawa, Ishigaki and Tanaka in "Evaluation of the hardwired sequence control
system generated by high-level synthesis". In that work the IP was produced by
a high-level synthesis tool from C code; here it is written directly in
SystemVerilog, with the structure they describe for their hand-written HDL
variant. Everything this RTL decides on its own is listed under
[Departures and own choices](#departures-and-own-choices).

## Block structure

```
             AXI4-Lite (32-bit)                         irq
                  |                                      ^
            +-----v------+     +----------------+    +---+-----+
            | axil_slave |---->| plc_controller |--->| irq_gen |
            +------------+     +--+----+-----+--+    +---------+
                                  |    |     |
     AXI4-Stream in (16-bit)      |recv|     |exec
            |                     |send|     |
      +-----v-----+   +-----------v----+--+  |     AXI4-Stream out
      | axis_skid |-->|  data_converter   |--+--> axis_skid --> (16-bit)
      +-----------+   +---------+---------+  |
                        port A  | word       |
                      +---------v---------+  |
                      |    relay_mem      |  |
                      | 2 x dp_bram banks |  |
                      +---------^---------+  |
                        port B  | relay      |
                      +---------+---------+  |
                      |    plc_coproc     |<-+
                      +-------------------+
```

| File | Block | Role |
|---|---|---|
| `rtl/plc_pkg.sv` | package | instruction encoding, sizes, register offsets |
| `rtl/plc_system.sv` | top | wires the blocks below; the IP's ports |
| `rtl/axil_slave.sv` | AXI4-Lite interface | bus transactions to register strobes |
| `rtl/plc_controller.sv` | controller | registers, phase sequencing |
| `rtl/irq_gen.sv` | IRQ | interrupt enable/status, `irq` |
| `rtl/axis_skid.sv` | AXI4-Stream in / out | register slice at each stream port |
| `rtl/data_converter.sv` | data converter | chars on the stream to relay bits in BRAM and back |
| `rtl/relay_mem.sv`, `rtl/dp_bram.sv` | dual-port BRAM | the relay image |
| `rtl/plc_coproc.sv` | PLC co-processor | the hardwired program |

The processor, the DMA engine, the processing-system ports and the DDR
memory around the IP are not part of this RTL. The top-level ports are
exactly the signals that would connect to them. The top-level testbench plays
the processor and the DMA engine.

## The hardwired program (`plc_coproc`)

### Instruction list semantics

The stack machine has a 1-bit accumulator `Acc` and an accumulator stack.
The RTL implements the three instructions of the reference example:

| Instruction | Effect |
|---|---|
| `LD d`  | push `Acc` onto the stack, then `Acc = d` |
| `ANI d` | `Acc = Acc & ~d` |
| `OUT d` | `d = Acc` |
| `NOP`   | nothing (padding) |

`d` is a relay device: an input relay `X<n>` or an output relay `Y<n>`.
The default program is one ladder rung: a normally-open contact X1 in series
with a normally-closed contact X2 driving coil Y1:

```
LD  X1
ANI X2
OUT Y1        ->  Y1 = X1 & ~X2
```

### From instruction list to circuit

The program is the parameter `PROG`, an array of `plc_pkg::instr_t`
(opcode, X/Y flag, 8-bit device number). A program counter walks the array,
and `PROG[pc]` is a constant table indexed by the counter. Synthesis reduces
this table and the opcode decode to plain logic, so there is no instruction
memory. Because every operand lives in a block RAM behind one port, the
co-processor is a *sequential* design: one instruction per step, and each
relay access waits for the memory. The block RAM serializes the accesses, so
a design that evaluates independent rungs in parallel would gain little here.

### Timing

A step that reads a relay (`LD`, `ANI`) takes two cycles: the address is
presented, then the data is used. `OUT` and `NOP` take one cycle. `done`
follows one cycle after the last step:

```
cycles(start -> done) = 2 * (#LD + #ANI) + #OUT + #NOP + 1
```

The default program therefore runs in 6 cycles.

`Acc` and the stack are cleared at every start. The stack is `STACK_DEPTH`
entries deep (default 8). A push onto a full stack drops the oldest entry,
and `stack_depth` saturates. None of the implemented instructions pops the
stack, so it can only be observed through the `acc`, `stack_depth` and
`acc_stack` ports. The top leaves these ports unconnected.

An elaboration-time check rejects a program that names a relay outside the
image.

## The relay image and the stream format

The image holds `N_X` input relays followed by `N_Y` output relays. The
default is 16 + 16, so relay `X<n>` has index `n` and `Y<n>` has index
`16 + n`. On the stream each relay is one 8-bit char, and each 16-bit beat
carries two chars:

| Beat `k` bits | Relay |
|---|---|
| `[7:0]`  | relay `2k` (bit 0 is the value, bits 7:1 are ignored) |
| `[15:8]` | relay `2k+1` (bit 8 is the value) |

A run transfers the whole image in both directions: `(N_X+N_Y)/2` beats
in, then the same number back. Output chars are always `0x00` or `0x01`, and
`m_axis_tlast` marks the last beat. The receive phase counts beats; it does
not rely on `s_axis_tlast`.

### Memory organisation (`relay_mem`)

After conversion, each relay is one bit in BRAM. The image is split over two
single-bit dual-port banks: relay `r` is at word `r/2` of bank `r%2`. This
places the two relays of a beat at the same address in different banks.

- **Port A** (stream side) reaches one word in both banks at once. The data
  converter therefore writes or reads a whole beat per access.
- **Port B** (co-processor side) reaches one relay by its flat index. The
  bank is chosen from bit 0 of the index, and the read data is picked with a
  registered copy of that bit.

Both ports have one cycle of read latency and read the old contents on a
write. If both ports write the same address, port B wins. The controller
never lets both ports work at once; an assertion in the top checks this.

## Control and registers

All registers are 32 bits wide, at byte offsets on the AXI4-Lite slave
(6-bit address):

| Offset | Name | Bits |
|---|---|---|
| `0x00` | CTRL | `[0]` start: write 1 to request a run; reads 1 until that run ends. `[1]` done: set when a run ends, cleared by reading CTRL. `[2]` idle |
| `0x04` | GIE | `[0]` global interrupt enable |
| `0x08` | IER | `[0]` enable the end-of-run interrupt |
| `0x0C` | ISR | `[0]` end-of-run status; write 1 to clear |

`irq = GIE & IER & ISR` is a registered level output. Other offsets read as
zero, and so do the unused bits of each register. Each write is accepted
once both AW and W have arrived, in either order. Only one write and one read
are in flight at a time, and the responses are always OKAY.

A run moves through three phases. Each phase is started by a one-cycle pulse
from `plc_controller` and ended by a done pulse from the block doing the
work:

| Phase | Block | Duration (default size, no stalls) |
|---|---|---|
| RECV | `data_converter` | 1 cycle per beat: 16 cycles |
| EXEC | `plc_coproc` | 6 cycles with the default program |
| SEND | `data_converter` | 2 cycles per beat (BRAM read, then present): 33 cycles |

Each hand-off between phases adds one cycle, and each stream port adds one
cycle of register-slice latency. With the default program, and a DMA engine
that starts one cycle after the start write and never stalls, `CTRL.start`
stays set for 61 cycles. The input slice holds two beats, so the DMA
may start streaming before `start` is written.

## Departures and own choices

The points below are decided by this RTL. The source design either leaves
them open or builds them differently.

- **How the IP is made.** The reference IP was generated by high-level
  synthesis from C, so its internal scheduling is not public. This RTL uses
  the hand-written HDL arrangement described alongside it: one BRAM port for
  the stream and the other for the co-processor, each scheduled on its own.
  The co-processor steps through the program one instruction at a time.
- **Instruction set.** Only `LD`, `ANI` and `OUT` are built, plus `NOP`.
  The evaluated control programs also use word data with multiply and divide
  instructions, which the reference executes on multi-cycle units. Their
  encoding and operands are not specified, so there is no multiplier,
  divider or word memory here. Those programs (PID with 21 instructions, YNK
  with 165, a plant controller with 3755) cannot run on this design, and
  their instruction lists are not available anyway.
- **Sizes and encodings.** These are all this design's own:
  - the 16 + 16 relay image;
  - the 8-bit device number;
  - the 2-bit opcode;
  - the 8-entry stack;
  - the use of char bit 0;
  - placing char 0 in the low byte;
  - the register map;
  - the 6-bit AXI4-Lite address.

  The 16-bit stream, the two chars per beat and the 32-bit AXI4-Lite data
  width come from the reference.
- **BRAM banking.** The reference draws the BRAM as a stack of memories
  without a count. Two banks, one per char of a beat, is this design's
  choice.
- **Stream ports.** The reference names the AXI4-Stream in and out ports.
  The two-entry skid buffers at those ports are this design's choice.
- **Reset.** The reset is asynchronous and active low.

## Simulating

Every testbench is self-checking. Each prints one line,
`TB_RESULT checks=<n> failures=<m>`, and ends with `$finish`. Each also has a
cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/plc_pkg.sv \
    rtl/axil_slave.sv rtl/axis_skid.sv rtl/data_converter.sv rtl/dp_bram.sv \
    rtl/irq_gen.sv rtl/plc_controller.sv rtl/plc_coproc.sv rtl/relay_mem.sv \
    rtl/plc_system.sv tb/tb_plc_system.sv --top-module tb_plc_system
./obj_dir/Vtb_plc_system
```

Swap the testbench file and `--top-module` to run the others. A block
testbench needs only `plc_pkg.sv`, its block and the block's sub-modules.

| Testbench | What it covers |
|---|---|
| `tb_plc_system` | End to end at the default parameters. It plays the processor and the DMA engine for 60 runs on random images and checks the returned image against Y1 = X1 & ~X2. It checks the 6-cycle program phase, irq, the clear-on-read done flag and ISR clearing. It requires input gaps, input back-pressure (data before start), output back-pressure, a stack push and both values of Y1 to occur. |
| `tb_plc_system_prog` | The same flow with a 14-instruction program that reads back its own outputs and overflows a 4-entry stack. The result is compared with a software interpreter; the program phase takes 24 cycles. |
| `tb_plc_coproc` | The default and the long program against a behavioural memory. It checks the image, `Acc`, the stack and the exact cycle count. |
| `tb_relay_mem` | Word writes and relay reads, relay writes and word reads, read-before-write. |
| `tb_data_converter` | Unpacking and packing, tlast, 1 beat per cycle in and 2 cycles per beat out, random gaps and back-pressure. |
| `tb_axis_skid` | Order and loss under random valid/ready, full throughput, latency. |
| `tb_axil_slave` | AW/W in any order, byte strobes, response hold. |
| `tb_plc_controller` | Phase order, start/done/idle flags, interrupt register decode. |
| `tb_irq_gen` | Register model comparison, set-versus-clear priority. |

The simulator is two-state. Every flop that is read is reset, and the BRAM
content is always written before it is read.

## Changing the program

Write the instruction list as a `plc_pkg::instr_t` array and pass it to the
top together with its length:

```systemverilog
localparam plc_pkg::instr_t MY_PROG [4] = '{
  '{plc_pkg::OP_LD,  plc_pkg::DEV_X, 8'd0},
  '{plc_pkg::OP_ANI, plc_pkg::DEV_Y, 8'd3},
  '{plc_pkg::OP_OUT, plc_pkg::DEV_Y, 8'd3},
  '{plc_pkg::OP_OUT, plc_pkg::DEV_Y, 8'd4}};
plc_system #(.PROG_LEN(4), .PROG(MY_PROG)) u_plc (...);
```

`N_X` and `N_Y` set the image size. Keep `N_X + N_Y` even, because every
beat carries two relays. `STACK_DEPTH` sets the stack size.

## Known limits

- There is no instruction for OR, parallel branches (ANB/ORB), stack pops,
  timers, counters or word data, so a real ladder program usually needs more
  than this instruction set.
- The whole relay image crosses the bus on every run. Bus transfer time,
  not the program, dominates each call; the next point is the fix.
- A faster controller would keep the relays in flip-flops and drive
  dedicated I/O pins, rather than a BRAM image exchanged over a bus.
- Some output bits are constant by construction:
  - the upper seven bits of each output char;
  - the unused register bits;
  - the AXI response codes.

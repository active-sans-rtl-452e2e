# Active SAN interface card: computing on messages in transit

In a cluster joined by a system area network, much of the data that moves
between nodes is also transformed on the way: checksummed, encrypted,
reduced, copied. This design puts that work on the network side of the host.
An FPGA card sits on the PCI bus beside the network interface. Hosts, the
network interface and other peripherals send it messages in the style of
active messages: each message names a circuit (the handler), the input
vectors it works on, and a *forwarding identifier* that says what happens to
the result. The result can stay in the card's scratchpad memory, be fed
through another circuit on the same card ("recycled"), or be sent on as a new
message to another endpoint, which may be the next FPGA in a pipeline of
stages spread over several nodes. A message for a circuit that is not loaded
raises a *function fault* for the host, much like a page fault.

The RTL here is the FPGA configuration of such a card plus the card's memory
arbiter. It is written in synthesizable SystemVerilog (IEEE 1800-2017).

## Card organisation

```
            PCI side (host CPU, network interface)
                 | host_req/host_gnt, host_mem[4]
   +-------------v--------------------------------------------+
   | cpld_bank_arbiter: per-bank owner (FPGA / PCI / none)    |
   |                    and bank switch                       |
   +---^--------------------------------------------------|---+
       | fpga_req/gnt, fpga_mem[4]                        | sram_mem[4], sram_rdata[4]
   +---|-----------------------------------------+        v
   | fpga_control_block                          |   SRAM bank 0: incoming queue,
   |   message sequencer, directory handler,     |                forwarding directory
   |   function-fault flush/restore              |   SRAM bank 1: scratchpad, low 2 MB
   |   sram_interface (one access/bank/clock)    |   SRAM bank 2: scratchpad, high 2 MB
   |   vector_reader A, vector_reader B,         |   SRAM bank 3: outgoing queue
   |   vector_writer C                           |
   +--------|--- ports A, B, C (ckt_in_t/ckt_out_t)
   +--------v------------------------------------+
   | user_area: builtin_circuit  (id 0x00)       |
   |            alu_user_circuit (id 0x01)       |
   |            rc6_user_circuit (id 0x02)       |
   |            md5_user_circuit (id 0x03)       |
   |            des_user_circuit (id 0x04)       |
   +---------------------------------------------+
```

The four SRAM banks are single ported, 2 MB each, 32 bits wide. Each bank
belongs to exactly one side at a time. The FPGA takes banks 1 and 2 at reset
and keeps them. It takes banks 0 and 3 only while it handles a message, so that
hosts and the network interface can fill the incoming queue and empty the
outgoing queue in between.

| File | Role |
|------|------|
| `rtl/asan_pkg.sv` | Types, memory map, header and directory formats, operation codes |
| `rtl/asan_card.sv` | Top: arbiter + control block + user area |
| `rtl/cpld_bank_arbiter.sv` | Bank ownership and switching between FPGA and PCI side |
| `rtl/fpga_control_block.sv` | Message sequencer, directory handler, fault handling |
| `rtl/sram_interface.sv` | Routes controller and port accesses onto the banks |
| `rtl/vector_reader.sv` | Ports A and B: linear vector reads |
| `rtl/vector_writer.sv` | Port C: linear vector writes |
| `rtl/user_area.sv` | Holds the circuits, selects one by identifier |
| `rtl/builtin_circuit.sv` | Built-in vector ALU and copy |
| `rtl/alu_user_circuit.sv` | "ALU operations" user circuit |
| `rtl/rc6_user_circuit.sv` | RC6 encryption/decryption user circuit |
| `rtl/md5_user_circuit.sv` | MD5 digest user circuit |
| `rtl/des_user_circuit.sv` | DES encryption/decryption user circuit |
| `rtl/ew_engine.sv`, `rtl/sync_fifo.sv` | Helpers: element-wise engine, small FIFO |

## Memory map and message format

All addresses are 32-bit word addresses within a bank.

Bank 0:

| Words | Contents |
|-------|----------|
| 0 | in-queue head (slot index, written by the FPGA) |
| 1 | in-queue tail (slot index, written by the producer) |
| 2, 3, 4 | state flushed on a function fault: in-queue head, out-queue tail, missing circuit id |
| 256-511 | forwarding directory, 256 entries |
| 1024 + k*1032 | incoming slot k, k = 0..IQ_SLOTS-1 |

Bank 3 has the out-queue head (word 0, written by the consumer), the
out-queue tail (word 1, written by the FPGA) and outgoing slots from word
1024. A queue is empty when head = tail and full when tail + 1 = head
(modulo the slot count), so it holds one message fewer than it has slots.

A slot is 1032 words: a 6-word header, two spare words and up to 1024 words
(4 KB) of payload starting at word 8.

| Header word | Meaning |
|-------------|---------|
| 0 | `[31:24]` circuit id, `[23:16]` sub-operator, `[15:8]` forwarding id |
| 1, 2 | vector A address and length in words |
| 3, 4 | vector B address and length (length 0: no B) |
| 5 | vector C address (where a stored result goes) |

A vector address with bit 31 set is an offset into the payload of the message
itself. Otherwise bits 19:0 address the 4 MB scratchpad: bit 19 = 0 is bank 1,
bit 19 = 1 is bank 2, and a vector may run from bank 1 into bank 2.

A forwarding-directory entry is one word:

| Bits | Field |
|------|-------|
| 31:30 | action: 0 store, 1 recycle, 2 forward, 3 treated as store |
| 29:24 | destination endpoint (forward) |
| 23:16 | next circuit id |
| 15:8 | next sub-operator |
| 7:0 | next forwarding id |

Circuit id 0xFF is not a circuit: it is the directory-update handler. Its A
vector is a list of word pairs (directory index, new entry).

## How a message is handled

The control block runs one sequence at a time. Clock counts are for this RTL
with the SRAM answering reads one clock after the request.

1. Every `POLL_INTERVAL` clocks (64) it asks for banks 0 and 3 and waits for
   both grants (2 clocks when they are free).
2. It reads the in-queue tail and the out-queue head. If the in-queue is
   empty it gives the banks back and waits for the next poll.
3. It reads the 6 header words, one per clock (7 clocks).
4. Circuit id 0xFF goes to the directory handler. Any other id is looked up
   in the user area; if it is not loaded, see *Function faults* below.
5. It reads the directory entry of the forwarding id (2 clocks).
6. For a forward, if the outgoing queue is full it gives the banks back
   and leaves the message where it is; the next poll tries again.
7. It starts ports A, B and C and the circuit. Port C writes to the header's
   C address, or, for a forward, into the payload of the next outgoing slot.
   With A, B and C on different banks every port moves one word per clock,
   and a circuit adds one clock of latency, so a 4 KB copy streams in about
   1029 clocks. Ports on the same bank share it (controller, then C, then A,
   then B) and run slower.
8. Recycle: the result becomes vector A (no B) of the entry's next circuit,
   with the entry's next sub-operator and forwarding id, and is written back
   in place at C. Control returns to step 4.
   Forward: the outgoing slot gets a header that is ready to run at the next
   stage (next circuit, sub-operator and forwarding id; A = its own payload
   with the result's length; no B; the same C address) and, in word 7, a
   routing word `{dest[31:24], length[15:0]}` for the network interface. Then
   the out-queue tail advances.
9. The in-queue head advances and banks 0 and 3 are released.

The order of these steps and the single ownership of banks 0 and 3 for a whole
message come from the source design. The source design's own timing table
gives larger counts for some steps: 8 clocks to acquire, 5 for the directory
read, 48 to store the outgoing header and 3 to update the pointers. Its
memory interface is not described. Here the counts are what the simpler
interface needs. The 7-clock header fetch, the one-word-per-clock payload
stream and the one-clock compute latency agree with it.

## Function faults

When the named circuit is not loaded, the control block writes its runtime
state to bank 0: the in-queue head, the out-queue tail and the missing id.
It then releases banks 0 and 3 and raises `func_fault` with `fault_cid`. The
scratchpad banks stay with the FPGA. Nothing else happens until the host
pulses `fault_clear`. The control block then reads the head and the tail back
from words 2 and 3 and resumes polling. If the host has loaded the circuit
meanwhile (a new FPGA configuration), the faulting message runs. If instead
the host did the work itself and advanced the saved head (and the in-queue
head), the message is skipped. At reset the control block loads the same two
values from the live queue pointers (bank 0 word 0, bank 3 word 1), which
software must set before releasing reset.

Loading a configuration is outside the RTL.

## Bank arbitration

`cpld_bank_arbiter` keeps an owner per bank. A side requests a bank by
raising its request line and releases it by lowering it. A free bank goes to
the first side that asks; the grant is registered (one clock). An owner keeps
the bank until it lets go, and a waiting request of the other side then gets
it at the next clock. If both sides ask for a free bank in the same clock, the
FPGA wins. Each bank port carries the access of its owner. Read data goes to
both sides, and only the owner makes use of it.

The PCI side is a single requester here. On the original card several hosts
and the network interface share one PCI register for bank requests. The
network interface merges their requests in software, which is not part of
this RTL.

## Circuits

Every circuit sees the same bundle (`ckt_in_t`): a start pulse, the
sub-operator, the A and B lengths, valid/data for A and B, and ready for C.
It returns ready for A and B, valid/data for C and a `done` level
(`ckt_out_t`). The user area broadcasts the inputs to all circuits. Only the
circuit whose id matches gets the start pulse and C ready, and only its outputs
come back.

Built-in circuit (id 0x00), sub-operator in bits 3:0: 0 copy A, 1 copy B,
2 add, 3 multiply (low 32 bits), 4 AND, 5 OR, 6 XOR, 7 min, 8 max.

ALU user circuit (id 0x01): 0 add, 1 subtract (A-B), 2 multiply, 3 min,
4 max, 5 AND, 6 OR, 7 XOR, 8 NOT A.

Min and max compare signed. Operations on two vectors produce as many words
as the shorter vector has. An unknown sub-operator produces an empty result.

The three cipher and digest circuits are written from the published
definitions of the algorithms. Each is iterative and does one round or step
per clock. Byte order inside a word is little-endian for RC6 and MD5, as those
algorithms define it. DES numbers its bits from the left, so for DES the first
word holds the first 32 bits of a 64-bit value.

RC6 user circuit (id 0x02), RC6-32/r/b with r up to 1024 and keys up to 1024
bytes. Sub-operator 0 encrypts and 1 decrypts. Vector B holds the round
count r, the key length b in bytes, and then the key. Vector A holds 128-bit
blocks, four words each. Every message first runs the key schedule: 2r+4
clocks to fill the round-key table, then 3*max(key words, 2r+4) mixing
clocks. After that each block takes r+10 clocks. The round keys live in a
2052-word array.

MD5 user circuit (id 0x03), sub-operator 0. It digests vector A as a message
of 4*a_len bytes and pads the message itself. It writes the 128-bit digest as
four words. A 64-byte block takes 80 clocks: 16 to load and 64 steps. The 64
round constants are computed when the design is elaborated, from
floor(2^32 * |sin(i+1)|).

DES user circuit (id 0x04). Sub-operator 0 encrypts and 1 decrypts.
Vector B is the 64-bit key in two words. Its parity bits are ignored, which
leaves 56 key bits. Vector A holds 64-bit blocks, two words each. A block
takes 20 clocks. Round keys are produced on the fly by rotating the key halves.

In all three circuits a bad sub-operator or an out-of-range key vector
produces an empty result.

The user area is sized for up to eight user circuits
(`MAX_USER_CIRCUITS`); four are loaded. To add one, instantiate it in
`user_area.sv` with the same two struct ports and put its id in the `IDS`
list, which also drives the presence lookup.

## What is not here

- SRAM chips, the PCI bridge, the network interface, the host: outside the
  FPGA. The SRAM ports and the PCI-side handshake are ports of `asan_card`.
- FPGA reconfiguration: only the fault handshake around it is modelled.
- The future single-chip card with the network interface, transceivers and
  processor inside the FPGA.

## Design choices not fixed by the source

The source design keeps a set of incoming and outgoing queues per pair of
endpoints in a host. This card has one incoming queue and one outgoing queue,
and all senders share them. The routing word of an outgoing message says
where it goes.

These are this design's own: word layouts of the header, directory entry,
routing word and queues; 64-slot queues; 64-clock polling; circuit ids;
the recycle semantics (result becomes A, written in place); the wait when the
out-queue is full; the bank priority inside the FPGA; the registered grant and
the tie rule of the arbiter; signed min/max; the valid/ready stream protocol;
asynchronous active-low reset. The same goes for how the RC6, MD5 and DES
circuits take their keys and data and for their structure. The source design
wrapped an existing DES core and describes it as working on "32-bit blocks
with a 56-bit key". Here that is read as a core that moves data 32 bits at a
time, because a DES block itself is 64 bits.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/asan_pkg.sv tb/tb_asan_card.sv --top-module tb_asan_card -o sim
./obj_dir/sim
```

Replace `tb_asan_card` with another testbench name to run that one.
`tb/sram_bank_model.sv` is a behavioural model of one SRAM bank. It reads with
a one-clock latency and starts zeroed.

`tb_asan_card` runs the card at its default sizes (2 MB banks, 64-slot
queues). A host model writes messages through the arbiter. The test installs
directory entries with the handler, runs a stored ADD and a forwarded 4 KB
copy, and checks the 7-clock header fetch and a stream of at most 1030
clocks. It then runs a multiply of two payload vectors, whose ports collide
on bank 0, recycled through NOT. Next come an RC6 encryption, an MD5 digest
and a DES encryption, each checked against a published test vector. It
triggers a function fault that the host
resolves, and fills the outgoing queue until the FPGA waits. Last, it runs a
two-stage pipeline. An ADD is forwarded, and the outgoing message is fed back
in as the next stage would receive it. That stage runs NOT on the sum with
the header the first stage wrote, and stores the result. It counts every
one of these mechanisms and fails if one never happens. It takes well under a
second.

`tb_fpga_control_block` tests the controller alone, with 4-slot queues.
The other testbenches drive single blocks with random stalls and compare
against results computed in the testbench. The RC6, MD5 and DES tests also
check published test vectors, and the RC6 test runs the largest size: 1024
rounds with a 1024-byte key.

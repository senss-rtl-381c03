# SENSS bus security for a shared-bus multiprocessor

In a symmetric multiprocessor, cache-to-cache transfers cross an external bus. Anyone with a probe on the bus can read them, and anyone who can drive the bus can change them. This RTL adds a **Security Hardware Unit (SHU)** between each processor and the bus. The SHUs encrypt every cache-to-cache transfer of a protected program. They also check, at regular intervals, that all processors running the program saw exactly the same sequence of messages.

The key idea is to keep the cipher off the critical path. Each transfer is XORed with a *mask*, in the manner of a one-time pad. All processors of a program see every message of that program, so they all compute the next mask the same way: AES of the ciphertext just seen. That takes 80 cycles, but it runs in the background. Sending then costs one XOR cycle and receiving costs two.

Everything runs on the processor clock (1 GHz in the reference machine). The bus runs at one transfer every 10 processor cycles (100 MHz).

## Blocks

| module | what it is |
|---|---|
| `senss_pkg` | Bus widths (5-bit PID, 10-bit GID, 8-bit interval), message types, configuration operations, round-robin helper |
| `aes_pkg` | AES-128 round functions; the S-box is computed from its GF(2^8) definition |
| `aes128_pipe` | Fully pipelined AES-128 encryptor: one block per cycle, result exactly `LAT` (80) cycles later |
| `gp_matrix` | Group/processor bit matrix: which processors belong to which program group |
| `group_info_table` | Per-group secrets: occupied bit, session key, authentication interval, mask slots, MAC chains |
| `bus_arbiter` | Round-robin arbiter: one transfer per bus cycle, and the owner may hold the bus |
| `shu` | One processor's security unit: send, snoop, decrypt, mask update, authentication, alarms |
| `senss_top` | `NPROC` SHUs, the arbiter and the bus; processors and main memory connect through its ports |

```
 CPU0        CPU1        CPU2        CPU3          main memory / other agent
  |           |           |           |                    |
 SHU0        SHU1        SHU2        SHU3                ext_* port
  |  gp_matrix, group_info_table, aes128_pipe inside each SHU
  +-----------+-----------+-----------+--------------------+
                 shared bus: type[1:0] | GID[9:0] | PID[4:0] | data[255:0]
                 granted by bus_arbiter (NPROC+1 requesters)
```

## Groups

A protected program runs on a *group* of processors, and each group has a 10-bit group id (GID). Every protected bus message carries its GID and the sender's PID. Each SHU keeps two tables, indexed by GID:

* **Group/processor matrix** (`gp_matrix`). This is one 32-bit row per GID, with bit p set when processor p is a member. An SHU only keeps the rows of groups it belongs to, so the row of any other group reads as zero. A snooped message is decrypted only if bit (GID, PID) is set. Any other message is discarded, and the discard is counted in `n_discard`.
* **Group information table** (`group_info_table`). Each entry holds:
  * an occupied bit;
  * the 128-bit session key;
  * the 8-bit authentication interval;
  * `NMASK` mask slots and `NMASK` MAC chains, each 256 bits wide.

  The lowest unoccupied GID is always offered on `alloc_gid`.

Group set-up is done by software through the configuration port (`cfg_en/cfg_op/cfg_gid/cfg_slot/cfg_data`). That software stands for the operating system plus the processor's trusted key-handling path. The steps are:

1. Read `alloc_gid`, then issue `CFG_OCCUPY` on **every** processor, members or not. This way no two programs can share a GID.
2. `CFG_ROW` with the member bit vector in `cfg_data[31:0]`. A non-member stores an empty row.
3. On members: `CFG_KEY` (`cfg_data[127:0]`) and `CFG_CTR` (the interval; 0 disables authentication).
4. On members, for every slot: `CFG_MASK` and `CFG_MAC`, with the same random initial values on all members.
5. When the program ends: `CFG_RELEASE` on every processor.

How the key and initial vectors reach the members securely is a public-key protocol outside this RTL. The configuration port is where its results are written.

## One transfer, cycle by cycle

Message n of a group uses slot `n mod NMASK`. Every SHU has its own copy of the slot pointer, and all copies advance on the same bus messages.

| cycle | sender SHU | every member SHU (sender included) |
|---|---|---|
| G | Holds the bus grant and its slot is free: `c = data ^ mask[slot]` is registered and `tx_ready` pulses | |
| G+1 | `c`, type 11, GID and PID on the bus | Matrix lookup and mask read; the slot pointer and message count advance; the slot is marked busy |
| G+2 | | `data = c ^ mask` |
| G+3 | | `rx_valid` with data, GID and PID (not on the sender) |
| G+3 … | | Four operations enter the SHU's AES pipeline on consecutive cycles: the new mask `AES_k(c ^ PID)` for the low and high 128 bits, and the new MAC chain `AES_k(mac ^ data ^ PID)` for both halves |
| ≈G+87 | | The last result is written back and the slot is free again |

The sender passes its own message through the same snoop pipeline, without delivering it to itself. That makes all members mark a slot busy and free it in the same cycle, so they always agree on when it can be reused.

The slot is chosen only **after** the sender owns the bus. Two processors that want to send at the same moment therefore cannot both encrypt with the same slot.

## Why a sender sometimes waits

A slot is reused every `NMASK` messages of its group. With 8 slots and one message per 10-cycle bus cycle, that gives 80 cycles. A slot is busy for about 86 cycles: 2 snoop cycles, 4 AES issue cycles and 80 cycles of AES latency. If the bus owner finds its slot still busy, it keeps the grant and waits. The wait is counted in `n_stall`, and the bus stays idle meanwhile.

Light traffic never waits. Back-to-back traffic of a single group does, as the table below shows. Fewer slots make it much worse. These are measured results from `tb_senss_workload`: 4 processors, one 4-member group, 200 transfers sent as fast as the bus accepts them.

| masks | interval 100: cycles per transfer | interval 10 | interval 1 |
|---|---|---|---|
| 1 | 86.6 | 87.6 | 97.5 |
| 2 | 43.2 | 45.1 | 97.5 |
| 4 | 21.7 | 27.7 | 97.5 |
| 8 | 11.2 | 19.0 | 97.5 |

The ideal is 10 (one transfer per bus cycle). With interval 1, every transfer is followed by an authentication. An authentication is sent only once all MAC updates of its group have been written back (see below), so the group's traffic serialises on the AES latency however many slots there are. Programs with sparser sharing traffic do not see this.

## Authentication

Encryption alone does not reveal a dropped, reordered, replayed or injected message; the masks simply diverge. So each member also keeps a CBC-MAC chain of everything the group sent, plaintext and originating PID included, per slot and per 128-bit half. The chains start from initial vectors that differ from the masks.

Each SHU counts its group's messages. When the count reaches the group's interval, the next initiator sends an authentication message (type 00). The initiator is the next member in PID order after the previous initiator, starting with the lowest PID. The message carries the XOR of all 2×`NMASK` MAC chains of the group. It is sent only once no update of that group is still pending.

Every member compares the message with its own digest. A match is counted in `n_auth_ok` and restarts the count. Until the authentication has been sent, members do not start new transfers of that group.

`alarm` is sticky. `alarm_cause` tells why it was raised. `senss_top` also ORs all the alarms into `alarm_global`, which the processors are meant to treat as a signal to halt the program.

| bit | cause |
|---|---|
| 0 | The authentication digest differs from this SHU's own |
| 1 | A data or authentication message tagged with this processor's own PID that this processor did not send (spoofing) |
| 2 | A protocol breach: data for a slot still being updated, an authentication from the wrong initiator, or an authentication while updates are pending |

## The bus

| lines | width | meaning |
|---|---|---|
| `bus_type` | 2 | 00 authentication, 01 pad invalidate, 10 pad request, 11 data |
| `bus_gid` | 10 | group of the message |
| `bus_pid` | 5 | originating processor |
| `bus_data` | 256 | encrypted data, or the authentication digest |

Types 01 and 10 belong to memory-encryption pad coherence, which is outside this design. The SHUs let such messages pass without reacting to them.

`bus_arbiter` grants one requester at a time, round-robin. Requesters `0..NPROC-1` are the SHUs and requester `NPROC` is the external agent port (`ext_*`). After a transfer (`done`), the next grant comes no sooner than `BUS_CYCLE` clocks later. An owner that keeps its request up and does not send holds the bus.

The bus is the OR of all drivers. Every agent drives it only in the cycle after it used its grant. The external port is where main memory connects, and a testbench can use it to play an attacker.

## Where this design departs from the SENSS proposal

* **Transfer width.** The bus carries 256-bit transfers and AES works on 128-bit blocks. Each slot therefore holds two mask chains and two MAC chains. The proposal sizes a table entry with 128-bit masks (1161 bits). An entry here is 1 + 128 + 8 + 8×256 + 8×256 = 4233 bits, about 542 KB per SHU for 1024 groups.
* **Separate MAC storage.** MAC chains are stored next to the masks instead of sharing the mask slots.
* **How the PID enters AES.** The PID is XORed into the low bits of the AES input. The proposal only says that the PID is an input.
* **Authentication message.** It carries the XOR of all chains of the group, so one bus transfer covers all of them.
* **Waiting for a busy slot.** The bus owner holds the bus until its slot is free. The proposal only says such a sender is delayed.
* **Message type lines.** The sender drives them; the proposal has the arbiter generate them. Data transfers use the free code 11.
* **Matrix row width.** Rows are 32 bits: one bit per possible processor. The proposal's size estimate (5 bits per row) cannot hold a member set.
* **Initial set-up.** Initial masks, MAC vectors, keys and rows are written through a configuration port. The proposal has a designated member broadcast them over the bus under a key-exchange protocol.
* **Extra checks.** The protocol-breach checks of alarm bit 2 are additions.
* **Decryption.** No AES decryption is built: the scheme only ever encrypts.

Not built: the processors, caches, main memory, the public-key unit that unwraps session keys, and the memory-side protection that the proposal combines with SENSS (pad caches for memory encryption, hash-tree integrity checking).

## Parameters and size

`senss_top` parameters, all set by default to the reference machine:

| parameter | default | meaning |
|---|---|---|
| `NPROC` | 4 | processors / SHUs |
| `GROUPS` | 1024 | group table entries (GID is 10 bits) |
| `NMASK` | 8 | mask slots per group = ⌈AES latency / bus cycle⌉ = ⌈80 / 10⌉ |
| `DATA_W` | 256 | bus data width |
| `AES_LAT` | 80 | AES latency in processor cycles |
| `BUS_CYCLE` | 10 | processor cycles per bus transfer |

At the defaults, a generic synthesis of the top gives:

* about 17k cells;
* 14k flip-flop bits;
* 19.3 Mbit of memory arrays, almost all of it in the four group information tables.

The AES pipeline has 11 register stages of real work: the initial key addition, then 10 rounds, each expanding its own round key. A delay line pads it to `AES_LAT`.

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=<n> failures=<m>` and ends with `$finish`. Compile the packages first, for example:

```
verilator --binary --timing -j 4 --top-module tb_senss_top \
  rtl/senss_pkg.sv rtl/aes_pkg.sv rtl/aes128_pipe.sv rtl/gp_matrix.sv \
  rtl/group_info_table.sv rtl/bus_arbiter.sv rtl/shu.sv rtl/senss_top.sv \
  tb/tb_senss_top.sv
./obj_dir/Vtb_senss_top
```

For `tb_senss_workload`, add `tb/senss_wl_rig.sv`. For the block testbenches, only the files that block uses are needed.

| testbench | what it shows |
|---|---|
| `tb_aes128_pipe` | FIPS-197 known-answer vectors, back-to-back blocks, latency exactly `LAT` |
| `tb_gp_matrix` | membership lookups against a model; foreign rows stay empty; release |
| `tb_group_info_table` | occupy/release and lowest-free allocation; key, interval, mask and MAC storage; AES write-back alongside configuration writes; digests |
| `tb_bus_arbiter` | round-robin order; transfers exactly one bus cycle apart; holding and dropping a grant |
| `tb_shu` | three SHUs with a bus adversary that can hide or inject messages: correct delivery, authentication, non-member discard, refused send, and alarms for a dropped message, a spoofed PID and a replay |
| `tb_senss_top` | the whole design at its default sizes; two overlapping programs on processors {0,1,2} and {2,3} with intervals 10 and 1; random and saturating traffic; a pad request from memory; GID release; a spoof through the external port. Counts stalls, authentications, initiators, discards, refusals, external transfers, allocations and the spoof alarm, and requires each to happen |
| `tb_senss_workload` | four copies of the design with 1, 2, 4 and 8 masks, each run at intervals 1, 10, 32 and 100 under peak load; checks delivery, the exact number of authentications and extra bus messages, and the timing trends in the table above |

The full-size test builds in about half a minute and runs in under a second.

To try another configuration, override the `senss_top` parameters. The slot index width follows `NMASK`; 1, 2, 4 and 8 are the values exercised by the testbenches.

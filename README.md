# AXI-4 master, interconnect and block-RAM slave on an 8-bit bus

This is a small, complete AXI-4 system: one burst-capable master, one
interconnect and one slave backed by a 256 x 8 block RAM, all on an 8-bit
data bus and an 8-bit address space. All five AXI-4 channels are used:
write address, write data, write response, read address and read data (which
carries the read response).

The master is self-checking. After a 16-clock start count it writes a known
byte pattern into the slave in INCR bursts, reads the same bursts back and
compares every byte and every response. A mismatch lands in an error
register. With the default parameters this is a short demonstration
transfer: the bytes 10, 20 and 30 go to addresses 8'h81, 8'h82 and 8'h83 in
three single-beat bursts, and are then read back. The same RTL handles bursts
of up to 256 beats, and FIXED and WRAP bursts on the slave side.

The aim is a low-cost AXI-4 link for an FPGA system on chip, small enough to
sit beside, for example, an image-processing datapath.

```
             +-------------+   m_*   +-------------------+   s_*   +-------------------+
 init_txn -->| axi4_master |========>| axi4_interconnect |========>| axi4_slave        |
 status   <--| IDLE/COUNTER|<========| write FSM (3 st.) |<========|  flagw / flagr    |
             | WRITE/READ  | AW W B  | read FSM  (2 st.) | AW W B  |  addr generation  |
             | FINAL       | AR R    | burst-length check| AR R    |  +-------------+  |
             +-------------+         +-------------------+         |  | axi4_bram   |  |
                                            |                      |  | 256 x 8     |  |
                                        proto_err                  |  +-------------+  |
                                                                   +-------------------+
```

`axi4_top` wires these together. Its ports are `aclk`, `aresetn`
(asynchronous, active low), `init_txn`, the master's status outputs and the
interconnect's `proto_err`.

## Channel bundles (`axi4_pkg`)

Each channel is one packed struct plus a separate VALID/READY pair, so
modules connect through plain ports:

| struct | fields | used by |
|--------|--------|---------|
| `ax_t` | `id, addr[7:0], len[7:0], size[2:0], burst, lock, cache[3:0], prot[2:0], qos[3:0]` | AW and AR |
| `w_t`  | `data[7:0], strb[0:0], last` | W |
| `b_t`  | `id, resp[1:0]` | B |
| `r_t`  | `id, data[7:0], resp[1:0], last` | R |

`burst_e` holds FIXED 00, INCR 01 and WRAP 10, and `resp_e` holds OKAY,
EXOKAY, SLVERR and DECERR. `next_beat_addr()` gives the next beat address for
each burst type. A WRAP burst wraps at a boundary of (AxLEN+1) x 2^AxSIZE
bytes. An INCR burst that passes 8'hFF rolls over to 8'h00. The ID is
1 bit wide.

## The master (`axi4_master`)

### Test session state machine

| state | what happens | leaves when |
|-------|--------------|-------------|
| IDLE | counters and error register cleared | `init_txn` is high |
| COUNTER | start count | 16 clocks have passed (`START_COUNT`) |
| WRITE | issues `NUM_BURSTS` write bursts, one at a time | the last write response is taken (`writes_done`) |
| READ | issues the same bursts as reads, one at a time | the last read beat is taken (`reads_done`) |
| FINAL | `c_done` set; `error` = any error seen | always, to IDLE |

`busy` is high outside IDLE. `c_done`, `error`, `err_data` and `err_kind`
hold their values until the next session starts. Tie `init_txn` high to run
sessions back to back.

### Addresses and data

Burst *j* (counted from 0) goes to `BASE_ADDR + FIRST_OFFSET + j*BURST_LEN`.
Every burst has AxLEN = `BURST_LEN-1`, AxSIZE = 0 (one byte per beat),
AxBURST = INCR and AxCACHE = 4'b0011 (bufferable, cacheable). Lock, prot and
qos are 0. The defaults are `BASE_ADDR = 8'h80` and `FIRST_OFFSET = 1`, so
the bursts land at 8'h81, 8'h82, 8'h83.

Beat *k* of the session (counted from 0 over all bursts) carries
`DATA_STEP*(k+1)` mod 256. With `DATA_STEP = 10` that is 10, 20, 30, ...
When read back, beat *k* is compared with the same value.

### Handshake behaviour

* **AW and W** go valid in the same clock when a burst starts. So the data
  channel runs alongside the address channel and does not wait for it. Each
  VALID drops on its own handshake: AWVALID after one, WVALID after the
  WLAST beat. WLAST is high while the beat counter equals `BURST_LEN-1`.
* **BREADY** goes high in the clock after BVALID is first seen, for one
  clock only.
* **RREADY** goes high in the clock after RVALID is first seen. It then stays
  high until the RLAST beat is taken, so a burst streams at one beat per
  clock after the first.
* Only one burst per direction is in flight. The next write burst starts
  after the previous write response, and all reads come after all writes.

### Error register

A session has an error if any of these happens:

* a read byte differs from the pattern (`err_kind[0]`);
* a write response is not OKAY or has the wrong BID (`err_kind[1]`);
* a read response is not OKAY or has the wrong RID (`err_kind[2]`).

The first mismatching read byte is kept in `err_data`. `error` is set in
FINAL from the OR of `err_kind`.

## The interconnect (`axi4_interconnect`)

There is a single master and a single slave, so no address decoding is
needed. The interconnect is two small sequencers that open one channel at a
time. The payloads pass through combinationally.

```
write:  WR_ADDR --AW handshake--> WR_DATA --WLAST beat--> WR_RESP --B handshake--> WR_ADDR
read:   RD_ADDR --AR handshake--> RD_DATA --RLAST beat--> RD_ADDR
```

While a channel is closed, the interconnect holds its VALID low towards the
receiver and its READY low towards the sender. These rules follow:

* a write beat never reaches the slave before its address;
* a response never reaches the master before its burst is complete;
* one write burst and one read burst can be in flight at the same time.

A beat counter for each direction compares the position of WLAST or RLAST
with AxLEN. A LAST on the wrong beat, or a beat past the end of the burst,
sets the sticky `proto_err` output. Only reset clears it.

The interconnect adds no register stage. Its only cost in time is that
write data waits for the write address handshake. The slave needs that
handshake before it raises WREADY anyway, so no clock is lost.

## The slave (`axi4_slave`)

### Which burst owns the slave: two flags

`flagw` is set when a write address is accepted and cleared by the WLAST
beat. `flagr` is set when a read address is accepted and cleared by the RLAST
beat. A new address is accepted only when all three of these hold:

* both flags are clear;
* no write response is still waiting;
* for a read address: no write address is arriving in the same clock (writes
  go first).

So the slave serves one burst at a time, and it never reads and writes the
RAM in the same clock.

### Write path

1. **AWREADY.** It is a one-clock pulse, raised when AWVALID is first seen.
   In the same edge the slave latches the address, length, size, burst type
   and ID, and sets `flagw`.
2. **WREADY.** It rises once `flagw` is set and WVALID is present, and stays
   high until the WLAST beat is taken.
3. **Each accepted beat** writes the RAM at the current address when
   `WSTRB[0]` is set. The address then steps by the burst rule.
4. **The WLAST beat** raises BVALID with BRESP = OKAY and BID = AWID. BVALID
   drops when BREADY is seen.

### Read path: the RAM address runs one clock ahead

The RAM has a registered read port, so data appears one clock after its
address. For a burst to stream at one beat per clock, the slave steers the
RAM's read address one clock ahead of the beat it is presenting:

| condition in this clock | RAM read address | effect at the next edge |
|-------------------------|------------------|-------------------------|
| read address being accepted | ARADDR | RAM output = byte of beat 0 |
| beat taken (RVALID and RREADY) | next beat address | RAM output = byte of the next beat |
| otherwise | current beat address | RAM output unchanged |

RDATA is the RAM output itself, with no extra register, so it always shows
the byte of the current beat. RVALID rises in the clock after the AR
handshake. It stays high for the whole burst. RLAST is high when the beat
count equals ARLEN. RRESP is always OKAY, and RID = ARID.

The 256-location RAM covers the whole 8-bit address space, so every address
exists and no error response is ever needed.

## The block RAM (`axi4_bram`)

The RAM is `DEPTH x DATA_W` (256 x 8) with one write port and one read port
on a single clock. The read is synchronous. If both ports hit one address in
the same clock, the read returns the old byte. The contents are not reset.
The array is written so FPGA tools map it onto block RAM.

## Timing of the default session

Clock numbers count from the first clock in which `busy` is high:

| clocks | event |
|--------|-------|
| 0-14 | COUNTER state (16 clocks including the IDLE-to-COUNTER step) |
| 16 | AWVALID and WVALID rise (burst 0) |
| 17 | AW handshake |
| 19 | W handshake (WREADY rises once the slave has the address) |
| 20 / 21 | BVALID / BREADY; B handshake at 21 |
| 23, 30 | bursts 1 and 2 start (7 clocks per single-beat write) |
| 38 | ARVALID (burst 0) |
| 39 | AR handshake |
| 40 / 41 | RVALID / RREADY; R handshake at 41 |
| 43, 48 | read bursts 1 and 2 start (5 clocks per single-beat read) |
| 53 | FINAL state; `c_done` high from 54 |

A burst of N beats takes N+6 clocks to write and N+4 clocks to read. The
session overhead is the start count plus two clocks between phases.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `axi4_top`, `axi4_master` | `BASE_ADDR` | 8'h80 | base address of the target slave |
| | `START_COUNT` | 16 | clocks of the start count |
| | `BURST_LEN` | 1 | beats per burst (1..256) |
| | `NUM_BURSTS` | 3 | bursts per session |
| | `FIRST_OFFSET` | 1 | offset of the first burst from `BASE_ADDR` |
| | `DATA_STEP` | 10 | pattern: beat k carries `DATA_STEP*(k+1)` |
| `axi4_master` | `M_ID` | 0 | AWID/ARID used, and expected back |
| `axi4_top`, `axi4_slave` | `MEM_DEPTH` | 256 | RAM locations (addresses fold into it) |
| `axi4_pkg` | `DATA_W`, `ADDR_W`, `ID_W` | 8, 8, 1 | bus widths (package constants) |

`DATA_W` is a package constant. The master's pattern, the 1-bit strobe and
the byte-wide RAM assume one byte per beat.

## How this RTL relates to the original design

These points follow the original description:

* the 8-bit data and address widths;
* the 256 x 8 block RAM;
* the base address 8'h80 and the 16-clock start count;
* the five master states and their order;
* the burst encodings and AWCACHE = 4'b0011;
* the flag-guarded AWREADY/ARREADY and the WREADY behaviour of the slave;
* the OKAY responses;
* the BREADY and RREADY rules;
* the error register;
* the demonstration transfer (10, 20, 30 written and read back).

These are interpretations or this RTL's own choices:

* **AWSIZE = 0.** The original text also describes AWSIZE as "3, i.e. 2^3 =
  8 bits", but its simulation shows AWSIZE = 000. In AXI-4 the field counts
  bytes, and one byte fills the 8-bit bus, so AWSIZE = 0 is used.
* **Addresses 8'h81..8'h83.** The original gives a base of 8'h80, and its
  simulation shows addresses 1, 2, 3. These are taken as offsets from the
  base, added to it.
* **The write data is a generated pattern** (10, 20, 30, ...). The original
  calls the written bytes image data but does not say where they come from.
  There is no image input port.
* **`init_txn`.** This start input was added so sessions can be started and
  repeated. After FINAL the master always returns to IDLE.
* **One burst in flight per direction, in the master and the interconnect.**
  The original does not specify outstanding transactions.
* **The interconnect's insides.** The original describes the interconnect
  only as a state machine that gives the master and the slave a common
  interface. The two sequencers and the length check (`proto_err`) are this
  RTL's reading of that.
* **Slave read path streams one beat per clock.** This uses the look-ahead
  RAM address described above.
* **The slave's ordering rules.** Writes win over reads in the same clock,
  and no new address is taken while a write response is waiting.
* **1-bit IDs.** An ID mismatch counts as a response error.
* **BVALID once per burst.** BVALID is raised once per burst, on the WLAST
  beat, as AXI-4 requires. The original demonstration uses only single-beat
  bursts, where one response per burst and one response per beat look the
  same.

The original reports, for its FPGA implementation on an Artix-7, 63 slice
registers, 77 LUTs, 561 MHz and 0.085 W at 100 MHz. This RTL has not been
through a vendor flow. A generic synthesis of `axi4_top` gives 121
flip-flop bits and the 2048-bit RAM. The extra flops come from the burst
descriptions latched in the slave, the error register, and the
burst-length checking in the interconnect.

## Verification

Each module has a self-checking testbench. It ends by printing
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.
`tb/axi4_chan_checker.sv` checks the VALID/READY rule on every channel in
every testbench: once VALID is up, VALID and the payload must hold until
READY. It checks this both by counting and with a concurrent assertion.

| testbench | what it checks |
|-----------|----------------|
| `tb_axi4_bram` | Fills all 256 locations. Runs 2000 clocks of random reads and writes against a reference array. Checks the one-clock read latency and read-before-write. |
| `tb_axi4_slave` | Writes one 256-beat INCR burst and reads it back streaming, at one beat per clock (timed). Runs FIXED, INCR and WRAP bursts and the 8'hFF roll-over. Runs 60 random bursts with random VALID/READY gaps. Checks BID/RID, RLAST and OKAY. |
| `tb_axi4_master` | Runs the master against a behavioural slave (`tb/axi4_slave_model.sv`) that stalls 30% of clocks. Two configurations (3 x 1 beat and 4 x 8 beats), five sessions each: clean, a corrupted read byte, write SLVERR, read SLVERR, clean again. Checks addresses, lengths, pattern, WLAST, the 16-clock start count, BREADY/RREADY timing, reads-after-writes, and the error flag, kind and stored byte. |
| `tb_axi4_interconnect` | Sends bursts through to the behavioural slave, with writes and reads running at the same time. Checks every byte. Monitors the ordering rules above. Checks that a burst with an early WLAST sets `proto_err`. |
| `tb_axi4_top` | Runs the whole system in four configurations at once. **A:** the defaults, two sessions. **B:** 4 x 16-beat bursts. **C:** a 2-byte RAM, so addresses alias and the first read returns 30 instead of 10; the master must flag this. **D:** one 256-beat burst whose addresses run past 8'hFF and wrap to 8'h00. An independent scoreboard checks every beat, and the test counts each mechanism: start count, each channel handshake, WLAST, RLAST, late BREADY, streamed read beats, clean compare and error compare. |
| `tb_axi4_top_full` | One session of `axi4_top` at its default parameters. Checks every AW/W/B/AR/R field, the timing of the first address, and the RAM contents 10, 20, 30 at 8'h81..8'h83. |

Each module was also checked with a deliberate fault, for example
read-address look-ahead removed, or the read compare disabled. The
testbenches reported failures each time.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb rtl/axi4_pkg.sv \
          tb/tb_axi4_top.sv --top-module tb_axi4_top -o sim
./obj_dir/sim
```

Substitute the testbench name as needed. `-y rtl -y tb` lets Verilator find
each module in the file of the same name. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/axi4_pkg.sv rtl/axi4_top.sv`.
The remaining lint warnings are for the address-channel fields the slave
does not use (lock, cache, prot, qos) and for a package constant that not
every module needs.

## Files

* `rtl/axi4_pkg.sv`: widths, encodings, channel structs, burst address rule
* `rtl/axi4_bram.sv`: 256 x 8 block RAM
* `rtl/axi4_slave.sv`: AXI-4 burst slave
* `rtl/axi4_master.sv`: self-checking AXI-4 burst master
* `rtl/axi4_interconnect.sv`: single-master, single-slave interconnect
* `rtl/axi4_top.sv`: the complete system
* `tb/`: the testbenches above and their helpers:
  * `axi4_chan_checker`: the VALID/READY rule checker
  * `axi4_slave_model`: the behavioural slave
  * `axi4_master_rig`: the master test rig
  * `axi4_top_harness`: the system harness with its scoreboard

# Portable memory access framework for FPGA accelerators

Machines that pair host processors with FPGAs all wire the FPGA to memory in
their own way. They differ in how many local SRAM banks there are, whether a
bank has one port or separate read and write ports, and how data gets from
host memory into those banks. Accelerator logic written for one machine
therefore has to be rewritten for the next. This RTL puts a fixed layer
between the user's accelerator ("user logic") and the platform. The user logic
sees one logical memory with a small, fixed set of signals. The framework
stages data between host memory and the local banks by itself. If the data
is bigger than the local memory, it runs the user logic several times.

The design follows the framework described in *A Portable Memory Access
Framework on Reconfigurable Computers*. It implements that framework's
mapping for a board with four 4 MB local SRAM banks, each with separate read
and write ports (a Cray XD1-class node). An optional multi-buffered variant of
mode-2 overlaps transfers with processing. The original framework used this
variant on an SGI RC-100. A second option, staged mode-3, serves the
sequential mode from local memory and overlaps the stage-in with processing,
as the original did on an SRC-6.

## The three access modes

The user logic picks the mode that suits its access pattern. The mode is a
field of each job.

| mode | what the user logic sees | local memory use |
|---|---|---|
| 1, dual-ported random | one logical bank of 2^20 blocks (16 MB); read and write any block | all four banks, concatenated by address |
| 2, single-ported random | logical bank 0 holds raw data and is read only; logical bank 1 takes results and is write only; 2^19 blocks (8 MB) each | banks 0-1 form bank 0, banks 2-3 form bank 1 |
| 2, multi-buffered (`MULTI_BUFFER=1`) | the same two logical banks, each one window of half a physical bank (2^17 blocks, 2 MB) | banks 0 and 1, two windows each |
| 3, sequential | one in-order read stream and one in-order write stream, no addresses | bypassed: data flows straight from and to host memory |
| 3, staged (`SEQ_STAGED=1`) | the same two streams | raw data staged into banks 0-1 while it is consumed; results collected in banks 2-3 |

A block is 128 bits, and every address counts blocks.

### User-side signals

| signal | dir (from the framework) | meaning |
|---|---|---|
| `user_logic_go` | out | high while the user logic may run. It rises once the data is ready (in staged mode-3, as the stage-in starts) and falls after `user_logic_done`. The user logic starts on the rising edge. |
| `user_logic_done` | in | one-cycle pulse while `user_logic_go` is high: the user logic has finished, and all its writes have been issued |
| `mem_rd_rq`, `mem_rd_addr[19:0]` | in | read request. In mode-3 the address is ignored and each request asks for the next block. |
| `mem_rd_data_vld`, `mem_rd_data[127:0]` | out | read data, returned in request order. In modes 1 and 2 it arrives exactly `RD_LAT` cycles after the request. In mode-3 it arrives at least one cycle after the request (`RD_LAT` cycles in staged mode-3), and later if the block has not arrived from host memory yet. |
| `mem_rd_vol[31:0]` | out | number of raw blocks for this run: the chunk size in modes 1 and 2 and in staged mode-3, the whole job in direct mode-3 |
| `mem_wr_rq`, `mem_wr_addr[19:0]`, `mem_wr_data[127:0]` | in | write. Address and data are given in the same cycle. Modes 1 and 2 always accept a write. |
| `mem_wr_ready` | out | mode-3 only: a write offered in this cycle is accepted. A write offered while it is low is ignored. |

In mode-2 the top address bit must be zero, because a logical bank holds only
half the blocks. In multi-buffered mode-2 the top three bits must be zero.
Assertions check both rules.

## How a job runs

A job is described by `job_mode`, `job_vol` (raw blocks), `job_src` and
`job_dst` (host block addresses), and is started by a one-cycle `job_start`.
`job_done` pulses once every result is in host memory. `job_rounds` then holds
the number of user-logic runs.

**Modes 1 and 2 (plain)** run in rounds, with nothing overlapped
(`mf_controller`). Each round:

1. **Stage-in.** The transfer engine copies the next chunk from host memory
   into logical bank 0, at addresses 0 to n-1. A chunk is
   `min(remaining, logical bank size)` blocks.
2. **Run.** `user_logic_go` goes high, and the user logic owns the banks until
   `user_logic_done`.
3. **Drain.** The controller waits `RD_LAT+2` cycles, so reads still in the
   SRAM pipeline come back to the user logic and not to the engine.
4. **Stage-out.** The engine copies the chunk's n blocks back to
   `job_dst + offset`. In mode-1 they come from logical bank 0, where the
   results were written in place. In mode-2 they come from logical bank 1.

The result region of a chunk is the same size as its raw data, and in the same
place. For example, with 16 MB logical banks a 40 MB mode-1 job takes three
rounds: 16, 16 and 8 MB.

**Mode-3** has a single run. The stream port reads ahead from host memory while
the user logic consumes blocks. The job ends after `user_logic_done`, once the
write FIFO has drained to host memory. Staged mode-3, a build option, runs in rounds
instead; it is described further down.

## Multi-buffered mode-2

This is the part that needs the most care (`mf_multibuf_sched`). Banks 0 (raw)
and 1 (results) are each split into two windows. Chunk k uses window k mod 2
in both banks. While the user logic works on chunk k, the transfer engine works
in the other window:

- it copies the results of chunk k-1 out of bank 1, through bank 1's read
  port, and
- it copies the raw data of chunk k+1 into bank 0, through bank 0's write
  port.

Meanwhile the user logic uses only bank 0's read port and bank 1's write port.
The user logic and the engine never share a port, so they run at full rate in
the same cycles. The framework gives each of them its own `mf_bank_mapper` and
merges the two mappers' physical ports. Assertions check that no port is
driven twice.

The scheduler follows three rules, with n = ceil(vol / window) chunks:

- **Stage in chunk i** only after chunk i-2 has been processed, so its raw
  window is free.
- **Run chunk j** only after all of these hold: chunk j is fully staged in;
  chunk j-2's results have left bank 1; the user logic is idle; and `RD_LAT+2`
  cycles have passed since the previous run ended.
- **Stage out chunk k** only after chunk k has been processed. When the engine
  could do either, stage-out goes before stage-in.

The engine takes one command at a time. The window is held for the whole
transfer. When both sides take similar time, the job takes about one
transfer plus n runs, instead of n × (two transfers + run). The unit testbench
measures a four-chunk job at under 80 % of the serial time.

## Staged mode-3

With `SEQ_STAGED=1`, mode-3 no longer talks to host memory directly. Each
round of up to 2^19 blocks works like this:

1. The controller starts the transfer engine on the stage-in into logical
   bank 0 (banks 0-1). It raises `user_logic_go` one cycle later, without
   waiting for the stage-in to finish.
2. `mf_local_stream` turns each `mem_rd_rq` into a read of the next raw
   block. It issues that read only once the engine's `progress` count shows
   the block has been written. Until then the request waits. The data comes
   back `RD_LAT` cycles after the read is issued, in order.
3. Each result block offered on `mem_wr_rq` is accepted at once
   (`mem_wr_ready` is high for the whole run). It is written to the next
   address of logical bank 1 (banks 2-3).
4. After `user_logic_done`, the controller waits for both the drain gap and
   the end of the stage-in. It then copies the round's results out to
   `job_dst + offset`.

The bank ports are never shared. The engine writes banks 0-1 while the user
logic reads them, and the user logic writes banks 2-3, which the engine reads
only after the run. `mem_rd_vol` gives the round's block count. The user logic
must produce one result per raw block, in order.

## Local memory mapping

`mf_bank_mapper` turns a (logical bank, block address) pair into a (physical
bank, in-bank address) pair:

- **Mode-1.** Bank = `addr[19:18]`, in-bank address = `addr[17:0]`.
- **Mode-2 and staged mode-3.** Bank = `{lbank, addr[18]}`.
- **Multi-buffered mode-2.** Bank = `lbank`, and the window is the top bit of
  the in-bank address.

The mapper keeps the bank number of each read in a shift register of length
`RD_LAT`. It uses that number to pick the returning word, so reads come back
in order with a fixed latency. Banks are joined by address range, not
interleaved.

## Sequential mode streaming

`mf_stream_port` fetches `mem_rd_vol` blocks from `job_src` onwards. It keeps
the requests in flight plus the queued blocks within `FIFO_DEPTH`. The user
logic's `mem_rd_rq` pulses are counted, and one queued block is handed out per
pending request per cycle. Results go into a second FIFO, which
`mem_wr_ready` guards, and are written to `job_dst` onwards. With a host that
answers every cycle, a stream moves one block per cycle. At 200 MHz that is
the 3.2 GB/s of two pipelined 64-bit block ciphers.

## Platform ports

These ports are where the platform plugs in. They stand in for the vendor's
interface block and the SRAM devices.

- **Host read.** `hrd_req_valid/ready/addr` is a request with a valid/ready
  handshake. `hrd_rsp_valid/data` is the response: in request order, any
  latency, and it cannot be stalled. The framework never has more requests
  outstanding than it can buffer.
- **Host write.** `hwr_valid/ready/addr/data`, with a valid/ready handshake.
- **Banks.** For each of the `NUM_BANKS` banks: `bank_rd_en/addr`, with
  `bank_rd_data` valid `RD_LAT` cycles after the enable, and
  `bank_wr_en/addr/data`, written at the clock edge.

Porting to another machine means adapting these ports to its interface block.
The user-side signals stay the same.

## Modules

| file | role |
|---|---|
| `rtl/mf_pkg.sv` | widths, `mode_e`, `xfer_dir_e` |
| `rtl/mem_access_framework.sv` | top: wiring, the two bank mappers and their port merge, host-port and read-return multiplexing |
| `rtl/mf_controller.sv` | job sequencer: rounds of plain modes 1 and 2, mode-3 run (direct or staged), hand-off to the multi-buffer scheduler |
| `rtl/mf_multibuf_sched.sv` | window scheduler for multi-buffered mode-2 |
| `rtl/mf_transfer_engine.sv` | host ↔ logical-bank block copier, one block per cycle |
| `rtl/mf_bank_mapper.sv` | logical → physical bank mapping, in-order read return |
| `rtl/mf_stream_port.sv` | mode-3 read and write streams, to and from host memory |
| `rtl/mf_local_stream.sv` | staged mode-3 streams, from and to local memory, reads held behind the stage-in |
| `rtl/mf_sync_fifo.sv` | FIFO used by the engine and the stream port |

Parameters of the top, with their defaults: `DATA_W=128`, `NUM_BANKS=4`,
`BANK_AW=18` (4 MB banks), `RD_LAT=2`, `FIFO_DEPTH=16`, `MULTI_BUFFER=0`,
`SEQ_STAGED=0`, `HADDR_W=32`, `VOL_W=32`. Reset is active-low and asynchronous.

## Simulating

Each testbench in `tb/` checks its own results and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mf_pkg.sv tb/tb_mem_access_framework.sv --top-module tb_mem_access_framework
./obj_dir/Vtb_mem_access_framework
```

| testbench | what it covers |
|---|---|
| `tb_mem_access_framework` | End to end, with small banks and multi-buffering on. Eight jobs across all three modes, under ideal and stalling hosts. It checks every result block. It counts the mechanisms (several rounds, stage-in/out, each mode, mode-3 bypass, transfer/processing overlap, starved stream reads, `mem_wr_ready` back-pressure, host stalls) and fails if any never happened. It also checks the rates: mode-3 within n+24 cycles, and a one-round mode-1 job within 3n+40. |
| `tb_mem_access_framework_full` | The top at its default size, 16 MB of local memory. A mode-1 job of 2^20+300 blocks and a mode-2 job of 2^19+200 blocks, two rounds each, plus two mode-3 streams. About 5 M cycles, a few seconds. |
| `tb_mf_local_stream` | End to end with `SEQ_STAGED=1` and small banks (32-block rounds). Staged mode-3 jobs of 1 to 100 blocks, mixed with mode-1 and mode-2 jobs, under ideal and stalling hosts. It checks every result block and that mode-3 used the banks. It fails unless these all happened: several rounds, stage-in/out, each mode, user logic running during a stage-in, and a read waiting for a block not yet staged in. |
| `tb_mf_controller` | the exact transfer commands, rounds, `mem_rd_vol`, the drain gap and the mode-3 drain. A second instance with `SEQ_STAGED=1` checks that each run starts with its stage-in, and that the stage-out waits for both the run and the stage-in. |
| `tb_mf_multibuf_sched` | window safety of every command, windows held during transfers, overlap, speed-up |
| `tb_mf_bank_mapper` | placement in each layout, in-order fixed-latency reads |
| `tb_mf_transfer_engine` | both directions, host stalls, rate of one block per cycle |
| `tb_mf_stream_port` | ordering, starvation, back-pressure, rate of one block per cycle |

Behavioural models used by the testbenches:

- `mf_host_mem_model`: host memory with random latency and stalls. Raw data is
  a function of the address, so nothing needs to be loaded.
- `mf_sram_bank_model`: one SRAM bank.
- `mf_user_logic_model`: a stand-in for the accelerator. It applies a keyed
  half-swap-and-xor to each block.

## Where this design departs from the original framework, and its limits

- **One platform mapping.** Only the four-bank, dual-port mapping is built,
  plus multi-buffered mode-2 on the same board. The single-port, six-bank
  mapping of the SRC-6 is not built. Its mode-3 scheme is built, but on the
  four dual-ported banks, as the `SEQ_STAGED` option. The RC-100's
  single-bank-per-logical-bank mode-1 is not built.
- **Staged mode-3 holds reads, not the user logic.** How the original kept
  the user logic behind the stage-in is not described. Here pending read
  requests simply wait, so the user logic must tolerate read data arriving
  later than `RD_LAT`, as it already must in direct mode-3.
- **Multi-buffered window size.** Here a window is half of a 4 MB bank. On the
  original board banks were 8 MB, so its windows were larger.
- **Mode per job.** The original fixed the mode per FPGA bitstream. Here it is
  a field of each job, so one build can run all three modes. Multi-buffering
  and staged mode-3 are still chosen per build.
- **The framework moves the data itself.** Host-side drivers and vendor DMA
  are replaced by the framework's own transfer engine behind a generic host
  port. The job control interface is this design's own.
- **`mem_rd_vol` in every mode.** The original defines it for the sequential
  mode only. Here it is also driven in the random modes, where it gives the
  chunk size.
- **Assumed timing.** The bank read latency (2), the FIFO depths (16), the
  drain gap and the host-port protocol are all assumptions.
- **Not verified.** The accelerator used to evaluate the original framework,
  two pipelined DES cores, is not included. Neither is any vendor interface
  block. The original's resource and throughput figures were measured on real
  machines and cannot be reproduced in simulation. No clock-frequency claim is
  made for this RTL.

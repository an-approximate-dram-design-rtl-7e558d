# Approximate DRAM with bit-significance refresh: memory controller RTL

DRAM spends a large part of its power on refresh, and every cell is refreshed every 64 ms whether
its data matters or not. The weights and feature maps of a deep neural network are 32-bit floats,
and the network tolerates small errors in their mantissas but not in their sign or exponent. This
design uses that. It spreads each float across sixteen x4 DRAM devices by bit significance. The
devices that hold the sign and exponent are refreshed at the normal rate. The devices that hold
the mantissa are refreshed much less often, or not at all. The DRAM devices themselves are
unchanged. The controller needs two changes:

* a separate chip select for every device of the approximate rank, so that a REF command can
  reach only some of the devices;
* one more counter beside the usual refresh-interval and row counters. It counts 64-ms rounds
  and decides which devices are refreshed in the current round.

The scheme and its numbers follow the APPROX2 architecture of "An Approximate DRAM Design with
an Adjustable Refresh Scheme for Low-power Deep Neural Networks". The controller around it (the
command sequencing, the address map, the interfaces) is this design's own. The section
"Departures and limits" lists where it differs.

## Where the bits go (APPROX2 mapping)

A 64-byte cache line is one BL8 burst of eight 64-bit beats. Beat k carries two words:
DATA(2k+1) in bits [63:32] and DATA(2k) in bits [31:0]. On the approximate rank, device n (data
pins [4n+3:4n]) stores bits [2n+1:2n] of both words:

| device | pins    | holds                              | class       |
|--------|---------|------------------------------------|-------------|
| 15     | [63:60] | DATA1[31:30], DATA0[31:30] (sign)  | precise     |
| 14..11 | ...     | bits [29:22] (exponent, mantissa MSB) | precise  |
| 10..0  | [43:0]  | bits [21:0] (mantissa)             | approximate |

Five precise devices keep bits [31:22]. That protects the 9 critical bits [31:23] plus one
mantissa bit. `approx2_bit_map` is this permutation. It sits between the controller and the data
pins and is enabled only for accesses to the approximate rank. Inside a device, the DATA1 pair is
on the upper two pins; that order is a choice of this design.

## The refresh schedule

`refresh_scheduler` has three counters:

1. **Refresh interval counter.** It raises `ref_req` every `T_REFI` cycles. The default is
   5200 cycles, which is 7.8 us at the 666.67 MHz clock of DDR3-1333.
2. **Row counter.** It counts issued REF commands. 8192 of them (`ROWS_PER_ROUND`) refresh every
   row once and make one 64-ms **round**.
3. **Round counter.** It counts rounds (`round_cnt`). Each device also keeps the number of rounds
   left until its next refreshed round. A device is *due* when that number is 0. At the end of a
   round, a due device reloads `period-1` and the other devices count down. So a device with
   period P takes part in every REF of rounds 0, P, 2P, ... and in no REF of the other rounds.

`ref_mask` has one bit per device: the devices due in the current round. `cmd_sequencer` drives
`cs_n_a = ~ref_mask` with every REF, so devices that are not due never see the command. The
precise rank (`cs_n_p`) takes part in every REF.

Periods are counted in rounds, because an approximate period must be a multiple of 64 ms.
`refresh_policy` computes them from the run-time configuration `ref_cfg`:

    RP(n) = 1 round                        for devices 11..15
    RP(n) = (10 - n) * incr + offset       for devices 0..10 (least significant = longest)

`ref_cfg.approx_off` turns the approximate devices' refresh off altogether (period 0). The field
is 12 bits wide, so a period can be up to 4095 rounds (262 s). Larger results saturate, and a
result of 0 is raised to one round.

Example: (offset, incr) = (1024 ms, 256 ms) is `offset = 16`, `incr = 4`. That gives device 10 a
period of 16 rounds and device 0 a period of 56 rounds (3.58 s). The fraction of refresh work
saved across the whole rank is

    saving = 11/16 - sum over m = 0..10 of 4 / (m * incr_ms + offset_ms)

which is 66.5 % at this point. With the approximate refresh off it is 11/16 = 68.75 %.

Refreshes that are owed while a request is in flight are postponed. Up to `MAX_PENDING` (8, the
DDR3 limit) may be owed; an assertion fires beyond that. A period change takes effect at once.
If a period is lowered below the rounds a device has left, the device becomes due immediately,
so a change never stretches an interval.

## Hybrid memory and address map

Code and other critical data need fully precise memory. Only DNN data goes to the approximate
rank. The controller therefore drives two ranks on one channel:

| line address (64-byte units) | rank | devices | size |
|------------------------------|------|---------|------|
| `0 .. 2^26-1` | precise | 8 x8, 4 Gb, one `cs_n_p` | 4 GB |
| `2^26 .. 2^26+2^27-1` | approximate | 16 x4, 4 Gb, `cs_n_a[15:0]` | 8 GB |
| above | unmapped; answered at once with `resp_err` | | |

`addr_decoder` splits each line index as row : bank : column. A row of an x8 device holds 128
lines, and a row of an x4 device holds 256. Software (an allocator) decides which data is placed
in the upper region.

## Request queue and command sequencing

Requests enter `req_queue`, which holds up to 128 of them (64 per rank). Each cycle it offers the
sequencer one request, chosen first-ready, first-come-first-served (FR-FCFS):

* the oldest request whose bank already has its row open (a row hit);
* otherwise the oldest request.

Requests therefore finish out of order, and every request carries a tag that comes back with its
response. The queue keeps only the request headers in age order. The 512-bit write data sits in
a slot-indexed memory and never moves. A requester must not have two requests to the same line
outstanding; an assertion checks this. There is no limit on how long an old row miss can wait.

`cmd_sequencer` keeps one row open per bank of each rank (open-page policy) and serves one burst
at a time:

    row hit:       RD/WR --T_CL/T_CWL--> 8 beats
    bank closed:   ACT --T_RCD--> RD/WR --> 8 beats
    row conflict:  PRE (once T_RAS has passed since that bank's ACT) --T_RP--> then as "bank closed"
    after a write: T_WR before the next command

The request is accepted in the cycle its ACT or column command goes out. After the PRE of a row
conflict, the queue may therefore offer a different request. A refresh that is owed takes
priority over new requests. If any bank is open, a precharge-all (PRE with `dram_addr[10]` set,
both ranks selected) goes out first. The REF follows `T_RP` later, and the next command follows
`T_RFC` after the REF. While a refresh is owed, the sequencer accepts no request. For ACT, RD, WR
and single-bank PRE, the chip selects pick one whole rank. Only a REF uses individual device
selects.

The default timing is DDR3-1333 9-9-9: `T_RCD = T_CL = T_RP = 9`, `T_CWL = 7`, `T_RAS = 24` and
`T_WR = 10`. `T_RFC = 174` is 260 ns for a 4 Gb device. The data bus is modelled as one beat per
controller clock rather than two.

## Top-level interface (`approx_mem_ctrl`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `ref_cfg` | in | 25 | `{approx_off, incr[11:0], offset[11:0]}`, in 64-ms rounds |
| `req_valid` / `req_ready` | in / out | 1 | request handshake; the request transfers when both are high |
| `req_we`, `req_addr`, `req_wdata`, `req_tag` | in | 1, 28, 512, 8 | write flag, line address, line data, tag |
| `resp_valid`, `resp_tag` | out | 1, 8 | one-cycle pulse when a request is finished, with its tag |
| `resp_we`, `resp_err`, `resp_rdata` | out | 1, 1, 512 | write flag, unmapped address, line read (held until the next request) |
| `dram_cmd`, `dram_ba`, `dram_addr` | out | 3, 3, 16 | command (`approx_pkg::dram_cmd_e`), bank, row or column |
| `cs_n_p` | out | 1 | precise rank select |
| `cs_n_a` | out | 16 | approximate rank, one select per device |
| `dq_oe`, `dq_out`, `dq_in` | out, out, in | 1, 64, 64 | write beat valid; write data after mapping; read data before unmapping |
| `ref_mask`, `round_cnt`, `row_cnt`, `round_end` | out | 16, 16, 13, 1 | refresh status |
| `queue_count` | out | 8 | requests waiting in the queue |

Write beat k is on `dq_out` `T_CWL + k` cycles after the WR cycle. Read beat k is expected on
`dq_in` `T_CL + k` cycles after the RD cycle. `resp_valid` follows the last beat by one cycle.
On an idle controller, a read to a closed bank completes `T_RCD + T_CL + 8` cycles after it leaves
the queue, and a row hit `T_CL + 8` cycles after. An unmapped address is answered with `resp_err`
and its tag, in the first cycle in which no DRAM response is being given.

## Files

* `rtl/approx_pkg.sv`: shared constants, the command enum, the location and configuration
  structs.
* `rtl/approx2_bit_map.sv`, `rtl/refresh_policy.sv`, `rtl/refresh_scheduler.sv`,
  `rtl/addr_decoder.sv`, `rtl/req_queue.sv`, `rtl/cmd_sequencer.sv`: the blocks described above.
* `rtl/approx_mem_ctrl.sv`: the top.
* `tb/dram_dev_model.sv`: a behavioural DDR3 device (x4 or x8) for simulation only. It has
  sparse storage, counts the REF commands that reach it, and has an optional retention limit:
  after `RET_CYCLES` without a REF, everything it stores leaks to 0.
* `tb/tb_<block>.sv`: one self-checking testbench per block. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb/tb_approx_mem_ctrl.sv`: end-to-end test on a shortened timebase (T_REFI = 64, 4 rows per
  round) with 24 device models. The steps:
  1. 30 rounds of random traffic, with the REF count of every device checked against
     4 x ceil(30 / RP(n)).
  2. Switch the approximate refresh off. Once the retention time has passed, check that bits
     [31:22] of every approximate word are still exact while the mantissa has leaked, and that
     precise lines are intact.
  3. Switch the refresh back on, then make an unmapped access. Between steps 1 and 2, a burst
     pushes 24 writes and then 24 reads to distinct lines back to back through an 8-entry
     queue, and checks the data by tag. The test counts refresh stalls, masked and full REFs,
     round ends, accesses to each rank, row hits, a full queue, out-of-order responses, mode
     switches and error responses, and fails if any of them never happened.
* `tb/tb_approx_mem_ctrl_full.sv`: the top at its default parameters. It checks REFs every 5200
  cycles and two complete 64-ms rounds (85 M cycles, about 80 s): in round 0 all devices take
  part in all 8192 REFs; in round 1 only devices 11..15 do. It also checks that data is read back.

Simulate with Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/approx_pkg.sv tb/tb_approx_mem_ctrl.sv --top-module tb_approx_mem_ctrl -o sim
    ./obj_dir/sim

The RTL is SystemVerilog-2017 and synthesizable. The `tb/` files are not.

## Departures and limits

* **Scheduling.** The controller the scheme was evaluated with had an open-page policy, FR-FCFS
  scheduling and 64-entry queues per rank. Here, one shared queue of 128 entries feeds a
  sequencer that keeps one burst in flight. Commands to different banks are not overlapped, so
  bandwidth is below a full controller. The queue does not order requests to the same line
  against each other.
* **Capacity.** The evaluated system had a 16 GB module, one quarter of it precise. Whole ranks of
  4 Gb devices give 4 GB (x8 rank) and 8 GB (x4 rank). This design maps 12 GB, one third of it
  precise. The rank sizes are set by the `*_COLL_W` parameters of `addr_decoder` and the
  package constants.
* **Bus abstraction.** The DDR3 command bus is an enum, with no RAS/CAS/WE encoding, no ODT and
  no CKE. The data bus runs one beat per clock. A PHY would sit between this controller and the
  devices.
* **Refresh granularity.** All rows of a device share one period. Whether a device is refreshed
  is decided once per round, not per row.
* **Error behaviour.** How often bits fail at a given period and temperature is a property of the
  devices. The testbench's all-or-nothing leak model only shows which bits are exposed; it does
  not show how often they fail.
* Verilator reports `SYNCASYNCNET` on `rst_n`. That comes from the `disable iff (!rst_n)` clauses
  of the assertions, not from the logic.

# Parallel-serial scan with head-cell serial mode and on-chip transformations

Broadcast ("Illinois") scan splits the scan cells of a circuit into N short
chains and loads all of them from one scan-input pin at once. One clock loads
a whole *test slice*: the N cells that sit at the same distance from the chain
heads. The price is that every cell of a slice gets the same value. A vector
whose slices mix 0s and 1s has to fall back to a fully serial load through all
the cells, which costs N times as long.

This RTL removes most of that penalty in two ways:

1. **Head-cell serial mode.** The serial path links the *head cells* of the
   chains, not the tail of one chain to the head of the next. A slice with
   mixed values is loaded with one broadcast, followed by a few serial shifts
   along the heads. Everything behind the heads holds during those shifts. So
   only the conflicting slices pay extra, and the rest of the vector still
   loads one slice per clock.
2. **Serial transformation gates.** XOR gates and inverters can be placed
   between the cells of each chain, so the content of a chain after loading is
   a fixed, invertible function of the bits shifted in. With gates chosen for
   a test set, vectors with conflicting slices come from a stimulus whose
   slices are all uniform, and that stimulus loads by broadcasts alone. Any
   slice the gates cannot make uniform is patched in serial mode.

Both additions cost about what plain broadcast scan costs: one multiplexer per
chain head, plus the XOR gates and inverters that were chosen.

## Loading one slice

The cells are numbered from the head: `q[i][0]` is the head of chain `i`, and
`q[i][L-1]` is its tail. Slices are loaded from the farthest one (cell `L-1`)
to the head slice (cell 0). For each slice:

* **Broadcast (parallel) clock.** Every chain shifts by one cell, moving the
  slices already loaded one level deeper. Every head then takes the
  scan-input value.
* **Serial clocks (optional).** The heads shift along the path
  `scan_in -> head0 -> head1 -> ... -> head(N-1)`. The bodies hold. After `m`
  shifts, heads `0..m-1` hold the serial bits. Heads `m..N-1` still hold the
  broadcast value, because only that value was ahead of them on the path.

The broadcast therefore carries the value of the last chain. `m` is one more
than the index of the highest chain that wants a different value. If the last
`k` chains agree, the slice costs `N-k+1` clocks: 1 for a uniform slice, and
never more than N, because the last chain always agrees with itself. The
serial bits go in reverse order: the value for head `m-1` first, and the value
for head 0 last.

Worked example with 4 chains and 4 slices. From the head, the slices are
`1111`, `0100`, `1111` and `0000`:

| clock | operation          | what it does                            |
|-------|--------------------|-----------------------------------------|
| 1     | broadcast 0        | slice 4                                 |
| 2     | broadcast 1        | slice 3                                 |
| 3     | broadcast 0        | slice 2, all heads 0                    |
| 4     | serial shift 1     | becomes the value for chain 1's head    |
| 5     | serial shift 0     | chain 0's head; chain 1's head gets the 1 |
| 6     | broadcast 1        | slice 1                                 |

That is 6 clocks, against 16 for a fully serial load. A broadcast-only design
would have to load this vector fully serially.

## Transformation gates

Each chain has two parameters:

* `TAPS[j][k] = 1` places an XOR gate that adds cell `k` into the shift input
  of cell `j`.
* `INV[j] = 1` places an inverter in the shift input of cell `j`.

On a broadcast clock, cell `j >= 1` loads
`q[j-1] ^ INV[j] ^ XOR(q[k] for TAPS[j][k])`.

Only cells at least two places upstream may be tapped (`k <= j-2`). This rule
is checked when the design is elaborated. Under it, a bit shifted in can only
affect its own final cell and cells further down. So the loaded vector `I`
relates to the stimulus `S` by a triangular, always invertible map:
`I = S x T` and `S = I x T^-1`.

In this RTL, `S[k]` is the bit that would end up in cell `k` of a chain
without gates, so it is shifted in at step `L-1-k`. The stimulus can be
solved cell by cell from the head:
`S[j] = I[j] ^ (cell j after loading S[0..j-1] with S[j..] = 0)`.
The testbenches compute stimuli this way.

The default chain of `tx_scan_chain` is a 5-cell example with two gates: cell
0 into cell 2, and cell 1 into cell 4. It turns the stimulus `11010` into
`11111`, with strings read from the head cell. This is the only two-gate
placement with that mapping.

The head cell itself has no gate or inverter (`INV[0]` must be 0), so that
all heads agree after a broadcast. Choosing the gates for a test set means
solving the per-chain equations `S_i = I_i x T_i^-1` with all `S_i` equal.
That is done offline and is outside the hardware. The RTL only takes the
result as parameters.

## Test data stream

A tester sends one bit per clock on `tdi` while `scan_en = 1`. Every record
starts with a configuration selection bit:

| record   | bits                                       | chains do                             |
|----------|--------------------------------------------|----------------------------------------|
| parallel | `0`, `b`                                   | hold, then broadcast `b`               |
| serial   | `1`, count (`CNT_W` bits, MSB first), `count` data bits | hold for `1+CNT_W` clocks, then one serial shift per data bit |

`CNT_W = clog2(N)`, because a slice never needs more than N-1 serial shifts.
A count of 0 ends the record with no shifts.

A slice is one parallel record, optionally followed by one serial record. The
worked example is 13 stream bits: `00 01 00 1 10 1 0 01`.

The decoder is a Mealy machine. On the clock that carries a broadcast or
serial data bit, that same bit is on the scan input of the chains, and they
shift at that clock edge. There is no pipeline delay.

`scan_en = 0` for one clock captures `func_d` into every cell. It also
returns the decoder to the start of a record. The response leaves on
`scan_out[i]` (chain tails) during the broadcast clocks that load the next
vector. It passes through the same gates on its way out.

Test time in scan clocks is the sum over slices of `1 + m`. Data volume is
`2` bits for a uniform slice and `2 + 1 + CNT_W + m` bits otherwise. A vector
whose stimulus is fully uniform takes L scan clocks against N x L for a fully
serial load. That is a reduction of 1 - 1/N (66.7 % for 3 chains, 75 % for 4),
which is the most that any slice-per-clock scheme can reach.

## Modules

| file                      | module                | role |
|---------------------------|-----------------------|------|
| `rtl/ps_scan_pkg.sv`      | package               | `scan_op_e` (hold / parallel / serial / capture) and `scan_ctrl_t` (op plus data bit) |
| `rtl/tx_scan_chain.sv`    | `tx_scan_chain`       | one chain: L cells, transformation gates, head multiplexer |
| `rtl/ps_scan_array.sv`    | `ps_scan_array`       | N chains sharing the broadcast line, with heads linked for serial mode |
| `rtl/scan_stream_decoder.sv` | `scan_stream_decoder` | turns stream records into per-clock scan operations |
| `rtl/ps_scan_top.sv`      | `ps_scan_top`         | decoder plus array: the complete scan structure with one data pin |

Interface of `ps_scan_top`:

* Inputs: `clk`, `rst_n` (asynchronous, active low, resets only the decoder),
  `scan_en`, `tdi`, and `func_d[N][L]`, the circuit's next-state values.
* Outputs: `q[N][L]` (the scan cells, which feed the circuit), `scan_out[N]`,
  `ctrl_op` (the scan operation of the current clock) and `rec_done` (the
  last bit of a record is on `tdi`).
* Parameters: `N = 4` chains and `L = 4` cells, which is the worked example.
  `TAPS[N][L][L]` and `INV[N][L]` are all zero by default, meaning plain
  chains.

The circuit under test is not included. For a real circuit, set `N` to the
number of chains, set `L` to ceil(flip-flops / N), and wire `func_d`/`q` to
its logic. For example, a 669-flip-flop circuit with 16 chains needs
`N = 16, L = 42`.

## Design choices beyond the basic scheme

These points are not fixed by the scheme itself; they are the choices made
here:

* Body cells hold in serial mode through an enable. Clock gating would also
  work.
* Record encoding: `0` means parallel and `1` means serial. The count field
  is `clog2(N)` bits, sent MSB first, and a count of 0 is allowed.
* The stream is decoded on chip from the single pin, one bit per clock.
  Stream bits and scan clocks are therefore different quantities. A tester
  that drives the mode directly could use `ps_scan_array` on its own (`op`,
  `scan_in`).
* Capture through `scan_en = 0`, and response observation at one output per
  chain tail. No response compactor is included.
* Transformation gates tap only upstream cells, and there is no gate at the
  head cell.
* Scan cells have no reset. Their content is defined by a load or a capture.

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
through a watchdog if it hangs.

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ps_scan_top \
    -y rtl -y tb +libext+.sv rtl/ps_scan_pkg.sv tb/tb_ps_scan_top.sv
./obj_dir/Vtb_ps_scan_top
```

| testbench | what it shows |
|-----------|---------------|
| `tb_tx_scan_chain` | the 5-cell example (11010 loads 11111, in 5 clocks); random targets loaded through the inverse transformation; serial mode, capture, hold and unload |
| `tb_ps_scan_array` | the worked example in 6 clocks with the hand-worked content; 300 random vectors, checked for content and for a clock count of the sum of `N-k+1`; serial mode moving only the heads; capture and unload |
| `tb_scan_stream_decoder` | random records, every serial count 0..N-1, the per-clock operation and data, record ends, and a capture that abandons a half-received record |
| `tb_ps_scan_top` | end to end through the stream: 3 chains of 6 cells with gates and an inverter. Vectors with conflicting slices load by broadcasts alone; random vectors need serial patches; content, scan clocks and stream bits are checked; a captured response is unloaded through the gates. It counts every mechanism and fails if one never occurred. |
| `tb_ps_scan_top_full` | default configuration: the worked example (6 scan clocks, 13 stream bits), random vectors, and a capture and unload |
| `tb_ps_scan_workloads` | benchmark-sized configurations with gates: 16 chains of 42 cells (a 669-flip-flop circuit) and 30 chains of 55 cells (a 1636-flip-flop circuit). Random vectors go through the stream, both ones whose stimulus is uniform and ones with a few conflicting slices. |

The testbenches compare against models of their own. One is a model of the
gates, written per shift step. The others are formulas for the clock and bit
counts.

The benchmark test sets themselves are not available, so no testbench
reproduces published reduction figures. The workload testbench reports the
clocks its random vectors take, against the `N x L` clocks of a fully serial
load.

# Reconfigurable Viterbi traceback for 2^(K-1)-state trellises, K = 5..9

A Viterbi decoder does not decide a bit when it receives it. Its
add-compare-select (ACS) units keep, for every trellis state, one *decision
bit* saying which of the two predecessor states survived. The decoded bits are
recovered later by walking these decisions backwards (the *traceback*). This
RTL is the survivor memory and traceback of a Viterbi decoder that processes
the trellis with only eight ACS units, so eight decision bits arrive per clock
whatever the number of states. Its one datapath serves every constraint
length from K = 5 (16 states, GSM) to K = 9 (256 states, 3GPP/CDMA2000). The
choice is made at run time by a 4-bit input.

Three ideas carry the design:

* **Decisions live in plain byte-wide RAMs, one window per RAM.** A trellis
  stage of K-1 state bits has 2^(K-1) decisions, which fill 2^(K-4) bytes
  (a *segment*). A window of WL = 6K stages fits one 2K x 8 RAM for every K.
  Four such RAMs are used in rotation.
* **Two traceback processors run side by side.** A *dummy* processor, B2,
  traces the newest window. It starts from an arbitrary state, and by the
  time it reaches the window's first stage it has fallen onto the true
  survivor path. The state it ends in seeds the *decoding* processor, B1,
  which traces the older window and emits its bits. Both processors share
  one stage counter.
* **The read address is assembled from the counter and the state.** A small
  shifter and a bank of selectors place the stage number and the state's
  word-index bits at the right positions for the current K. No arithmetic is
  needed per step.

The RTL runs at one trellis stage per clock. The testbench decodes
convolutionally encoded blocks with channel errors at K = 5, 6, 7, 8 and 9.

## Memory layout

Each RAM word holds the decisions of eight consecutive states. Bit j of word
w belongs to state 8w + j. So a state S (K-1 bits) splits into two parts:

| state bits | role |
|---|---|
| S[2:0] (D3..D1) | which bit of the word: select of the survivor multiplexer M1 |
| S[K-2:3] (K-4 bits, "U") | which word of the segment |

Stage L of a window occupies addresses L * 2^(K-4) ... L * 2^(K-4) + 2^(K-4) - 1,
so the address is simply `{stage, U}`:

| K | states | words per stage | WL = 6K | words per window | address |
|---|---|---|---|---|---|
| 9 (3GPP, CDMA2000, W-CDMA) | 256 | 32 | 54 | 1728 | C5..C0 U4..U0 |
| 8 | 128 | 16 | 48 | 768 | 0 C5..C0 U3..U0 |
| 7 (IS-95, 802.11, 802.16, ADSL) | 64 | 8 | 42 | 336 | 00 C5..C0 U2..U0 |
| 6 (IS-54) | 32 | 4 | 36 | 144 | 000 C5..C0 U1 U0 |
| 5 (GSM, PDC) | 16 | 2 | 30 | 60 | 0000 C5..C0 U0 |

Here C5..C0 is the stage number. The four windows together need at most
4 x 1728 words, within the 4 x 2048 available.

## One traceback step

If the trellis state at stage L is S_L, its predecessor is

    S_(L-1) = [S_L << 1, D]   (kept to K-1 bits)

D is the survivor decision stored for S_L. The bit shifted out at the top,
S_L[K-2], is the input bit that drove the encoder into S_L; that is the
decoded bit of stage L. Example, for K = 8: from state 0111111 the decoded
bit is 0, and the predecessor is 1111110 or 1111111, depending on D.

A processor (`vtb_reverse_proc`) is a state register (`vtb_state_reg`, flip-flops D1..D8),
the survivor multiplexer M1 (`vtb_survivor_mux`) and an address selector
(`vtb_addr_select`). Per clock it:

1. receives the RAM word of its current state S_L (the stage and word were
   addressed one clock earlier);
2. picks D = word[S_L[2:0]] through M1;
3. outputs S_L[K-2] as the decoded bit;
4. forms S_(L-1) and, in the same clock, the address of S_(L-1)'s word at
   stage L-1. The synchronous RAM then returns that word for the next step.

Step 4 builds the address from the state register's *next* value and the
counter's *next* value. This is what allows one step per clock with a
synchronous RAM. Built from the register outputs, the address would allow
only one step every two clocks. At K = 5 that rate would fall behind the
writes: a window is written in 60 clocks, and a pass would need over 60.

## Building the read address (counter, shifter, buffers B1-B8)

The shared part is a 6-bit down counter (`vtb_down_counter`) and a 10-bit
shifter (`vtb_arith_shifter`). At the start of a pass the counter is loaded
with WL-1 and then counts down by one per step, so one count is one segment.
The shifter takes `0000 C5..C0` and shifts it left by K-5.

The 11-bit address is then put together as follows:

* bits 10..5 are the shifter's bits 9..4;
* bit 0 is always state bit D4 (U0);
* bits 4..1 each come either from a state bit (D8..D5 through buffers
  B1..B4) or from the shifter's bits 3..0 (through buffers B5..B8).

`vtb_config` derives the selection from K. Address bit i (1 <= i <= 4) takes
the state when i < K-4. Otherwise it takes the shifter. The two sources of a
bit are never selected together. The original design uses tri-state buffers
on a shared line; here each bit is a 2-to-1 multiplexer. With the exclusive
enables both behave the same.

| K | shift | B1 B2 B3 B4 (state) | B5 B6 B7 B8 (shifter) |
|---|---|---|---|
| 9 | 4 | on on on on | off off off off |
| 8 | 3 | off on on on | on off off off |
| 7 | 2 | off off on on | on on off off |
| 6 | 1 | off off off on | on on on off |
| 5 | 0 | off off off off | on on on on |

The resulting address equals `stage << (K-4) | U` for every K. That is the
layout the write side uses.

## Pass schedule

The write controller (`vtb_ph_write_ctrl`) fills window n into RAM n mod 4.
It writes one decision word per valid clock, and after a window's last word
it pulses `win_done_o`. The scheduler (`vtb_tb_ctrl`) then starts a *pass*:
one load clock, then WL step clocks with the counter running WL-1 ... 0.

| pass | B2 (dummy) | B1 (decoding) |
|---|---|---|
| after window w (w >= 2) | window w, from `b2_start_i` | window w-2, from the state B2 ended in one pass earlier |
| after windows 0 and 1 | window w | idle |
| flush A (after `flush_i`, n windows) | idle | window n-2, from B2's last end state |
| flush B | idle | window n-1, from state 0 |

Why w-2 and not w-1: B2's trace of window w ends at the last stage of window
w-1. That state is only available when the pass ends, so the B1 pass that
uses it runs in the next pass, over window w-1. By then that window is
"w-2". At any time one RAM is being written, one is read by B2, one waits for
B1, and one is read by B1. That accounts for all four.

A pass takes WL+2 clocks, counting the clock in which the scheduler sees the
request. Writing a window takes WL * 2^(K-4) >= 2 WL clocks. So passes never
queue, even with decisions arriving every clock. An assertion in
`vtb_tb_ctrl` flags an overrun.

The flush assumes the block was terminated: the encoder ended in state 0
after K-1 zero tail bits. The block must also fill a whole number of
windows. The last window is then decoded from state 0.

## Interface (`vtb_traceback_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `clear_i` | in | 1 | start a new block at window 0, and take `k_i` |
| `k_i` | in | 4 | constraint length 5..9. It is read only on `clear_i`; after reset K is 9. |
| `dec_valid_i`, `dec_word_i` | in | 1, 8 | one ACS decision word per clock: the words of a stage in order 0 .. 2^(K-4)-1, bit j of word w for state 8w+j. There is no back-pressure. |
| `b2_start_i` | in | 8 | start state of the dummy pass: the best-metric state if the ACS provides it, any state otherwise |
| `flush_i` | in | 1 | the block's last window has been written |
| `out_valid_o`, `out_bit_o` | out | 1 | one decoded bit |
| `out_win_o`, `out_stage_o` | out | 16, 6 | its position: bit index = `out_win_o` * 6K + `out_stage_o` |
| `win_done_o`, `pass_done_o`, `flush_done_o`, `busy_o` | out | 1 | status |

Decoded bits leave in traceback order: for each window, stage WL-1 first and
stage 0 last, on WL consecutive clocks. A consumer that needs them in order
writes them to a WL-bit buffer at `out_stage_o`. Window w's bits appear
during the pass after window w+2 is written, or during the flush.

The ACS units are not part of this RTL. In a full decoder they drive
`dec_valid_i` / `dec_word_i` and, optionally, `b2_start_i`. The decision
convention they must follow: the state S = {newest input bit, ...,
oldest}, with predecessors {S[K-3:0], D}.

## Where this design fills gaps in its source

The traceback datapath (counter, shifter, address buffers, state shift
register, M1, two processors sharing the counter), the RAM sizes and the
segment layout follow the original description. Several points are this
design's own reading or choice:

* **Address layout.** The published read-register examples for 3GPP and GSM
  have their labels reversed relative to the segment sizes. They also show a
  7-bit counter, although the counter is described as 6-bit. The published
  buffer-control table would turn on two buffers driving the same address
  bit. This RTL follows the arithmetic of the memory layout: a 6-bit counter,
  and address = stage << (K-4) | word.
* **Buffers B9-B11.** The block diagram shows three further elements between
  flip-flops D8..D5 without describing them. Here the state register is
  shortened for smaller K by masking bits K-1 and above.
* **Next-value addressing**, for one step per clock (see above).
* **The pass schedule, the B2 start-state input, the flush, the window
  numbering and the output tagging**, none of which is specified.
* **Window length** is fixed at 6K. The original allows 5 to 6 times K.
* **K = 8** is supported because the datapath handles it naturally. No
  standard in the original list uses it.
* **Reset and handshake** (valid flag, no back-pressure, asynchronous reset)
  are choices too.

Not modelled: the ACS units, their branch metrics and their state
scheduling. These come from the turbo decoding array the traceback is meant
to share hardware with. Also not modelled are the process, power and area
figures of the original chip (180 nm, 20 MHz, 69 mW, 2.8 mm^2).

## Files

| file | block |
|---|---|
| `rtl/vtb_pkg.sv` | constants, `cfg_t` configuration struct |
| `rtl/vtb_traceback_top.sv` | top level |
| `rtl/vtb_config.sv` | K to shift, buffer enables, WL, segment size |
| `rtl/vtb_down_counter.sv` | shared 6-bit down counter |
| `rtl/vtb_arith_shifter.sv` | shared 10-bit shifter |
| `rtl/vtb_reverse_proc.sv` | one traceback processor (B1 or B2) |
| `rtl/vtb_state_reg.sv` | state register D1..D8 |
| `rtl/vtb_survivor_mux.sv` | survivor multiplexer M1 |
| `rtl/vtb_addr_select.sv` | read-address bit selection (B1..B8) |
| `rtl/vtb_ph_ram.sv` | 2K x 8 path-history RAM, separate read and write ports |
| `rtl/vtb_ph_write_ctrl.sv` | decision write addressing, window rotation |
| `rtl/vtb_tb_ctrl.sv` | pass scheduler |
| `tb/tb_<module>.sv` | self-checking testbench of each module |

## Verification

Each module has a self-checking testbench, `tb/tb_<module>.sv`, which ends by
printing `TB_RESULT checks=N failures=M`.

`tb_vtb_traceback_top` exercises the whole design at its default sizes. It
contains a behavioural hard-decision Viterbi ACS model. For each K it
encodes a random block at rate 1/2 with standard generator polynomials:
561/753 for K=9, 171/133 for K=7, 23/33 for K=5 (octal), and
similar codes for K=6 and 8. Some blocks get random bit errors. The model's
decisions are fed to the design eight per clock, sometimes with gaps. The
decoded bits are compared:

* always, with a software model of the same windowed traceback, bit for bit;
* on error-free blocks, also with the transmitted bits.

The test also checks timing: each window's bits arrive on WL consecutive
clocks, and each pass ends one clock after its last bit. It counts the
mechanisms and fails if any never happened: dummy-only passes, joint B1/B2
passes, flush passes, RAM reuse, K switches, non-zero dummy start states and
input gaps.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/vtb_pkg.sv \
        tb/tb_vtb_traceback_top.sv --top-module tb_vtb_traceback_top -o sim
    ./obj_dir/sim

Replace the testbench name to run another module's test. The full-size
end-to-end test runs in well under a second. To try another standard's
polynomials, edit `poly()` in the top testbench. To change the window length
or the number of windows, edit `WL_FACTOR` and `NUM_WIN` in `vtb_pkg`. Check
first that WL_FACTOR * K_MAX * 2^(K_MAX-4) still fits `RAM_DEPTH` and that
WL-1 fits the 6-bit counter. `NUM_WIN` must stay 4 for the pass schedule
above.

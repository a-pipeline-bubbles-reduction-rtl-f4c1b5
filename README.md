# Auxiliary matching stores for an explicit-token-store dataflow pipeline

In a Monsoon-style dynamic dataflow processor, a two-operand instruction
fires only when both of its operand tokens have met in the frame store. The
first token to arrive just writes its value into the frame slot. It uses a
full pass through the pipeline and produces nothing: a pipeline bubble.

An *auxiliary matching store* (AMS) sits between the pipeline's output and
its input, and catches such tokens before they re-enter. When both operands
meet in the AMS, they go back into the pipeline together as one matched
pair. That pair fires at once, with no frame-store wait and no bubble. A
token that finds no partner in the AMS still works: it goes to the frame
store as usual. So the AMS only ever saves work. It never changes results.

This RTL implements two organisations of such a store:

* **FOSS** – sets of eight slots, indexed by `IP mod K`. Replacement is LRU,
  using a usage count per slot. The AMS can only keep a few blocks
  "resident" if few code blocks are active, and FOSS relies on the runtime
  to keep that number small.
* **SOCS** – eight banks, one per active code block. An *instruction transfer
  buffer* (ITB) assigns the banks. A *controlling process queue* (CPQ)
  suspends new code blocks while all eight banks are in use, so SOCS limits
  the number of active blocks in hardware.

`ams_top` puts the two side by side. Each has its own ports, so either one
can be attached to a pipeline.

## Tokens and the pipeline interface

A token is 144 bits (`ams_pkg::token_t`), made of a tag word and a value
word. Each word is an 8-bit type byte plus 64 bits. The tag holds IP (24
bits), PE (8 bits) and FP (24 bits); 8 tag bits are unused. This design
gives three bits of the tag type byte a meaning:

| bit | name   | meaning                                                  |
|-----|--------|----------------------------------------------------------|
| 0   | dyadic | the destination instruction has two operands            |
| 1   | port   | 0 = left operand, 1 = right operand                      |
| 2   | link   | parameter/return-value token between code blocks (SOCS)  |

An executed instruction can produce two result tokens in one cycle. Each
unit (`foss`, `socs`) has the same pipeline-side ports for them:

* `next_valid/next_tok` – the token for IP+1. It always re-enters the
  pipeline in the same cycle, with top priority, and never goes into the
  AMS. Giving it top priority keeps the current code block running.
* `side_valid/side_tok/side_ready` – the token for IP+S. It is handled by the
  AMS. It is a valid/ready handshake: the token waits while `side_ready` is
  low.
* `pipe_valid/pipe_pkg/pipe_src` – what enters the pipeline this cycle. The
  package is either a single token or a matched pair (`pipe_pkg.pair = 1`,
  left operand in `a`, right operand in `b`). The pipeline takes one package
  per cycle, so there is no ready signal.
* `ev` – one-cycle event strobes (match, spill and so on), for monitoring.

Every unit contains a matching token queue (MTQ) of pairs, an unmatching
token queue (UTQ) of single tokens, and `pipe_arbiter`. The arbiter's
priority is: IP+1 token, then MTQ, then UTQ. Giving the UTQ the lowest
priority means new code blocks only get in when there is nothing else to
do, which keeps the number of active blocks small.

## FOSS (`foss`, `foss_ams`)

`foss_ams` holds `K` sets of `SLOTS` (8) slots. Each slot has:

* a presence bit PB;
* a usage count UC: 0 means empty, 1 means the newest token;
* a content field CF holding the whole token.

A dyadic IP+S token addresses set `IP mod K`. In one cycle exactly one of
these happens:

| action | condition                              | effect                                       |
|--------|----------------------------------------|----------------------------------------------|
| match  | a full slot holds the same IP and FP   | pair to MTQ; slot emptied (PB = 0, UC = 0)   |
| fill   | no partner; a slot is empty            | token stored with UC = 1                     |
| spill  | no partner; all eight slots are full   | victim to UTQ; the token takes its slot, UC = 1 |
| fresh  | no input; MTQ and UTQ both empty       | oldest token of the first occupied set to UTQ |

On fill and spill, every other occupied slot in the set has its UC raised
by one, so UC counts how many tokens have arrived since this one. UC stops
at its maximum (`UC_W` = 4 bits). With `REPL = REPL_LRU` (the default), the
spill victim is the slot with the largest UC. `REPL_LIFO` picks the smallest
UC instead.

Monadic IP+S tokens bypass the store and go into the UTQ. A side token is
accepted only while neither queue is full.

A spilled or refreshed token is not lost: it goes through the UTQ to the
frame store, and meets its partner there. This is why the unit never needs
to know whether a partner will ever come.

## SOCS (`socs`, `socs_itb`, `socs_bank`, `socs_tcd`)

SOCS turns FOSS's eight ways into eight banks, one per active code block.
Each bank (`socs_bank`) has `K` direct-mapped slots, holding PB and CF with
no usage count. Slot `IP mod K` is used. The three rules are:

* match – same IP: the pair goes to the MTQ;
* spill – a different IP: the old token goes to the UTQ;
* fill – the slot is empty: the token is stored.

The ITB (`socs_itb`) has one entry per bank: a valid bit, the block's FP,
and a token count TC. Its job is to decide which blocks are active. A
dyadic IP+S token is handled like this:

1. Look up its FP in the ITB. On a hit, use that entry's bank. On a miss,
   allocate the lowest free entry for the FP.
2. Operate the bank. TC goes up by 1 for the arriving token. The token count
   decrementor (`socs_tcd`) lowers it by 2 for a match and by 1 for a spill
   or a refresh. So TC is always the number of tokens held in the bank.
3. An entry whose TC reaches 0 is released.
4. If no entry is free, eight blocks are already active. A *linking* token
   is then parked in the CPQ, which suspends the block it would start. Any
   other token of a block without a bank goes to the UTQ (the "bypass"
   event) and is matched in the frame store.

The CPQ head is handled before new IP+S tokens whenever an ITB entry is
free. That activates the suspended block. It is also handled first when its
own block has become active in the meantime; a second ITB lookup port,
applied to the CPQ head's FP, detects that case.

A bank can hold a token whose partner went to the frame store, and then it
never empties by matching. The refresh rule prevents this. Whenever MTQ and
UTQ are empty and the current token uses neither a bank nor the UTQ, the
lowest-numbered non-empty bank gives one token to the UTQ. Refresh also runs
while a linking token is stalled waiting for room in a full CPQ. Without
that, a full CPQ would block the very release that empties it.

A side token stalls only when the queue its route needs is full: the CPQ
for suspension, MTQ and UTQ for a bank operation, the UTQ otherwise.

## Timing

Every AMS action takes one clock cycle. The store is a register array that
is read combinationally and written at the clock edge. The event strobes
and the queue write strobes come out in the same cycle as the action.

A matched pair reaches the pipeline at the earliest one cycle after its
second operand arrives, because it passes through the MTQ. The IP+1 token
takes zero cycles.

All resets are synchronous and active-low. Reset empties every slot, ITB
entry and queue.

## Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `SLOTS` (FOSS ways) | 8 | one per pipeline stage, as in the architecture |
| `NBANK` (SOCS banks / active blocks) | 8 | as in the architecture |
| `K` (sets per FOSS store, slots per bank) | 64 | the architecture sets this to the activation-frame size but gives no number; 64 is a choice |
| `UC_W` | 4 | choice |
| `REPL` | `REPL_LRU` | LRU as in the architecture; LIFO also available |
| `MTQ_DEPTH`, `UTQ_DEPTH`, `CPQ_DEPTH` | 16 | choice |

Non-power-of-two `K` works, but costs a modulo operation.

## Where this departs from, or adds to, the architecture

* FOSS's match rule, as the architecture gives it, compares only the FP of
  the held token with the arriving one. Here the IP is compared as well,
  because several IPs share a set.
* SOCS's description says that a token that finds no free ITB entry goes to
  the CPQ, and also that only linking tokens may go to the CPQ. This design
  parks linking tokens and sends all other such tokens to the UTQ.
* Several choices are this design's own: the refresh policy (how many
  tokens, and which ones), the release of an ITB entry when TC reaches 0,
  the back-pressure on the IP+S token, sending monadic tokens through the
  UTQ, the queue depths, and the encoding of the tag type bits.
* The Monsoon pipeline and its frame store are not part of the RTL. Neither
  is the resource manager that FOSS relies on to limit the number of
  dispatched frames. The testbenches model the frame store behaviourally.
* The compile-time side of the technique is software and is not included:
  laying out related instructions nearby in D_level order along the
  critical path.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`.

* `foss_ams_tb` runs an LRU and a LIFO instance against a slot-level
  reference model, on random tokens.
* `socs_bank_tb` and `socs_itb_tb` check the bank and the ITB against
  reference models.
* `token_fifo_tb`, `pipe_arbiter_tb` and `socs_tcd_tb` cover the queue, the
  arbiter and the decrementor.
* `dataflow_env` is shared by the end-to-end tests. It plays the pipeline
  and frame store. It runs a workload of many code blocks that share the
  same code, like loop iterations, interleaved twelve at a time. It checks:
  * every instruction fires exactly once, with the right left and right
    values;
  * IP+1 tokens enter the pipeline in the cycle they are offered;
  * at the end, the frame store and the unit are empty.

  It also counts frame-store bubbles.
* `foss_tb` and `socs_tb` run the environment at reduced sizes. They require
  every mechanism to occur at least once: match, fill, spill, fresh or
  refresh, passing, back-pressure, and for SOCS also block allocation,
  release, CPQ push and pop, and bypass.
* `ams_top_tb` runs both units at the default parameters: 40 blocks of 80
  instructions each. It takes well under a second.
* `ams_latency_tb` is a directed test of both units at default sizes. It
  checks cycle counts for:
  * an IP+1 token: enters in the same cycle;
  * a matched pair: one cycle after its second operand;
  * a monadic token through the UTQ: one cycle;
  * a lone token: refreshed and at the pipeline two cycles later;
  * an IP+1 token winning over a waiting pair.
* `ams_loop_tb` is a closed-loop workload (`pipeline_model`). It models an
  eight-stage pipeline with a frame store that really executes a small
  program. A loop of 40 iterations, each its own code block, is started at
  once. Each block has nine dyadic and sixteen monadic instructions. Five
  of the dyadic ones receive both operands as IP+S tokens and can match in
  an AMS. The other four receive one operand as an IP+1 token, which
  bypasses the AMS, so they always match in the frame store. Each block's
  result is checked against a direct computation. At the defaults, of the
  360 dyadic firings:
  * FOSS fires 198 as matched pairs; the other 162 cost a bubble. All 40
    entry tokens share set 0, which causes 124 spills.
  * SOCS fires only 68 as pairs and suspends blocks through the CPQ 20
    times.

  SOCS does worse here because it releases a bank as soon as the bank's
  count reaches 0. In this chain-shaped program that happens between two
  steps of the same block, so a suspended block takes the bank. The block
  that lost it then sends its later tokens to the frame store.

In `dataflow_env`, blocks keep producing tokens even while they are
suspended. A real suspended block would not, because its linking token is
held back. So SOCS's bypass count in these tests is higher than a real
program would show. The bubble counts are not a performance estimate.

To run a test with Verilator:

```
verilator --binary --timing --assert rtl/*.sv tb/dataflow_env.sv tb/ams_top_tb.sv \
          --top-module ams_top_tb -Mdir obj && ./obj/Vams_top_tb
```

For a unit test, list `rtl/ams_pkg.sv`, the module's file and the files it
instantiates, then its testbench.

// socs: the SOCS auxiliary matching store unit placed at the output of the
// processing pipeline.
//
// Unlike FOSS, SOCS controls the number of active code blocks in hardware.
// The eight slots per set of FOSS become NBANK (eight) AMS banks, one per
// active code block, each with K direct-mapped slots. A dyadic IP+S token
// (side_*) is handled in one cycle:
//   1. its FP is looked up in the instruction transfer buffer (socs_itb);
//      on a hit the token goes to that block's bank; on a miss a free entry
//      is allocated for its FP and the token goes to the new bank;
//   2. the bank matches (pair to MTQ), spills (old token to UTQ) or fills;
//      the entry's token count TC is raised by 1 for the arriving token and
//      lowered through the token count decrementor (socs_tcd) by 2 for a
//      match and by 1 for a spill or a refresh;
//   3. with no free entry, eight blocks are active: a linking token (tag
//      type bit link) is parked in the controlling process queue (CPQ), which
//      suspends its new code block; any other token goes to the UTQ and is
//      matched in the frame store.
// When an entry's TC falls to 0 it is released. While an entry is free, or
// while the block of the CPQ head has meanwhile become active, the head of
// the CPQ is processed ahead of new side tokens, activating the suspended
// block. Monadic tokens go straight to the UTQ. When MTQ and UTQ are
// empty and no token uses a bank or the UTQ, the lowest-numbered non-empty
// bank refreshes one token to the UTQ. A side token waits (side_ready low)
// only when the queue it needs is full. The IP+1 token (next_*) and the pipe_arbiter priorities
// are as in FOSS.
//
// The structure follows the SOCS description. Its text says that a token
// finding no free entry goes to the CPQ, and also that only linking tokens
// may be put there; this design parks linking tokens and sends the others to
// the UTQ. The refresh, the handshake (side_ready) and the queue depths are
// this design's own choices. Reset is active-low and synchronous.
module socs
  import ams_pkg::*;
#(
  parameter int K         = 64,
  parameter int NBANK     = 8,
  parameter int MTQ_DEPTH = 16,
  parameter int UTQ_DEPTH = 16,
  parameter int CPQ_DEPTH = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      next_valid,
  input  token_t    next_tok,
  input  logic      side_valid,
  input  token_t    side_tok,
  output logic      side_ready,
  output logic      pipe_valid,
  output pipe_pkg_t pipe_pkg,
  output pipe_src_e pipe_src,
  output socs_ev_t  ev,
  output logic [NBANK-1:0] active_blocks,  // ITB valid bits
  output logic      idle                    // banks and all queues empty
);

  localparam int BW   = $clog2(NBANK);
  localparam int TC_W = $clog2(K + 2);

  // queues
  logic   mtq_empty, mtq_full, utq_empty, utq_full, cpq_empty, cpq_full;
  logic   mtq_push, utq_push, cpq_push, mtq_pop, utq_pop, cpq_pop;
  pair_t  mtq_din, mtq_head;
  token_t utq_din, utq_head, cpq_head;
  logic [$clog2(MTQ_DEPTH+1)-1:0] mtq_count;
  logic [$clog2(UTQ_DEPTH+1)-1:0] utq_count;
  logic [$clog2(CPQ_DEPTH+1)-1:0] cpq_count;

  // selection of the token handled this cycle
  logic   use_cpq, sel_valid, out_ready, proceed, sel_dyadic;
  token_t sel_tok;

  // ITB
  logic          hit, free_avail, rel, cpq_active;
  logic [BW-1:0] hit_idx, free_idx, op_bank;
  logic          alloc, bank_op, do_pass, do_bypass;
  logic          r_pass, r_bank, r_alloc, r_cpq, r_bypass;

  // banks
  logic [NBANK-1:0] b_match, b_spill, b_fill, b_refresh, b_nonempty, b_op, b_refreq;
  pair_t            b_pair [NBANK];
  token_t           b_tok  [NBANK];
  logic             refresh_req, any_match, any_spill, any_refresh;
  logic [BW-1:0]    ref_bank, ev_bank;

  // TCD
  logic          dec_valid;
  logic [BW-1:0] dec_idx;
  logic [1:0]    dec_amt;

  assign use_cpq    = !cpq_empty && (free_avail || cpq_active);
  assign sel_valid  = use_cpq || side_valid;
  assign sel_tok    = use_cpq ? cpq_head : side_tok;
  assign sel_dyadic = is_dyadic(sel_tok);

  // Route of the selected token, then whether its destination has room: a
  // bank operation may write the MTQ (match) or the UTQ (spill), passing and
  // bypass write the UTQ, suspension writes the CPQ.
  always_comb begin
    r_pass   = 1'b0;
    r_bank   = 1'b0;
    r_alloc  = 1'b0;
    r_cpq    = 1'b0;
    r_bypass = 1'b0;
    op_bank  = hit_idx;
    if (!sel_dyadic) begin
      r_pass = 1'b1;
    end else if (hit) begin
      r_bank = 1'b1;
    end else if (free_avail) begin
      r_bank  = 1'b1;
      r_alloc = 1'b1;
      op_bank = free_idx;
    end else if (is_link(sel_tok)) begin
      r_cpq = 1'b1;
    end else begin
      r_bypass = 1'b1;
    end
    if (r_cpq)       out_ready = !cpq_full;
    else if (r_bank) out_ready = !mtq_full && !utq_full;
    else             out_ready = !utq_full;
  end

  assign proceed    = sel_valid && out_ready;
  assign side_ready = out_ready && !use_cpq;
  assign cpq_pop    = proceed && use_cpq;
  assign bank_op    = proceed && r_bank;
  assign alloc      = proceed && r_alloc;
  assign cpq_push   = proceed && r_cpq;
  assign do_pass    = proceed && r_pass;
  assign do_bypass  = proceed && r_bypass;

  socs_itb #(.NBANK(NBANK), .TC_W(TC_W)) u_itb (
    .clk, .rst_n,
    .lookup_fp (sel_tok.tag.fp),
    .hit, .hit_idx, .free_avail, .free_idx,
    .lookup2_fp(cpq_head.tag.fp),
    .hit2      (cpq_active),
    .inc_valid (bank_op),
    .inc_idx   (op_bank),
    .alloc,
    .alloc_fp  (sel_tok.tag.fp),
    .dec_valid, .dec_idx, .dec_amt,
    .vb        (active_blocks),
    .ev_release(rel)
  );

  // Refresh from the lowest-numbered non-empty bank, in any cycle in which
  // the queues are empty and no token uses a bank or the UTQ. It also runs
  // while a linking token waits for room in a full CPQ: the banks then drain,
  // a count reaches 0 and a suspended block can be admitted.
  assign refresh_req = mtq_empty && utq_empty && !bank_op && !do_pass && !do_bypass;
  always_comb begin
    ref_bank = '0;
    for (int b = NBANK - 1; b >= 0; b--) if (b_nonempty[b]) ref_bank = BW'(b);
  end

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    assign b_op[b]    = bank_op && (op_bank == BW'(b));
    assign b_refreq[b] = refresh_req && (ref_bank == BW'(b));
    socs_bank #(.K(K)) u_bank (
      .clk, .rst_n,
      .op_valid   (b_op[b]),
      .op_tok     (sel_tok),
      .refresh_req(b_refreq[b]),
      .ev_match   (b_match[b]),
      .ev_spill   (b_spill[b]),
      .ev_fill    (b_fill[b]),
      .ev_refresh (b_refresh[b]),
      .pair       (b_pair[b]),
      .out_tok    (b_tok[b]),
      .nonempty   (b_nonempty[b])
    );
  end

  assign any_match   = |b_match;
  assign any_spill   = |b_spill;
  assign any_refresh = |b_refresh;
  assign ev_bank     = any_refresh ? ref_bank : op_bank;

  socs_tcd #(.NBANK(NBANK)) u_tcd (
    .match(any_match), .spill(any_spill), .refresh(any_refresh), .bank(ev_bank),
    .dec_valid, .dec_idx, .dec_amt
  );

  assign mtq_push = any_match;
  assign mtq_din  = b_pair[op_bank];
  assign utq_push = any_spill || any_refresh || do_pass || do_bypass;
  assign utq_din  = (any_spill || any_refresh) ? b_tok[ev_bank] : sel_tok;

  token_fifo #(.T(pair_t), .DEPTH(MTQ_DEPTH)) u_mtq (
    .clk, .rst_n, .push(mtq_push), .din(mtq_din), .pop(mtq_pop),
    .dout(mtq_head), .empty(mtq_empty), .full(mtq_full), .count(mtq_count)
  );

  token_fifo #(.T(token_t), .DEPTH(UTQ_DEPTH)) u_utq (
    .clk, .rst_n, .push(utq_push), .din(utq_din), .pop(utq_pop),
    .dout(utq_head), .empty(utq_empty), .full(utq_full), .count(utq_count)
  );

  token_fifo #(.T(token_t), .DEPTH(CPQ_DEPTH)) u_cpq (
    .clk, .rst_n, .push(cpq_push), .din(side_tok), .pop(cpq_pop),
    .dout(cpq_head), .empty(cpq_empty), .full(cpq_full), .count(cpq_count)
  );

  pipe_arbiter u_arb (
    .next_valid, .next_tok,
    .mtq_empty, .mtq_head, .utq_empty, .utq_head,
    .mtq_pop, .utq_pop, .pipe_valid, .pipe_pkg, .pipe_src
  );

  always_comb begin
    ev.match    = any_match;
    ev.fill     = |b_fill;
    ev.spill    = any_spill;
    ev.refresh  = any_refresh;
    ev.pass     = do_pass;
    ev.alloc    = alloc;
    ev.release_ = rel;
    ev.cpq_push = cpq_push;
    ev.cpq_pop  = cpq_pop;
    ev.bypass   = do_bypass;
  end

  assign idle = !(|b_nonempty) && mtq_empty && utq_empty && cpq_empty;

  a_cpq_only_side: assert property (@(posedge clk) disable iff (!rst_n) cpq_push |-> !use_cpq);
  a_one_bank_event: assert property (@(posedge clk) disable iff (!rst_n)
                                     $onehot0({any_match, any_spill, any_refresh, do_pass, do_bypass}));

endmodule

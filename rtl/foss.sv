// foss: the FOSS auxiliary matching store unit placed at the output of the
// processing pipeline.
//
// Each cycle the pipeline may produce two result tokens. The one for the
// next instruction (IP+1, next_*) goes straight back into the pipeline. The
// other one (IP+S, side_*) is handled by the in/out/passing rule:
//   in      : a dyadic token enters the AMS (foss_ams) when neither the MTQ
//             nor the UTQ is full; a match sends the pair to the MTQ, a spill
//             sends the victim to the UTQ;
//   passing : a monadic token needs no matching and is written to the UTQ;
//   fresh   : when both queues are empty and no side token arrives, the AMS
//             gives up its oldest token to the UTQ.
// pipe_arbiter then feeds the pipeline with the IP+1 token first, a matched
// pair from the MTQ second and a UTQ token last. A pair fires its
// instruction without a frame-store access, which removes the bubble the
// first operand would otherwise cost; a UTQ token is matched in the frame
// store as usual. The token from the AMS can thus reach the pipeline one
// cycle after the partner arrives (through a queue); the IP+1 token enters
// in the same cycle it is offered.
//
// side_ready is the back-pressure to the pipeline output: a side token is
// taken only in a cycle with side_ready high. The structure and priorities
// follow the FOSS description; the handshake, the queue depths and sending
// monadic tokens through the UTQ are this design's own choices. Reset is
// active-low and synchronous.
module foss
  import ams_pkg::*;
#(
  parameter int    K         = 64,
  parameter int    SLOTS     = 8,
  parameter int    UC_W      = 4,
  parameter repl_e REPL      = REPL_LRU,
  parameter int    MTQ_DEPTH = 16,
  parameter int    UTQ_DEPTH = 16
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
  output foss_ev_t  ev,
  output logic      idle       // AMS and both queues empty
);

  logic   mtq_empty, mtq_full, utq_empty, utq_full, mtq_pop, utq_pop;
  pair_t  mtq_din, mtq_head;
  token_t utq_din, utq_head, ams_utq_tok;
  logic   mtq_push, utq_push, ams_utq_push;
  logic   out_ready, ams_in_valid, pass, ams_busy;
  logic [$clog2(MTQ_DEPTH+1)-1:0] mtq_count;
  logic [$clog2(UTQ_DEPTH+1)-1:0] utq_count;

  assign out_ready    = !mtq_full && !utq_full;
  assign side_ready   = out_ready;
  assign ams_in_valid = side_valid && is_dyadic(side_tok);
  assign pass         = side_valid && !is_dyadic(side_tok) && out_ready;

  foss_ams #(.K(K), .SLOTS(SLOTS), .UC_W(UC_W), .REPL(REPL)) u_ams (
    .clk, .rst_n,
    .in_valid (ams_in_valid),
    .in_tok   (side_tok),
    .in_ready (),
    .out_ready(out_ready),
    .fresh_req(mtq_empty && utq_empty && !side_valid),
    .mtq_push (mtq_push),
    .mtq_pair (mtq_din),
    .utq_push (ams_utq_push),
    .utq_tok  (ams_utq_tok),
    .ev_match (ev.match),
    .ev_fill  (ev.fill),
    .ev_spill (ev.spill),
    .ev_fresh (ev.fresh),
    .busy     (ams_busy)
  );

  assign ev.pass  = pass;
  assign utq_push = ams_utq_push || pass;
  assign utq_din  = pass ? side_tok : ams_utq_tok;

  token_fifo #(.T(pair_t), .DEPTH(MTQ_DEPTH)) u_mtq (
    .clk, .rst_n, .push(mtq_push), .din(mtq_din), .pop(mtq_pop),
    .dout(mtq_head), .empty(mtq_empty), .full(mtq_full), .count(mtq_count)
  );

  token_fifo #(.T(token_t), .DEPTH(UTQ_DEPTH)) u_utq (
    .clk, .rst_n, .push(utq_push), .din(utq_din), .pop(utq_pop),
    .dout(utq_head), .empty(utq_empty), .full(utq_full), .count(utq_count)
  );

  pipe_arbiter u_arb (
    .next_valid, .next_tok,
    .mtq_empty, .mtq_head, .utq_empty, .utq_head,
    .mtq_pop, .utq_pop, .pipe_valid, .pipe_pkg, .pipe_src
  );

  assign idle = !ams_busy && mtq_empty && utq_empty;

  a_single_utq_writer: assert property (@(posedge clk) disable iff (!rst_n)
                                        !(ams_utq_push && pass));

endmodule

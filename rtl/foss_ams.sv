// foss_ams: the matching store of the FOSS auxiliary matching store.
//
// K sets of SLOTS slots (eight by default, one per Monsoon pipeline stage).
// A slot holds a presence bit PB, a usage count UC and a content field CF
// with a whole token. A dyadic token selects set IP mod K and, in one cycle:
//   match : a full slot holds its partner (same IP and FP) -> the pair goes
//           to the MTQ, the slot is emptied (PB = 0, UC = 0);
//   fill  : no partner, a slot is empty -> the token is stored there;
//   spill : no partner, all slots full -> the replacement victim goes to the
//           UTQ and the token takes its slot.
// On fill and spill the new token gets UC = 1 and every other occupied slot
// of the set counts up by one, so UC is the token's age in arrivals (it
// saturates at its maximum). With REPL_LRU the victim is the slot with the
// largest UC, with REPL_LIFO the one with the smallest.
//   fresh : in a cycle with no input and fresh_req high (the parent raises it
//           when MTQ and UTQ are empty), the oldest token of the lowest-numbered
//           non-empty set goes to the UTQ so that it can meet its partner in
//           the frame store.
// The set layout, UC rule, match/spill/fill rules and the LRU choice follow
// the FOSS description. The partner test compares IP as well as FP, since
// several IPs share a set; the single-cycle timing, the fresh choice, the UC
// width and the saturation are this design's own choices.
//
// Interface: in_valid/in_tok/in_ready is a valid/ready handshake, ready when
// out_ready (room in MTQ and UTQ). mtq_push/utq_push are one-cycle write
// strobes for the queues in the same cycle as the action. At most one of the
// ev_* strobes is high per cycle. Reset (active-low, synchronous) empties
// every slot.
module foss_ams
  import ams_pkg::*;
#(
  parameter int    K     = 64,
  parameter int    SLOTS = 8,
  parameter int    UC_W  = 4,
  parameter repl_e REPL  = REPL_LRU
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  token_t in_tok,
  output logic   in_ready,
  input  logic   out_ready,
  input  logic   fresh_req,
  output logic   mtq_push,
  output pair_t  mtq_pair,
  output logic   utq_push,
  output token_t utq_tok,
  output logic   ev_match,
  output logic   ev_fill,
  output logic   ev_spill,
  output logic   ev_fresh,
  output logic   busy          // some slot is occupied
);

  localparam int SW = (K > 1) ? $clog2(K) : 1;
  localparam int JW = (SLOTS > 1) ? $clog2(SLOTS) : 1;
  localparam logic [UC_W-1:0] UC_MAX = '1;

  logic             pb [K][SLOTS];
  logic [UC_W-1:0]  uc [K][SLOTS];
  token_t           cf [K][SLOTS];

  logic [SW-1:0] idx;
  logic          take;
  logic          hit, has_empty;
  logic [JW-1:0] hit_j, empty_j, victim_j, new_j;
  logic [K-1:0]  set_busy;
  logic [SW-1:0] fresh_set;
  logic [JW-1:0] fresh_j;
  logic          do_fresh;

  assign idx      = SW'(in_tok.tag.ip % K);
  assign in_ready = out_ready;
  assign take     = in_valid && in_ready;

  // Search of the addressed set.
  always_comb begin
    hit       = 1'b0;
    hit_j     = '0;
    has_empty = 1'b0;
    empty_j   = '0;
    victim_j  = '0;
    for (int j = SLOTS - 1; j >= 0; j--) begin
      if (pb[idx][j] && same_tag(cf[idx][j], in_tok)) begin
        hit   = 1'b1;
        hit_j = JW'(j);
      end
      if (!pb[idx][j]) begin
        has_empty = 1'b1;
        empty_j   = JW'(j);
      end
    end
    for (int j = 1; j < SLOTS; j++) begin
      if (REPL == REPL_LRU) begin
        if (uc[idx][j] > uc[idx][victim_j]) victim_j = JW'(j);
      end else begin
        if (uc[idx][j] < uc[idx][victim_j]) victim_j = JW'(j);
      end
    end
    new_j = has_empty ? empty_j : victim_j;
  end

  // Choice of the token to refresh.
  always_comb begin
    for (int s = 0; s < K; s++) begin
      set_busy[s] = 1'b0;
      for (int j = 0; j < SLOTS; j++) set_busy[s] = set_busy[s] | pb[s][j];
    end
    fresh_set = '0;
    for (int s = K - 1; s >= 0; s--) if (set_busy[s]) fresh_set = SW'(s);
    fresh_j = '0;
    for (int j = SLOTS - 1; j >= 0; j--)
      if (pb[fresh_set][j] && (!pb[fresh_set][fresh_j] || uc[fresh_set][j] >= uc[fresh_set][fresh_j]))
        fresh_j = JW'(j);
  end

  assign busy     = |set_busy;
  assign do_fresh = !in_valid && fresh_req && out_ready && busy;

  always_comb begin
    ev_match = take && hit;
    ev_fill  = take && !hit && has_empty;
    ev_spill = take && !hit && !has_empty;
    ev_fresh = do_fresh;
    mtq_push = ev_match;
    mtq_pair = make_pair(cf[idx][hit_j], in_tok);
    utq_push = ev_spill || ev_fresh;
    utq_tok  = ev_spill ? cf[idx][victim_j] : cf[fresh_set][fresh_j];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < K; s++)
        for (int j = 0; j < SLOTS; j++) begin
          pb[s][j] <= 1'b0;
          uc[s][j] <= '0;
        end
    end else if (ev_match) begin
      pb[idx][hit_j] <= 1'b0;
      uc[idx][hit_j] <= '0;
    end else if (ev_fill || ev_spill) begin
      for (int j = 0; j < SLOTS; j++)
        if (JW'(j) != new_j && uc[idx][j] != '0 && uc[idx][j] != UC_MAX)
          uc[idx][j] <= uc[idx][j] + 1'b1;
      pb[idx][new_j] <= 1'b1;
      uc[idx][new_j] <= UC_W'(1);
      cf[idx][new_j] <= in_tok;
    end else if (ev_fresh) begin
      pb[fresh_set][fresh_j] <= 1'b0;
      uc[fresh_set][fresh_j] <= '0;
    end
  end

  a_one_event: assert property (@(posedge clk) disable iff (!rst_n)
                                $onehot0({ev_match, ev_fill, ev_spill, ev_fresh}));

endmodule

// socs_bank: one AMS bank of the SOCS auxiliary matching store.
//
// A bank belongs to one active code block (one frame pointer, kept in the
// instruction transfer buffer). It has K direct-mapped slots, each a presence
// bit PB and a content field CF; slot IP mod K is used. For an operation
// (op_valid) in one cycle:
//   match : the slot is full and holds a token with the same IP -> the pair
//           is output (ev_match, pair), the slot is emptied;
//   spill : the slot is full with another IP -> the old token is output
//           (ev_spill, out_tok) and the new one takes the slot;
//   fill  : the slot is empty -> the token is stored, PB is set.
// refresh_req, in a cycle without op_valid, removes the token of the
// lowest-numbered full slot and outputs it (ev_refresh, out_tok).
// The slot layout and the three rules follow the SOCS description; the
// refresh choice and the single-cycle timing are this design's own. The FP is
// not compared: the bank is owned by one frame. Reset (active-low,
// synchronous) empties all slots.
module socs_bank
  import ams_pkg::*;
#(
  parameter int K = 64
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   op_valid,
  input  token_t op_tok,
  input  logic   refresh_req,
  output logic   ev_match,
  output logic   ev_spill,
  output logic   ev_fill,
  output logic   ev_refresh,
  output pair_t  pair,
  output token_t out_tok,
  output logic   nonempty
);

  localparam int SW = (K > 1) ? $clog2(K) : 1;

  logic   pb [K];
  token_t cf [K];

  logic [SW-1:0] idx, ref_idx;
  logic          full_here;

  assign idx       = SW'(op_tok.tag.ip % K);
  assign full_here = pb[idx];

  always_comb begin
    nonempty = 1'b0;
    ref_idx  = '0;
    for (int s = K - 1; s >= 0; s--)
      if (pb[s]) begin
        nonempty = 1'b1;
        ref_idx  = SW'(s);
      end
  end

  always_comb begin
    ev_match   = op_valid && full_here && (cf[idx].tag.ip == op_tok.tag.ip);
    ev_spill   = op_valid && full_here && (cf[idx].tag.ip != op_tok.tag.ip);
    ev_fill    = op_valid && !full_here;
    ev_refresh = !op_valid && refresh_req && nonempty;
    pair       = make_pair(cf[idx], op_tok);
    out_tok    = ev_refresh ? cf[ref_idx] : cf[idx];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < K; s++) pb[s] <= 1'b0;
    end else if (ev_match) begin
      pb[idx] <= 1'b0;
    end else if (ev_spill || ev_fill) begin
      pb[idx] <= 1'b1;
      cf[idx] <= op_tok;
    end else if (ev_refresh) begin
      pb[ref_idx] <= 1'b0;
    end
  end

endmodule

// ams_pkg: token format and shared types of the auxiliary matching stores.
//
// A Monsoon token is a tag/value pair of two 72-bit words, each an 8-bit
// hardware type byte followed by 64 bits (144 bits in all). The tag's 64 bits
// carry the instruction pointer IP (24 bits), the processing element number
// PE (8 bits) and the frame pointer FP (24 bits); the remaining 8 bits are
// unused here. Field widths follow the Monsoon token format; the placement of
// the unused byte and the meaning of the tag type bits are this design's own
// choice:
//   tag type bit 0  dyadic : the token goes to a two-operand instruction
//   tag type bit 1  port   : 0 = left operand, 1 = right operand
//   tag type bit 2  link   : an inter-block parameter/return-value token that
//                            may be parked in the SOCS controlling process queue
package ams_pkg;

  localparam int IP_W    = 24;
  localparam int PE_W    = 8;
  localparam int FP_W    = 24;
  localparam int VALUE_W = 64;

  typedef struct packed {
    logic [7:0]      unused;
    logic [IP_W-1:0] ip;
    logic [PE_W-1:0] pe;
    logic [FP_W-1:0] fp;
  } tag_t;                               // 64 bits

  typedef struct packed {
    logic [7:0]         ttype;           // tag hardware type
    tag_t               tag;
    logic [7:0]         vtype;           // value hardware type
    logic [VALUE_W-1:0] value;
  } token_t;                             // 144 bits

  localparam int TT_DYADIC = 0;
  localparam int TT_PORT   = 1;
  localparam int TT_LINK   = 2;

  // A matched operand pair, ready to fire without a frame-store access.
  typedef struct packed {
    token_t left;
    token_t right;
  } pair_t;

  // What enters the processing pipeline in one cycle: a single token, or a
  // matched pair (pair = 1, operands in a/b = left/right).
  typedef struct packed {
    logic   pair;
    token_t a;
    token_t b;
  } pipe_pkg_t;

  // Which source the pipeline entry arbiter granted.
  typedef enum logic [1:0] {
    SRC_NONE = 2'd0,
    SRC_NEXT = 2'd1,   // the IP+1 result token
    SRC_MTQ  = 2'd2,   // matching token queue
    SRC_UTQ  = 2'd3    // unmatching token queue
  } pipe_src_e;

  // Replacement policy of a full FOSS set.
  typedef enum logic {
    REPL_LRU  = 1'b0,  // spill the token with the largest usage count
    REPL_LIFO = 1'b1   // spill the token with the smallest usage count
  } repl_e;

  // Per-cycle event strobes of a FOSS unit, for monitoring.
  typedef struct packed {
    logic match;   // token met its partner in the AMS, pair to MTQ
    logic fill;    // token stored in an empty slot
    logic spill;   // set full: victim token to UTQ, new token stored
    logic fresh;   // queues empty: an AMS token moved to UTQ
    logic pass;    // monadic token sent straight to UTQ
  } foss_ev_t;

  // Per-cycle event strobes of a SOCS unit, for monitoring.
  typedef struct packed {
    logic match;     // pair to MTQ, bank count -2
    logic fill;      // token stored in an empty bank slot
    logic spill;     // old token to UTQ, bank count -1
    logic refresh;   // queues empty: a bank token moved to UTQ, count -1
    logic pass;      // monadic token sent straight to UTQ
    logic alloc;     // new code block given an ITB entry and a bank
    logic release_;  // an ITB entry's count reached 0
    logic cpq_push;  // linking token of a new block suspended in CPQ
    logic cpq_pop;   // suspended token taken from CPQ
    logic bypass;    // non-linking token of a block without a bank, to UTQ
  } socs_ev_t;

  function automatic logic is_dyadic(token_t t);
    return t.ttype[TT_DYADIC];
  endfunction

  function automatic logic is_right(token_t t);
    return t.ttype[TT_PORT];
  endfunction

  function automatic logic is_link(token_t t);
    return t.ttype[TT_LINK];
  endfunction

  function automatic logic same_tag(token_t a, token_t b);
    return (a.tag.ip == b.tag.ip) && (a.tag.fp == b.tag.fp);
  endfunction

  // Order two partner tokens as (left, right) by their port bit.
  function automatic pair_t make_pair(token_t held, token_t incoming);
    pair_t p;
    if (is_right(held)) begin
      p.left  = incoming;
      p.right = held;
    end else begin
      p.left  = held;
      p.right = incoming;
    end
    return p;
  endfunction

endpackage

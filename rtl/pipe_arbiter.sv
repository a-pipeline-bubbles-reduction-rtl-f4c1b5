// pipe_arbiter: selects what enters the processing pipeline in a cycle.
//
// Three sources compete, in fixed priority: the IP+1 result token coming
// straight back from the pipeline (highest, so that one code block keeps
// running), then the head of the matching token queue (a matched pair that
// fires without a bubble), then the head of the unmatching token queue
// (lowest, so that few new code blocks become active). The pipeline accepts
// one package every cycle, so there is no ready input. The decision is purely
// combinational: the granted queue is popped at the next clock edge, and the
// package is presented in the same cycle.
module pipe_arbiter
  import ams_pkg::*;
(
  input  logic      next_valid,
  input  token_t    next_tok,
  input  logic      mtq_empty,
  input  pair_t     mtq_head,
  input  logic      utq_empty,
  input  token_t    utq_head,
  output logic      mtq_pop,
  output logic      utq_pop,
  output logic      pipe_valid,
  output pipe_pkg_t pipe_pkg,
  output pipe_src_e pipe_src
);

  always_comb begin
    mtq_pop    = 1'b0;
    utq_pop    = 1'b0;
    pipe_valid = 1'b1;
    pipe_pkg   = '0;
    pipe_src   = SRC_NONE;
    if (next_valid) begin
      pipe_src   = SRC_NEXT;
      pipe_pkg.a = next_tok;
    end else if (!mtq_empty) begin
      pipe_src      = SRC_MTQ;
      mtq_pop       = 1'b1;
      pipe_pkg.pair = 1'b1;
      pipe_pkg.a    = mtq_head.left;
      pipe_pkg.b    = mtq_head.right;
    end else if (!utq_empty) begin
      pipe_src   = SRC_UTQ;
      utq_pop    = 1'b1;
      pipe_pkg.a = utq_head;
    end else begin
      pipe_valid = 1'b0;
    end
  end

endmodule

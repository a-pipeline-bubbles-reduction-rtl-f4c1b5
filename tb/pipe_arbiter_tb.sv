// pipe_arbiter_tb: self-checking test of the pipeline entry priority.
// Every combination of the three sources: the IP+1 token wins over the MTQ,
// the MTQ over the UTQ; only the granted queue is popped.
module pipe_arbiter_tb;
  import ams_pkg::*;
  logic      next_valid, mtq_empty, utq_empty, mtq_pop, utq_pop, pipe_valid;
  token_t    next_tok, utq_head;
  pair_t     mtq_head;
  pipe_pkg_t pipe_pkg;
  pipe_src_e pipe_src;
  int checks = 0, failures = 0;

  pipe_arbiter dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 40; r++) begin
      for (int c = 0; c < 8; c++) begin
        next_tok = token_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
        utq_head = token_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
        mtq_head = pair_t'({$urandom, $urandom, $urandom, $urandom, $urandom,
                            $urandom, $urandom, $urandom, $urandom, $urandom});
        next_valid = c[0];
        mtq_empty  = !c[1];
        utq_empty  = !c[2];
        #1;
        if (c[0]) begin
          check(pipe_valid && pipe_src == SRC_NEXT && !pipe_pkg.pair && pipe_pkg.a == next_tok, "next wins");
          check(!mtq_pop && !utq_pop, "no pop with next");
        end else if (c[1]) begin
          check(pipe_valid && pipe_src == SRC_MTQ && pipe_pkg.pair, "mtq second");
          check(pipe_pkg.a == mtq_head.left && pipe_pkg.b == mtq_head.right, "pair operands");
          check(mtq_pop && !utq_pop, "pop mtq only");
        end else if (c[2]) begin
          check(pipe_valid && pipe_src == SRC_UTQ && !pipe_pkg.pair && pipe_pkg.a == utq_head, "utq last");
          check(!mtq_pop && utq_pop, "pop utq only");
        end else begin
          check(!pipe_valid && !mtq_pop && !utq_pop && pipe_src == SRC_NONE, "idle");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// ams_latency_tb: directed timing test of both units of ams_top at default
// sizes. With nothing else in flight it checks, in clock cycles:
//   - an IP+1 token enters the pipeline in the cycle it is offered;
//   - a dyadic token whose partner is already held comes back as a matched
//     pair one cycle after it is offered (through the MTQ);
//   - a monadic IP+S token comes back one cycle later (through the UTQ);
//   - a lone token held in the store is refreshed to the UTQ as soon as the
//     queues are empty and appears at the pipeline one cycle after that;
//   - an IP+1 token takes priority over a waiting matched pair, which then
//     follows in the next cycle.
module ams_latency_tb;
  import ams_pkg::*;
  logic clk = 0, rst_n = 0;
  logic nv[2], sv[2], sr[2], pv[2], idl[2];
  token_t nt[2], st[2];
  pipe_pkg_t pkg[2];
  pipe_src_e src[2];
  foss_ev_t f_ev;
  socs_ev_t s_ev;
  logic [7:0] s_act;
  int checks = 0, failures = 0;

  ams_top dut (
    .clk, .rst_n,
    .foss_next_valid(nv[0]), .foss_next_tok(nt[0]), .foss_side_valid(sv[0]), .foss_side_tok(st[0]),
    .foss_side_ready(sr[0]), .foss_pipe_valid(pv[0]), .foss_pipe_pkg(pkg[0]), .foss_pipe_src(src[0]),
    .foss_ev(f_ev), .foss_idle(idl[0]),
    .socs_next_valid(nv[1]), .socs_next_tok(nt[1]), .socs_side_valid(sv[1]), .socs_side_tok(st[1]),
    .socs_side_ready(sr[1]), .socs_pipe_valid(pv[1]), .socs_pipe_pkg(pkg[1]), .socs_pipe_src(src[1]),
    .socs_ev(s_ev), .socs_active_blocks(s_act), .socs_idle(idl[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic token_t mk(int fp, int ip, bit dy, bit port, logic [63:0] v);
    token_t t = '0;
    t.ttype[TT_DYADIC] = dy;
    t.ttype[TT_PORT]   = port;
    t.tag.ip = 24'(ip);
    t.tag.fp = 24'(fp);
    t.value  = v;
    return t;
  endfunction

  // offer side token t to unit u for one cycle (it must be taken)
  task automatic side(int u, token_t t);
    @(negedge clk);
    sv[u] = 1; st[u] = t;
    #1 check(sr[u], "side token taken");
    @(negedge clk);
    sv[u] = 0;
  endtask

  task automatic run(int u);
    token_t a, b, m, x;
    a = mk(3, 5, 1, 0, 64'h11);
    b = mk(3, 5, 1, 1, 64'h22);
    m = mk(3, 9, 0, 0, 64'h33);
    x = mk(4, 6, 1, 0, 64'h44);
    // IP+1 token: same cycle
    @(negedge clk);
    nv[u] = 1; nt[u] = m;
    #1 check(pv[u] && src[u] == SRC_NEXT && pkg[u].a == m, "IP+1 same cycle");
    @(negedge clk);
    nv[u] = 0;
    // left operand held, right operand offered while a steady IP+1 stream
    // keeps the queues from refreshing it; then the pair follows one cycle
    // after the right operand
    nv[u] = 1; nt[u] = m;
    sv[u] = 1; st[u] = a;
    #1 check(sr[u], "left taken");
    @(negedge clk);
    st[u] = b;
    #1 check(sr[u], "right taken");
    @(negedge clk);
    sv[u] = 0;
    #1 check(pv[u] && src[u] == SRC_NEXT, "IP+1 wins over the pair");
    @(negedge clk);
    nv[u] = 0;
    #1 check(pv[u] && src[u] == SRC_MTQ && pkg[u].pair && pkg[u].a == a && pkg[u].b == b,
             "pair one cycle after IP+1 releases the pipeline");
    // with an idle pipeline input the pair is there one cycle after its
    // second operand
    @(negedge clk);
    sv[u] = 1; st[u] = a;
    @(negedge clk);
    st[u] = b;
    @(negedge clk);
    sv[u] = 0;
    #1 check(pv[u] && src[u] == SRC_MTQ && pkg[u].pair, "pair one cycle after second operand");
    // monadic IP+S: through the UTQ, one cycle
    @(negedge clk);
    sv[u] = 1; st[u] = m;
    @(negedge clk);
    sv[u] = 0;
    #1 check(pv[u] && src[u] == SRC_UTQ && !pkg[u].pair && pkg[u].a == m, "monadic one cycle via UTQ");
    // lone token: stored, refreshed in the next idle cycle, at the pipeline one later
    @(negedge clk);
    sv[u] = 1; st[u] = x;
    @(negedge clk);
    sv[u] = 0;
    #1 check(!pv[u], "nothing while the token is held");
    @(negedge clk);
    #1 check(pv[u] && src[u] == SRC_UTQ && pkg[u].a == x, "refreshed token two cycles after");
    @(negedge clk);
    #1 check(!pv[u] && idl[u], "unit idle");
  endtask

  initial begin
    for (int u = 0; u < 2; u++) begin nv[u] = 0; sv[u] = 0; nt[u] = '0; st[u] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

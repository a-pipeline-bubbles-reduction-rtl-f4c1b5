// dataflow_env: testbench environment for one auxiliary matching store unit.
//
// It plays the processing pipeline around the unit. A synthetic workload of
// NBLK code blocks (frame pointers 1..NBLK), all running the same code of
// NINS dyadic instructions (IP 0..NINS-1, like loop iterations) plus one
// monadic token per block, is issued with W blocks interleaved at a time.
// Each operand token is offered either as the IP+1 token (next_*, always
// taken) or as the IP+S token (side_*, taken when side_ready). The block's
// first token is marked as a linking token.
// What the unit feeds back into the pipeline is checked against a model of
// the pipeline's explicit token store: a matched pair fires at once; a
// single dyadic token either finds its partner waiting in the frame store
// (fires) or is stored (a pipeline bubble). At the end every instruction
// must have fired exactly once with the right operand values, the frame
// store and the unit must be empty, and every monadic token must have
// arrived. An IP+1 token must enter the pipeline in the cycle it is offered.
module dataflow_env
  import ams_pkg::*;
#(
  parameter int NBLK  = 20,
  parameter int NINS  = 12,
  parameter int W     = 12,
  parameter int SEED  = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  output logic      next_valid,
  output token_t    next_tok,
  output logic      side_valid,
  output token_t    side_tok,
  input  logic      side_ready,
  input  logic      pipe_valid,
  input  pipe_pkg_t pipe_pkg,
  input  pipe_src_e pipe_src,
  input  logic      idle,
  output logic      done,
  output int        checks,
  output int        failures,
  output int        n_src_next,
  output int        n_src_mtq,
  output int        n_src_utq,
  output int        n_bubbles,
  output int        n_side_stall,
  output int        cycles
);

  token_t side_q[$];
  token_t waiting[longint];
  int     fired[longint];
  int     n_mono = 0;
  int     n_filler = 0;

  function automatic longint key(token_t t);
    return {16'd0, t.tag.fp, t.tag.ip};
  endfunction

  function automatic logic [63:0] val(int fp, int ip, int port);
    return 64'(fp) * 64'h1_0000_0001 + 64'(ip) * 64'd977 + 64'(port) * 64'h8000_0000_0000;
  endfunction

  function automatic token_t mk(int fp, int ip, bit dy, bit port, bit link);
    token_t t = '0;
    t.ttype[TT_DYADIC] = dy;
    t.ttype[TT_PORT]   = port;
    t.ttype[TT_LINK]   = link;
    t.tag.ip = 24'(ip);
    t.tag.fp = 24'(fp);
    t.tag.pe = 8'd3;
    t.value  = val(fp, ip, port);
    return t;
  endfunction

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic fire(token_t l, token_t r);
    chk(!is_right(l) && is_right(r), "operand ports");
    if (is_right(l) || !is_right(r)) $display("  l fp %0d ip %0d tt %h  r fp %0d ip %0d tt %h src %0d", l.tag.fp, l.tag.ip, l.ttype, r.tag.fp, r.tag.ip, r.ttype, pipe_src);
    chk(l.value == val(int'(l.tag.fp), int'(l.tag.ip), 0), "left value");
    chk(r.value == val(int'(r.tag.fp), int'(r.tag.ip), 1), "right value");
    fired[key(l)] = fired.exists(key(l)) ? fired[key(l)] + 1 : 1;
  endtask

  // pipeline side: frame-store model
  always @(posedge clk) begin
    if (rst_n && pipe_valid) begin
      case (pipe_src)
        SRC_NEXT: n_src_next++;
        SRC_MTQ:  n_src_mtq++;
        SRC_UTQ:  n_src_utq++;
        default:  chk(0, "valid without source");
      endcase
      if (pipe_pkg.pair) begin
        chk(same_tag(pipe_pkg.a, pipe_pkg.b), "pair tags equal");
        fire(pipe_pkg.a, pipe_pkg.b);
      end else if (!is_dyadic(pipe_pkg.a) && pipe_pkg.a.tag.fp == 0) begin
        n_filler++;
      end else if (!is_dyadic(pipe_pkg.a)) begin
        n_mono++;
        chk(pipe_pkg.a.value == val(int'(pipe_pkg.a.tag.fp), 1000, 0), "monadic value");
      end else if (waiting.exists(key(pipe_pkg.a))) begin
        if (is_right(pipe_pkg.a)) fire(waiting[key(pipe_pkg.a)], pipe_pkg.a);
        else                      fire(pipe_pkg.a, waiting[key(pipe_pkg.a)]);
        waiting.delete(key(pipe_pkg.a));
      end else begin
        waiting[key(pipe_pkg.a)] = pipe_pkg.a;
        n_bubbles++;
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    done = 1;
  end

  initial begin
    int act[$], nxt_blk, pos[int], b, ins;
    bit stop;
    token_t t;
    checks = 0; failures = 0; n_src_next = 0; n_src_mtq = 0; n_src_utq = 0;
    n_bubbles = 0; n_side_stall = 0; cycles = 0; done = 0;
    next_valid = 0; side_valid = 0; next_tok = '0; side_tok = '0;
    void'($urandom(SEED));
    @(posedge rst_n);
    nxt_blk = 1;
    for (int i = 0; i < W && nxt_blk <= NBLK; i++) begin act.push_back(nxt_blk); pos[nxt_blk] = 0; nxt_blk++; end
    // each block emits 2*NINS operand tokens and one monadic token
    while (act.size() != 0 || side_q.size() != 0) begin
      @(negedge clk);
      cycles++;
      next_valid = 0;
      // finish the side handshake of the previous cycle
      if (act.size() != 0 && side_q.size() < 2 && !((cycles / 64) % 5 == 4 && side_q.size() != 0)) begin
        int ai, p;
        ai = $urandom_range(0, act.size() - 1);
        b = act[ai];
        p = pos[b];
        if (p == 2 * NINS) t = mk(b, 1000, 0, 0, 0);
        else begin
          ins = (p / 2 + b) % NINS;
          t = mk(b, ins, 1, (p % 2 == 1) ^ (ins % 3 == 0), p == 0);
        end
        pos[b] = p + 1;
        if (pos[b] > 2 * NINS) begin
          act.delete(ai);
          if (nxt_blk <= NBLK) begin act.push_back(nxt_blk); pos[nxt_blk] = 0; nxt_blk++; end
        end
        // about one token in four comes back as the IP+1 token; bursts of
        // them starve the queues of pipeline slots
        if (p != 0 && $urandom_range(0, 3) == 0) begin
          next_valid = 1;
          next_tok = t;
        end else begin
          side_q.push_back(t);
        end
      end
      // bursts of other IP+1 work (monadic filler tokens of frame 0) take
      // every pipeline slot, so that the queues fill up
      if (!next_valid && (cycles / 64) % 5 == 4) begin
        next_valid = 1;
        next_tok = mk(0, 2000, 0, 0, 0);
      end
      side_valid = side_q.size() != 0;
      if (side_valid) side_tok = side_q[0];
      #1;
      if (next_valid) chk(pipe_valid && pipe_src == SRC_NEXT && pipe_pkg.a == next_tok, "IP+1 token enters at once");
      @(posedge clk);
      if (side_valid) begin
        if (side_ready) void'(side_q.pop_front());
        else n_side_stall++;
      end
    end
    @(negedge clk);
    next_valid = 0;
    side_valid = 0;
    // drain: the unit hands out all it holds once the queues run dry
    stop = 0;
    for (int i = 0; i < 20000 && !stop; i++) begin
      @(negedge clk);
      cycles++;
      if (idle && !pipe_valid) stop = 1;
    end
    chk(stop, "unit drained");
    chk(waiting.size() == 0, "frame store empty at the end");
    chk(n_mono == NBLK, "all monadic tokens arrived");
    for (int fb = 1; fb <= NBLK; fb++)
      for (int ip = 0; ip < NINS; ip++) begin
        longint k;
        k = {16'd0, 24'(fb), 24'(ip)};
        chk(fired.exists(k) && fired[k] == 1, "instruction fired exactly once");
      end
    done = 1;
  end
endmodule

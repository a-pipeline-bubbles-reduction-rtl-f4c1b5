// pipeline_model: behavioural model of a Monsoon-style processing pipeline
// with its explicit token store, closed around one auxiliary matching store
// unit, running a loop whose iterations are code blocks.
//
// Pipeline: every cycle the package the unit selects enters an eight-stage
// delay line. At its end a matched pair or a monadic token fires its
// instruction; a single dyadic token goes to the frame store, where it
// either finds its partner and fires, or is stored and the slot is wasted
// (a bubble). A fired instruction may produce an IP+1 token (next_*, given
// to the unit in the same cycle) and an IP+S token (queued for side_*,
// which has back-pressure).
//
// Program: each code block (frame pointer f = 1..NBLK) starts at
// instruction 0, a dyadic instruction fed by two linking tokens (a parameter
// p = 7f and a trigger 1) that a spawner injects. Then follow U units of
// three instructions at base b = 1 + 3u:
//   b   monadic, input x : IP+1 -> b+1 with x+1, IP+S -> b+2 (left) with 2x
//   b+1 monadic, input y : to b+2 (right) with y+3, as the IP+S token in
//                          even units (both operands of b+2 then meet in the
//                          AMS) and as the IP+1 token in odd units (they meet
//                          in the frame store)
//   b+2 dyadic, (l, r)   : z = l ^ (r + b); IP+1 -> next unit's base with z
// Instruction 0 computes p + t and sends it as IP+1 to instruction 1.
// The last unit's z is the block's result, checked against the same chain
// computed directly. Every block must finish.
module pipeline_model
  import ams_pkg::*;
#(
  parameter int NBLK   = 24,
  parameter int U      = 8,
  parameter int STAGES = 8
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
  input  logic      idle,
  output logic      done,
  output int        checks,
  output int        failures,
  output int        n_fired,
  output int        n_bubbles,
  output int        n_pairs,
  output int        n_dyadic,
  output int        cycles
);

  localparam int NINS = 1 + 3 * U;

  logic      st_v   [STAGES];
  pipe_pkg_t st_pkg [STAGES];
  token_t    side_buf[$];
  token_t    spawn[$];
  token_t    fstore[longint];
  int        finished = 0;

  function automatic longint key(token_t t);
    return {16'd0, t.tag.fp, t.tag.ip};
  endfunction

  function automatic token_t mk(int fp, int ip, bit dy, bit port, bit link, logic [63:0] v);
    token_t t = '0;
    t.ttype[TT_DYADIC] = dy;
    t.ttype[TT_PORT]   = port;
    t.ttype[TT_LINK]   = link;
    t.tag.ip = 24'(ip);
    t.tag.fp = 24'(fp);
    t.value  = v;
    return t;
  endfunction

  function automatic logic [63:0] expected(int f);
    logic [63:0] x, y, l, r;
    x = 64'(7 * f) + 64'd1;
    for (int u = 0; u < U; u++) begin
      int b;
      b = 1 + 3 * u;
      y = x + 64'd1;
      l = x * 64'd2;
      r = y + 64'd3;
      x = l ^ (r + 64'(b));
    end
    return x;
  endfunction

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Fire instruction ip of frame fp with operands a (left) and b (right).
  task automatic fire(int fp, int ip, logic [63:0] a, logic [63:0] b,
                      output bit nv, output token_t nt);
    int u, k;
    nv = 0;
    nt = '0;
    n_fired++;
    if (ip == 0) begin
      nv = 1; nt = mk(fp, 1, 0, 0, 0, a + b);
    end else begin
      u = (ip - 1) / 3;
      k = (ip - 1) % 3;
      if (k == 0) begin
        nv = 1; nt = mk(fp, ip + 1, 0, 0, 0, a + 64'd1);
        side_buf.push_back(mk(fp, ip + 2, 1, 0, 0, a * 64'd2));
      end else if (k == 1) begin
        if (u % 2 == 0) side_buf.push_back(mk(fp, ip + 1, 1, 1, 0, a + 64'd3));
        else begin nv = 1; nt = mk(fp, ip + 1, 1, 1, 0, a + 64'd3); end
      end else begin
        if (u == U - 1) begin
          chk((a ^ (b + 64'(ip - 2))) == expected(fp), "block result");
          finished++;
        end else begin
          nv = 1; nt = mk(fp, ip + 1, 0, 0, 0, a ^ (b + 64'(ip - 2)));
        end
      end
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d of %0d blocks finished", finished, NBLK);
    done = 1;
  end

  initial begin
    bit     nv, stop;
    token_t nt;
    pipe_pkg_t e;
    checks = 0; failures = 0; n_fired = 0; n_bubbles = 0; n_pairs = 0; n_dyadic = 0;
    cycles = 0; done = 0; next_valid = 0; side_valid = 0; next_tok = '0; side_tok = '0;
    for (int s = 0; s < STAGES; s++) st_v[s] = 0;
    for (int f = 1; f <= NBLK; f++) begin
      spawn.push_back(mk(f, 0, 1, 0, 1, 64'(7 * f)));
      spawn.push_back(mk(f, 0, 1, 1, 1, 64'd1));
    end
    @(posedge rst_n);
    stop = 0;
    while (!stop) begin
      @(negedge clk);
      cycles++;
      // pipeline exit
      nv = 0;
      if (st_v[STAGES-1]) begin
        e = st_pkg[STAGES-1];
        if (e.pair) begin
          n_pairs++;
          n_dyadic++;
          chk(same_tag(e.a, e.b) && !is_right(e.a) && is_right(e.b), "pair operands");
          fire(int'(e.a.tag.fp), int'(e.a.tag.ip), e.a.value, e.b.value, nv, nt);
        end else if (!is_dyadic(e.a)) begin
          fire(int'(e.a.tag.fp), int'(e.a.tag.ip), e.a.value, 64'd0, nv, nt);
        end else if (fstore.exists(key(e.a))) begin
          token_t w;
          w = fstore[key(e.a)];
          fstore.delete(key(e.a));
          n_dyadic++;
          chk(is_right(w) != is_right(e.a), "frame-store partner port");
          if (is_right(e.a)) fire(int'(e.a.tag.fp), int'(e.a.tag.ip), w.value, e.a.value, nv, nt);
          else               fire(int'(e.a.tag.fp), int'(e.a.tag.ip), e.a.value, w.value, nv, nt);
        end else begin
          fstore[key(e.a)] = e.a;
          n_bubbles++;
        end
      end
      next_valid = nv;
      next_tok   = nt;
      // linking tokens of new blocks come in when the output path is free
      if (side_buf.size() == 0 && spawn.size() != 0) side_buf.push_back(spawn.pop_front());
      side_valid = side_buf.size() != 0;
      if (side_valid) side_tok = side_buf[0];
      #1;
      if (nv) chk(pipe_valid && !pipe_pkg.pair && pipe_pkg.a == nt, "IP+1 token enters at once");
      @(posedge clk);
      for (int s = STAGES - 1; s > 0; s--) begin
        st_v[s]   = st_v[s-1];
        st_pkg[s] = st_pkg[s-1];
      end
      st_v[0]   = pipe_valid;
      st_pkg[0] = pipe_pkg;
      if (side_valid && side_ready) void'(side_buf.pop_front());
      if (finished == NBLK) stop = 1;
    end
    chk(finished == NBLK, "all blocks finished");
    chk(fstore.size() == 0, "frame store empty");
    chk(n_fired == NBLK * (NINS), "every instruction fired once");
    repeat (STAGES + 2) @(negedge clk);
    chk(idle, "unit empty at the end");
    done = 1;
  end
endmodule

// foss_ams_tb: self-checking test of the FOSS matching store.
// Two instances, LRU and LIFO replacement, get the same random dyadic tokens
// (few IPs and FPs, so that sets overflow and partners meet). A reference
// model of the slots (presence bit, usage count, content) predicts, every
// cycle, which action happens (match, fill, spill, fresh) and what is sent
// to the MTQ and the UTQ. Every action must occur at least once.
module foss_ams_tb;
  import ams_pkg::*;
  localparam int K = 4, SLOTS = 8, UC_W = 4;

  logic clk = 0, rst_n = 0;
  logic in_valid, out_ready, fresh_req;
  token_t in_tok;
  int checks = 0, failures = 0;
  int n_match[2], n_fill[2], n_spill[2], n_fresh[2];

  logic   mtq_push[2], utq_push[2], ev_match[2], ev_fill[2], ev_spill[2], ev_fresh[2], busy[2], in_ready[2];
  pair_t  mtq_pair[2];
  token_t utq_tok[2];

  foss_ams #(.K(K), .SLOTS(SLOTS), .UC_W(UC_W), .REPL(REPL_LRU)) dut_lru (
    .clk, .rst_n, .in_valid, .in_tok, .in_ready(in_ready[0]), .out_ready, .fresh_req,
    .mtq_push(mtq_push[0]), .mtq_pair(mtq_pair[0]), .utq_push(utq_push[0]), .utq_tok(utq_tok[0]),
    .ev_match(ev_match[0]), .ev_fill(ev_fill[0]), .ev_spill(ev_spill[0]), .ev_fresh(ev_fresh[0]),
    .busy(busy[0]));
  foss_ams #(.K(K), .SLOTS(SLOTS), .UC_W(UC_W), .REPL(REPL_LIFO)) dut_lifo (
    .clk, .rst_n, .in_valid, .in_tok, .in_ready(in_ready[1]), .out_ready, .fresh_req,
    .mtq_push(mtq_push[1]), .mtq_pair(mtq_pair[1]), .utq_push(utq_push[1]), .utq_tok(utq_tok[1]),
    .ev_match(ev_match[1]), .ev_fill(ev_fill[1]), .ev_spill(ev_spill[1]), .ev_fresh(ev_fresh[1]),
    .busy(busy[1]));

  // reference model, one per policy
  bit     mpb [2][K][SLOTS];
  int     muc [2][K][SLOTS];
  token_t mcf [2][K][SLOTS];

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Predict and check one cycle for policy p; update the model.
  task automatic step(int p);
    int s, m, e, v, fs, fj;
    bit any;
    s = int'(in_tok.tag.ip) % K;
    if (in_valid && out_ready) begin
      m = -1; e = -1;
      for (int j = 0; j < SLOTS; j++) begin
        if (m < 0 && mpb[p][s][j] && mcf[p][s][j].tag.ip == in_tok.tag.ip &&
            mcf[p][s][j].tag.fp == in_tok.tag.fp) m = j;
        if (e < 0 && !mpb[p][s][j]) e = j;
      end
      if (m >= 0) begin
        check(ev_match[p] && mtq_push[p] && !utq_push[p], "match expected");
        if (!is_right(mcf[p][s][m])) check(mtq_pair[p].left == mcf[p][s][m] && mtq_pair[p].right == in_tok, "pair order r");
        else                  check(mtq_pair[p].right == mcf[p][s][m] && mtq_pair[p].left == in_tok, "pair order l");
        mpb[p][s][m] = 0; muc[p][s][m] = 0;
        n_match[p]++;
      end else begin
        if (e >= 0) begin
          check(ev_fill[p] && !mtq_push[p] && !utq_push[p], "fill expected");
          v = e;
          n_fill[p]++;
        end else begin
          v = 0;
          for (int j = 1; j < SLOTS; j++)
            if (p == 0 ? muc[p][s][j] > muc[p][s][v] : muc[p][s][j] < muc[p][s][v]) v = j;
          check(ev_spill[p] && utq_push[p] && !mtq_push[p], "spill expected");
          check(utq_tok[p] == mcf[p][s][v], "spilled token");
          n_spill[p]++;
        end
        for (int j = 0; j < SLOTS; j++)
          if (j != v && muc[p][s][j] != 0 && muc[p][s][j] < 15) muc[p][s][j]++;
        mpb[p][s][v] = 1; muc[p][s][v] = 1; mcf[p][s][v] = in_tok;
      end
    end else begin
      any = 0; fs = -1;
      for (int ss = 0; ss < K; ss++)
        for (int j = 0; j < SLOTS; j++)
          if (mpb[p][ss][j]) begin any = 1; if (fs < 0) fs = ss; end
      check(busy[p] == any, "busy");
      if (!in_valid && fresh_req && out_ready && any) begin
        fj = -1;
        for (int j = 0; j < SLOTS; j++)
          if (mpb[p][fs][j] && (fj < 0 || muc[p][fs][j] > muc[p][fs][fj])) fj = j;
        check(ev_fresh[p] && utq_push[p] && !mtq_push[p], "fresh expected");
        check(utq_tok[p] == mcf[p][fs][fj], "fresh token (oldest of first busy set)");
        mpb[p][fs][fj] = 0; muc[p][fs][fj] = 0;
        n_fresh[p]++;
      end else begin
        check(!ev_fresh[p] && !utq_push[p] && !mtq_push[p] && !ev_match[p] && !ev_fill[p] && !ev_spill[p],
              "no action");
      end
    end
    check(in_ready[p] == out_ready, "in_ready");
  endtask

  initial begin
    in_valid = 0; out_ready = 1; fresh_req = 0; in_tok = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      in_tok = '0;
      in_tok.ttype[TT_DYADIC] = 1'b1;
      in_tok.ttype[TT_PORT]   = 1'($urandom);
      in_tok.tag.ip   = 24'($urandom_range(0, 11));
      in_tok.tag.fp   = 24'($urandom_range(0, (i % 2000 < 1000) ? 5 : 30));
      in_tok.tag.pe   = 8'($urandom);
      in_tok.value    = {$urandom, $urandom};
      in_valid  = (i % 1000 < 900) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 7) == 0);
      out_ready = $urandom_range(0, 7) != 0;
      fresh_req = $urandom_range(0, 1);
      #1;
      step(0);
      step(1);
    end
    for (int p = 0; p < 2; p++) begin
      check(n_match[p] > 0, "match seen");
      check(n_fill[p] > 0, "fill seen");
      check(n_spill[p] > 0, "spill seen");
      check(n_fresh[p] > 0, "fresh seen");
      $display("policy %0d: match %0d fill %0d spill %0d fresh %0d", p, n_match[p], n_fill[p], n_spill[p], n_fresh[p]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

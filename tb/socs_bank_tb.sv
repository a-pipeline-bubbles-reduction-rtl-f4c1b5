// socs_bank_tb: self-checking test of one SOCS AMS bank.
// Random tokens of one frame (IPs chosen so that slots collide) against a
// direct-mapped model: match, spill, fill and refresh and the tokens they
// output are predicted every cycle, and each must occur.
module socs_bank_tb;
  import ams_pkg::*;
  localparam int K = 8;
  logic clk = 0, rst_n = 0;
  logic op_valid, refresh_req, ev_match, ev_spill, ev_fill, ev_refresh, nonempty;
  token_t op_tok, out_tok;
  pair_t pair;
  int checks = 0, failures = 0, nm = 0, ns = 0, nf = 0, nr = 0;
  bit mpb[K];
  token_t mcf[K];

  socs_bank #(.K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int s, f;
    bit any;
    op_valid = 0; refresh_req = 0; op_tok = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      op_tok = '0;
      op_tok.ttype = 8'h01 | 8'(($urandom & 1) << 1);
      op_tok.tag.ip = 24'($urandom_range(0, 23));
      op_tok.tag.fp = 24'h000abc;
      op_tok.value = {$urandom, $urandom};
      op_valid = $urandom_range(0, 2) != 0;
      refresh_req = $urandom_range(0, 1);
      #1;
      any = 0; f = -1;
      for (int j = 0; j < K; j++) if (mpb[j]) begin any = 1; if (f < 0) f = j; end
      check(nonempty == any, "nonempty");
      s = int'(op_tok.tag.ip) % K;
      if (op_valid) begin
        if (mpb[s] && mcf[s].tag.ip == op_tok.tag.ip) begin
          check(ev_match && !ev_spill && !ev_fill && !ev_refresh, "match");
          check(pair == make_pair(mcf[s], op_tok), "pair");
          mpb[s] = 0; nm++;
        end else if (mpb[s]) begin
          check(ev_spill && !ev_match && !ev_fill && !ev_refresh, "spill");
          check(out_tok == mcf[s], "spilled token");
          mcf[s] = op_tok; ns++;
        end else begin
          check(ev_fill && !ev_match && !ev_spill && !ev_refresh, "fill");
          mpb[s] = 1; mcf[s] = op_tok; nf++;
        end
      end else if (refresh_req && any) begin
        check(ev_refresh && !ev_match && !ev_spill && !ev_fill, "refresh");
        check(out_tok == mcf[f], "refreshed token");
        mpb[f] = 0; nr++;
      end else begin
        check(!ev_refresh && !ev_match && !ev_spill && !ev_fill, "idle");
      end
    end
    check(nm > 0 && ns > 0 && nf > 0 && nr > 0, "all actions seen");
    $display("match %0d spill %0d fill %0d refresh %0d", nm, ns, nf, nr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

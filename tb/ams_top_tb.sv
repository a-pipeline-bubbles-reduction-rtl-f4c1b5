// ams_top_tb: end-to-end test of the whole design at its default sizes
// (K = 64 slots, eight slots per FOSS set, eight SOCS banks, queues of 16).
// Each unit gets its own pipeline environment and a workload of 40 code
// blocks with 80 dyadic instructions each, twelve blocks interleaved. IP
// values up to 79 overlap modulo 64, so FOSS sets and SOCS bank slots both
// see collisions. Every instruction must fire exactly once with the right
// operands, IP+1 tokens must enter at once, and each mechanism of both
// units must happen at least once.
module ams_top_tb;
  import ams_pkg::*;
  logic clk = 0, rst_n = 0;
  logic f_nv, f_sv, f_sr, f_pv, f_idle, f_done;
  logic s_nv, s_sv, s_sr, s_pv, s_idle, s_done;
  token_t f_nt, f_st, s_nt, s_st;
  pipe_pkg_t f_pkg, s_pkg;
  pipe_src_e f_src, s_src;
  foss_ev_t f_ev;
  socs_ev_t s_ev;
  logic [7:0] s_act;
  int fc, ff, fn, fm, fu, fb, fs, fcy;
  int sc, sf, sn, sm, su, sb, ss, scy;
  int nf[5], ns[10];

  ams_top dut (
    .clk, .rst_n,
    .foss_next_valid(f_nv), .foss_next_tok(f_nt), .foss_side_valid(f_sv), .foss_side_tok(f_st),
    .foss_side_ready(f_sr), .foss_pipe_valid(f_pv), .foss_pipe_pkg(f_pkg), .foss_pipe_src(f_src),
    .foss_ev(f_ev), .foss_idle(f_idle),
    .socs_next_valid(s_nv), .socs_next_tok(s_nt), .socs_side_valid(s_sv), .socs_side_tok(s_st),
    .socs_side_ready(s_sr), .socs_pipe_valid(s_pv), .socs_pipe_pkg(s_pkg), .socs_pipe_src(s_src),
    .socs_ev(s_ev), .socs_active_blocks(s_act), .socs_idle(s_idle));

  dataflow_env #(.NBLK(40), .NINS(80), .W(12), .SEED(3)) env_f (
    .clk, .rst_n, .next_valid(f_nv), .next_tok(f_nt), .side_valid(f_sv), .side_tok(f_st),
    .side_ready(f_sr), .pipe_valid(f_pv), .pipe_pkg(f_pkg), .pipe_src(f_src), .idle(f_idle),
    .done(f_done), .checks(fc), .failures(ff), .n_src_next(fn), .n_src_mtq(fm), .n_src_utq(fu),
    .n_bubbles(fb), .n_side_stall(fs), .cycles(fcy));

  dataflow_env #(.NBLK(40), .NINS(80), .W(12), .SEED(5)) env_s (
    .clk, .rst_n, .next_valid(s_nv), .next_tok(s_nt), .side_valid(s_sv), .side_tok(s_st),
    .side_ready(s_sr), .pipe_valid(s_pv), .pipe_pkg(s_pkg), .pipe_src(s_src), .idle(s_idle),
    .done(s_done), .checks(sc), .failures(sf), .n_src_next(sn), .n_src_mtq(sm), .n_src_utq(su),
    .n_bubbles(sb), .n_side_stall(ss), .cycles(scy));

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    nf[0] += int'(f_ev.match); nf[1] += int'(f_ev.fill); nf[2] += int'(f_ev.spill);
    nf[3] += int'(f_ev.fresh); nf[4] += int'(f_ev.pass);
    ns[0] += int'(s_ev.match);    ns[1] += int'(s_ev.fill);     ns[2] += int'(s_ev.spill);
    ns[3] += int'(s_ev.refresh);  ns[4] += int'(s_ev.pass);     ns[5] += int'(s_ev.alloc);
    ns[6] += int'(s_ev.release_); ns[7] += int'(s_ev.cpq_push); ns[8] += int'(s_ev.cpq_pop);
    ns[9] += int'(s_ev.bypass);
  end

  initial begin
    int c, f;
    string fnames[5] = '{"match", "fill", "spill", "fresh", "pass"};
    string snames[10] = '{"match", "fill", "spill", "refresh", "pass", "alloc", "release",
                          "cpq_push", "cpq_pop", "bypass"};
    for (int i = 0; i < 5; i++) nf[i] = 0;
    for (int i = 0; i < 10; i++) ns[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (f_done && s_done);
    c = fc + sc; f = ff + sf;
    for (int i = 0; i < 5; i++) begin
      c++; if (nf[i] == 0) begin f++; $display("FAIL FOSS %s never happened", fnames[i]); end
    end
    for (int i = 0; i < 10; i++) begin
      c++; if (ns[i] == 0) begin f++; $display("FAIL SOCS %s never happened", snames[i]); end
    end
    c++; if (fs == 0) begin f++; $display("FAIL FOSS back-pressure never happened"); end
    c++; if (ss == 0) begin f++; $display("FAIL SOCS back-pressure never happened"); end
    c++; if (fm == 0 || fu == 0 || fn == 0 || sm == 0 || su == 0 || sn == 0) f++;
    c++; if (nf[0] != fm || ns[0] != sm) f++;
    c++; if (ns[7] != ns[8] || s_act != 0) f++;
    $display("FOSS: match %0d fill %0d spill %0d fresh %0d pass %0d stall %0d | next %0d mtq %0d utq %0d bubbles %0d",
             nf[0], nf[1], nf[2], nf[3], nf[4], fs, fn, fm, fu, fb);
    $display("SOCS: match %0d fill %0d spill %0d refresh %0d pass %0d alloc %0d release %0d cpq %0d/%0d bypass %0d stall %0d | next %0d mtq %0d utq %0d bubbles %0d",
             ns[0], ns[1], ns[2], ns[3], ns[4], ns[5], ns[6], ns[7], ns[8], ns[9], ss, sn, sm, su, sb);
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule

// ams_loop_tb: closed-loop workload test of the whole design at its default
// sizes. Each unit of ams_top runs a loop of 40 iterations (code blocks),
// eight units of three instructions each, through an eight-stage pipeline
// model with a frame store (pipeline_model). It checks every block's result
// and that every instruction fires once, and reports how many dyadic firings
// still cost a frame-store bubble. Without an auxiliary store every dyadic
// firing costs one; here the matched pairs must remove some, and SOCS must
// have suspended blocks in its CPQ, as 40 blocks start at once.
module ams_loop_tb;
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
  int fc, ff, ffi, fb, fp, fd, fcy;
  int sc, sf, sfi, sb, sp, sd, scy;
  int n_cpq = 0, n_spill_f = 0, n_spill_s = 0, max_act = 0;

  ams_top dut (
    .clk, .rst_n,
    .foss_next_valid(f_nv), .foss_next_tok(f_nt), .foss_side_valid(f_sv), .foss_side_tok(f_st),
    .foss_side_ready(f_sr), .foss_pipe_valid(f_pv), .foss_pipe_pkg(f_pkg), .foss_pipe_src(f_src),
    .foss_ev(f_ev), .foss_idle(f_idle),
    .socs_next_valid(s_nv), .socs_next_tok(s_nt), .socs_side_valid(s_sv), .socs_side_tok(s_st),
    .socs_side_ready(s_sr), .socs_pipe_valid(s_pv), .socs_pipe_pkg(s_pkg), .socs_pipe_src(s_src),
    .socs_ev(s_ev), .socs_active_blocks(s_act), .socs_idle(s_idle));

  pipeline_model #(.NBLK(40), .U(8)) pm_f (
    .clk, .rst_n, .next_valid(f_nv), .next_tok(f_nt), .side_valid(f_sv), .side_tok(f_st),
    .side_ready(f_sr), .pipe_valid(f_pv), .pipe_pkg(f_pkg), .idle(f_idle), .done(f_done),
    .checks(fc), .failures(ff), .n_fired(ffi), .n_bubbles(fb), .n_pairs(fp), .n_dyadic(fd),
    .cycles(fcy));

  pipeline_model #(.NBLK(40), .U(8)) pm_s (
    .clk, .rst_n, .next_valid(s_nv), .next_tok(s_nt), .side_valid(s_sv), .side_tok(s_st),
    .side_ready(s_sr), .pipe_valid(s_pv), .pipe_pkg(s_pkg), .idle(s_idle), .done(s_done),
    .checks(sc), .failures(sf), .n_fired(sfi), .n_bubbles(sb), .n_pairs(sp), .n_dyadic(sd),
    .cycles(scy));

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    n_cpq     += int'(s_ev.cpq_push);
    n_spill_f += int'(f_ev.spill);
    n_spill_s += int'(s_ev.spill);
    if ($countones(s_act) > max_act) max_act = $countones(s_act);
  end

  initial begin
    int c, f;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (f_done && s_done);
    c = fc + sc; f = ff + sf;
    c++; if (fp == 0) begin f++; $display("FAIL FOSS matched no pair"); end
    c++; if (sp == 0) begin f++; $display("FAIL SOCS matched no pair"); end
    c++; if (fb + fp != fd || sb + sp != sd) begin f++; $display("FAIL bubble accounting"); end
    c++; if (n_cpq == 0) begin f++; $display("FAIL SOCS never suspended a block"); end
    c++; if (max_act != 8) begin f++; $display("FAIL SOCS active blocks peaked at %0d", max_act); end
    $display("FOSS: %0d cycles, %0d dyadic firings, %0d as AMS pairs, %0d bubbles, %0d spills",
             fcy, fd, fp, fb, n_spill_f);
    $display("SOCS: %0d cycles, %0d dyadic firings, %0d as AMS pairs, %0d bubbles, %0d spills, %0d CPQ pushes",
             scy, sd, sp, sb, n_spill_s, n_cpq);
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule

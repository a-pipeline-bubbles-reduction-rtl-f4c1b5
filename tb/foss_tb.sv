// foss_tb: end-to-end test of the FOSS unit with the pipeline environment.
// Checks that every instruction fires once with the right operands and that
// IP+1 tokens take priority, and counts the FOSS mechanisms: match, fill,
// spill, fresh, passing, back-pressure, and packages from MTQ and UTQ.
// Each must happen at least once. Small K to keep the run short.
module foss_tb;
  import ams_pkg::*;
  logic clk = 0, rst_n = 0;
  logic next_valid, side_valid, side_ready, pipe_valid, idle, done;
  token_t next_tok, side_tok;
  pipe_pkg_t pipe_pkg;
  pipe_src_e pipe_src;
  foss_ev_t ev;
  int checks, failures, n_next, n_mtq, n_utq, n_bub, n_stall, cycles;
  int n_match = 0, n_fill = 0, n_spill = 0, n_fresh = 0, n_pass = 0;

  foss #(.K(16), .MTQ_DEPTH(4), .UTQ_DEPTH(4)) dut (.*);
  dataflow_env #(.NBLK(24), .NINS(10), .W(12), .SEED(7)) env (
    .clk, .rst_n, .next_valid, .next_tok, .side_valid, .side_tok, .side_ready,
    .pipe_valid, .pipe_pkg, .pipe_src, .idle, .done, .checks, .failures,
    .n_src_next(n_next), .n_src_mtq(n_mtq), .n_src_utq(n_utq), .n_bubbles(n_bub),
    .n_side_stall(n_stall), .cycles);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    n_match += int'(ev.match); n_fill += int'(ev.fill); n_spill += int'(ev.spill);
    n_fresh += int'(ev.fresh); n_pass += int'(ev.pass);
  end

  initial begin
    int c = 0, f = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    c = checks; f = failures;
    c++; if (n_match == 0) f++;
    c++; if (n_fill == 0) f++;
    c++; if (n_spill == 0) f++;
    c++; if (n_fresh == 0) f++;
    c++; if (n_pass == 0) f++;
    c++; if (n_stall == 0) f++;
    c++; if (n_mtq == 0 || n_utq == 0 || n_next == 0) f++;
    // every match removes one frame-store bubble
    c++; if (n_match != n_mtq) f++;
    $display("FOSS cycles %0d match %0d fill %0d spill %0d fresh %0d pass %0d stall %0d",
             cycles, n_match, n_fill, n_spill, n_fresh, n_pass, n_stall);
    $display("     pipeline: next %0d mtq %0d utq %0d bubbles %0d", n_next, n_mtq, n_utq, n_bub);
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule

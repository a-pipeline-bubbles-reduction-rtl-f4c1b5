// socs_tb: end-to-end test of the SOCS unit with the pipeline environment.
// Twelve code blocks are interleaved, more than the eight banks, so the
// instruction transfer buffer fills and linking tokens wait in the CPQ.
// Checks every instruction fires once with the right operands, that at most
// eight blocks are active, and counts each SOCS mechanism: match, fill,
// spill, refresh, passing, block allocation and release, CPQ push and pop,
// bypass of an inactive block's token, and back-pressure.
module socs_tb;
  import ams_pkg::*;
  logic clk = 0, rst_n = 0;
  logic next_valid, side_valid, side_ready, pipe_valid, idle, done;
  token_t next_tok, side_tok;
  pipe_pkg_t pipe_pkg;
  pipe_src_e pipe_src;
  socs_ev_t ev;
  logic [7:0] active_blocks;
  int checks, failures, n_next, n_mtq, n_utq, n_bub, n_stall, cycles;
  int n[10];
  int over8 = 0;

  socs #(.K(8), .MTQ_DEPTH(4), .UTQ_DEPTH(4), .CPQ_DEPTH(4)) dut (.*);
  dataflow_env #(.NBLK(30), .NINS(10), .W(12), .SEED(11)) env (
    .clk, .rst_n, .next_valid, .next_tok, .side_valid, .side_tok, .side_ready,
    .pipe_valid, .pipe_pkg, .pipe_src, .idle, .done, .checks, .failures,
    .n_src_next(n_next), .n_src_mtq(n_mtq), .n_src_utq(n_utq), .n_bubbles(n_bub),
    .n_side_stall(n_stall), .cycles);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    n[0] += int'(ev.match);    n[1] += int'(ev.fill);    n[2] += int'(ev.spill);
    n[3] += int'(ev.refresh);  n[4] += int'(ev.pass);    n[5] += int'(ev.alloc);
    n[6] += int'(ev.release_); n[7] += int'(ev.cpq_push); n[8] += int'(ev.cpq_pop);
    n[9] += int'(ev.bypass);
  end

  initial begin
    int c, f;
    string names[10] = '{"match", "fill", "spill", "refresh", "pass", "alloc", "release",
                         "cpq_push", "cpq_pop", "bypass"};
    for (int i = 0; i < 10; i++) n[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    c = checks; f = failures;
    for (int i = 0; i < 10; i++) begin
      c++;
      if (n[i] == 0) begin f++; $display("FAIL mechanism %s never happened", names[i]); end
    end
    c++; if (n_stall == 0) f++;
    c++; if (n_mtq == 0 || n_utq == 0 || n_next == 0) f++;
    c++; if (n[0] != n_mtq) f++;
    c++; if (n[7] != n[8]) f++;        // every suspended token resumed
    c++; if (active_blocks != 0) f++;  // all blocks released at the end
    $display("SOCS cycles %0d match %0d fill %0d spill %0d refresh %0d pass %0d alloc %0d release %0d",
             cycles, n[0], n[1], n[2], n[3], n[4], n[5], n[6]);
    $display("     cpq push %0d pop %0d bypass %0d stall %0d", n[7], n[8], n[9], n_stall);
    $display("     pipeline: next %0d mtq %0d utq %0d bubbles %0d", n_next, n_mtq, n_utq, n_bub);
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule

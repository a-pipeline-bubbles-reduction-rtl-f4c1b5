// ams_top: the two auxiliary matching store organisations, FOSS and SOCS,
// side by side.
//
// Both are alternative back ends for the output of one Monsoon processing
// pipeline and share nothing; each brings out its own pipeline-side ports:
// the IP+1 token (next_*), the IP+S token with its back-pressure (side_*),
// the package entering the pipeline every cycle (pipe_*), and event strobes
// for monitoring. The pipeline itself, with its frame store, lies outside.
// Parameters: K slots per set (FOSS) or per bank (SOCS), equal to the
// activation frame size; eight slots per FOSS set and eight SOCS banks, one
// per pipeline stage; queue depths. Reset is active-low and synchronous.
module ams_top
  import ams_pkg::*;
#(
  parameter int    K         = 64,
  parameter int    SLOTS     = 8,
  parameter int    NBANK     = 8,
  parameter int    UC_W      = 4,
  parameter repl_e REPL      = REPL_LRU,
  parameter int    MTQ_DEPTH = 16,
  parameter int    UTQ_DEPTH = 16,
  parameter int    CPQ_DEPTH = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  // FOSS
  input  logic      foss_next_valid,
  input  token_t    foss_next_tok,
  input  logic      foss_side_valid,
  input  token_t    foss_side_tok,
  output logic      foss_side_ready,
  output logic      foss_pipe_valid,
  output pipe_pkg_t foss_pipe_pkg,
  output pipe_src_e foss_pipe_src,
  output foss_ev_t  foss_ev,
  output logic      foss_idle,
  // SOCS
  input  logic      socs_next_valid,
  input  token_t    socs_next_tok,
  input  logic      socs_side_valid,
  input  token_t    socs_side_tok,
  output logic      socs_side_ready,
  output logic      socs_pipe_valid,
  output pipe_pkg_t socs_pipe_pkg,
  output pipe_src_e socs_pipe_src,
  output socs_ev_t  socs_ev,
  output logic [NBANK-1:0] socs_active_blocks,
  output logic      socs_idle
);

  foss #(.K(K), .SLOTS(SLOTS), .UC_W(UC_W), .REPL(REPL),
         .MTQ_DEPTH(MTQ_DEPTH), .UTQ_DEPTH(UTQ_DEPTH)) u_foss (
    .clk, .rst_n,
    .next_valid(foss_next_valid), .next_tok(foss_next_tok),
    .side_valid(foss_side_valid), .side_tok(foss_side_tok), .side_ready(foss_side_ready),
    .pipe_valid(foss_pipe_valid), .pipe_pkg(foss_pipe_pkg), .pipe_src(foss_pipe_src),
    .ev(foss_ev), .idle(foss_idle)
  );

  socs #(.K(K), .NBANK(NBANK), .MTQ_DEPTH(MTQ_DEPTH), .UTQ_DEPTH(UTQ_DEPTH),
         .CPQ_DEPTH(CPQ_DEPTH)) u_socs (
    .clk, .rst_n,
    .next_valid(socs_next_valid), .next_tok(socs_next_tok),
    .side_valid(socs_side_valid), .side_tok(socs_side_tok), .side_ready(socs_side_ready),
    .pipe_valid(socs_pipe_valid), .pipe_pkg(socs_pipe_pkg), .pipe_src(socs_pipe_src),
    .ev(socs_ev), .active_blocks(socs_active_blocks), .idle(socs_idle)
  );

endmodule

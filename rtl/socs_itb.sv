// socs_itb: instruction transfer buffer of the SOCS auxiliary matching store.
//
// NBANK entries (eight by default), one per AMS bank; an entry is the valid
// bit VB, the frame pointer FP of the code block that owns the bank, and the
// token count TC, the number of tokens in the bank. The buffer so decides
// which code blocks are active: at most NBANK at a time.
//   lookup : combinational; hit/hit_idx give the valid entry whose FP equals
//            lookup_fp, free_avail/free_idx the lowest empty entry. A second
//            port (lookup2_fp, hit2) only tells whether a frame is active;
//            it is used for the head of the controlling process queue.
//   inc    : a token enters bank inc_idx, TC += 1; with alloc the entry is
//            first taken for alloc_fp (VB set, TC counted from 0).
//   dec    : from the token count decrementor, TC -= dec_amt (1 or 2).
// inc and dec may name the same entry in one cycle. An entry whose TC
// reaches 0 is released (VB cleared, ev_release for one cycle), which lets
// the controlling process queue admit a waiting code block. Entry fields and
// counting follow the SOCS description; releasing at TC = 0 is this design's
// reading of it. Reset (active-low, synchronous) clears every VB and TC.
module socs_itb
  import ams_pkg::*;
#(
  parameter int NBANK = 8,
  parameter int TC_W  = 7
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [FP_W-1:0]          lookup_fp,
  output logic                     hit,
  output logic [$clog2(NBANK)-1:0] hit_idx,
  output logic                     free_avail,
  output logic [$clog2(NBANK)-1:0] free_idx,
  input  logic [FP_W-1:0]          lookup2_fp,
  output logic                     hit2,
  input  logic                     inc_valid,
  input  logic [$clog2(NBANK)-1:0] inc_idx,
  input  logic                     alloc,
  input  logic [FP_W-1:0]          alloc_fp,
  input  logic                     dec_valid,
  input  logic [$clog2(NBANK)-1:0] dec_idx,
  input  logic [1:0]               dec_amt,
  output logic [NBANK-1:0]         vb,
  output logic                     ev_release
);

  localparam int BW = $clog2(NBANK);

  logic [FP_W-1:0] fp [NBANK];
  logic [TC_W-1:0] tc [NBANK];

  always_comb begin
    hit        = 1'b0;
    hit_idx    = '0;
    free_avail = 1'b0;
    free_idx   = '0;
    hit2       = 1'b0;
    for (int b = NBANK - 1; b >= 0; b--) begin
      if (vb[b] && fp[b] == lookup2_fp) hit2 = 1'b1;
      if (vb[b] && fp[b] == lookup_fp) begin
        hit     = 1'b1;
        hit_idx = BW'(b);
      end
      if (!vb[b]) begin
        free_avail = 1'b1;
        free_idx   = BW'(b);
      end
    end
  end

  logic [TC_W-1:0] tc_next [NBANK];
  logic [NBANK-1:0] rel;

  always_comb begin
    for (int b = 0; b < NBANK; b++) begin
      tc_next[b] = (alloc && inc_valid && inc_idx == BW'(b)) ? '0 : tc[b];
      if (inc_valid && inc_idx == BW'(b)) tc_next[b] = tc_next[b] + 1'b1;
      if (dec_valid && dec_idx == BW'(b)) tc_next[b] = tc_next[b] - TC_W'(dec_amt);
      rel[b] = (vb[b] || (alloc && inc_valid && inc_idx == BW'(b))) && (tc_next[b] == '0);
    end
  end

  assign ev_release = |rel;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int b = 0; b < NBANK; b++) begin
        vb[b] <= 1'b0;
        tc[b] <= '0;
        fp[b] <= '0;
      end
    end else begin
      for (int b = 0; b < NBANK; b++) begin
        tc[b] <= tc_next[b];
        if (alloc && inc_valid && inc_idx == BW'(b)) begin
          vb[b] <= 1'b1;
          fp[b] <= alloc_fp;
        end
        if (rel[b]) vb[b] <= 1'b0;
      end
    end
  end

  a_alloc_free: assert property (@(posedge clk) disable iff (!rst_n)
                                 (alloc && inc_valid) |-> !vb[inc_idx]);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   dec_valid |-> (tc[dec_idx] + TC_W'(inc_valid && inc_idx == dec_idx)) >= TC_W'(dec_amt));

endmodule

// socs_itb_tb: self-checking test of the instruction transfer buffer.
// Random allocations, increments and 1/2 decrements against a model of the
// eight (VB, FP, TC) entries: lookup hit and free entry, token counts and
// release when a count reaches zero.
module socs_itb_tb;
  import ams_pkg::*;
  localparam int NBANK = 8, TC_W = 7;
  logic clk = 0, rst_n = 0;
  logic [FP_W-1:0] lookup_fp, alloc_fp, lookup2_fp;
  logic hit2;
  logic hit, free_avail, inc_valid, alloc, dec_valid, ev_release;
  logic [2:0] hit_idx, free_idx, inc_idx, dec_idx;
  logic [1:0] dec_amt;
  logic [NBANK-1:0] vb;
  int checks = 0, failures = 0, nrel = 0, nalloc = 0, nfull = 0, nd2 = 0;
  bit mvb[NBANK];
  int mfp[NBANK], mtc[NBANK];

  socs_itb #(.NBANK(NBANK), .TC_W(TC_W)) dut (.*);

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
    int h, fr, b, d, tcn[NBANK];
    bit r;
    lookup_fp = 0; alloc_fp = 0; inc_valid = 0; alloc = 0; dec_valid = 0;
    inc_idx = 0; dec_idx = 0; dec_amt = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      lookup_fp = 24'($urandom_range(0, 14));
      lookup2_fp = 24'($urandom_range(0, 14));
      inc_valid = 0; alloc = 0; dec_valid = 0;
      #1;
      h = -1; fr = -1;
      for (int j = 0; j < NBANK; j++) begin
        check(vb[j] == mvb[j], "vb");
        if (h < 0 && mvb[j] && mfp[j] == int'(lookup_fp)) h = j;
        if (fr < 0 && !mvb[j]) fr = j;
      end
      check(hit == (h >= 0), "hit");
      r = 0;
      for (int j = 0; j < NBANK; j++) if (mvb[j] && mfp[j] == int'(lookup2_fp)) r = 1;
      check(hit2 == r, "hit2");
      if (h >= 0) check(int'(hit_idx) == h, "hit_idx");
      check(free_avail == (fr >= 0), "free_avail");
      if (fr >= 0) check(int'(free_idx) == fr, "free_idx");
      if (fr < 0) nfull++;
      // choose an operation like the SOCS unit would
      if ($urandom_range(0, 1)) begin
        if (h >= 0) begin inc_valid = 1; inc_idx = 3'(h); end
        else if (fr >= 0) begin inc_valid = 1; alloc = 1; inc_idx = 3'(fr); alloc_fp = lookup_fp; end
      end
      b = $urandom_range(0, NBANK - 1);
      d = $urandom_range(1, 2);
      if (mvb[b] && (mtc[b] + ((inc_valid && int'(inc_idx) == b) ? 1 : 0)) >= d && $urandom_range(0, 2) == 0) begin
        dec_valid = 1; dec_idx = 3'(b); dec_amt = 2'(d);
        if (d == 2) nd2++;
      end
      #1;
      r = 0;
      for (int j = 0; j < NBANK; j++) begin
        tcn[j] = mtc[j];
        if (alloc && int'(inc_idx) == j) begin tcn[j] = 0; mvb[j] = 1; mfp[j] = int'(alloc_fp); nalloc++; end
        if (inc_valid && int'(inc_idx) == j) tcn[j]++;
        if (dec_valid && int'(dec_idx) == j) tcn[j] -= int'(dec_amt);
        if (mvb[j] && tcn[j] == 0) begin r = 1; mvb[j] = 0; nrel++; end
        mtc[j] = tcn[j];
      end
      check(ev_release == r, "release");
    end
    check(nrel > 0 && nalloc > 0 && nfull > 0 && nd2 > 0, "alloc, release, full buffer and -2 seen");
    $display("alloc %0d release %0d full %0d", nalloc, nrel, nfull);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// socs_tcd_tb: self-checking test of the token count decrementor:
// 2 for a match, 1 for a spill or a refresh, none otherwise, for every bank.
module socs_tcd_tb;
  logic match, spill, refresh, dec_valid;
  logic [2:0] bank, dec_idx;
  logic [1:0] dec_amt;
  int checks = 0, failures = 0;

  socs_tcd #(.NBANK(8)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 8; b++)
      for (int e = 0; e < 4; e++) begin
        bank = 3'(b);
        match = (e == 1); spill = (e == 2); refresh = (e == 3);
        #1;
        checks++;
        if (dec_valid != (e != 0)) failures++;
        if (e != 0) begin
          checks += 2;
          if (dec_idx != 3'(b)) failures++;
          if (dec_amt != ((e == 1) ? 2'd2 : 2'd1)) failures++;
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// socs_tcd: token count decrementor of the SOCS auxiliary matching store.
//
// Every token that leaves an AMS bank for the MTQ or the UTQ passes it. It
// turns the bank's event into a decrement of that bank's token count in the
// instruction transfer buffer: 2 for a match (the arriving token, counted on
// entry, and its stored partner both leave), 1 for a spill or a refresh (one
// token leaves). A token that reaches the UTQ without touching a bank (a
// monadic token, or one of an inactive block) carries no bank and is not
// counted. Purely combinational; the decrement is applied by the buffer at
// the clock edge that ends the cycle. The amounts follow the SOCS
// description; the encoding is this design's own.
module socs_tcd #(
  parameter int NBANK = 8
) (
  input  logic                     match,     // pair sent to MTQ
  input  logic                     spill,     // old token sent to UTQ
  input  logic                     refresh,   // refreshed token sent to UTQ
  input  logic [$clog2(NBANK)-1:0] bank,      // bank the token left
  output logic                     dec_valid,
  output logic [$clog2(NBANK)-1:0] dec_idx,
  output logic [1:0]               dec_amt
);

  always_comb begin
    dec_valid = match || spill || refresh;
    dec_idx   = bank;
    dec_amt   = match ? 2'd2 : ((spill || refresh) ? 2'd1 : 2'd0);
  end

endmodule

// lfsr_inc: the count-value incrementer (the "INC" box of the data path).
//
// Combinational. cnt_o is the successor of cnt_i in the 31-state sequence of a
// five-bit maximal-length LFSR, so repeated increments count modulo 31. The
// document chose an LFSR because its delay is the same for every value; the
// polynomial (x^5 + x^3 + 1, in cf_pkg::lfsr_next) is this design's choice.
// A count of zero is outside the sequence and stays zero; load non-zero counts.
// Four of the five output bits are input bits moved up one place, which is
// what a shift register is; only bit 0 has a gate (one xor).
module lfsr_inc
  import cf_pkg::*;
(
  input  logic [CNT_W-1:0] cnt_i,
  output logic [CNT_W-1:0] cnt_o
);

  always_comb cnt_o = lfsr_next(cnt_i);

endmodule

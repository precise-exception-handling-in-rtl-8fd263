// elo_clo: the two bit-scan functions that let an exception handler walk the
// pending sources of the Exception Source Word in priority order.
//
//   ELO (encode leftmost one): index of the most significant set bit. With
//   the highest-priority source at bit 31 this names the most urgent pending
//   exception. An all-zero operand returns 32 (none), a choice of this design.
//   CLO (clear leftmost one): the operand with that bit cleared, ready for the
//   next ELO.
// A handler loops: ELO, service the source, CLO, until ELO returns 32.
//
// The two instructions and their use come from the DIVA processor; the
// result for a zero operand is this design's own. Combinational, meant to
// sit in the integer ALU.
module elo_clo
  import ehu_pkg::*;
(
  input  word_t operand,
  output word_t elo,   // 0..31, or 32 when operand is zero
  output word_t clo
);

  always_comb begin
    elo = word_t'(XLEN);
    clo = operand;
    for (int i = 0; i < int'(XLEN); i++) begin
      if (operand[i]) begin
        elo = word_t'(i);   // last hit is the leftmost one
      end
    end
    if (elo != word_t'(XLEN)) clo[elo[4:0]] = 1'b0;
  end

endmodule

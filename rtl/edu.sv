// edu: the exception detection unit. It decides in the memory stage whether
// an exception is taken this cycle and which vector applies.
//
//   undef_inst_excep = the memory-stage instruction is undefined (incl. BRK)
//   all_other_excep  = PSW exception enable and any ESW bit enabled in EMR
// An undefined instruction has no ESW bit and no mask; this design takes it
// whatever the enable bit, since the instruction cannot complete. When both
// are raised the undefined-instruction vector is used, following the order
// of the vector table (reset, undefined instruction, all others); the ESW
// bits stay pending and are seen again once exceptions are re-enabled.
//
// Inputs and vectors follow the DIVA exception datapath; the precedence and
// the unmasked undefined instruction are this design's own. Combinational.
module edu
  import ehu_pkg::*;
(
  input  logic  undef_inst,   // valid undefined instruction in ME
  input  word_t esw,          // exception source word (detect view)
  input  word_t emrq,         // exception mask register, 1 = enabled
  input  logic  ee,           // PSW global exception enable
  output logic  undef_inst_excep,
  output logic  all_other_excep,
  output logic  excep,
  output addr_t vector
);

  always_comb begin
    undef_inst_excep = undef_inst;
    all_other_excep  = ee && ((esw & emrq) != '0);
    excep            = undef_inst_excep || all_other_excep;
    vector           = undef_inst_excep ? VEC_UNDEF : VEC_OTHER;
  end

endmodule

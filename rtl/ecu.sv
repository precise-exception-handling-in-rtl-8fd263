// ecu: the ESW control unit. It forms the Exception Source Word from its
// registered value and this cycle's events.
//
// Hardware sources are of two kinds: the synchronous flags that travelled
// with the instruction now in the memory stage (counted only when that stage
// holds a valid instruction) and asynchronous requests (interval timer,
// parcel-buffer interrupt) that are counted at any time. Software sets bits
// by writing ones to ESR and clears them by writing ones to ERR.
//
// Two words leave the unit:
//   esw_detect = eswq | new hardware bits    -> exception detection
//   esw_next   = (eswq & ~err) | esr | new hardware bits -> ESW register
// A software set or clear therefore acts on detection one cycle later, after
// the MTPR that caused it has completed; this keeps detection independent of
// the write that it may cancel. A new hardware event wins over a clear in the
// same cycle, so no event is lost.
//
// The source word, the set/clear registers and the split between hardware
// and software initiators follow the DIVA exception architecture; the
// one-cycle delay of software writes and the set-wins rule are this design's
// own. Purely combinational.
module ecu
  import ehu_pkg::*;
(
  input  word_t eswq,        // current ESW register
  input  logic  me_valid,    // memory stage holds an instruction
  input  word_t me_src,      // its synchronous sources
  input  word_t async_src,   // asynchronous hardware requests
  input  word_t esr_set,     // software set (MTPR ESR data, else 0)
  input  word_t err_clr,     // software clear (MTPR ERR data, else 0)
  output word_t esw_detect,
  output word_t esw_next
);

  word_t hw_new;

  always_comb begin
    hw_new     = (me_valid ? me_src : '0) | async_src;
    esw_detect = eswq | hw_new;
    esw_next   = (eswq & ~err_clr) | esr_set | hw_new;
  end

endmodule

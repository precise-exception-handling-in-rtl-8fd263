// prio_enc: selects the return addresses FADR and NADR at the moment an
// exception is recognized.
//
// The candidates are the instruction slots of the pipeline, ordered from the
// oldest (the memory stage) back towards the youngest (the decode stage); the
// address about to be fetched, if_pc, is always counted as valid and follows
// them. The rules:
//   * at least two valid (if_pc included): FADR = first valid, NADR = second
//   * only if_pc valid, last committed instruction was a taken branch whose
//     target is still pending in the PC state machine: FADR = if_pc,
//     NADR = that target
//   * only if_pc valid otherwise: FADR = if_pc, NADR = if_pc + 4
// Bubbles anywhere in the pipeline are skipped, so neither register ever
// records the address of an instruction that has already left the pipeline.
//
// The selection rules are those of the DIVA exception unit. The search is
// written as two chained first-one scans; the ordering of the candidate
// vector is this design's own (see pipe_tracker).
//
// Interface: purely combinational. cand[0] is the memory stage.
module prio_enc
  import ehu_pkg::*;
#(
  parameter int unsigned NCAND = 14   // ME + 11 pc-array slots + EX + ID
) (
  input  logic [NCAND-1:0] cand_valid,
  input  addr_t            cand_pc [NCAND],
  input  addr_t            if_pc,        // next fetch address (always valid)
  input  logic             pend_valid,   // a resolved target waits behind if_pc
  input  addr_t            pend_target,  // that target
  output addr_t            fadr,
  output addr_t            nadr,
  output sel_e             sel
);

  always_comb begin
    logic  found1, found2;
    addr_t first_pc, second_pc;
    found1    = 1'b0;
    found2    = 1'b0;
    first_pc  = '0;
    second_pc = '0;
    for (int i = 0; i < int'(NCAND); i++) begin
      if (cand_valid[i]) begin
        if (!found1) begin
          found1   = 1'b1;
          first_pc = cand_pc[i];
        end else if (!found2) begin
          found2    = 1'b1;
          second_pc = cand_pc[i];
        end
      end
    end

    if (found2) begin
      fadr = first_pc;
      nadr = second_pc;
      sel  = SEL_TWO_VALID;
    end else if (found1) begin
      // the fetch PC is the second valid instruction
      fadr = first_pc;
      nadr = if_pc;
      sel  = SEL_TWO_VALID;
    end else if (pend_valid) begin
      fadr = if_pc;
      nadr = pend_target;
      sel  = SEL_PC_TARGET;
    end else begin
      fadr = if_pc;
      nadr = if_pc + INSN_BYTES;
      sel  = SEL_PC_SEQ;
    end
  end

endmodule

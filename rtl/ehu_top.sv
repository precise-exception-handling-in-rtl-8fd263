// ehu_top: precise exception handling unit for a single-issue, in-order
// pipeline with one branch delay slot and long-latency execution pipes.
//
// The unit watches the pipeline (pipe_tracker), keeps the fetch address
// (pc_unit), gathers exception sources into the Exception Source Word (ecu),
// decides in the memory stage whether to take an exception (edu) and keeps
// the protected registers (prot_regs). When an exception is taken, prio_enc
// picks FADR and NADR as the first two valid instructions searching from the
// memory stage back to the fetch PC, falling back to the PC state machine's
// resolved next address when every stage holds a bubble. Together FADR and
// NADR are the complete return state even after a taken delayed branch; a
// return from exception fetches FADR and then NADR.
//
// Exception recognition (cycle t, hold low):
//   * every stage is flushed, the ME instruction does not commit
//   * pc <= vector (0x0800_0100 undefined instruction, 0x0800_0200 others)
//   * FADR, NADR, MADR, SSW <= PSW, PSW: EE = 0, supervisor = 1
// Return from exception (rfe with the RFE instruction committing in ME):
//   younger stages flushed, pc <= FADR with NADR pending, PSW <= SSW.
// Reset starts fetch at 0x0800_0000 in supervisor mode with exceptions off.
//
// The processor around the unit supplies fetch/issue handshakes, the issue
// latency (1 integer, 5 FP, 12 FP divide), branch resolution in decode,
// exception flags where they arise, MFPR/MTPR accesses and the RFE commit;
// these port conventions are this design's own. The ELO/CLO bit-scan
// function used by handlers sits beside the unit with its own ports.
module ehu_top
  import ehu_pkg::*;
#(
  parameter int unsigned NSLOT = 11
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    hold,            // whole pipeline frozen (e.g. memory wait)
  // fetch
  output addr_t   pc,
  input  logic    fetch,
  input  word_t   if_exc,          // instruction access faults of this fetch
  // decode / issue
  input  logic    issue,
  input  logic [$clog2(NSLOT+2)-1:0] issue_lat,
  input  logic    issue_regwrite,
  input  logic    id_undef,        // undefined instruction (incl. BRK)
  input  word_t   id_src,          // other sources found in decode
  input  logic    br_valid,        // issuing instruction is a branch
  input  logic    br_taken,
  input  addr_t   br_target,
  // execute / memory
  input  word_t   ex_exc,          // flags raised as a result reaches EX/ME
  input  word_t   me_src,          // data access faults in ME
  input  addr_t   me_maddr,        // data address of the ME instruction
  input  logic    rfe,             // ME instruction is a return from exception
  input  logic    pbuf_irq,        // parcel buffer interrupt (asynchronous)
  // MFPR / MTPR
  input  pr_num_e pr_rd_addr,
  output word_t   pr_rd_data,
  input  logic    pr_wr_en,        // ME instruction is an MTPR
  input  pr_num_e pr_wr_addr,
  input  word_t   pr_wr_data,
  // status
  output logic    me_valid,
  output addr_t   me_pc,
  output logic    me_commit,
  output logic    me_regwrite,
  output logic    excep,
  output logic    undef_inst_excep,
  output logic    all_other_excep,
  output addr_t   vector,
  output logic    flush,
  output sel_e    sel,             // FADR/NADR rule used (valid with excep)
  output logic    pend_valid,
  output word_t   pswq,
  output word_t   eswq,
  output addr_t   fadrq,
  output addr_t   nadrq,
  output addr_t   madrq,
  // ELO / CLO
  input  word_t   bs_operand,
  output word_t   elo_result,
  output word_t   clo_result
);

  localparam int unsigned NCAND = NSLOT + 3;

  slot_t id_s, ex_s, me_s;
  slot_t slots [NSLOT];

  logic  rfe_go, excep_raw, undef_raw, other_raw;
  addr_t pend_target, fadr, nadr;
  word_t esw_detect, esw_next, sswq, emrq, esr_set, err_clr, async_src;
  logic  ee, timer_expire;

  logic [NCAND-1:0] cand_valid;
  addr_t            cand_pc [NCAND];

  assign excep            = excep_raw && !hold;
  assign undef_inst_excep = undef_raw && !hold;
  assign all_other_excep  = other_raw && !hold;
  assign rfe_go           = rfe && me_commit;
  assign flush            = excep || rfe_go;
  assign me_valid         = me_s.valid;
  assign me_pc            = me_s.pc;

  pipe_tracker #(.NSLOT(NSLOT)) u_track (
    .clk, .rst_n, .hold, .flush, .kill(excep),
    .fetch, .if_pc(pc), .if_exc,
    .issue, .issue_lat, .issue_regwrite,
    .id_exc('{undef: id_undef, src: id_src}),
    .ex_exc,
    .id_s, .ex_s, .slots, .me_s,
    .me_commit, .me_regwrite
  );

  pc_unit u_pc (
    .clk, .rst_n, .hold, .fetch,
    .br_valid(br_valid && issue), .br_taken, .br_target,
    .excep, .vector, .rfe(rfe_go), .fadrq, .nadrq,
    .pc, .pend_valid, .pend_target
  );

  // oldest first: ME, pc array slot 0 .. NSLOT-1, EX, ID
  always_comb begin
    cand_valid[0] = me_s.valid;
    cand_pc[0]    = me_s.pc;
    for (int i = 0; i < int'(NSLOT); i++) begin
      cand_valid[i+1] = slots[i].valid;
      cand_pc[i+1]    = slots[i].pc;
    end
    cand_valid[NSLOT+1] = ex_s.valid;
    cand_pc[NSLOT+1]    = ex_s.pc;
    cand_valid[NSLOT+2] = id_s.valid;
    cand_pc[NSLOT+2]    = id_s.pc;
  end

  prio_enc #(.NCAND(NCAND)) u_penc (
    .cand_valid, .cand_pc, .if_pc(pc), .pend_valid, .pend_target,
    .fadr, .nadr, .sel
  );

  always_comb begin
    async_src               = '0;
    async_src[ESW_TIMER]    = timer_expire;
    async_src[ESW_PBUF_IRQ] = pbuf_irq;
  end

  ecu u_ecu (
    .eswq, .me_valid(me_s.valid), .me_src(me_s.exc.src | me_src),
    .async_src, .esr_set, .err_clr, .esw_detect, .esw_next
  );

  edu u_edu (
    .undef_inst(me_s.valid && me_s.exc.undef), .esw(esw_detect), .emrq, .ee,
    .undef_inst_excep(undef_raw), .all_other_excep(other_raw),
    .excep(excep_raw), .vector
  );

  prot_regs u_pr (
    .clk, .rst_n,
    .rd_addr(pr_rd_addr), .rd_data(pr_rd_data),
    .wr_en(pr_wr_en && me_commit), .wr_addr(pr_wr_addr), .wr_data(pr_wr_data),
    .esw_next, .excep, .fadr_in(fadr), .nadr_in(nadr), .maddr_in(me_maddr),
    .rfe(rfe_go),
    .pswq, .sswq, .eswq, .emrq, .fadrq, .nadrq, .madrq, .ee,
    .esr_set, .err_clr, .timer_expire
  );

  elo_clo u_bs (
    .operand(bs_operand), .elo(elo_result), .clo(clo_result)
  );

endmodule

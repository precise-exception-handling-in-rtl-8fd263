// prot_regs: the protected register file of the exception unit, 17
// registers numbered as in the DIVA architecture, read by MFPR and written by
// MTPR, plus the updates the hardware makes on its own.
//
//   0 PSW   status word: bit 0 exception enable (EE), bit 1 supervisor mode
//   1 SSW   shadow PSW
//   2 -     reserved, reads 0
//   3 FADR  faulting instruction address
//   4-7     SCR0..SCR3 scratch registers
//   8 ESW   exception source word; follows esw_next every cycle, MTPR ignored
//   9 EMR   exception mask, 1 = source enabled
//  10 ESR   write ones to set ESW bits (strobe, reads 0)
//  11 ERR   write ones to clear ESW bits (strobe, reads 0)
//  12 MADR  faulting memory address
//  13 TIMER counts down to 0; the step from 1 to 0 raises timer_expire
//  14 RCL / 15 RCH  64-bit real-time clock, +1 every cycle; a write
//           replaces one half while the low half keeps counting
//  16 NADR  address of the instruction after FADR
//
// On an exception (excep): SSW <= PSW, PSW gets supervisor mode and EE
// cleared (nested exceptions blocked), FADR/NADR take the priority encoder's
// addresses and MADR the memory-stage data address. A same-cycle MTPR is
// dropped, since its instruction is flushed. On a return from exception
// (rfe): PSW <= SSW.
//
// Numbering, the exception-time copies and the EE/mode behaviour follow the
// DIVA description. The PSW bit positions, reset values (supervisor mode,
// EE = 0), the timer's count-down behaviour, the MADR load on every
// exception and PSW <= SSW on return are this design's choices.
//
// Timing: the read port is combinational (decode stage); all writes take
// effect on the rising clock edge.
module prot_regs
  import ehu_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // MFPR
  input  pr_num_e rd_addr,
  output word_t   rd_data,
  // MTPR
  input  logic    wr_en,
  input  pr_num_e wr_addr,
  input  word_t   wr_data,
  // exception unit
  input  word_t   esw_next,
  input  logic    excep,
  input  addr_t   fadr_in,
  input  addr_t   nadr_in,
  input  addr_t   maddr_in,
  input  logic    rfe,
  output word_t   pswq,
  output word_t   sswq,
  output word_t   eswq,
  output word_t   emrq,
  output addr_t   fadrq,
  output addr_t   nadrq,
  output addr_t   madrq,
  output logic    ee,
  output word_t   esr_set,
  output word_t   err_clr,
  output logic    timer_expire
);

  word_t scr [4];
  word_t timerq;
  logic [63:0] rtc;

  logic wr;
  assign wr = wr_en && !excep;

  assign ee           = pswq[PSW_EE];
  assign esr_set      = (wr && wr_addr == PR_ESR) ? wr_data : '0;
  assign err_clr      = (wr && wr_addr == PR_ERR) ? wr_data : '0;
  assign timer_expire = (timerq == word_t'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pswq   <= word_t'(1) << PSW_SUP;
      sswq   <= '0;
      eswq   <= '0;
      emrq   <= '0;
      fadrq  <= '0;
      nadrq  <= '0;
      madrq  <= '0;
      timerq <= '0;
      rtc    <= '0;
      for (int i = 0; i < 4; i++) scr[i] <= '0;
    end else begin
      eswq <= esw_next;
      rtc  <= rtc + 64'd1;
      if (timerq != '0) timerq <= timerq - word_t'(1);

      if (wr) begin
        unique case (wr_addr)
          PR_PSW:   pswq   <= wr_data;
          PR_SSW:   sswq   <= wr_data;
          PR_FADR:  fadrq  <= wr_data;
          PR_SCR0:  scr[0] <= wr_data;
          PR_SCR1:  scr[1] <= wr_data;
          PR_SCR2:  scr[2] <= wr_data;
          PR_SCR3:  scr[3] <= wr_data;
          PR_EMR:   emrq   <= wr_data;
          PR_MADR:  madrq  <= wr_data;
          PR_TIMER: timerq <= wr_data;
          PR_RCL:   rtc    <= {rtc[63:32], wr_data};
          PR_RCH:   rtc    <= {wr_data, rtc[31:0] + 32'd1};
          PR_NADR:  nadrq  <= wr_data;
          default:  ;  // RSVD, ESW (read-only), ESR/ERR (strobes)
        endcase
      end

      if (excep) begin
        sswq          <= pswq;
        pswq[PSW_EE]  <= 1'b0;
        pswq[PSW_SUP] <= 1'b1;
        fadrq         <= fadr_in;
        nadrq         <= nadr_in;
        madrq         <= maddr_in;
      end else if (rfe) begin
        pswq <= sswq;
      end
    end
  end

  always_comb begin
    unique case (rd_addr)
      PR_PSW:   rd_data = pswq;
      PR_SSW:   rd_data = sswq;
      PR_FADR:  rd_data = fadrq;
      PR_SCR0:  rd_data = scr[0];
      PR_SCR1:  rd_data = scr[1];
      PR_SCR2:  rd_data = scr[2];
      PR_SCR3:  rd_data = scr[3];
      PR_ESW:   rd_data = eswq;
      PR_EMR:   rd_data = emrq;
      PR_MADR:  rd_data = madrq;
      PR_TIMER: rd_data = timerq;
      PR_RCL:   rd_data = rtc[31:0];
      PR_RCH:   rd_data = rtc[63:32];
      PR_NADR:  rd_data = nadrq;
      default:  rd_data = '0;
    endcase
  end

  a_no_write_on_return : assert property (@(posedge clk) disable iff (!rst_n)
    !(rfe && wr_en));

endmodule

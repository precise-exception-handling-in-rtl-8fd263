// ehu_pkg: types and constants shared by the exception handling unit.
//
// Holds the 32-bit address width, the three hardware exception vectors,
// the numbering of the 17 protected registers, the bit layout of the
// Processor Status Word (PSW) and of the Exception Source Word (ESW), and
// the per-instruction record that the pipeline tracker carries from fetch to
// the memory stage.
//
// The vectors and register numbers follow the DIVA exception architecture.
// The PSW bit positions and the ESW bit positions are this design's own
// choice: the sources are placed from bit 31 downwards in the order in which
// the DIVA source classes are listed, so that an encode-leftmost-one finds the
// first-listed pending source first.
package ehu_pkg;

  localparam int unsigned XLEN = 32;
  typedef logic [XLEN-1:0] addr_t;
  typedef logic [XLEN-1:0] word_t;

  // Hardware-vectored exceptions
  localparam addr_t VEC_RESET = 32'h0800_0000;
  localparam addr_t VEC_UNDEF = 32'h0800_0100;
  localparam addr_t VEC_OTHER = 32'h0800_0200;

  // Instruction size in bytes (fall-through is PC + 4)
  localparam addr_t INSN_BYTES = 32'd4;

  // Protected register numbers (MFPR / MTPR operand)
  typedef enum logic [4:0] {
    PR_PSW   = 5'd0,
    PR_SSW   = 5'd1,
    PR_RSVD  = 5'd2,
    PR_FADR  = 5'd3,
    PR_SCR0  = 5'd4,
    PR_SCR1  = 5'd5,
    PR_SCR2  = 5'd6,
    PR_SCR3  = 5'd7,
    PR_ESW   = 5'd8,
    PR_EMR   = 5'd9,
    PR_ESR   = 5'd10,
    PR_ERR   = 5'd11,
    PR_MADR  = 5'd12,
    PR_TIMER = 5'd13,
    PR_RCL   = 5'd14,
    PR_RCH   = 5'd15,
    PR_NADR  = 5'd16
  } pr_num_e;

  localparam int unsigned NUM_PR = 17;

  // PSW bits (positions chosen by this design)
  localparam int unsigned PSW_EE  = 0;  // global exception enable
  localparam int unsigned PSW_SUP = 1;  // 1 = supervisor mode

  // ESW bit positions, highest priority at bit 31
  // Memory-access related
  localparam int unsigned ESW_UNMAP_IACC  = 31; // HW
  localparam int unsigned ESW_INV_IACC    = 30; // HW
  localparam int unsigned ESW_UNMAP_DACC  = 29; // HW
  localparam int unsigned ESW_INV_DACC    = 28; // HW
  localparam int unsigned ESW_ADDR_FIXUP  = 27; // SW
  // Execution related
  localparam int unsigned ESW_TIMER       = 26; // HW
  localparam int unsigned ESW_WW_NA       = 25; // HW
  localparam int unsigned ESW_FP_NA       = 24; // HW
  localparam int unsigned ESW_FP_DZ       = 23; // HW
  localparam int unsigned ESW_FP_INV      = 22; // HW
  localparam int unsigned ESW_FP_OVUF     = 21; // HW
  localparam int unsigned ESW_FP_INEXACT  = 20; // HW
  localparam int unsigned ESW_SYSCALL     = 19; // HW
  localparam int unsigned ESW_PRIV        = 18; // HW
  localparam int unsigned ESW_INT_ALU     = 17; // HW
  localparam int unsigned ESW_WW_ALU      = 16; // HW
  localparam int unsigned ESW_CTX_SWAP    = 15; // SW
  localparam int unsigned ESW_INT_FIXUP   = 14; // SW
  localparam int unsigned ESW_WW_FIXUP    = 13; // SW
  localparam int unsigned ESW_FP_FIXUP    = 12; // SW
  localparam int unsigned ESW_LOCK_BUZZ   = 11; // SW
  localparam int unsigned ESW_THR_RESCHED = 10; // SW
  localparam int unsigned ESW_THR_DISP    = 9;  // SW
  localparam int unsigned ESW_RET_USER    = 8;  // SW
  // Communication related
  localparam int unsigned ESW_PBUF_IRQ    = 7;  // HW
  localparam int unsigned ESW_SEND_ERR    = 6;  // SW
  localparam int unsigned ESW_PBUF_DBELL  = 5;  // SW
  // bits 4..0 reserved

  // Exception state carried with an instruction until the memory stage
  typedef struct packed {
    logic  undef;  // undefined instruction (has its own vector, no ESW bit)
    word_t src;    // synchronous ESW sources raised so far
  } exc_t;

  // One pipeline slot as seen by the tracker and the priority encoder
  typedef struct packed {
    logic  valid;
    logic  regwrite;
    addr_t pc;
    exc_t  exc;
  } slot_t;

  // Which rule of the FADR/NADR selection was applied
  typedef enum logic [1:0] {
    SEL_TWO_VALID = 2'd0,  // first and second valid instruction
    SEL_PC_SEQ    = 2'd1,  // only PC valid, sequential: PC, PC+4
    SEL_PC_TARGET = 2'd2   // only PC valid, after a taken branch: PC, target
  } sel_e;

endpackage

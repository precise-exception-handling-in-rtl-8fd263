// pc_unit: the PC processing state machine of a single-issue pipeline with
// one branch delay slot.
//
// pc is the address of the next instruction to fetch. A branch is resolved
// when it leaves the decode stage; its delay slot is then the instruction at
// pc. If the delay slot is fetched in the same cycle, pc moves straight to
// the target; if fetch is stalled, the target is held as "pending" and taken
// by the next fetch. Without a pending target a fetch advances pc by 4.
// The pending state is exactly the information the priority encoder needs
// when every pipeline stage is a bubble: pend_valid / pend_target tell it
// whether the address after pc is a branch target or pc + 4.
//
// An exception loads pc with the vector and drops any pending target. A
// return from exception loads pc with FADR and makes NADR the pending
// target, so the two saved addresses are fetched back to back; this resumes
// correctly even when FADR was a delay slot and NADR the branch target.
//
// Following the DIVA description: PC, the FADR/NADR return path and the
// reset vector 0x0800_0000. This design's choices: branch resolution in
// decode, the single pending register, and priority
// exception > return > fetch. hold freezes the state.
//
// Timing: all updates on the rising clock edge; outputs are registers.
module pc_unit
  import ehu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  hold,        // whole pipeline frozen this cycle
  input  logic  fetch,       // instruction at pc is fetched this cycle
  input  logic  br_valid,    // a branch leaves decode this cycle
  input  logic  br_taken,
  input  addr_t br_target,
  input  logic  excep,       // exception recognized: go to vector
  input  addr_t vector,
  input  logic  rfe,         // return from exception committed
  input  addr_t fadrq,
  input  addr_t nadrq,
  output addr_t pc,
  output logic  pend_valid,
  output addr_t pend_target
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc          <= VEC_RESET;
      pend_valid  <= 1'b0;
      pend_target <= '0;
    end else if (excep) begin
      pc          <= vector;
      pend_valid  <= 1'b0;
    end else if (rfe) begin
      pc          <= fadrq;
      pend_valid  <= 1'b1;
      pend_target <= nadrq;
    end else if (!hold) begin
      if (br_valid && br_taken) begin
        if (fetch) begin
          pc <= br_target;          // delay slot fetched now
        end else begin
          pend_valid  <= 1'b1;      // delay slot still to come
          pend_target <= br_target;
        end
      end else if (fetch) begin
        pc         <= pend_valid ? pend_target : pc + INSN_BYTES;
        pend_valid <= 1'b0;
      end
    end
  end

  // A taken branch can only resolve while no other target is pending
  a_one_pending : assert property (@(posedge clk) disable iff (!rst_n)
    (br_valid && br_taken && !hold && !excep && !rfe) |-> !pend_valid);

endmodule

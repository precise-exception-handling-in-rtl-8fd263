// pipe_tracker: follows every in-flight instruction's address, valid bit,
// register-write flag and synchronous exception flags from decode to the
// memory stage, so that the priority encoder can see which stages hold real
// instructions and which hold bubbles.
//
// Stages: ID (fetched, being decoded), EX (first execute cycle, the ID/EX
// register), an array of NSLOT slots for multi-cycle operations (the "pc
// array" and "regwrite array", slot NSLOT-1 entered first, slot 0 last), and
// ME (the EX/ME register). An instruction of latency L spends L cycles in
// execute: L = 1 goes from EX to ME at the next edge; L >= 2 is written into
// slot L-2 and shifts down one slot per cycle until slot 0 hands it to ME.
// With NSLOT = 11 the longest latency is 12, the divider depth; the 5-stage
// FP pipe uses L = 5.
//
// Synchronous exception flags travel with the instruction and are OR-ed in
// where they are detected: at fetch (if_exc), at issue (id_exc, including an
// undefined opcode), when the result reaches EX/ME (ex_exc). The issue logic
// outside must keep completion in program order: a new instruction may not
// reach ME before an older one; an assertion checks this. With that rule the
// candidate order me, slot 0 .. slot NSLOT-1, EX, ID is oldest first.
//
// flush empties every stage (exception or return from exception); hold
// freezes every stage. me_commit is asserted when ME holds a valid
// instruction that is not cancelled by kill (an exception; a return from
// exception flushes the younger stages but itself completes), and
// me_regwrite gates its register write.
//
// The pc and regwrite arrays of 11 entries and the 12-stage divider are
// taken from the DIVA exception datapath; the valid bit per slot, the
// latency-indexed insertion and the exception flags carried per slot are this
// design's choices.
module pipe_tracker
  import ehu_pkg::*;
#(
  parameter int unsigned NSLOT = 11
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  hold,
  input  logic  flush,
  input  logic  kill,     // the ME instruction is cancelled (exception)
  // fetch: IF -> ID
  input  logic  fetch,
  input  addr_t if_pc,
  input  word_t if_exc,
  // issue: ID -> EX
  input  logic  issue,
  input  logic [$clog2(NSLOT+2)-1:0] issue_lat,  // 1 .. NSLOT+1
  input  logic  issue_regwrite,
  input  exc_t  id_exc,
  // flags raised as a result enters EX/ME
  input  word_t ex_exc,
  // observation
  output slot_t id_s,
  output slot_t ex_s,
  output slot_t slots [NSLOT],
  output slot_t me_s,
  output logic  me_commit,
  output logic  me_regwrite
);

  typedef logic [$clog2(NSLOT+2)-1:0] lat_t;
  lat_t ex_lat;

  assign me_commit   = me_s.valid && !kill && !hold;
  assign me_regwrite = me_commit && me_s.regwrite;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id_s   <= '0;
      ex_s   <= '0;
      me_s   <= '0;
      ex_lat <= '0;
      for (int i = 0; i < int'(NSLOT); i++) slots[i] <= '0;
    end else if (flush) begin
      id_s.valid <= 1'b0;
      ex_s.valid <= 1'b0;
      me_s.valid <= 1'b0;
      for (int i = 0; i < int'(NSLOT); i++) slots[i].valid <= 1'b0;
    end else if (!hold) begin
      // ID
      if (fetch) begin
        id_s.valid     <= 1'b1;
        id_s.regwrite  <= 1'b0;
        id_s.pc        <= if_pc;
        id_s.exc.undef <= 1'b0;
        id_s.exc.src   <= if_exc;
      end else if (issue) begin
        id_s.valid <= 1'b0;
      end
      // EX (ID/EX register)
      if (issue) begin
        ex_s.valid     <= 1'b1;
        ex_s.regwrite  <= issue_regwrite;
        ex_s.pc        <= id_s.pc;
        ex_s.exc.undef <= id_s.exc.undef | id_exc.undef;
        ex_s.exc.src   <= id_s.exc.src | id_exc.src;
        ex_lat         <= issue_lat;
      end else begin
        ex_s.valid <= 1'b0;
      end
      // pc / regwrite arrays
      for (int i = 0; i < int'(NSLOT); i++) begin
        if (ex_s.valid && ex_lat >= lat_t'(2) && int'(ex_lat) - 2 == i)
          slots[i] <= ex_s;
        else if (i == int'(NSLOT) - 1)
          slots[i].valid <= 1'b0;
        else
          slots[i] <= slots[i+1];
      end
      // EX/ME register
      if (ex_s.valid && ex_lat == lat_t'(1)) begin
        me_s         <= ex_s;
        me_s.exc.src <= ex_s.exc.src | ex_exc;
      end else begin
        me_s         <= slots[0];
        me_s.exc.src <= slots[0].exc.src | (slots[0].valid ? ex_exc : '0);
      end
    end
  end

  // Fetch into ID only when ID is empty or its instruction leaves now
  a_fetch_room : assert property (@(posedge clk) disable iff (!rst_n)
    (fetch && !hold && !flush) |-> (!id_s.valid || issue));
  // Issue needs an instruction in ID and a legal latency
  a_issue_valid : assert property (@(posedge clk) disable iff (!rst_n)
    (issue && !hold && !flush) |-> (id_s.valid && issue_lat >= 1 && int'(issue_lat) <= int'(NSLOT) + 1));

  // In-order completion: nothing older may still be behind the new entry
  always_ff @(posedge clk) begin
    if (rst_n && !hold && !flush && ex_s.valid) begin
      // the new entry reaches ME after ex_lat edges, slot j after j+1
      for (int j = 0; j < int'(NSLOT); j++) begin
        if (j >= int'(ex_lat) - 1)
          assert (!slots[j].valid) else $error("younger instruction would overtake slot %0d", j);
      end
    end
  end

endmodule

// tb_prio_enc: random test of the FADR/NADR selection.
// Candidate valid patterns are drawn with different densities (all bubbles,
// a single valid slot, sparse, dense) and the outputs are compared with a
// reference that lists the valid addresses in a queue and applies the three
// rules directly.
module tb_prio_enc;
  import ehu_pkg::*;

  localparam int unsigned NCAND = 14;

  logic [NCAND-1:0] cand_valid;
  addr_t cand_pc [NCAND];
  addr_t if_pc, pend_target, fadr, nadr;
  logic  pend_valid;
  sel_e  sel;

  int checks = 0, failures = 0;
  int n_two = 0, n_seq = 0, n_tgt = 0;

  prio_enc dut (.*);

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (valid=%b)", what, got, exp, cand_valid);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 4000; it++) begin
      addr_t q[$];
      addr_t ef, en;
      sel_e  es;
      int mode;
      q.delete();
      mode = it % 4;
      for (int i = 0; i < int'(NCAND); i++) begin
        cand_pc[i] = $urandom & 32'hffff_fffc;
        case (mode)
          0: cand_valid[i] = 1'b0;
          1: cand_valid[i] = ($urandom_range(0, 15) == 0);
          2: cand_valid[i] = ($urandom_range(0, 3) == 0);
          default: cand_valid[i] = $urandom_range(0, 1) == 1;
        endcase
      end
      if (mode == 1 && it % 8 == 1) begin
        cand_valid = '0;
        cand_valid[$urandom_range(0, NCAND-1)] = 1'b1;
      end
      if_pc       = $urandom & 32'hffff_fffc;
      pend_valid  = $urandom_range(0, 1) == 1;
      pend_target = $urandom & 32'hffff_fffc;
      #1;
      for (int i = 0; i < int'(NCAND); i++) if (cand_valid[i]) q.push_back(cand_pc[i]);
      q.push_back(if_pc);   // the fetch address always counts as valid
      if (q.size() >= 2) begin
        ef = q[0]; en = q[1]; es = SEL_TWO_VALID; n_two++;
      end else if (pend_valid) begin
        ef = if_pc; en = pend_target; es = SEL_PC_TARGET; n_tgt++;
      end else begin
        ef = if_pc; en = if_pc + 32'd4; es = SEL_PC_SEQ; n_seq++;
      end
      check("fadr", fadr, ef);
      check("nadr", nadr, en);
      check("sel", 32'(sel), 32'(es));
    end
    checks++;
    if (n_two == 0 || n_seq == 0 || n_tgt == 0) begin
      failures++;
      $display("FAIL coverage two=%0d seq=%0d tgt=%0d", n_two, n_seq, n_tgt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

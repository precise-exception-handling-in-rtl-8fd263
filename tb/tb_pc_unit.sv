// tb_pc_unit: random test of the PC state machine against a reference that
// keeps the pair (pc, address that follows pc) the way an architectural
// delayed-branch model does: a fetch moves along the pair, a taken branch
// replaces the follower, an exception restarts at the vector, a return
// restarts at (FADR, NADR). The unit's pending state must reproduce the
// follower: pend_valid ? pend_target : pc + 4.
module tb_pc_unit;
  import ehu_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  hold, fetch, br_valid, br_taken, excep, rfe;
  addr_t br_target, vector, fadrq, nadrq, pc, pend_target;
  logic  pend_valid;

  int checks = 0, failures = 0;
  int n_redirect_now = 0, n_redirect_later = 0, n_exc = 0, n_rfe = 0;

  pc_unit dut (.*);

  always #5 clk = ~clk;

  addr_t m_pc, m_next;
  logic  m_pend;   // follower differs from sequential

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {hold, fetch, br_valid, br_taken, excep, rfe} = '0;
    br_target = '0; vector = '0; fadrq = '0; nadrq = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    m_pc = VEC_RESET; m_next = VEC_RESET + 4; m_pend = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // compare current state
      check("pc", pc, m_pc);
      check("follower", pend_valid ? pend_target : pc + 32'd4, m_next);
      // drive
      hold      = $urandom_range(0, 15) == 0;
      fetch     = $urandom_range(0, 2) != 0;
      br_valid  = !m_pend && $urandom_range(0, 4) == 0;
      br_taken  = $urandom_range(0, 1) == 1;
      br_target = $urandom & 32'hffff_fffc;
      excep     = $urandom_range(0, 60) == 0;
      vector    = $urandom_range(0, 1) ? VEC_UNDEF : VEC_OTHER;
      rfe       = $urandom_range(0, 60) == 0;
      fadrq     = $urandom & 32'hffff_fffc;
      nadrq     = $urandom & 32'hffff_fffc;
      // reference for the coming edge
      if (excep) begin
        m_pc = vector; m_next = vector + 4; m_pend = 0; n_exc++;
      end else if (rfe) begin
        m_pc = fadrq; m_next = nadrq; m_pend = 1; n_rfe++;
      end else if (!hold) begin
        if (br_valid && br_taken) begin
          m_next = br_target; m_pend = 1;
          if (fetch) n_redirect_now++; else n_redirect_later++;
        end
        if (fetch) begin
          m_pc = m_next; m_next = m_pc + 4; m_pend = 0;
        end
      end
    end
    checks++;
    if (n_redirect_now == 0 || n_redirect_later == 0 || n_exc == 0 || n_rfe == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("redirect now=%0d later=%0d exc=%0d rfe=%0d", n_redirect_now, n_redirect_later, n_exc, n_rfe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

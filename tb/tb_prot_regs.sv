// tb_prot_regs: random MTPR writes, MFPR reads, exceptions and returns
// against a reference register file. It checks every read, the
// exception-time copies (SSW <= PSW, EE cleared, supervisor set, FADR, NADR,
// MADR), PSW <= SSW on return, that a write in an exception cycle is dropped,
// the ESR/ERR strobes, the interval timer (a write of N raises timer_expire
// exactly N-1 cycles later) and the 64-bit real-time clock.
module tb_prot_regs;
  import ehu_pkg::*;

  logic    clk = 0, rst_n = 0;
  pr_num_e rd_addr, wr_addr;
  word_t   rd_data, wr_data, esw_next;
  logic    wr_en, excep, rfe;
  addr_t   fadr_in, nadr_in, maddr_in;
  word_t   pswq, sswq, eswq, emrq, esr_set, err_clr;
  addr_t   fadrq, nadrq, madrq;
  logic    ee, timer_expire;

  prot_regs dut (.*);

  always #5 clk = ~clk;

  word_t m [NUM_PR];     // reference (RCL/RCH/TIMER/ESW handled separately)
  logic [63:0] m_rtc;
  word_t m_timer;
  int checks = 0, failures = 0;
  int n_exc = 0, n_rfe = 0, n_drop = 0, n_expire = 0, n_timer_set = 0;
  int expire_due;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time); end
  endtask

  function automatic word_t ref_read(int a);
    case (a)
      PR_RSVD, PR_ESR, PR_ERR: return '0;
      PR_RCL: return m_rtc[31:0];
      PR_RCH: return m_rtc[63:32];
      PR_TIMER: return m_timer;
      default: return (a < int'(NUM_PR)) ? m[a] : '0;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_addr = PR_PSW; wr_addr = PR_PSW; wr_data = '0; esw_next = '0;
    wr_en = 0; excep = 0; rfe = 0; fadr_in = '0; nadr_in = '0; maddr_in = '0;
    foreach (m[i]) m[i] = '0;
    m[PR_PSW] = 32'h2;
    m_rtc = 0; m_timer = 0; expire_due = -1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    m_rtc = 1;   // one edge passes before the first comparison
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // state checks
      check("pswq", pswq, m[PR_PSW]);
      check("sswq", sswq, m[PR_SSW]);
      check("ee", 32'(ee), 32'(m[PR_PSW][PSW_EE]));
      check("timer_expire", 32'(timer_expire), 32'(expire_due == cyc));
      if (timer_expire) n_expire++;
      // drive
      wr_en    = $urandom_range(0, 1);
      wr_addr  = pr_num_e'($urandom_range(0, 16));
      wr_data  = $urandom;
      if (wr_addr == PR_TIMER) wr_data = $urandom_range(0, 40);
      excep    = $urandom_range(0, 25) == 0;
      rfe      = !excep && !wr_en && $urandom_range(0, 25) == 0;
      fadr_in  = $urandom; nadr_in = $urandom; maddr_in = $urandom;
      esw_next = $urandom;
      rd_addr  = pr_num_e'(cyc % 32);
      #1;
      check($sformatf("read %0d", int'(rd_addr)), rd_data, ref_read(int'(rd_addr)));
      check("esr_set", esr_set, (wr_en && !excep && wr_addr == PR_ESR) ? wr_data : '0);
      check("err_clr", err_clr, (wr_en && !excep && wr_addr == PR_ERR) ? wr_data : '0);
      // reference update
      m_rtc = m_rtc + 1;
      if (m_timer != 0) m_timer = m_timer - 1;
      if (wr_en && excep) n_drop++;
      if (wr_en && !excep) begin
        case (wr_addr)
          PR_RSVD, PR_ESW, PR_ESR, PR_ERR: ;
          PR_TIMER: begin
            m_timer = wr_data; n_timer_set++;
          end
          PR_RCL: m_rtc[31:0] = wr_data;
          PR_RCH: m_rtc[63:32] = wr_data;
          default: m[wr_addr] = wr_data;
        endcase
      end
      if (excep) begin
        m[PR_SSW] = m[PR_PSW];
        m[PR_PSW][PSW_EE] = 1'b0;
        m[PR_PSW][PSW_SUP] = 1'b1;
        m[PR_FADR] = fadr_in; m[PR_NADR] = nadr_in; m[PR_MADR] = maddr_in;
        n_exc++;
      end else if (rfe) begin
        m[PR_PSW] = m[PR_SSW]; n_rfe++;
      end
      m[PR_ESW] = esw_next;
      // a count of N reaches 1 after N-1 edges
      if (m_timer == 1) expire_due = cyc + 1;
      if (m_timer == 0 && expire_due <= cyc) expire_due = -1;
    end
    checks++;
    if (n_exc == 0 || n_rfe == 0 || n_drop == 0 || n_expire == 0) begin failures++; $display("FAIL coverage"); end
    $display("exc=%0d rfe=%0d drop=%0d expire=%0d", n_exc, n_rfe, n_drop, n_expire);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

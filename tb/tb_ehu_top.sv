// tb_ehu_top: end-to-end test of the exception handling unit at its default
// size. The testbench plays the processor: it fetches from the unit's pc,
// decodes a synthetic program (instruction kinds derived from a hash of the
// address), issues with the real latencies (integer 1, FP 5, FP divide 12),
// stalls fetch and issue at random, resolves delayed branches at random, and
// injects every kind of exception source: instruction access faults, FP
// faults at completion, data access faults in the memory stage, undefined
// instructions, system calls, software requests through ESR, parcel-buffer
// interrupts and the interval timer. Exception handlers are short fixed
// sequences at the three vectors, executed through the same pipeline; they
// read FADR/NADR/ESW with MFPR, clear ESW through ERR, skip the faulting
// instruction where it cannot be re-executed (undefined instruction, system
// call), re-arm the timer and return with RFE.
//
// Independently of the unit, the testbench keeps the architectural state as
// a pair (pc, npc) of a delayed-branch machine, updated only by committed
// instructions. It checks:
//   * every committed instruction is the one the architectural state names
//   * on every exception FADR = pc and NADR = npc, whatever bubbles or taken
//     branches were in flight, and the vector, PSW, MADR follow
//   * the exception is taken exactly in the cycles a model of ESW, EMR, PSW
//     and the timer predicts
//   * MFPR reads in the handlers and ELO/CLO on the ESW value
// and counts how often each mechanism happened; one that never happened is a
// failure.
module tb_ehu_top;
  import ehu_pkg::*;

  localparam int unsigned NSLOT = 11;
  localparam int unsigned LW = $clog2(NSLOT+2);
  localparam int CYCLES = 40000;

  // ---------------- DUT ----------------
  logic    clk = 0, rst_n = 0;
  logic    hold, fetch, issue, issue_regwrite, id_undef, br_valid, br_taken, rfe, pbuf_irq, pr_wr_en;
  logic [LW-1:0] issue_lat;
  word_t   if_exc, id_src, ex_exc, me_src, pr_wr_data, pr_rd_data, bs_operand, elo_result, clo_result;
  addr_t   br_target, me_maddr, pc, me_pc, vector, fadrq, nadrq, madrq;
  pr_num_e pr_rd_addr, pr_wr_addr;
  logic    me_valid, me_commit, me_regwrite, excep, undef_inst_excep, all_other_excep, flush, pend_valid;
  sel_e    sel;
  word_t   pswq, eswq;

  ehu_top dut (.*);

  always #5 clk = ~clk;

  // ---------------- program ----------------
  typedef enum int {K_INT, K_FP, K_FDIV, K_BR, K_UNDEF, K_SYSCALL, K_ESRSET, K_MEM,
                    K_H_MTPR, K_H_MFPR, K_H_RFE, K_H_NOP} kind_e;

  function automatic int hsh(addr_t a);
    logic [31:0] x;
    x = (a >> 2) * 32'd2654435761;
    return int'(x[31:24]);
  endfunction

  function automatic bit raw_br(addr_t a);
    return hsh(a) < 40;
  endfunction

  function automatic kind_e user_kind(addr_t a);
    int h;
    h = hsh(a);
    if (h < 40) return (raw_br(a - 4) ? K_INT : K_BR);
    if (h < 70) return K_FP;
    if (h < 80) return K_FDIV;
    if (h < 85) return K_UNDEF;
    if (h < 89) return K_SYSCALL;
    if (h < 93) return K_ESRSET;
    if (h < 120) return K_MEM;
    return K_INT;
  endfunction

  function automatic bit is_handler(addr_t a);
    return a[31:12] == 20'h08000;
  endfunction

  // handler step kinds: base + offset
  function automatic kind_e handler_kind(addr_t a, bit skip);
    int off;
    off = int'(a[7:0]);
    if (a[11:8] == 4'h0) begin          // reset
      if (off <= 12) return K_H_MTPR;
      if (off == 16) return K_H_RFE;
      return K_H_NOP;
    end else if (a[11:8] == 4'h1) begin // undefined instruction
      if (off <= 4) return K_H_MFPR;
      if (off <= 12) return K_H_MTPR;
      if (off == 16) return K_H_RFE;
      return K_H_NOP;
    end else begin                      // all other
      if (off <= 8) return K_H_MFPR;
      if (off == 12 || off == 16) return K_H_MTPR;
      if (off == 20) return skip ? K_H_MTPR : K_H_NOP;
      if (off == 24) return K_H_RFE;
      return K_H_NOP;
    end
  endfunction

  function automatic int lat_of(kind_e k);
    case (k)
      K_FP:   return 5;
      K_FDIV: return 12;
      default: return 1;
    endcase
  endfunction

  // ---------------- processor model state ----------------
  typedef struct {
    addr_t addr;
    kind_e kind;
    bit    taken;
    addr_t target;
    int    arrive;
    bit    ds_taken;   // delay slot of a taken branch
    bit    if_fault;
    bit    ex_fault;
  } rec_t;

  rec_t  fifo[$];
  bit    id_occ;
  bit    ds_next;
  int    T, last_arrive;

  // architectural and register model
  addr_t apc, anpc;
  bit    in_handler, m_skip;
  word_t m_psw, m_ssw, m_esw, m_emr, m_seen;
  addr_t m_fadr, m_nadr;
  word_t m_timer;
  addr_t last_if_fault;
  int    icache_miss;

  // post-exception checks for the next cycle
  bit    chk_pending;
  addr_t chk_fadr, chk_nadr, chk_vec, chk_madr;
  bit    chk_arch;

  int checks = 0, failures = 0;
  int n_commit = 0, n_exc_undef = 0, n_exc_other = 0, n_rfe = 0;
  int n_if_fault = 0, n_ex_fault = 0, n_me_fault = 0, n_syscall = 0, n_esr = 0, n_pbuf = 0, n_timer = 0;
  int n_sel_two = 0, n_sel_seq = 0, n_sel_tgt = 0, n_ds_exc = 0, n_fdiv_flush = 0;
  int n_hold = 0, n_bubble_me = 0, n_taken = 0, n_pend = 0, n_skip = 0, n_elo = 0, n_after_rfe = 0;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %h expected %h at cycle T=%0d", what, got, exp, T);
    end
  endtask

  initial begin
    repeat (CYCLES + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rec_t  mr;
    bit    have_me;
    word_t hw_new;
    bit    p_undef, p_other;
    int    lat;
    kind_e idk, mk;

    {hold, fetch, issue, issue_regwrite, id_undef, br_valid, br_taken, rfe, pbuf_irq, pr_wr_en} = '0;
    issue_lat = '0; if_exc = '0; id_src = '0; ex_exc = '0; me_src = '0; pr_wr_data = '0;
    bs_operand = '0; br_target = '0; me_maddr = '0; pr_rd_addr = PR_PSW; pr_wr_addr = PR_PSW;
    id_occ = 0; ds_next = 0; T = 0; last_arrive = 0;
    apc = '0; anpc = '0; in_handler = 1; m_skip = 0;
    m_psw = 32'h2; m_ssw = '0; m_esw = '0; m_emr = '0; m_seen = '0;
    m_fadr = '0; m_nadr = '0; m_timer = '0; last_if_fault = '1; icache_miss = 0;
    chk_pending = 0; chk_arch = 0; chk_fadr = '0; chk_nadr = '0; chk_vec = '0; chk_madr = '0;

    repeat (2) @(negedge clk);
    rst_n = 1;

    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);

      // ------- checks of the state left by the last edge -------
      if (cyc == 0) check("reset vector", pc, VEC_RESET);
      if (chk_pending) begin
        chk_pending = 0;
        check("vector", pc, chk_vec);
        if (chk_arch) begin
          check("FADR", fadrq, chk_fadr);
          check("NADR", nadrq, chk_nadr);
        end
        check("MADR", madrq, chk_madr);
        check("PSW after exception", pswq, m_psw);
      end
      have_me = fifo.size() > 0 && fifo[0].arrive == T;
      if (have_me) mr = fifo[0];
      check("me_valid", 32'(me_valid), 32'(have_me));
      if (have_me) check("me_pc", me_pc, mr.addr);
      check("eswq", eswq, m_esw);

      // ------- drive -------
      hold = $urandom_range(0, 24) == 0;
      if (hold) n_hold++;
      if (!have_me) n_bubble_me++;
      mk = have_me ? mr.kind : K_INT;

      // memory stage
      rfe = have_me && mk == K_H_RFE;
      pr_wr_en = 0; pr_wr_addr = PR_PSW; pr_wr_data = '0;
      pr_rd_addr = PR_PSW;
      me_src = '0;
      me_maddr = $urandom;
      bs_operand = $urandom;
      if (have_me) begin
        int off;
        off = int'(mr.addr[7:0]);
        if (mk == K_MEM && !in_handler && $urandom_range(0, 29) == 0) me_src[ESW_UNMAP_DACC] = 1'b1;
        if (mk == K_ESRSET) begin
          pr_wr_en = 1; pr_wr_addr = PR_ESR; pr_wr_data = word_t'(1) << ESW_THR_DISP;
        end
        if (mk == K_H_MFPR) begin
          pr_rd_addr = (off == 0) ? PR_FADR : (off == 4) ? PR_NADR : PR_ESW;
          if (off == 8) bs_operand = m_esw;
        end
        if (mk == K_H_MTPR) begin
          pr_wr_en = 1;
          if (mr.addr[11:8] == 4'h0) begin
            case (off)
              0: begin pr_wr_addr = PR_EMR;  pr_wr_data = 32'hffff_ffe0; end
              4: begin pr_wr_addr = PR_SSW;  pr_wr_data = word_t'(1) << PSW_EE; end
              8: begin pr_wr_addr = PR_FADR; pr_wr_data = 32'h0000_1000; end
              default: begin pr_wr_addr = PR_NADR; pr_wr_data = 32'h0000_1004; end
            endcase
          end else if (mr.addr[11:8] == 4'h1) begin
            if (off == 8) begin pr_wr_addr = PR_FADR; pr_wr_data = m_nadr; end
            else          begin pr_wr_addr = PR_NADR; pr_wr_data = m_nadr + 4; end
          end else begin
            case (off)
              12: begin pr_wr_addr = PR_ERR; pr_wr_data = m_seen; end
              16: begin
                if (m_skip) begin pr_wr_addr = PR_FADR; pr_wr_data = m_nadr; end
                else begin pr_wr_addr = PR_TIMER; pr_wr_data = ($urandom_range(0, 2) == 0) ? $urandom_range(2, 80) : 0; end
              end
              default: begin pr_wr_addr = PR_NADR; pr_wr_data = m_fadr + 4; end
            endcase
          end
        end
      end

      // result reaching EX/ME at this edge
      ex_exc = '0;
      foreach (fifo[i]) if (!hold && fifo[i].arrive == T + 1 && (fifo[i].kind == K_FP || fifo[i].kind == K_FDIV)
                            && $urandom_range(0, 24) == 0) begin
        ex_exc[ESW_FP_OVUF] = 1'b1;
        fifo[i].ex_fault = 1;
      end

      // issue from ID
      issue = 0; br_valid = 0; br_taken = 0; br_target = '0; id_undef = 0; id_src = '0; issue_lat = LW'(1);
      issue_regwrite = 0;
      idk = K_INT;
      if (id_occ) begin
        idk = fifo[$].kind;
        lat = lat_of(idk);
        issue = $urandom_range(0, 4) != 0 && (T + 1 + lat > last_arrive);
        issue_lat = LW'(lat);
        issue_regwrite = (idk == K_INT || idk == K_FP || idk == K_FDIV || idk == K_MEM);
        id_undef = idk == K_UNDEF;
        if (idk == K_SYSCALL) id_src[ESW_SYSCALL] = 1'b1;
        if (idk == K_BR) begin
          br_valid = 1;
          br_taken = $urandom_range(0, 1);
          br_target = 32'h0000_1000 | ($urandom_range(0, 1023) << 2);
        end
      end

      // fetch, with occasional instruction-cache misses
      if (icache_miss > 0) icache_miss--;
      else if ($urandom_range(0, 40) == 0) icache_miss = $urandom_range(2, 16);
      fetch = (!id_occ || issue) && icache_miss == 0 && $urandom_range(0, 5) != 0;
      if_exc = '0;
      if (fetch && !is_handler(pc) && pc != last_if_fault && $urandom_range(0, 60) == 0) begin
        kind_e fk;
        fk = user_kind(pc);
        if (fk == K_INT || fk == K_FP || fk == K_MEM) if_exc[ESW_UNMAP_IACC] = 1'b1;
      end

      pbuf_irq = $urandom_range(0, 149) == 0;

      #1;

      // ------- predict the exception -------
      hw_new = '0;
      if (have_me) begin
        if (mr.if_fault) hw_new[ESW_UNMAP_IACC] = 1'b1;
        if (mr.ex_fault) hw_new[ESW_FP_OVUF] = 1'b1;
        if (mk == K_SYSCALL) hw_new[ESW_SYSCALL] = 1'b1;
        hw_new = hw_new | me_src;
      end
      if (pbuf_irq) hw_new[ESW_PBUF_IRQ] = 1'b1;
      if (m_timer == 1) hw_new[ESW_TIMER] = 1'b1;
      p_undef = !hold && have_me && mk == K_UNDEF;
      p_other = !hold && m_psw[PSW_EE] && (((m_esw | hw_new) & m_emr) != 0);
      check("excep", 32'(excep), 32'(p_undef || p_other));
      check("undef_inst_excep", 32'(undef_inst_excep), 32'(p_undef));
      check("all_other_excep", 32'(all_other_excep), 32'(p_other));
      check("me_commit", 32'(me_commit), 32'(have_me && !hold && !(p_undef || p_other)));
      if (have_me && mk == K_H_MFPR && !hold) begin
        int off;
        off = int'(mr.addr[7:0]);
        if (off == 0) check("MFPR FADR", pr_rd_data, m_fadr);
        else if (off == 4) check("MFPR NADR", pr_rd_data, m_nadr);
        else begin
          int top;
          check("MFPR ESW", pr_rd_data, m_esw);
          top = 32;
          for (int b = 31; b >= 0; b--) if (m_esw[b]) begin top = b; break; end
          check("ELO of ESW", elo_result, word_t'(top));
          check("CLO of ESW", clo_result, top == 32 ? m_esw : (m_esw & ~(word_t'(1) << top)));
          n_elo++;
        end
      end

      // ------- advance the model past the edge -------
      if (p_undef || p_other) begin
        // exception recognized
        if (!in_handler) begin
          chk_arch = 1; chk_fadr = apc; chk_nadr = anpc;
        end else chk_arch = 0;
        chk_pending = 1;
        chk_vec  = p_undef ? VEC_UNDEF : VEC_OTHER;
        chk_madr = me_maddr;
        if (p_undef) n_exc_undef++; else n_exc_other++;
        if (have_me && mr.ds_taken) n_ds_exc++;
        if (have_me && mr.if_fault) begin n_if_fault++; last_if_fault = mr.addr; end
        if (have_me && mr.ex_fault) n_ex_fault++;
        if (have_me && me_src != 0) n_me_fault++;
        if (have_me && mk == K_SYSCALL) n_syscall++;
        if (m_esw[ESW_THR_DISP]) n_esr++;
        if (hw_new[ESW_PBUF_IRQ] || m_esw[ESW_PBUF_IRQ]) n_pbuf++;
        if (hw_new[ESW_TIMER] || m_esw[ESW_TIMER]) n_timer++;
        foreach (fifo[i]) if (fifo[i].kind == K_FDIV && fifo[i].arrive > T) n_fdiv_flush++;
        case (sel)
          SEL_TWO_VALID: n_sel_two++;
          SEL_PC_SEQ:    n_sel_seq++;
          default:       n_sel_tgt++;
        endcase
        if (chk_arch && pend_valid) n_after_rfe++;
        m_skip = p_undef || (have_me && mk == K_SYSCALL);
        m_fadr = apc; m_nadr = anpc;
        m_ssw = m_psw;
        m_psw[PSW_EE] = 0; m_psw[PSW_SUP] = 1;
        in_handler = 1;
        fifo.delete(); id_occ = 0; ds_next = 0; last_arrive = T + 1;
        T++;
      end else if (!hold) begin
        bit flushed;
        flushed = 0;
        if (have_me) begin
          void'(fifo.pop_front());
          n_commit++;
          if (!in_handler && !is_handler(mr.addr)) begin
            check("commit order", mr.addr, apc);
            if (mr.kind == K_BR && mr.taken) begin apc = anpc; anpc = mr.target; end
            else begin apc = anpc; anpc = anpc + 4; end
          end
          if (pr_wr_en) begin
            case (pr_wr_addr)
              PR_EMR:   m_emr = pr_wr_data;
              PR_SSW:   m_ssw = pr_wr_data;
              PR_FADR:  m_fadr = pr_wr_data;
              PR_NADR:  m_nadr = pr_wr_data;
              PR_TIMER: m_timer = pr_wr_data + 1;   // decremented below this same edge
              default: ;
            endcase
          end
          if (mk == K_H_MFPR && mr.addr[7:0] == 8'd8) m_seen = m_esw;
          if (mk == K_H_RFE) begin
            check("FADR at return", fadrq, m_fadr);
            check("NADR at return", nadrq, m_nadr);
            apc = m_fadr; anpc = m_nadr;
            m_psw = m_ssw;
            in_handler = 0;
            if (m_skip) n_skip++;
            m_skip = 0;
            n_rfe++;
            fifo.delete(); id_occ = 0; ds_next = 0; last_arrive = T + 1;
            flushed = 1;
          end
        end
        if (!flushed) begin
          if (issue) begin
            fifo[$].arrive = T + 1 + int'(issue_lat);
            last_arrive = fifo[$].arrive;
            if (br_valid) begin
              fifo[$].taken = br_taken; fifo[$].target = br_target;
              if (br_taken) begin
                ds_next = 1; n_taken++;
                if (!fetch) n_pend++;
              end
            end
            if (!fetch) id_occ = 0;
          end
          if (fetch) begin
            rec_t r;
            r.addr = pc;
            r.kind = is_handler(pc) ? handler_kind(pc, m_skip) : user_kind(pc);
            r.taken = 0; r.target = '0; r.arrive = -1;
            r.ds_taken = ds_next; ds_next = 0;
            r.if_fault = if_exc != 0;
            r.ex_fault = 0;
            fifo.push_back(r);
            id_occ = 1;
          end
        end
        T++;
      end

      // registers that change every edge
      begin
        word_t errc, esrs;
        bit wr_ok;
        wr_ok = pr_wr_en && have_me && !hold && !(p_undef || p_other);
        errc = (wr_ok && pr_wr_addr == PR_ERR) ? pr_wr_data : '0;
        esrs = (wr_ok && pr_wr_addr == PR_ESR) ? pr_wr_data : '0;
        m_esw = (m_esw & ~errc) | esrs | hw_new;
        if (m_timer != 0) m_timer = m_timer - 1;
      end
    end

    // ------- mechanisms that must have happened -------
    begin
      int cov [string];
      cov["commit"] = n_commit;          cov["rfe"] = n_rfe;
      cov["undef exception"] = n_exc_undef; cov["other exception"] = n_exc_other;
      cov["instruction access fault"] = n_if_fault; cov["FP fault at completion"] = n_ex_fault;
      cov["data access fault"] = n_me_fault; cov["system call"] = n_syscall;
      cov["software ESR request"] = n_esr; cov["parcel buffer interrupt"] = n_pbuf;
      cov["interval timer"] = n_timer;
      cov["FADR/NADR two valid"] = n_sel_two; cov["FADR/NADR PC, PC+4"] = n_sel_seq;
      cov["FADR/NADR PC, target"] = n_sel_tgt; cov["exception in delay slot"] = n_ds_exc;
      cov["divide flushed in flight"] = n_fdiv_flush; cov["hold"] = n_hold;
      cov["ME bubble"] = n_bubble_me; cov["taken branch"] = n_taken;
      cov["branch target pending"] = n_pend; cov["skip after handler"] = n_skip;
      cov["ELO/CLO on ESW"] = n_elo; cov["exception right after return"] = n_after_rfe;
      foreach (cov[k]) begin
        $display("  %-30s %0d", k, cov[k]);
        checks++;
        if (cov[k] == 0) begin failures++; $display("FAIL mechanism never happened: %s", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

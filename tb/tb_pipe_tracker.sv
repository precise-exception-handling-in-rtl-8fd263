// tb_pipe_tracker: drives a random but legal instruction stream (fetch and
// issue stalls, latencies 1 .. NSLOT+1 with in-order completion, hold and
// flush) and checks, every cycle, that the memory stage holds exactly the
// instruction whose arrival time the reference predicts: an instruction
// issued at (unheld) cycle T of latency L must sit in ME at cycle T + 1 + L
// with its address, register-write flag and all exception flags that were
// raised at fetch, issue and completion. It also checks that the valid slots
// seen by the priority encoder are in program order.
module tb_pipe_tracker;
  import ehu_pkg::*;

  localparam int unsigned NSLOT = 11;
  localparam int unsigned LW = $clog2(NSLOT+2);

  logic  clk = 0, rst_n = 0;
  logic  hold, flush, kill, fetch, issue, issue_regwrite;
  addr_t if_pc;
  word_t if_exc, ex_exc;
  logic [LW-1:0] issue_lat;
  exc_t  id_exc;
  slot_t id_s, ex_s, me_s;
  slot_t slots [NSLOT];
  logic  me_commit, me_regwrite;

  pipe_tracker dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    addr_t pc;
    logic  rw;
    exc_t  exc;
    int    arrive;
  } ent_t;

  ent_t  inflight[$];
  int    T;             // unheld cycles since reset
  int    last_arrive;
  logic  m_id_valid;
  addr_t m_id_pc;
  word_t m_id_src;
  addr_t next_pc;
  int    checks = 0, failures = 0;
  int    n_lat[int];
  int    n_hold = 0, n_flush = 0, n_exexc = 0, n_bubble_me = 0;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at T=%0d", what, got, exp, T);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {hold, flush, kill, fetch, issue, issue_regwrite} = '0;
    if_pc = '0; if_exc = '0; ex_exc = '0; issue_lat = '0; id_exc = '0;
    T = 0; last_arrive = 0; m_id_valid = 0; m_id_pc = '0; m_id_src = '0;
    next_pc = 32'h0000_1000;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 30000; cyc++) begin
      int idx;
      int lat;
      @(negedge clk);
      // ---- compare ME with the reference
      idx = -1;
      foreach (inflight[i]) if (inflight[i].arrive == T) idx = i;
      check("me.valid", 64'(me_s.valid), 64'(idx >= 0));
      if (idx >= 0) begin
        check("me.pc", 64'(me_s.pc), 64'(inflight[idx].pc));
        check("me.regwrite", 64'(me_s.regwrite), 64'(inflight[idx].rw));
        check("me.exc", 64'(me_s.exc), 64'(inflight[idx].exc));
      end else n_bubble_me++;
      check("id.valid", 64'(id_s.valid), 64'(m_id_valid));
      // program order of the encoder candidates: ME, slot0.., EX, ID
      begin
        int prev; prev = -1;
        if (me_s.valid) prev = int'(me_s.pc[23:2]);
        for (int i = 0; i < int'(NSLOT); i++)
          if (slots[i].valid) begin
            checks++;
            if (int'(slots[i].pc[23:2]) <= prev) begin failures++; $display("FAIL order slot %0d", i); end
            prev = int'(slots[i].pc[23:2]);
          end
        if (ex_s.valid) begin
          checks++;
          if (int'(ex_s.pc[23:2]) <= prev) begin failures++; $display("FAIL order ex"); end
        end
      end
      // ---- drive
      hold  = $urandom_range(0, 19) == 0;
      flush = $urandom_range(0, 150) == 0;
      kill  = flush;
      lat   = $urandom_range(0, 2) == 0 ? 1 : ($urandom_range(0, 1) ? 5 : $urandom_range(1, NSLOT+1));
      issue = m_id_valid && $urandom_range(0, 3) != 0 && (T + 1 + lat > last_arrive);
      fetch = (!m_id_valid || issue) && $urandom_range(0, 3) != 0;
      if_pc = next_pc;
      if_exc = $urandom_range(0, 9) == 0 ? (32'h1 << $urandom_range(28, 31)) : '0;
      issue_lat = LW'(lat);
      issue_regwrite = $urandom_range(0, 1);
      id_exc.undef = $urandom_range(0, 19) == 0;
      id_exc.src   = $urandom_range(0, 9) == 0 ? (32'h1 << $urandom_range(16, 25)) : '0;
      ex_exc = $urandom_range(0, 7) == 0 ? (32'h1 << $urandom_range(20, 23)) : '0;
      #1;
      check("me_commit", 64'(me_commit), 64'(me_s.valid && !kill && !hold));
      check("me_regwrite", 64'(me_regwrite), 64'(me_s.valid && !kill && !hold && me_s.regwrite));
      // ---- reference for the coming edge
      if (flush) begin
        inflight.delete();
        m_id_valid = 0;
        last_arrive = T;
        n_flush++;
      end else if (!hold) begin
        if (issue) begin
          ent_t e;
          e.pc = m_id_pc; e.rw = issue_regwrite;
          e.exc.undef = id_exc.undef; e.exc.src = m_id_src | id_exc.src;
          e.arrive = T + 1 + lat;
          last_arrive = e.arrive;
          inflight.push_back(e);
          n_lat[lat]++;
        end
        if (fetch) begin
          m_id_valid = 1; m_id_pc = if_pc; m_id_src = if_exc;
          next_pc = next_pc + 4;
        end else if (issue) m_id_valid = 0;
        T++;
        foreach (inflight[i]) if (inflight[i].arrive == T && ex_exc != 0) begin
          inflight[i].exc.src |= ex_exc; n_exexc++;
        end
        while (inflight.size() > 0 && inflight[0].arrive < T) void'(inflight.pop_front());
      end else n_hold++;
    end
    checks++;
    if (!n_lat.exists(1) || !n_lat.exists(5) || !n_lat.exists(12) || n_hold == 0 || n_flush == 0 || n_exexc == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("lat1=%0d lat5=%0d lat12=%0d hold=%0d flush=%0d bubbles=%0d", n_lat[1], n_lat[5], n_lat[12], n_hold, n_flush, n_bubble_me);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

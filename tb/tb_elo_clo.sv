// tb_elo_clo: checks ELO and CLO on random words of every density, on single
// bits and on zero, then walks a word the way a handler does (ELO, CLO until
// nothing is left) and checks that the indices come out strictly descending
// and cover exactly the set bits.
module tb_elo_clo;
  import ehu_pkg::*;

  word_t operand, elo, clo;
  int checks = 0, failures = 0;

  elo_clo dut (.*);

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: op %h got %h expected %h", what, operand, got, exp); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int top;
      case (it % 4)
        0: operand = $urandom;
        1: operand = $urandom >> $urandom_range(0, 31);
        2: operand = 32'h1 << $urandom_range(0, 31);
        default: operand = (it % 40 == 3) ? '0 : ($urandom & $urandom & $urandom);
      endcase
      #1;
      top = 32;
      for (int b = 31; b >= 0; b--) if (operand[b]) begin top = b; break; end
      check("elo", elo, top);
      check("clo", clo, top == 32 ? operand : (operand & ~(32'h1 << top)));
    end
    // handler-style walk
    for (int w = 0; w < 200; w++) begin
      word_t seen, start;
      int prev;
      start = $urandom & $urandom;
      operand = start; seen = '0; prev = 32;
      for (int s = 0; s < 40; s++) begin
        #1;
        if (elo == 32) break;
        checks++;
        if (int'(elo) >= prev) begin failures++; $display("FAIL walk order"); end
        prev = int'(elo);
        seen[elo[4:0]] = 1'b1;
        operand = clo;
      end
      check("walk coverage", seen, start);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

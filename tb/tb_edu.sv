// tb_edu: exhaustive-in-kind test of the exception detection unit: random
// ESW and EMR words (often with no overlap, often with exactly one), every
// combination of the enable bit and the undefined-instruction flag, checked
// against the vector table: undefined instruction -> 0x08000100, any enabled
// source with EE set -> 0x08000200, nothing otherwise.
module tb_edu;
  import ehu_pkg::*;

  logic  undef_inst, ee, undef_inst_excep, all_other_excep, excep;
  word_t esw, emrq;
  addr_t vector;
  int checks = 0, failures = 0;
  int n_none = 0, n_undef = 0, n_other = 0, n_masked = 0;

  edu dut (.*);

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 4000; it++) begin
      logic enabled;
      esw  = $urandom & $urandom & $urandom;
      emrq = (it % 3 == 0) ? ~esw : $urandom;
      if (it % 5 == 1) begin esw = 32'h1 << $urandom_range(0, 31); emrq = esw | ($urandom & $urandom); end
      undef_inst = it[0];
      ee         = it[1];
      #1;
      enabled = 1'b0;
      for (int b = 0; b < 32; b++) if (esw[b] && emrq[b]) enabled = 1'b1;
      check("undef_inst_excep", 32'(undef_inst_excep), 32'(undef_inst));
      check("all_other_excep", 32'(all_other_excep), 32'(ee && enabled));
      check("excep", 32'(excep), 32'(undef_inst || (ee && enabled)));
      if (undef_inst) begin check("vector", vector, 32'h0800_0100); n_undef++; end
      else if (ee && enabled) begin check("vector", vector, 32'h0800_0200); n_other++; end
      else begin n_none++; if (esw != 0) n_masked++; end
    end
    checks++;
    if (n_none == 0 || n_undef == 0 || n_other == 0 || n_masked == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

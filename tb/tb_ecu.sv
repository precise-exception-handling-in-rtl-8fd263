// tb_ecu: random test of the ESW control unit. For every bit the reference
// works out, one bit at a time, whether a hardware event is present this
// cycle, whether detection must see the bit, and what the ESW register must
// hold next (software clear, software set, new hardware events win).
module tb_ecu;
  import ehu_pkg::*;

  word_t eswq, me_src, async_src, esr_set, err_clr, esw_detect, esw_next;
  logic  me_valid;
  int checks = 0, failures = 0;
  int n_clr_hit = 0, n_set_hit = 0, n_masked_sync = 0;

  ecu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 5000; it++) begin
      eswq      = $urandom & $urandom;
      me_valid  = $urandom_range(0, 1);
      me_src    = $urandom & $urandom & $urandom;
      async_src = $urandom & $urandom & $urandom;
      esr_set   = $urandom & $urandom;
      err_clr   = $urandom;
      #1;
      for (int b = 0; b < 32; b++) begin
        logic hw, det, nxt;
        hw  = (me_valid && me_src[b]) || async_src[b];
        det = eswq[b] || hw;
        if (hw || esr_set[b]) nxt = 1'b1;
        else if (err_clr[b])  nxt = 1'b0;
        else                  nxt = eswq[b];
        if (eswq[b] && err_clr[b] && !hw && !esr_set[b]) n_clr_hit++;
        if (!eswq[b] && esr_set[b]) n_set_hit++;
        if (!me_valid && me_src[b] && !eswq[b] && !async_src[b]) n_masked_sync++;
        checks += 2;
        if (esw_detect[b] !== det) begin failures++; $display("FAIL detect bit %0d", b); end
        if (esw_next[b] !== nxt) begin failures++; $display("FAIL next bit %0d", b); end
      end
    end
    checks++;
    if (n_clr_hit == 0 || n_set_hit == 0 || n_masked_sync == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

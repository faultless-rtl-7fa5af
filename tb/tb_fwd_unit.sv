// tb_fwd_unit: random producer sets; the result must be the youngest
// producer that writes the register and has the consumer's copy flag, or
// the register-file value; stall exactly when that producer is not ready.
module tb_fwd_unit;
  import faultless_pkg::*;
  localparam int NP = 9;
  logic [4:0] rs; logic use_, cp; pipe_t prod [NP]; logic [31:0] rfd, d; logic hit, st; logic [3:0] idx;
  int checks = 0, failures = 0, hits = 0, stalls = 0, blocked = 0;
  fwd_unit #(.NP(NP)) dut (.rs_i(rs), .use_i(use_), .copy_i(cp), .prod_i(prod), .rf_data_i(rfd),
    .data_o(d), .hit_o(hit), .hit_idx_o(idx), .stall_o(st));
  initial begin
    for (int n = 0; n < 3000; n++) begin
      int e; logic [31:0] ed; logic es;
      rs = 5'($urandom_range(0, 4)); use_ = ($urandom_range(0, 7) != 0); cp = 1'($urandom); rfd = $urandom;
      for (int p = 0; p < NP; p++) begin
        prod[p] = '0;
        prod[p].valid = 1'($urandom); prod[p].copy = 1'($urandom);
        prod[p].uop.wen = 1'($urandom); prod[p].uop.rd = 5'($urandom_range(0, 4));
        prod[p].result = $urandom; prod[p].ready = ($urandom_range(0, 3) != 0);
        prod[p].pending = ($urandom_range(0, 9) == 0);
      end
      e = -1;
      if (use_ && rs != 0)
        for (int p = NP - 1; p >= 0; p--)
          if (prod[p].valid && prod[p].uop.wen && prod[p].uop.rd == rs && prod[p].copy == cp) e = p;
      ed = (e < 0) ? rfd : prod[e].result;
      es = (e >= 0) && (!prod[e].ready || prod[e].pending);
      #1; checks++;
      if (hit != (e >= 0) || d != ed || st != es) begin
        failures++; $display("FAIL n=%0d exp idx %0d", n, e);
      end
      if (e >= 0) hits++;
      if (es) stalls++;
      for (int p = 0; p < NP; p++)
        if (use_ && rs != 0 && prod[p].valid && prod[p].uop.wen && prod[p].uop.rd == rs && prod[p].copy != cp) blocked++;
    end
    checks++; if (hits == 0 || stalls == 0 || blocked == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

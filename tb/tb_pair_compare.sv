// tb_pair_compare: an original and its exact copy match; a single flipped
// bit anywhere else in the entry, swapped or equal copy flags, an invalid
// instance or a fault mark make the comparison fail.
module tb_pair_compare;
  import faultless_pkg::*;
  pipe_t a, b; logic m;
  int checks = 0, failures = 0;
  pair_compare dut (.a_i(a), .b_i(b), .match_o(m));
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask
  initial begin
    for (int n = 0; n < 400; n++) begin
      pipe_t base; int bit_i;
      base = pipe_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                      $urandom, $urandom, $urandom, $urandom});
      base.valid = 1; base.copy = 0; base.flt = 0;
      a = base; b = base; b.copy = 1; #1;
      chk("identical pair", m);
      b = base; #1; chk("both originals", !m);
      a = base; a.copy = 1; b = base; #1; chk("swapped roles", !m);
      a = base; b = base; b.copy = 1; b.valid = 0; #1; chk("invalid copy", !m);
      b.valid = 1; b.flt = 1; #1; chk("fault mark", !m);
      b.flt = 0;
      bit_i = $urandom_range(0, $bits(pipe_t) - 1);
      b = pipe_t'(b ^ ($bits(pipe_t))'(1) << bit_i); #1;
      // flipping valid/copy/flt is covered above; any other bit must mismatch
      chk($sformatf("flip bit %0d", bit_i), !m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

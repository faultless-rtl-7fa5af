// tb_ecc_egress: equal instances give a valid codeword and no mismatch;
// differing instances are flagged, data comes from the original and the
// check bits from the copy.
module tb_ecc_egress;
  import ecc_ref_pkg::*;
  logic [31:0] a, b; logic [38:0] cw; logic mm;
  int checks = 0, failures = 0;
  ecc_egress dut (.orig_i(a), .copy_i(b), .code_o(cw), .mismatch_o(mm));
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask
  initial begin
    for (int n = 0; n < 500; n++) begin
      a = $urandom; b = a; #1;
      chk("equal", cw == ref_encode(a) && !mm);
      b = a ^ (32'(1) << $urandom_range(0, 31)); #1;
      chk("differ", mm && cw[31:0] == a && cw[38:32] == ref_encode(b)[38:32]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

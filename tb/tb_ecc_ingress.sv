// tb_ecc_ingress: a clean word reaches both outputs without error; a flip
// anywhere in the word is reported, and the outputs carry the raw bits.
module tb_ecc_ingress;
  import ecc_ref_pkg::*;
  logic [38:0] cw; logic [31:0] o, c; logic e;
  int checks = 0, failures = 0;
  ecc_ingress dut (.code_i(cw), .orig_o(o), .copy_o(c), .err_o(e));
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask
  initial begin
    for (int n = 0; n < 300; n++) begin
      logic [31:0] v; logic [38:0] w; int b;
      v = $urandom; w = ref_encode(v);
      cw = w; #1; chk("clean", o == v && c == v && !e);
      b = $urandom_range(0, 38);
      cw = w ^ (39'(1) << b); #1;
      chk($sformatf("flip %0d", b), e && o == cw[31:0] && c == cw[31:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_secded_dec: clean words, every single-bit error (corrected and
// flagged) and random double-bit errors (flagged) on random data.
module tb_secded_dec;
  import ecc_ref_pkg::*;
  logic [38:0] cw; logic [31:0] d, raw; logic s, dd;
  int checks = 0, failures = 0;
  secded_dec dut (.code_i(cw), .data_o(d), .raw_o(raw), .single_o(s), .double_o(dd));
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask
  initial begin
    for (int n = 0; n < 200; n++) begin
      logic [31:0] v; logic [38:0] e;
      v = $urandom; e = ref_encode(v);
      cw = e; #1; chk("clean", d == v && !s && !dd && raw == v);
      for (int b = 0; b < 39; b++) begin
        cw = e ^ (39'(1) << b); #1;
        chk($sformatf("single bit %0d", b), d == v && s && !dd);
      end
      for (int k = 0; k < 5; k++) begin
        int b1, b2;
        b1 = $urandom_range(0, 38); b2 = (b1 + 1 + $urandom_range(0, 37)) % 39;
        cw = e ^ (39'(1) << b1) ^ (39'(1) << b2); #1;
        chk($sformatf("double %0d %0d", b1, b2), dd && !s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

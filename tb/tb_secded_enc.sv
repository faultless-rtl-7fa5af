// tb_secded_enc: compares the encoder with the reference code on corner
// values and 3000 random words.
module tb_secded_enc;
  import ecc_ref_pkg::*;
  logic [31:0] d; logic [38:0] c;
  int checks = 0, failures = 0;
  secded_enc dut (.data_i(d), .code_o(c));
  initial begin
    for (int i = 0; i < 3004; i++) begin
      d = (i == 0) ? '0 : (i == 1) ? '1 : (i < 4) ? 32'(1) << (i * 13) : $urandom;
      #1; checks++;
      if (c !== ref_encode(d)) begin failures++; $display("FAIL d=%h got %h exp %h", d, c, ref_encode(d)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_tcm_ecc: initial contents are the zero codeword; random writes are
// read back on both read ports against a scoreboard.
module tb_tcm_ecc;
  import ecc_ref_pkg::*;
  localparam int D = 256;
  logic clk = 0; always #5 clk = !clk;
  logic we; logic [7:0] wa; logic [38:0] wd; logic [7:0] ra [2]; logic [38:0] rd [2];
  logic [38:0] sb [D];
  int checks = 0, failures = 0;
  tcm_ecc #(.DEPTH(D), .NRD(2)) dut (.clk, .we_i(we), .waddr_i(wa), .wdata_i(wd), .raddr_i(ra), .rdata_o(rd));
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask
  initial begin
    we = 0; wa = 0; wd = 0; ra[0] = 0; ra[1] = 0;
    for (int i = 0; i < D; i++) sb[i] = ref_encode(0);
    ra[0] = 8'd17; ra[1] = 8'd200; #1;
    chk("initial zero codeword", rd[0] == ref_encode(0) && rd[1] == ref_encode(0));
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); wa = 8'($urandom); wd = {7'($urandom), 32'($urandom)};
      @(posedge clk); #1;
      if (we) sb[wa] = wd;
      we = 0;
      ra[0] = 8'($urandom); ra[1] = wa; #1;
      chk("port 0", rd[0] == sb[ra[0]]);
      chk("port 1", rd[1] == sb[ra[1]]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_regfile_ecc: random writes through both ports against a scoreboard,
// x0 stays zero, a stored single-bit error is corrected and flagged on
// read, a double-bit error is flagged.
module tb_regfile_ecc;
  import ecc_ref_pkg::*;
  logic clk = 0, rst_n = 0; always #5 clk = !clk;
  logic we [2]; logic [4:0] wa [2]; logic [38:0] wd [2];
  logic [4:0] ra [4]; logic [31:0] rd [4]; logic rc [4], re [4];
  logic [31:0] sb [32];
  int checks = 0, failures = 0;
  regfile_ecc #(.NRD(4), .NWR(2)) dut (.clk, .rst_n, .we_i(we), .waddr_i(wa), .wdata_i(wd),
    .raddr_i(ra), .rdata_o(rd), .rcorr_o(rc), .rerr_o(re));
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask
  initial begin
    for (int i = 0; i < 32; i++) sb[i] = 0;
    for (int p = 0; p < 2; p++) begin we[p] = 0; wa[p] = 0; wd[p] = 0; end
    for (int p = 0; p < 4; p++) ra[p] = 5'(p);
    #12 rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      logic [31:0] v0, v1;
      @(negedge clk);
      v0 = $urandom; v1 = $urandom;
      we[0] = 1'($urandom); wa[0] = 5'($urandom); wd[0] = ref_encode(v0);
      we[1] = 1'($urandom); wa[1] = 5'($urandom); wd[1] = ref_encode(v1);
      @(posedge clk); #1;
      if (we[0] && wa[0] != 0) sb[wa[0]] = v0;
      if (we[1] && wa[1] != 0) sb[wa[1]] = v1;
      we[0] = 0; we[1] = 0;
      for (int p = 0; p < 4; p++) ra[p] = 5'($urandom);
      #1;
      for (int p = 0; p < 4; p++) chk("read", rd[p] == sb[ra[p]] && !rc[p] && !re[p]);
    end
    @(negedge clk); we[0] = 1; wa[0] = 5'd7; wd[0] = ref_encode(32'h1234_5678) ^ (39'(1) << 9);
    @(posedge clk); #1; we[0] = 0; ra[0] = 5'd7; #1;
    chk("single corrected", rd[0] == 32'h1234_5678 && rc[0] && !re[0]);
    @(negedge clk); we[0] = 1; wa[0] = 5'd8; wd[0] = ref_encode(32'h0bad_f00d) ^ 39'h3;
    @(posedge clk); #1; we[0] = 0; ra[1] = 5'd8; #1;
    chk("double flagged", re[1]);
    ra[2] = 5'd0; #1; chk("x0", rd[2] == 0 && !re[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_pc_ecc: reset value, writes, a single flipped bit that is hidden from
// the output and scrubbed, and a double flip that raises the alarm.
module tb_pc_ecc;
  import faultless_pkg::CW;
  logic clk = 0, rst_n = 0; always #5 clk = !clk;
  logic we; logic [31:0] pin, pout; logic [CW-1:0] flip; logic corr, fatal;
  int checks = 0, failures = 0;
  pc_ecc #(.RESET_PC(32'h0000_0080)) dut (.clk, .rst_n, .we_i(we), .pc_i(pin), .flip_i(flip),
    .pc_o(pout), .corrected_o(corr), .fatal_o(fatal));
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask
  initial begin
    we = 0; pin = 0; flip = 0;
    #12 rst_n = 1; #1;
    chk("reset pc", pout == 32'h80 && !corr && !fatal);
    for (int n = 0; n < 100; n++) begin
      logic [31:0] v; int b;
      v = $urandom & ~32'h3;
      @(negedge clk); we = 1; pin = v; @(negedge clk); we = 0;
      chk("written", pout == v && !corr);
      b = $urandom_range(0, 38);
      flip = CW'(1) << b; @(negedge clk); flip = 0;
      chk($sformatf("single flip %0d hidden", b), pout == v && corr && !fatal);
      @(negedge clk);
      chk("scrubbed", pout == v && !corr);
    end
    flip = CW'(3) << 4; @(negedge clk); flip = 0;
    chk("double flip alarm", fatal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

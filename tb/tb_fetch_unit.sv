// tb_fetch_unit: a small ICCM array in the testbench feeds the fetch unit.
// Checks sequential advance by the accepted count, redirect priority,
// original/copy fan-out of each fetched word, ECC error flags on corrupted
// words (reported, raw bits passed on), a corrected PC flip that does not disturb fetch, and the PC alarm
// on a double flip.
module tb_fetch_unit;
  import faultless_pkg::*;
  import ecc_ref_pkg::*;
  logic clk = 0, rst_n = 0; always #5 clk = !clk;
  logic redir; logic [31:0] rpc; logic [1:0] acc; logic [CW-1:0] flip;
  logic [5:0] ra [2]; logic [CW-1:0] rd [2];
  logic [1:0] fv, fe; logic [31:0] fpc [2], fo [2], fc [2]; logic pcc, pcf;
  logic [CW-1:0] mem [64];
  int checks = 0, failures = 0;
  fetch_unit #(.RESET_PC(32'h8), .AW(6)) dut (.clk, .rst_n, .redirect_i(redir), .redirect_pc_i(rpc),
    .accept_i(acc), .pc_flip_i(flip), .iccm_raddr_o(ra), .iccm_rdata_i(rd), .f_valid_o(fv),
    .f_pc_o(fpc), .f_orig_o(fo), .f_copy_o(fc), .f_err_o(fe), .pc_corr_o(pcc), .pc_fatal_o(pcf));
  assign rd[0] = mem[ra[0]];
  assign rd[1] = mem[ra[1]];
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask
  task automatic chk_words();
    for (int k = 0; k < 2; k++)
      chk($sformatf("word %0d at %h", k, fpc[k]), fo[k] == fpc[k] * 3 + 1 && fc[k] == fo[k] && !fe[k]);
  endtask
  initial begin
    for (int i = 0; i < 64; i++) mem[i] = ref_encode(32'(i * 4) * 3 + 1);
    mem[20] = mem[20] ^ (39'(1) << 5);
    redir = 0; rpc = 0; acc = 0; flip = 0;
    #12 rst_n = 1; #1;
    chk("reset pc", fpc[0] == 32'h8 && fpc[1] == 32'hc && fv == 2'b11);
    chk_words();
    @(negedge clk); acc = 2'd2; @(negedge clk); acc = 0;
    chk("advance 2", fpc[0] == 32'h10); chk_words();
    @(negedge clk); acc = 2'd1; @(negedge clk); acc = 0;
    chk("advance 1", fpc[0] == 32'h14); chk_words();
    @(negedge clk); acc = 2'd2; redir = 1; rpc = 32'h4c; @(negedge clk); redir = 0; acc = 0;
    chk("redirect priority", fpc[0] == 32'h4c && fpc[1] == 32'h50);
    chk("corrupted word flagged, raw bits passed on", fe[1] && fo[1] == ((32'h50 * 3 + 1) ^ 32'h20) && fc[1] == fo[1]);
    @(negedge clk); flip = CW'(1) << 3; @(negedge clk); flip = 0;
    chk("pc flip hidden", fpc[0] == 32'h4c && pcc && !pcf && fv == 2'b11);
    @(negedge clk); acc = 2'd1; @(negedge clk); acc = 0;
    chk("advance after flip", fpc[0] == 32'h50 && !pcc);
    @(negedge clk); flip = CW'(3) << 3; @(negedge clk); flip = 0;
    chk("pc double flip stops fetch", pcf && fv == 2'b00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_csr_file: reset values, writes and legalisation through the commit
// port, the trap port, unimplemented addresses, a flipped bit in
// u_protectionmode that never shows on prot_o and is scrubbed, and a double
// flip that raises the alarm.
module tb_csr_file;
  import faultless_pkg::*;
  logic clk = 0, rst_n = 0; always #5 clk = !clk;
  logic [11:0] ra [2]; logic [31:0] rdv [2]; logic rv [2];
  logic we, trap, fe; logic [11:0] wa; logic [31:0] wd, tpc, tc, mtvec, mepc; logic [2:0] fi; logic [CW-1:0] fm;
  logic prot, det, corr, fatal;
  int checks = 0, failures = 0;
  csr_file #(.RESET_MTVEC(32'h100)) dut (.clk, .rst_n, .raddr_i(ra), .rdata_o(rdv), .rvalid_o(rv),
    .we_i(we), .waddr_i(wa), .wdata_i(wd), .trap_i(trap), .trap_pc_i(tpc), .trap_cause_i(tc),
    .flip_en_i(fe), .flip_idx_i(fi), .flip_mask_i(fm), .prot_o(prot), .detect_o(det),
    .mtvec_o(mtvec), .mepc_o(mepc), .corrected_o(corr), .fatal_o(fatal));
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask
  task automatic wr(logic [11:0] a, logic [31:0] d); @(negedge clk); we = 1; wa = a; wd = d; @(negedge clk); we = 0; endtask
  initial begin
    we = 0; trap = 0; fe = 0; wa = 0; wd = 0; tpc = 0; tc = 0; fi = 0; fm = 0; ra[0] = 0; ra[1] = 0;
    #12 rst_n = 1; #1;
    chk("reset", !prot && !det && mtvec == 32'h100 && !corr && !fatal);
    wr(CSR_UPROT, 32'hffff_ffff);
    ra[0] = CSR_UPROT; ra[1] = CSR_UPROT; #1;
    chk("prot on, one bit kept", prot && rdv[0] == 1 && rdv[1] == 1 && rv[0]);
    wr(CSR_UDETECT, 1); chk("detect on", det);
    wr(CSR_MTVEC, 32'h203); chk("mtvec aligned", mtvec == 32'h200);
    ra[0] = 12'h7c0; #1; chk("unimplemented", !rv[0] && rdv[0] == 0);
    @(negedge clk); trap = 1; tpc = 32'h44; tc = CAUSE_FAULT; @(negedge clk); trap = 0;
    ra[0] = CSR_MCAUSE; #1;
    chk("trap writes mepc/mcause", mepc == 32'h44 && rdv[0] == CAUSE_FAULT);
    // single flip in u_protectionmode bit 0: hidden, then scrubbed
    @(negedge clk); fe = 1; fi = 3'd0; fm = CW'(1); @(negedge clk); fe = 0;
    chk("flip hidden", prot && corr && !fatal);
    @(negedge clk); chk("scrubbed", prot && !corr);
    for (int b = 0; b < CW; b++) begin
      @(negedge clk); fe = 1; fi = 3'd1; fm = CW'(1) << b; @(negedge clk); fe = 0;
      chk($sformatf("detect bit %0d flip hidden", b), det && corr);
      @(negedge clk);
    end
    @(negedge clk); fe = 1; fi = 3'd0; fm = CW'(6); @(negedge clk); fe = 0;
    chk("double flip alarm", fatal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

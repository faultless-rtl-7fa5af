// tb_instr_buffer: duplication on write in protected mode, the issue
// strategy (atomic spatial pairs, lone temporal instances, pairing of a
// copy with the next different temporal original but never with a spatial
// one, unprotected dual issue
// and its unit conflicts) and the accept counts.
module tb_instr_buffer;
  import faultless_pkg::*;
  logic clk = 0, rst_n = 0; always #5 clk = !clk;
  logic flush, prot; logic [1:0] inv, eerr, acc, mx, take; logic [31:0] pcs [2];
  uop_t ua, ub; ibuf_t iss [2]; logic at; logic [2:0] cnt;
  int checks = 0, failures = 0;
  instr_buffer dut (.clk, .rst_n, .flush_i(flush), .prot_i(prot), .in_valid_i(inv), .in_pc_i(pcs),
    .in_uop_a_i(ua), .in_uop_b_i(ub), .in_eccerr_i(eerr), .accept_o(acc), .iss_o(iss),
    .iss_max_o(mx), .iss_atomic_o(at), .take_i(take), .count_o(cnt));
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask
  function automatic uop_t mk(unit_e u, logic [4:0] rd); uop_t x; x = '0; x.unit = u; x.rd = rd; return x; endfunction
  // push one instruction (a) or two (a, b) and issue nothing
  task automatic push(unit_e a, unit_e b, logic two, logic [31:0] pc);
    @(negedge clk); inv = {two, 1'b1}; ua = mk(a, 5'd1); ub = prot ? mk(a, 5'd1) : mk(b, 5'd2);
    pcs[0] = pc; pcs[1] = pc + 4; take = 0;
    @(posedge clk); #1; inv = 0;
  endtask
  task automatic pop(logic [1:0] n); @(negedge clk); take = n; @(posedge clk); #1; take = 0; endtask
  initial begin
    flush = 0; prot = 1; inv = 0; eerr = 0; take = 0; ua = '0; ub = '0; pcs[0] = 0; pcs[1] = 4;
    #12 rst_n = 1;
    // protected: an ALU instruction becomes an atomic original/copy pair
    push(UN_ALU, UN_ALU, 1'b0, 32'h40);
    chk("two entries", cnt == 2);
    chk("orig+copy", !iss[0].copy && iss[1].copy && iss[0].pc == 32'h40 && iss[1].pc == 32'h40);
    chk("atomic pair offered", mx == 2 && at);
    pop(2); chk("empty", cnt == 0);
    // protected: MUL then LD -> M alone, then M' with L, then L'
    push(UN_MULDIV, UN_MULDIV, 1'b0, 32'h50);
    push(UN_LD, UN_LD, 1'b0, 32'h54);
    chk("accept only when two free", cnt == 4);
    @(negedge clk); inv = 2'b01; #1; chk("full: accept 0", acc == 0); inv = 0;
    chk("temporal original alone", mx == 1 && !at && iss[0].uop.unit == UN_MULDIV && !iss[0].copy);
    pop(1);
    chk("copy paired with next different original", mx == 2 && iss[0].copy && !iss[1].copy &&
        iss[1].uop.unit == UN_LD);
    pop(2);
    chk("last copy alone", mx == 1 && iss[0].copy && iss[0].uop.unit == UN_LD);
    pop(1);
    // protected: two MULs never share a cycle
    push(UN_MULDIV, UN_MULDIV, 1'b0, 32'h60); push(UN_MULDIV, UN_MULDIV, 1'b0, 32'h64);
    pop(1); chk("same unit not paired", mx == 1);
    @(negedge clk); flush = 1; @(posedge clk); #1; flush = 0;
    // protected: a copy never joins a following spatial original
    push(UN_MULDIV, UN_MULDIV, 1'b0, 32'h68); push(UN_ALU, UN_ALU, 1'b0, 32'h6c);
    pop(1); chk("copy not paired with spatial original", mx == 1 && iss[0].copy);
    @(negedge clk); flush = 1; @(posedge clk); #1; flush = 0; chk("flush empties", cnt == 0);
    // unprotected: two ALU instructions per cycle, written once each
    prot = 0;
    @(negedge clk); inv = 2'b11; ua = mk(UN_ALU, 5'd1); ub = mk(UN_ALU, 5'd2); #1;
    chk("accept two", acc == 2);
    @(posedge clk); #1; inv = 0;
    chk("dual entries, no copies", cnt == 2 && !iss[0].copy && !iss[1].copy && iss[1].uop.rd == 2);
    chk("dual issue", mx == 2 && !at);
    pop(2);
    push(UN_LD, UN_ST, 1'b1, 32'h70); chk("LSU conflict", mx == 1);
    pop(1); pop(1);
    push(UN_CSR, UN_ALU, 1'b1, 32'h80); chk("CSR alone", mx == 1);
    pop(1); chk("after CSR", mx == 1 && iss[0].uop.unit == UN_ALU); pop(1);
    push(UN_ALU, UN_MULDIV, 1'b1, 32'h90); chk("ALU + MUL pair", mx == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// tb_commit_unit: protected spatial pairs (commit once, ECC word built from
// original data and copy check bits), a corrupted copy (fault, no commit),
// a sequential pair through the result buffer (park, then commit), a copy
// arriving with an empty buffer (fault), pairing of a copy with the next
// original in the same cycle, late data for a parked external load, and
// unprotected dual commits.
module tb_commit_unit;
  import faultless_pkg::*;
  import ecc_ref_pkg::*;
  logic clk = 0, rst_n = 0; always #5 clk = !clk;
  logic en, flush, prot, pv; logic [31:0] pd;
  pipe_t w [2]; logic [1:0] cv; pipe_t cm [2]; logic [CW-1:0] rdw [2], stw [2];
  logic f, fe; logic [31:0] fpc; pipe_t rb; logic rbw, pc_;
  int checks = 0, failures = 0;
  commit_unit dut (.clk, .rst_n, .en_i(en), .flush_i(flush), .prot_i(prot), .w_i(w),
    .patch_valid_i(pv), .patch_data_i(pd), .cm_valid_o(cv), .cm_o(cm), .cm_rd_word_o(rdw),
    .cm_st_word_o(stw), .fault_o(f), .fault_ecc_o(fe), .fault_pc_o(fpc), .rb_o(rb),
    .rb_write_o(rbw), .pair_check_o(pc_));
  task automatic chk(string w_, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w_); end endtask
  function automatic pipe_t ent(unit_e u, logic cp, logic [31:0] pc, logic [31:0] res);
    pipe_t e; e = '0; e.valid = 1; e.copy = cp; e.pc = pc; e.uop.unit = u; e.uop.rd = 5'd3;
    e.uop.wen = 1; e.result = res; e.ready = 1; return e;
  endfunction
  task automatic step(); @(posedge clk); #1; w[0] = '0; w[1] = '0; pv = 0; endtask
  initial begin
    en = 1; flush = 0; prot = 1; pv = 0; pd = 0; w[0] = '0; w[1] = '0;
    #12 rst_n = 1;
    // spatial pair
    w[0] = ent(UN_ALU, 0, 32'h10, 32'hcafe_0001); w[1] = ent(UN_ALU, 1, 32'h10, 32'hcafe_0001); #1;
    chk("pair commits once", cv == 2'b01 && !f && pc_ && rdw[0] == ref_encode(32'hcafe_0001));
    step();
    // corrupted copy
    w[0] = ent(UN_ALU, 0, 32'h14, 32'h5); w[1] = ent(UN_ALU, 1, 32'h14, 32'h7); #1;
    chk("mismatch faults", cv == 0 && f && fpc == 32'h14 && !fe);
    step();
    // eccerr on a pair is an ECC fault
    w[0] = ent(UN_ALU, 0, 32'h18, 32'h5); w[1] = ent(UN_ALU, 1, 32'h18, 32'h5); w[1].eccerr = 1; #1;
    chk("ecc fault", f && fe);
    step();
    // sequential pair through the result buffer
    w[0] = ent(UN_MULDIV, 0, 32'h20, 32'd42); #1;
    chk("first instance parked", cv == 0 && !f && rbw);
    step();
    chk("buffer visible for forwarding", rb.valid && rb.result == 42 && !rb.copy);
    w[0] = ent(UN_MULDIV, 1, 32'h20, 32'd42); w[1] = ent(UN_LD, 0, 32'h24, 32'd9); #1;
    chk("second instance commits, next original parked", cv == 2'b01 && !f && rbw &&
        rdw[0] == ref_encode(32'd42) && cm[0].pc == 32'h20);
    step();
    w[0] = ent(UN_LD, 1, 32'h24, 32'd8); #1;
    chk("sequential mismatch faults at first PC", f && fpc == 32'h24 && cv == 0);
    step();
    chk("fault empties buffer", !rb.valid);
    w[0] = ent(UN_MULDIV, 1, 32'h30, 32'd1); #1;
    chk("copy without original faults", f);
    step();
    // external load: parked while pending, patched, then compared
    w[0] = ent(UN_LD, 0, 32'h40, 32'd0); w[0].pending = 1; w[0].ready = 0; #1;
    step();
    pv = 1; pd = 32'd77; w[0] = ent(UN_LD, 1, 32'h40, 32'd77); #1;
    chk("patched parked load commits", cv == 2'b01 && !f && rdw[0] == ref_encode(32'd77));
    step();
    // frozen: nothing happens
    en = 0; w[0] = ent(UN_ALU, 0, 32'h50, 1); w[1] = ent(UN_ALU, 1, 32'h50, 2); #1;
    chk("frozen", cv == 0 && !f); en = 1;
    step();
    // unprotected dual commit, fault mark on the younger
    prot = 0;
    w[0] = ent(UN_ALU, 0, 32'h60, 1); w[1] = ent(UN_ALU, 0, 32'h64, 2); #1;
    chk("dual commit", cv == 2'b11 && !f && rdw[1] == ref_encode(2));
    w[1].flt = 1; #1;
    chk("older commits, younger faults", cv == 2'b01 && f && fpc == 32'h64);
    step();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

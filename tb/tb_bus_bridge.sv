// tb_bus_bridge: the bridge in front of the behavioural external memory
// (ext_mem_model). The testbench plays the pipeline's E3 stage: it presents
// the original and then the copy of each access and holds the copy while
// stall_o is high. Checks: exactly one bus transaction per protected pair,
// stored codeword equals the SECDED encoding of the data, loaded value
// delivered twice (copy result and patch for the parked original),
// address/data mismatches suppress the transaction, a corrupted response is
// flagged as an ECC error, unprotected accesses go straight out, and a flush
// drops a parked original.
module tb_bus_bridge;
  import faultless_pkg::*;
  import ecc_ref_pkg::*;
  logic clk = 0, rst_n = 0; always #5 clk = !clk;
  logic flush, prot, v, cp, we; logic [31:0] addr, wd;
  logic stall, done, first, mm, ee, pv; logic [31:0] rcopy, rorig;
  logic rqv, rqw, rqr, rsv; logic [31:0] rqa; logic [CW-1:0] rqd, rsd, rsd_mem, corrupt;
  logic [7:0] peek_a; logic [CW-1:0] peek_d; int nr, nw;
  int checks = 0, failures = 0;
  bus_bridge dut (.clk, .rst_n, .flush_i(flush), .prot_i(prot), .e3_valid_i(v), .e3_copy_i(cp),
    .e3_we_i(we), .e3_addr_i(addr), .e3_wdata_i(wd), .stall_o(stall), .done_o(done), .first_o(first),
    .mismatch_o(mm), .eccerr_o(ee), .rdata_copy_o(rcopy), .patch_valid_o(pv), .rdata_orig_o(rorig),
    .req_valid_o(rqv), .req_we_o(rqw), .req_addr_o(rqa), .req_wdata_o(rqd), .req_ready_i(rqr),
    .rsp_valid_i(rsv), .rsp_rdata_i(rsd));
  ext_mem_model #(.WORDS(256)) u_mem (.clk, .rst_n, .req_valid(rqv), .req_we(rqw), .req_addr(rqa),
    .req_wdata(rqd), .req_ready(rqr), .rsp_valid(rsv), .rsp_rdata(rsd_mem), .peek_addr(peek_a),
    .peek_data(peek_d), .n_reads(nr), .n_writes(nw));
  assign rsd = rsd_mem ^ corrupt;
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask

  // One instance in E3; holds it until the bridge lets it go.
  task automatic present(logic c, logic w, logic [31:0] a, logic [31:0] d,
                         output logic o_mm, output logic o_ee, output logic o_pv,
                         output logic [31:0] o_rc, output logic [31:0] o_ro);
    int n = 0;
    @(negedge clk); v = 1; cp = c; we = w; addr = a; wd = d; o_pv = 0; o_ro = 0;
    #1;
    while (!done && n < 50) begin @(negedge clk); #1; n++; end
    o_mm = mm; o_ee = ee; o_rc = rcopy;
    if (pv) begin o_pv = 1; o_ro = rorig; end
    @(negedge clk); v = 0;
  endtask

  logic m, e, p; logic [31:0] rc, ro;
  int r0, w0;
  initial begin
    flush = 0; prot = 1; v = 0; cp = 0; we = 0; addr = 0; wd = 0; corrupt = 0; peek_a = 0;
    #12 rst_n = 1;
    // protected store
    w0 = nw;
    present(0, 1, 32'h2000_0010, 32'hdead_beef, m, e, p, rc, ro);
    chk("first instance parked, nothing sent", !m && nw == w0);
    present(1, 1, 32'h2000_0010, 32'hdead_beef, m, e, p, rc, ro);
    peek_a = 8'h4; #1;
    chk("one write, ECC word from pair", !m && nw == w0 + 1 && peek_d == ref_encode(32'hdead_beef));
    // protected load of the same word
    r0 = nr;
    present(0, 0, 32'h2000_0010, 0, m, e, p, rc, ro);
    present(1, 0, 32'h2000_0010, 0, m, e, p, rc, ro);
    chk("one read, value to both instances", !m && !e && nr == r0 + 1 && p &&
        rc == 32'hdead_beef && ro == 32'hdead_beef);
    // store data mismatch: nothing is written
    w0 = nw;
    present(0, 1, 32'h2000_0014, 32'h1, m, e, p, rc, ro);
    present(1, 1, 32'h2000_0014, 32'h3, m, e, p, rc, ro);
    chk("data mismatch blocks write", m && nw == w0);
    // address mismatch on a load
    r0 = nr;
    present(0, 0, 32'h2000_0018, 0, m, e, p, rc, ro);
    present(1, 0, 32'h2000_001c, 0, m, e, p, rc, ro);
    chk("address mismatch blocks read", m && nr == r0);
    // copy without an original
    present(1, 0, 32'h2000_0018, 0, m, e, p, rc, ro);
    chk("lonely copy", m);
    // corrupted response: single error flagged (not corrected)
    corrupt = CW'(1) << 12;
    present(0, 0, 32'h2000_0010, 0, m, e, p, rc, ro);
    present(1, 0, 32'h2000_0010, 0, m, e, p, rc, ro);
    chk("corrupted response flagged, raw bits to both", e && rc == (32'hdead_beef ^ 32'h1000) && ro == rc);
    corrupt = 0;
    // flush drops a parked original
    present(0, 1, 32'h2000_0020, 32'h5, m, e, p, rc, ro);
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    w0 = nw;
    present(1, 1, 32'h2000_0020, 32'h5, m, e, p, rc, ro);
    chk("flushed original not paired", m && nw == w0);
    // unprotected accesses
    prot = 0; w0 = nw; r0 = nr;
    present(0, 1, 32'h2000_0024, 32'h77, m, e, p, rc, ro);
    present(0, 0, 32'h2000_0024, 0, m, e, p, rc, ro);
    chk("unprotected write+read", nw == w0 + 1 && nr == r0 + 1 && rc == 32'h77 && !p && !m);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

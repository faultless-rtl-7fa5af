// tb_core_ecc_faults: system-level test of the ECC-protected state of the
// core (default parameters), with protection on.
//  * a DCCM word with one flipped bit is loaded: the load traps with
//    mcause 25 (ECC errors are never replayed) and writes nothing;
//  * an ICCM word with one flipped bit is fetched: the instruction traps
//    with mcause 25 and does not execute;
//    the handler records mcause/mepc and returns past the bad instruction;
//  * the rest of the program still computes its results;
//  * while the program spins at its end, a single flipped bit in the PC
//    codeword and in the u_protectionmode codeword are corrected without
//    any visible effect; a double flip in a CSR raises alarm_o.
`timescale 1ns/1ps
module tb_core_ecc_faults;
  import faultless_pkg::*;
  import rv_asm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic          iccm_we;   logic [11:0] iccm_wa; logic [31:0] iccm_wd; logic [CW-1:0] iccm_fl;
  logic          dccm_we;   logic [11:0] dccm_wa; logic [31:0] dccm_wd; logic [CW-1:0] dccm_fl;
  logic [11:0]   dbg_da;    logic [31:0] dbg_dd;
  logic [4:0]    dbg_ra;    logic [31:0] dbg_rd;
  logic          rq_v, rq_we, rq_rdy, rs_v;
  logic [31:0]   rq_a;
  logic [CW-1:0] rq_wd, rs_rd, peek_d, pc_fl;
  logic [7:0]    peek_a;
  int            ext_reads, ext_writes;
  fi_t           fi;
  logic          prot, detect, alarm;
  ev_t           ev;

  faultless_core dut (
    .clk, .rst_n,
    .iccm_wr_en_i(iccm_we), .iccm_wr_addr_i(iccm_wa), .iccm_wr_data_i(iccm_wd), .iccm_wr_flip_i(iccm_fl),
    .dccm_wr_en_i(dccm_we), .dccm_wr_addr_i(dccm_wa), .dccm_wr_data_i(dccm_wd), .dccm_wr_flip_i(dccm_fl),
    .dbg_dccm_addr_i(dbg_da), .dbg_dccm_data_o(dbg_dd), .dbg_reg_addr_i(dbg_ra), .dbg_reg_data_o(dbg_rd),
    .bus_req_valid_o(rq_v), .bus_req_we_o(rq_we), .bus_req_addr_o(rq_a), .bus_req_wdata_o(rq_wd),
    .bus_req_ready_i(rq_rdy), .bus_rsp_valid_i(rs_v), .bus_rsp_rdata_i(rs_rd),
    .fi_i(fi), .pc_flip_i(pc_fl), .prot_o(prot), .detect_o(detect), .alarm_o(alarm), .ev_o(ev));

  ext_mem_model u_ext (.clk, .rst_n, .req_valid(rq_v), .req_we(rq_we), .req_addr(rq_a),
    .req_wdata(rq_wd), .req_ready(rq_rdy), .rsp_valid(rs_v), .rsp_rdata(rs_rd),
    .peek_addr(peek_a), .peek_data(peek_d), .n_reads(ext_reads), .n_writes(ext_writes));

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] prog [128];
  int pcw;
  task automatic put(logic [31:0] w); prog[pcw] = w; pcw++; endtask
  function automatic int here(); return pcw * 4; endfunction
  localparam int BAD_LD = 3, BAD_WORD = 4, HANDLER = 'h100;

  task automatic build();
    for (int i = 0; i < 128; i++) prog[i] = ADDI(0, 0, 0);
    pcw = 0;
    put(LUI(1, 20'h10000));                 // 0  x1 = DCCM base
    put(CSRRWI(0, CSR_UPROT, 1));           // 1  protection on
    put(ADDI(10, 1, 'h40));                 // 2  x10 = trap record pointer
    put(LW(3, 1, 'h20));                    // 3  loads the corrupted word
    put(ADDI(4, 0, 7));                     // 4  stored corrupted in the ICCM
    put(ADDI(5, 0, 9));                     // 5
    put(SW(5, 1, 'h24));
    put(LW(6, 1, 'h24));
    put(ADDI(6, 6, 1));                     // 10
    put(SW(6, 1, 'h28));
    put(ADDI(7, 0, 1));
    put(SW(7, 1, 'h7c));                    // done marker
    put(JAL(0, 0));
    pcw = HANDLER / 4;
    put(CSRRS(24, CSR_MCAUSE, 0));
    put(SW(24, 10, 0));
    put(CSRRS(25, CSR_MEPC, 0));
    put(SW(25, 10, 4));
    put(ADDI(10, 10, 8));
    put(ADDI(25, 25, 4));
    put(CSRRW(0, CSR_MEPC, 25));
    put(MRET());
  endtask

  task automatic rd_dccm(int byte_addr, output logic [31:0] v);
    dbg_da = 12'(byte_addr / 4); #1; v = dbg_dd;
  endtask
  task automatic rd_reg(int r, output logic [31:0] v);
    dbg_ra = 5'(r); #1; v = dbg_rd;
  endtask

  int corr;
  always @(posedge clk) if (rst_n && ev.ecc_corr) corr++;

  initial begin
    logic [31:0] v;
    int n;
    iccm_we = 0; iccm_wa = 0; iccm_wd = 0; iccm_fl = 0; dccm_we = 0; dccm_wa = 0; dccm_wd = 0; dccm_fl = 0;
    dbg_da = 0; dbg_ra = 0; peek_a = 0; fi = '0; pc_fl = 0; corr = 0;
    build();
    #2;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); iccm_we = 1; iccm_wa = 12'(i); iccm_wd = prog[i];
      iccm_fl = (i == BAD_WORD) ? CW'(1) << 17 : '0;
    end
    @(negedge clk); iccm_we = 0; iccm_fl = 0;
    dccm_we = 1; dccm_wa = 12'h8; dccm_wd = 32'h1234; dccm_fl = CW'(1) << 3;
    @(negedge clk); dccm_we = 0; dccm_fl = 0;
    @(negedge clk); rst_n = 1;
    n = 0;
    do begin @(negedge clk); n++; rd_dccm('h7c, v); end while (v != 1 && n < 5000);
    check("program finished", v == 1);
    rd_dccm('h40, v); check($sformatf("first trap cause %0d", v), v == CAUSE_ECC);
    rd_dccm('h44, v); check($sformatf("first trap at the corrupted load (%h)", v), v == BAD_LD * 4);
    rd_dccm('h48, v); check($sformatf("second trap cause %0d", v), v == CAUSE_ECC);
    rd_dccm('h4c, v); check($sformatf("second trap at the corrupted instruction (%h)", v), v == BAD_WORD * 4);
    rd_dccm('h50, v); check("no further traps", v == 0);
    rd_reg(3, v); check("corrupted load wrote nothing", v == 0);
    rd_reg(4, v); check("corrupted instruction did not execute", v == 0);
    rd_dccm('h28, v); check("rest of the program ran", v == 10);
    check("protection still on, no alarm", prot && !alarm);
    // single flips in the PC and in u_protectionmode are corrected silently
    corr = 0;
    @(negedge clk); pc_fl = CW'(1) << 6; @(negedge clk); pc_fl = 0;
    repeat (5) @(negedge clk);
    @(negedge clk); fi.csr_en = 1; fi.csr_idx = 3'd0; fi.csr_mask = CW'(1); @(negedge clk); fi = '0;
    repeat (5) @(negedge clk);
    check("both corrections seen", corr >= 2);
    check("protection unaffected, no alarm", prot && !alarm);
    rd_dccm('h50, v); check("no trap from corrected state", v == 0);
    // the spin loop still runs: the marker store is not repeated, but fetch
    // must still be at the JAL, so a taken-branch flush keeps happening
    n = 0;
    repeat (20) begin @(posedge clk); #1; if (ev.branch_flush) n++; end
    check("still executing the spin loop", n > 0);
    // a double flip cannot be corrected: alarm
    @(negedge clk); fi.csr_en = 1; fi.csr_idx = 3'd1; fi.csr_mask = CW'(3) << 4; @(negedge clk); fi = '0;
    #1; check("double CSR error raises the alarm", alarm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

// tb_faultless_core: end-to-end test of the FAULTLESS core at its default
// parameters. One program runs the same kernel four times:
//   pass 0  protection off
//   pass 1  protection on (enabled by a CSR write, which flushes)
//   pass 2  protection on, a result is corrupted in WB -> replay
//   pass 3  protection on, u_detectionmode = 1, corrupted again -> trap;
//           the handler records mcause/mepc and returns with MRET
// then switches protection off and writes a done marker. The kernel covers
// ALU forwarding, MUL and DIVU, a DCCM store/load, a counted loop (taken
// branches), and an external store and load through the bus bridge.
// Every pass must leave the same results; the tb computes them itself.
// It counts each FAULTLESS mechanism and fails if one never happened, and
// checks that the protected pass is slower but not more than 2.5x slower.
`timescale 1ns/1ps
module tb_faultless_core;
  import faultless_pkg::*;
  import rv_asm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic          iccm_we;   logic [11:0] iccm_wa; logic [31:0] iccm_wd;
  logic          dccm_we;   logic [11:0] dccm_wa; logic [31:0] dccm_wd;
  logic [11:0]   dbg_da;    logic [31:0] dbg_dd;
  logic [4:0]    dbg_ra;    logic [31:0] dbg_rd;
  logic          rq_v, rq_we, rq_rdy, rs_v;
  logic [31:0]   rq_a;
  logic [CW-1:0] rq_wd, rs_rd, peek_d;
  logic [7:0]    peek_a;
  int            ext_reads, ext_writes;
  fi_t           fi;
  logic          prot, detect, alarm;
  ev_t           ev;

  faultless_core dut (
    .clk, .rst_n,
    .iccm_wr_en_i(iccm_we), .iccm_wr_addr_i(iccm_wa), .iccm_wr_data_i(iccm_wd), .iccm_wr_flip_i('0),
    .dccm_wr_en_i(dccm_we), .dccm_wr_addr_i(dccm_wa), .dccm_wr_data_i(dccm_wd), .dccm_wr_flip_i('0),
    .dbg_dccm_addr_i(dbg_da), .dbg_dccm_data_o(dbg_dd), .dbg_reg_addr_i(dbg_ra), .dbg_reg_data_o(dbg_rd),
    .bus_req_valid_o(rq_v), .bus_req_we_o(rq_we), .bus_req_addr_o(rq_a), .bus_req_wdata_o(rq_wd),
    .bus_req_ready_i(rq_rdy), .bus_rsp_valid_i(rs_v), .bus_rsp_rdata_i(rs_rd),
    .fi_i(fi), .pc_flip_i('0), .prot_o(prot), .detect_o(detect), .alarm_o(alarm), .ev_o(ev));

  ext_mem_model u_ext (.clk, .rst_n, .req_valid(rq_v), .req_we(rq_we), .req_addr(rq_a),
    .req_wdata(rq_wd), .req_ready(rq_rdy), .rsp_valid(rs_v), .rsp_rdata(rs_rd),
    .peek_addr(peek_a), .peek_data(peek_d), .n_reads(ext_reads), .n_writes(ext_writes));

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ program
  logic [31:0] prog [1024];
  int pcw;
  task automatic put(logic [31:0] w); prog[pcw] = w; pcw++; endtask
  function automatic int here(); return pcw * 4; endfunction

  localparam int BODY = 'h40, HANDLER = 'h100, DISP = 'h200;
  localparam int L0 = 'h280, L1 = 'h2a0, L2 = 'h2c0, LDONE = 'h2e0;

  task automatic build();
    int loop_pc;
    for (int i = 0; i < 1024; i++) prog[i] = ADDI(0, 0, 0);
    pcw = 0;
    put(LUI(1, 20'h10000));        // x1 = DCCM base
    put(LUI(12, 20'h20000));       // x12 = external base
    put(ADDI(20, 0, 0));           // x20 = pass offset
    put(ADDI(21, 0, 0));           // x21 = pass number
    put(ADDI(9, 0, 0));
    put(JAL(0, BODY - here()));
    pcw = BODY / 4;                // ---- kernel
    put(ADD(17, 1, 20));           // x17 = DCCM + offset
    put(ADD(18, 12, 20));          // x18 = ext + offset
    put(LW(16, 1, 'h60));          // load, then a multiply on another unit
    put(MUL(15, 16, 16));
    put(ADDI(2, 0, 5));
    put(ADDI(3, 0, 7));
    put(ADD(4, 2, 3));             // 12
    put(MUL(5, 4, 3));             // 84
    put(ADD(6, 5, 2));             // 89  (waits for the multiplier)
    put(SW(6, 17, 0));
    put(LW(7, 17, 0));             // waits for the store
    put(ADD(8, 7, 7));             // 178 (load-use)
    put(ADDI(9, 0, 10));
    put(ADDI(10, 0, 0));
    loop_pc = here();
    put(ADD(10, 10, 9));
    put(ADDI(9, 9, -1));
    put(BNE(9, 0, loop_pc - here()));
    put(SW(10, 17, 4));            // 55
    put(DIVU(11, 8, 3));           // 25
    put(ADDI(26, 0, 1));           // independent work, then readers of x11 at
    put(ADDI(27, 0, 2));           // growing distance: one of them issues while
    put(ADDI(26, 26, 3));          // the DIVU original sits in the result buffer
    put(ADD(28, 11, 0));
    put(ADD(29, 11, 0));
    put(ADD(30, 11, 0));
    put(SW(11, 17, 8));
    put(SW(8, 18, 0));             // external store 178
    put(LW(13, 18, 0));            // external load
    put(ADDI(13, 13, 1));          // 179
    put(SW(13, 17, 12));
    put(JAL(0, DISP - here()));
    pcw = HANDLER / 4;             // ---- trap handler
    put(CSRRS(24, CSR_MCAUSE, 0));
    put(SW(24, 1, 'h70));
    put(CSRRS(25, CSR_MEPC, 0));
    put(SW(25, 1, 'h74));
    put(MRET());
    pcw = DISP / 4;                // ---- dispatcher
    put(ADDI(22, 0, 1));
    put(BEQ(21, 0, L0 - here()));
    put(BEQ(21, 22, L1 - here()));
    put(ADDI(22, 0, 2));
    put(BEQ(21, 22, L2 - here()));
    put(JAL(0, LDONE - here()));
    pcw = L0 / 4;
    put(ADDI(21, 0, 1)); put(ADDI(20, 0, 16)); put(CSRRWI(0, CSR_UPROT, 1)); put(JAL(0, BODY - here()));
    pcw = L1 / 4;
    put(ADDI(21, 0, 2)); put(ADDI(20, 0, 32)); put(JAL(0, BODY - here()));
    pcw = L2 / 4;
    put(ADDI(21, 0, 3)); put(ADDI(20, 0, 48)); put(CSRRWI(0, CSR_UDETECT, 1)); put(JAL(0, BODY - here()));
    pcw = LDONE / 4;
    put(CSRRWI(0, CSR_UPROT, 0)); put(ADDI(23, 0, 1)); put(SW(23, 1, 'h7c));
    put(JAL(0, 0));
  endtask

  // ------------------------------------------------------------ counters
  int n_pair, n_seq, n_mixed, n_fstall, n_fwd, n_rbfwd, n_rbw, n_chk, n_fault, n_trap,
      n_replay, n_e3, n_bflush, n_mflush, n_bus, n_freeze, n_dual_unprot, n_commit;
  int cyc = 0;
  always_ff @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    n_pair   <= n_pair + int'(ev.issue_pair);
    n_seq    <= n_seq + int'(ev.issue_seq);
    n_mixed  <= n_mixed + int'(ev.issue_mixed);
    n_fstall <= n_fstall + int'(ev.fwd_stall);
    n_fwd    <= n_fwd + int'(ev.fwd_hit);
    n_rbfwd  <= n_rbfwd + int'(ev.rb_fwd);
    n_rbw    <= n_rbw + int'(ev.rb_write);
    n_chk    <= n_chk + int'(ev.pair_check);
    n_fault  <= n_fault + int'(ev.fault);
    n_trap   <= n_trap + int'(ev.fault_trap);
    n_replay <= n_replay + int'(ev.fault_replay);
    n_e3     <= n_e3 + int'(ev.e3_check);
    n_bflush <= n_bflush + int'(ev.branch_flush);
    n_mflush <= n_mflush + int'(ev.mode_flush);
    n_bus    <= n_bus + int'(ev.bus_txn);
    n_freeze <= n_freeze + int'(ev.freeze);
    n_dual_unprot <= n_dual_unprot + int'(!prot && ev.issued == 2'd2);
    n_commit <= n_commit + int'(ev.commits);
  end

  task automatic rd_dccm(int byte_off, output logic [31:0] v);
    dbg_da = 12'(byte_off / 4); #1; v = dbg_dd;
  endtask

  // pass tracking through the DCCM: pass p is done when its last word is written
  function automatic logic [31:0] expect_word(int i);
    case (i) 0: return 89; 1: return 55; 2: return 25; default: return 179; endcase
  endfunction

  int t_pass [5];
  initial begin
    logic [31:0] v;
    int p;
    fi = '0; iccm_we = 0; dccm_we = 0; dbg_da = '0; dbg_ra = '0; peek_a = '0;
    iccm_wa = '0; iccm_wd = '0; dccm_wa = '0; dccm_wd = '0;
    n_pair = 0; n_seq = 0; n_mixed = 0; n_fstall = 0; n_fwd = 0; n_rbfwd = 0; n_rbw = 0;
    n_chk = 0; n_fault = 0; n_trap = 0; n_replay = 0; n_e3 = 0; n_bflush = 0; n_mflush = 0;
    n_bus = 0; n_freeze = 0; n_dual_unprot = 0; n_commit = 0;
    build();
    repeat (3) @(posedge clk);
    // backdoor program load (core in reset)
    for (int i = 0; i < 1024; i++) begin
      iccm_we = 1; iccm_wa = 12'(i); iccm_wd = prog[i]; @(posedge clk); #1;
    end
    iccm_we = 0;
    dccm_we = 1; dccm_wa = 12'('h60 / 4); dccm_wd = 32'd3; @(posedge clk); #1; dccm_we = 0;
    rst_n = 1;
    t_pass[0] = 0;
    for (p = 0; p < 4; p++) begin
      int t0;
      t0 = cyc;
      // passes 2 and 3: corrupt one WB result until the core reports a fault
      if (p >= 2) begin
        if (p == 3) while (!detect) @(posedge clk);
        repeat (12) @(posedge clk);
        #1;
        fi.pipe_en = 1; fi.stage = 3'd5; fi.slot = 1'b0; fi.mask = 32'h0000_0100;
        while (!ev.fault) begin @(posedge clk); #1; end
        fi = '0;
      end
      do begin @(posedge clk); rd_dccm(32'h60 - 32'h60 + p * 16 + 12, v); end while (v != 179);
      t_pass[p+1] = cyc;
      $display("pass %0d done at cycle %0d (%0d cycles)", p, cyc, cyc - t0);
    end
    do begin @(posedge clk); rd_dccm('h7c, v); end while (v != 1);
    repeat (5) @(posedge clk);

    for (p = 0; p < 4; p++)
      for (int i = 0; i < 4; i++) begin
        rd_dccm(p * 16 + i * 4, v);
        check($sformatf("pass %0d word %0d = %0d", p, i, v), v == expect_word(i));
      end
    for (p = 0; p < 4; p++) begin
      peek_a = 8'(p * 4); #1;
      check($sformatf("external word of pass %0d", p), peek_d == ecc_encode(32'd178));
    end
    check("each external access happened exactly once", ext_reads == 4 && ext_writes == 4);
    rd_dccm('h70, v); check("trap cause is the fault cause", v == CAUSE_FAULT);
    rd_dccm('h74, v); check("mepc points into the kernel", v >= BODY && v < HANDLER);
    dbg_ra = 5'd15; #1; check("x15 = 3*3 from the load/multiply pair", dbg_rd == 32'd9);
    for (int r = 28; r <= 30; r++) begin
      dbg_ra = 5'(r); #1; check($sformatf("x%0d = 25", r), dbg_rd == 32'd25);
    end
    check("protection switched off at the end", !prot);
    check("detection mode left on", detect);
    check("no alarm", !alarm);
    // protected kernel is slower than the unprotected one, within reason
    check($sformatf("protected pass slower (%0d vs %0d)", t_pass[2]-t_pass[1], t_pass[1]-t_pass[0]),
          (t_pass[2]-t_pass[1]) > (t_pass[1]-t_pass[0]) - 40);
    check("protected overhead below 150%", (t_pass[2]-t_pass[1]) * 2 < (t_pass[1]-t_pass[0]) * 5);

    $display("events: pair=%0d seq=%0d mixed=%0d fwd_stall=%0d fwd=%0d rb_fwd=%0d rb_write=%0d",
             n_pair, n_seq, n_mixed, n_fstall, n_fwd, n_rbfwd, n_rbw);
    $display("        check=%0d fault=%0d trap=%0d replay=%0d e3=%0d br_flush=%0d mode_flush=%0d bus=%0d freeze=%0d dual=%0d commits=%0d",
             n_chk, n_fault, n_trap, n_replay, n_e3, n_bflush, n_mflush, n_bus, n_freeze, n_dual_unprot, n_commit);
    check("parallel pair issue",   n_pair > 0);
    check("sequential issue",      n_seq > 0);
    check("two different sequential instances paired", n_mixed > 0);
    check("dual issue without protection", n_dual_unprot > 0);
    check("operand stall",         n_fstall > 0);
    check("forwarding",            n_fwd > 0);
    check("forwarding from the result buffer", n_rbfwd > 0);
    check("result buffer used",    n_rbw > 0);
    check("commit comparisons",    n_chk > 0);
    check("E3 branch comparisons", n_e3 > 0);
    check("faults detected = 2",   n_fault == 2);
    check("one replay",            n_replay == 1);
    check("one fault trap",        n_trap == 1);
    check("branch flushes",        n_bflush > 0);
    check("mode flushes = 2",      n_mflush == 2);
    check("bus transactions = 8",  n_bus == 8);
    check("bus freeze",            n_freeze > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

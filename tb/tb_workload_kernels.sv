// tb_workload_kernels: runs two small benchmark-style kernels on the core
// (default parameters) in the four configurations the protection scheme
// is meant to be compared in: data in the DCCM or in external memory
// (a core without DCCM), each with protection off and on.
//   kernel A  state-machine update in the style of a Petri-net benchmark:
//             load two counters, branch on their values, store them back;
//             every step depends on a load, so load-use stalls dominate
//   kernel B  dot product with running sums: two loads, one MUL, one
//             store per element (temporal pairs on the LSU and multiplier)
// The program initialises its own data, sets u_protectionmode, runs both
// kernels, clears the mode and writes a done marker into the DCCM. For
// every configuration the testbench compares all data words with its own
// model of the two kernels, checks that no fault or alarm was raised, and,
// for external data, that each load and store reached the bus exactly once
// whether or not protection was on. It prints the cycle count of each
// configuration and the slowdown caused by protection.
`timescale 1ns/1ps
module tb_workload_kernels;
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
  localparam int T = 12;              // kernel A iterations
  localparam int N = 16;              // kernel B length
  localparam logic [31:0] MARKER = 32'h600d_0001;
  localparam int MARK_W = 'h1f0;      // DCCM word index of the done marker

  logic [31:0] prog [256];
  int pcw;
  task automatic put(logic [31:0] w); prog[pcw] = w; pcw++; endtask
  function automatic int here(); return pcw * 4; endfunction

  // data layout (byte offsets from x1): P[0..3] at 0, A at 0x40, B at 0x80, C at 0xc0
  task automatic build(logic ext, logic p);
    int loop_a, loop_b, loop_i, f1, f2;
    for (int i = 0; i < 256; i++) prog[i] = ADDI(0, 0, 0);
    pcw = 0;
    put(LUI(1, ext ? 20'h20000 : 20'h10000));   // x1 = data base
    put(LUI(31, 20'h10000));                    // x31 = DCCM base (marker)
    put(CSRRWI(0, CSR_UPROT, 5'(p)));
    // initialise P = {5, 0, 2, 2}, A[i] = 3i+1, B[i] = 7-2i
    put(ADDI(2, 0, 5)); put(SW(2, 1, 0));
    put(SW(0, 1, 4));
    put(ADDI(2, 0, 2)); put(SW(2, 1, 8)); put(SW(2, 1, 12));
    put(ADDI(9, 0, N)); put(ADD(3, 1, 0)); put(ADDI(4, 0, 1)); put(ADDI(5, 0, 7));
    loop_i = here();
    put(SW(4, 3, 'h40)); put(SW(5, 3, 'h80));
    put(ADDI(4, 4, 3)); put(ADDI(5, 5, -2)); put(ADDI(3, 3, 4)); put(ADDI(9, 9, -1));
    put(BNE(9, 0, loop_i - here()));
    // kernel A
    put(ADDI(9, 0, T));
    loop_a = here();
    put(LW(2, 1, 0)); put(LW(3, 1, 4));
    f1 = pcw; put(0);                           // beq x2, x0, skip1
    put(ADDI(2, 2, -1)); put(ADDI(3, 3, 1)); put(SW(2, 1, 0)); put(SW(3, 1, 4));
    prog[f1] = BEQ(2, 0, here() - f1 * 4);
    put(LW(4, 1, 8)); put(LW(5, 1, 12));
    f2 = pcw; put(0);                           // bne x4, x5, skip2
    put(ADD(4, 4, 3)); put(SW(4, 1, 8));
    prog[f2] = BNE(4, 5, here() - f2 * 4);
    put(LW(6, 1, 12)); put(ADDI(6, 6, 3)); put(SW(6, 1, 12));
    put(ADDI(9, 9, -1));
    put(BNE(9, 0, loop_a - here()));
    // kernel B
    put(ADDI(9, 0, N)); put(ADD(3, 1, 0)); put(ADDI(10, 0, 0));
    loop_b = here();
    put(LW(4, 3, 'h40)); put(LW(5, 3, 'h80));
    put(MUL(6, 4, 5)); put(ADD(10, 10, 6)); put(SW(10, 3, 'hc0));
    put(ADDI(3, 3, 4)); put(ADDI(9, 9, -1));
    put(BNE(9, 0, loop_b - here()));
    // leave protection, write the marker, spin
    put(CSRRWI(0, CSR_UPROT, 0));
    put(LUI(7, 20'h600d0)); put(ADDI(7, 7, 1));
    put(SW(7, 31, MARK_W * 4));
    put(JAL(0, 0));
  endtask

  // ------------------------------------------------------------ model
  logic [31:0] exp_p [4];
  logic [31:0] exp_c [N];
  int exp_loads, exp_stores;
  task automatic model();
    logic [31:0] p0, p1, p2, p3, acc, a, b;
    exp_p[0] = 5; exp_p[1] = 0; exp_p[2] = 2; exp_p[3] = 2;
    exp_stores = 4 + 2 * N; exp_loads = 0;
    for (int t = 0; t < T; t++) begin
      p0 = exp_p[0]; p1 = exp_p[1]; exp_loads += 2;
      if (p0 != 0) begin p0--; p1++; exp_p[0] = p0; exp_p[1] = p1; exp_stores += 2; end
      p2 = exp_p[2]; p3 = exp_p[3]; exp_loads += 2;
      if (p2 == p3) begin exp_p[2] = p2 + p1; exp_stores++; end
      exp_p[3] = exp_p[3] + 3; exp_loads++; exp_stores++;
    end
    acc = 0;
    for (int i = 0; i < N; i++) begin
      a = 32'(3 * i + 1); b = 32'(7 - 2 * i);
      acc = acc + a * b; exp_c[i] = acc; exp_loads += 2; exp_stores++;
    end
  endtask

  // ------------------------------------------------------------ runs
  task automatic rd_data(logic ext, int byte_off, output logic [31:0] v);
    if (ext) begin peek_a = 8'(byte_off / 4); #1; v = peek_d[31:0]; end
    else begin dbg_da = 12'(byte_off / 4); #1; v = dbg_dd; end
  endtask

  int cyc [2][2];
  int faults_seen;
  always @(posedge clk) if (rst_n && ev.fault) faults_seen++;

  task automatic run(logic ext, logic p);
    int r0, w0, n;
    logic [31:0] v;
    rst_n = 1'b0;
    build(ext, p);
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      iccm_we = 1'b1; iccm_wa = 12'(i); iccm_wd = prog[i]; @(negedge clk);
    end
    iccm_we = 1'b0;
    dccm_we = 1'b1; dccm_wa = 12'(MARK_W); dccm_wd = '0; @(negedge clk); dccm_we = 1'b0;
    for (int i = 0; i < 64; i++) begin      // clear the DCCM data area
      dccm_we = 1'b1; dccm_wa = 12'(i); dccm_wd = '0; @(negedge clk);
    end
    dccm_we = 1'b0;
    r0 = ext_reads; w0 = ext_writes; faults_seen = 0;
    rst_n = 1'b1;
    n = 0;
    dbg_da = 12'(MARK_W);
    while (n < 20000) begin
      @(negedge clk); n++;
      dbg_da = 12'(MARK_W); #1;
      if (dbg_dd == MARKER) break;
    end
    cyc[ext][p] = n;
    check($sformatf("ext=%0d prot=%0d finished", ext, p), dbg_dd == MARKER);
    check($sformatf("ext=%0d prot=%0d no fault, no alarm", ext, p), faults_seen == 0 && !alarm);
    for (int i = 0; i < 4; i++) begin
      rd_data(ext, 4 * i, v);
      check($sformatf("ext=%0d prot=%0d P[%0d]=%0d (exp %0d)", ext, p, i, v, exp_p[i]), v == exp_p[i]);
    end
    for (int i = 0; i < N; i++) begin
      rd_data(ext, 'hc0 + 4 * i, v);
      check($sformatf("ext=%0d prot=%0d C[%0d]", ext, p, i), v == exp_c[i]);
    end
    if (ext)
      check($sformatf("prot=%0d: %0d bus reads (exp %0d), %0d bus writes (exp %0d)", p,
                      ext_reads - r0, exp_loads, ext_writes - w0, exp_stores),
            ext_reads - r0 == exp_loads && ext_writes - w0 == exp_stores);
    else
      check("DCCM configuration stays off the bus", ext_reads == r0 && ext_writes == w0);
    $display("config %-12s protection %-3s : %0d cycles", ext ? "external" : "DCCM", p ? "on" : "off", n);
  endtask

  initial begin
    iccm_we = 0; iccm_wa = 0; iccm_wd = 0; dccm_we = 0; dccm_wa = 0; dccm_wd = 0;
    dbg_da = 0; dbg_ra = 0; peek_a = 0; fi = '0;
    model();
    #22;
    for (int e = 0; e < 2; e++)
      for (int p = 0; p < 2; p++) run(1'(e), 1'(p));
    for (int e = 0; e < 2; e++) begin
      $display("%s data: protection costs %0d%% more cycles", e ? "external" : "DCCM",
               (cyc[e][1] - cyc[e][0]) * 100 / cyc[e][0]);
      check("protection is not free, nor more than 3x", cyc[e][1] > cyc[e][0] && cyc[e][1] < 3 * cyc[e][0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

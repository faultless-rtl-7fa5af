// faultless_core: a dual-issue, in-order RV32IM core with FAULTLESS
// run-time switchable fault protection.
//
// Pipeline: fetch (two words per cycle from the ECC-protected ICCM) ->
// decode/instruction buffer (4 entries, 2 issued per cycle) -> E1 E2 E3 E4
// WB on two arithmetic pipes, with one multiplier/divider and one
// load-store unit shared between them. Results are committed in WB only.
//   E1  ALU, branch condition, jump link, address, CSR read, MUL/DIV start
//   E2  DCCM read for loads (data usable from E3)
//   E3  MUL/DIV result usable; taken branches redirect fetch; external
//       loads/stores go through the bus bridge (pipeline frozen meanwhile),
//       but only once every older instruction has committed, so that a
//       replay or flush can never repeat a bus access
//   E4  -
//   WB  commit_unit compares and commits
// Taken branches are not predicted: fetch continues sequentially and a
// taken branch flushes the younger instructions from E3.
//
// Protection (u_protectionmode = 1): the instruction buffer holds every
// instruction twice (original and copy). ALU, branch, jump, CSR, MRET and
// FENCE pairs issue side by side on the two pipes; MUL/DIV, loads and
// stores issue their two instances one after the other. Forwarding only
// connects instances with the same copy flag. Branch pairs are compared in
// E3 before they may redirect; every pair is compared in WB, sequential
// pairs against the one-entry result buffer. Nothing reaches the register
// file, the DCCM, the CSRs or the bus before a comparison has passed, and
// the ECC of every committed word is computed from the copy while its data
// comes from the original. Writing u_protectionmode flushes the pipeline
// and refetches the next instruction.
// A detected fault (u_detectionmode = 0) flushes everything and replays
// from the faulting instruction, the oldest one in flight; with
// u_detectionmode = 1 it traps to mtvec with mcause 24 (mepc = its PC).
// Uncorrectable ECC errors on fetched words, loaded words or register reads
// always trap with mcause 25, because replaying cannot repair stored data.
// Illegal instructions trap with mcause 2; MRET returns to mepc.
//
// Memory map (this design's choice): ICCM at 0x0000_0000 (fetch only),
// DCCM where address bits [31:28] equal DCCM_BASE[31:28], everything else
// is external and reached through the bus bridge. Loads and stores are
// word-sized. Stores to the DCCM are written at commit; a load waits at
// issue while an older store is still in flight.
//
// Test hooks: backdoor write ports for both TCMs (with an XOR mask on the
// stored codeword), read ports for the DCCM and the register file, and a
// fault-injection input that XORs a mask into one pipeline result, one CSR
// word or the PC word for a cycle. `ev_o` pulses one bit per event.
//
// What follows the document: duplication in the instruction buffer, the
// spatial/temporal issue split, flag-separated forwarding, the E3 and WB
// comparison points, the result buffer with forwarding, the ECC hand-overs,
// ECC on PC/registers/CSRs/TCMs, the two mode CSRs with flush-on-write and
// the replay/exception recovery. The base pipeline is a much simpler
// stand-in for the document's VeeR EH1 base core.
module faultless_core
  import faultless_pkg::*;
#(
  parameter logic [31:0] RESET_PC    = 32'h0000_0000,
  parameter logic [31:0] RESET_MTVEC = 32'h0000_0100,
  parameter logic [31:0] DCCM_BASE   = 32'h1000_0000,
  parameter int unsigned ICCM_DEPTH  = 4096,
  parameter int unsigned DCCM_DEPTH  = 4096,
  parameter int unsigned IBUF_DEPTH  = 4,
  localparam int unsigned IAW = $clog2(ICCM_DEPTH),
  localparam int unsigned DAW = $clog2(DCCM_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // backdoor TCM access
  input  logic          iccm_wr_en_i,
  input  logic [IAW-1:0] iccm_wr_addr_i,
  input  logic [31:0]   iccm_wr_data_i,
  input  logic [CW-1:0] iccm_wr_flip_i,
  input  logic          dccm_wr_en_i,
  input  logic [DAW-1:0] dccm_wr_addr_i,
  input  logic [31:0]   dccm_wr_data_i,
  input  logic [CW-1:0] dccm_wr_flip_i,
  input  logic [DAW-1:0] dbg_dccm_addr_i,
  output logic [31:0]   dbg_dccm_data_o,
  input  logic [4:0]    dbg_reg_addr_i,
  output logic [31:0]   dbg_reg_data_o,
  // external bus
  output logic          bus_req_valid_o,
  output logic          bus_req_we_o,
  output logic [31:0]   bus_req_addr_o,
  output logic [CW-1:0] bus_req_wdata_o,
  input  logic          bus_req_ready_i,
  input  logic          bus_rsp_valid_i,
  input  logic [CW-1:0] bus_rsp_rdata_i,
  // fault injection and status
  input  fi_t           fi_i,
  input  logic [CW-1:0] pc_flip_i,
  output logic          prot_o,
  output logic          detect_o,
  output logic          alarm_o,
  output ev_t           ev_o
);
  localparam int NP = 11;

  // ------------------------------------------------------------ state
  pipe_t st [5][2];          // 0 = E1 .. 4 = WB
  pipe_t x  [5][2];          // views: x[0] = E1 result, x[1..4] = E2..WB registers
  logic        br_patch;     // bus bridge fills in a pending external load
  logic [31:0] br_rdata_orig;
  logic  prot, detect;

  // --------------------------------------------------------- fetch
  logic [IAW-1:0] iccm_raddr [2];
  logic [CW-1:0]  iccm_rdata [2];
  logic [1:0]     f_valid, f_err, accept;
  logic [31:0]    f_pc [2], f_orig [2], f_copy [2];
  logic           pc_corr, pc_fatal;
  logic           redirect;
  logic [31:0]    redirect_pc;

  tcm_ecc #(.DEPTH(ICCM_DEPTH), .NRD(2)) u_iccm (
    .clk, .we_i(iccm_wr_en_i), .waddr_i(iccm_wr_addr_i),
    .wdata_i(ecc_encode(iccm_wr_data_i) ^ iccm_wr_flip_i),
    .raddr_i(iccm_raddr), .rdata_o(iccm_rdata));

  fetch_unit #(.RESET_PC(RESET_PC), .AW(IAW)) u_fetch (
    .clk, .rst_n, .redirect_i(redirect), .redirect_pc_i(redirect_pc),
    .accept_i(accept), .pc_flip_i(pc_flip_i),
    .iccm_raddr_o(iccm_raddr), .iccm_rdata_i(iccm_rdata),
    .f_valid_o(f_valid), .f_pc_o(f_pc), .f_orig_o(f_orig), .f_copy_o(f_copy),
    .f_err_o(f_err), .pc_corr_o(pc_corr), .pc_fatal_o(pc_fatal));

  // ------------------------------------------------ decode and buffer
  uop_t  dec_a, dec_b;
  ibuf_t cand [2];
  logic [1:0] iss_max, take;
  logic  iss_atomic;
  logic  flush_front, flush_all;
  logic [$clog2(IBUF_DEPTH+1)-1:0] ibuf_cnt;

  rv_decoder u_dec_a (.instr_i(f_orig[0]), .uop_o(dec_a));
  rv_decoder u_dec_b (.instr_i(prot ? f_copy[0] : f_orig[1]), .uop_o(dec_b));

  instr_buffer #(.DEPTH(IBUF_DEPTH)) u_ibuf (
    .clk, .rst_n, .flush_i(flush_front || flush_all), .prot_i(prot),
    .in_valid_i(f_valid), .in_pc_i(f_pc), .in_uop_a_i(dec_a), .in_uop_b_i(dec_b),
    .in_eccerr_i(prot ? {f_err[0], f_err[0]} : f_err), .accept_o(accept),
    .iss_o(cand), .iss_max_o(iss_max), .iss_atomic_o(iss_atomic), .take_i(take),
    .count_o(ibuf_cnt));

  // ------------------------------------------------- register file
  logic [4:0]    rf_raddr [5];
  logic [31:0]   rf_rdata [5];
  logic          rf_rcorr [5], rf_rerr [5];
  logic          rf_we [2];
  logic [4:0]    rf_waddr [2];
  logic [CW-1:0] rf_wdata [2];

  regfile_ecc #(.NRD(5), .NWR(2)) u_rf (
    .clk, .rst_n, .we_i(rf_we), .waddr_i(rf_waddr), .wdata_i(rf_wdata),
    .raddr_i(rf_raddr), .rdata_o(rf_rdata), .rcorr_o(rf_rcorr), .rerr_o(rf_rerr));

  // ---------------------------------------------------- forwarding
  pipe_t       prod [NP];
  pipe_t       rb;
  logic [31:0] opnd [2][2];
  logic        f_hit [2][2], f_stall [2][2];
  logic [$clog2(NP)-1:0] f_idx [2][2];

  always_comb begin
    for (int k = 0; k < 5; k++) begin
      prod[2*k]   = x[k][1];
      prod[2*k+1] = x[k][0];
    end
    prod[10] = rb;
  end

  for (genvar s = 0; s < 2; s++) begin : g_fwd
    assign rf_raddr[2*s]   = cand[s].uop.rs1;
    assign rf_raddr[2*s+1] = cand[s].uop.rs2;
    fwd_unit #(.NP(NP)) u_f1 (.rs_i(cand[s].uop.rs1), .use_i(cand[s].uop.use_rs1),
      .copy_i(cand[s].copy), .prod_i(prod), .rf_data_i(rf_rdata[2*s]),
      .data_o(opnd[s][0]), .hit_o(f_hit[s][0]), .hit_idx_o(f_idx[s][0]), .stall_o(f_stall[s][0]));
    fwd_unit #(.NP(NP)) u_f2 (.rs_i(cand[s].uop.rs2), .use_i(cand[s].uop.use_rs2),
      .copy_i(cand[s].copy), .prod_i(prod), .rf_data_i(rf_rdata[2*s+1]),
      .data_o(opnd[s][1]), .hit_o(f_hit[s][1]), .hit_idx_o(f_idx[s][1]), .stall_o(f_stall[s][1]));
  end
  assign rf_raddr[4]    = dbg_reg_addr_i;
  assign dbg_reg_data_o = rf_rdata[4];

  // ----------------------------------------------------------- issue
  logic freeze;
  logic bx_hold;     // an external access waits in E3 for older instructions
  logic ok [2];
  logic pipe_empty, store_inflight, dep10;
  logic opnd_stall0;

  always_comb begin
    pipe_empty = !rb.valid;
    store_inflight = rb.valid && rb.uop.unit == UN_ST;
    for (int k = 0; k < 5; k++)
      for (int s = 0; s < 2; s++) begin
        if (st[k][s].valid) pipe_empty = 1'b0;
        if (st[k][s].valid && st[k][s].uop.unit == UN_ST) store_inflight = 1'b1;
      end
    for (int s = 0; s < 2; s++)
      ok[s] = !f_stall[s][0] && !f_stall[s][1] &&
              !(cand[s].uop.unit == UN_LD && store_inflight);
    ok[0] = ok[0] && (!is_serial(cand[0].uop.unit) || pipe_empty);
    opnd_stall0 = f_stall[0][0] || f_stall[0][1];
    // slot 1 may not read what slot 0 writes in the same group (unless it is
    // slot 0's own copy, whose flag keeps them apart anyway)
    dep10 = cand[0].uop.wen && cand[0].copy == cand[1].copy &&
            ((cand[1].uop.use_rs1 && cand[1].uop.rs1 == cand[0].uop.rd) ||
             (cand[1].uop.use_rs2 && cand[1].uop.rs2 == cand[0].uop.rd));
    ok[1] = ok[1] && !dep10;
    take = 2'd0;
    if (!freeze && !bx_hold && !flush_all && !flush_front && iss_max != 0) begin
      if (iss_atomic) take = (ok[0] && ok[1]) ? 2'd2 : 2'd0;
      else if (ok[0])  take = (iss_max == 2'd2 && ok[1]) ? 2'd2 : 2'd1;
    end
  end

  // ----------------------------------------------------------- E1
  logic [31:0] alu_res [2];
  logic        alu_tk [2];
  logic [31:0] md_res;
  logic        md_slot;
  logic [11:0] csr_raddr [2];
  logic [31:0] csr_rdata [2];
  logic        csr_rvalid [2];

  for (genvar s = 0; s < 2; s++) begin : g_alu
    alu u_alu (
      .op_i(st[0][s].uop.alu_op),
      .a_i(st[0][s].uop.use_pc ? st[0][s].pc : st[0][s].rs1v),
      .b_i(st[0][s].uop.use_imm ? st[0][s].uop.imm : st[0][s].rs2v),
      .br_funct3_i(st[0][s].uop.funct3),
      .result_o(alu_res[s]), .br_taken_o(alu_tk[s]));
    assign csr_raddr[s] = st[0][s].uop.csr;
  end
  assign md_slot = !(st[0][0].valid && st[0][0].uop.unit == UN_MULDIV);
  muldiv_unit u_md (.funct3_i(st[0][md_slot].uop.funct3), .a_i(st[0][md_slot].rs1v),
                    .b_i(st[0][md_slot].rs2v), .result_o(md_res));

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      pipe_t e;
      logic [31:0] co;
      e = st[0][s];
      e.ready = 1'b1;
      case (e.uop.unit)
        UN_ALU:  e.result = alu_res[s];
        UN_BR:   begin e.br_taken = alu_tk[s]; e.br_target = e.pc + e.uop.imm; end
        UN_JAL:  begin e.result = e.pc + 32'd4; e.br_taken = 1'b1; e.br_target = e.pc + e.uop.imm; end
        UN_JALR: begin
          e.result = e.pc + 32'd4; e.br_taken = 1'b1;
          e.br_target = (e.rs1v + e.uop.imm) & ~32'd1;
        end
        UN_MULDIV: begin e.result = md_res; e.ready = 1'b0; end
        UN_LD, UN_ST: begin
          e.addr  = e.rs1v + e.uop.imm;
          e.ext   = e.addr[31:28] != DCCM_BASE[31:28];
          e.ready = (e.uop.unit == UN_ST);
        end
        UN_CSR: begin
          co = e.uop.use_imm ? e.uop.imm : e.rs1v;
          e.result = csr_rdata[s];
          case (e.uop.funct3[1:0])
            2'b01:   e.csr_wdata = co;
            2'b10:   e.csr_wdata = csr_rdata[s] | co;
            default: e.csr_wdata = csr_rdata[s] & ~co;
          endcase
          e.csr_we = csr_rvalid[s] && (e.uop.funct3[1:0] == 2'b01 || e.uop.rs1 != 5'd0);
        end
        default: ;
      endcase
      x[0][s] = e;
    end
    // views of the E2..WB registers
    for (int k = 1; k < 5; k++)
      for (int s = 0; s < 2; s++) x[k][s] = st[k][s];
    // late data for a pending external load (first instance in E4/WB)
    for (int k = 3; k < 5; k++)
      for (int s = 0; s < 2; s++)
        if (br_patch && x[k][s].valid && x[k][s].pending) begin
          x[k][s].result = br_rdata_orig; x[k][s].pending = 1'b0; x[k][s].ready = 1'b1;
        end
    // fault injection into one result
    if (fi_i.pipe_en && fi_i.stage >= 3'd1 && fi_i.stage <= 3'd5)
      x[fi_i.stage - 3'd1][fi_i.slot].result = x[fi_i.stage - 3'd1][fi_i.slot].result ^ fi_i.mask;
  end

  // ----------------------------------------------------------- E2
  logic [DAW-1:0] dccm_raddr [2];
  logic [CW-1:0]  dccm_rdata [2];
  logic [31:0]    ld_data, ld_unused;
  logic           ld_s, ld_d;
  logic           l2;
  pipe_t          e2o [2];

  assign l2 = !(x[1][0].valid && fu_of(x[1][0].uop.unit) == FU_LSU);
  assign dccm_raddr[0] = x[1][l2].addr[DAW+1:2];
  assign dccm_raddr[1] = dbg_dccm_addr_i;
  secded_dec u_ld_chk (.code_i(dccm_rdata[0]), .data_o(ld_unused), .raw_o(ld_data),
                       .single_o(ld_s), .double_o(ld_d));
  logic [31:0] dbg_raw;
  logic        dbg_s, dbg_d;
  secded_dec u_dbg_chk (.code_i(dccm_rdata[1]), .data_o(dbg_dccm_data_o), .raw_o(dbg_raw),
                        .single_o(dbg_s), .double_o(dbg_d));

  always_comb
    for (int s = 0; s < 2; s++) begin
      e2o[s] = x[1][s];
      if (e2o[s].uop.unit == UN_LD && !e2o[s].ext) begin
        e2o[s].result = ld_data;
        e2o[s].ready  = 1'b1;
        e2o[s].eccerr = e2o[s].eccerr | ld_s | ld_d;
      end
      if (e2o[s].uop.unit == UN_MULDIV) e2o[s].ready = 1'b1;
    end

  // ----------------------------------------------------------- E3
  logic        br_match;
  logic        br_taken_any;
  logic [31:0] br_target;
  logic        kill_e3_1;
  logic        br_pair_chk;
  logic        l3;
  logic        bx_valid, bx_done, bx_first, bx_mm, bx_eccerr;
  logic [31:0] bx_rdata_copy;
  pipe_t       e3o [2];

  pair_compare u_brcmp (.a_i(x[2][0]), .b_i(x[2][1]), .match_o(br_match));

  function automatic logic is_ctl(unit_e u);
    return u inside {UN_BR, UN_JAL, UN_JALR};
  endfunction

  always_comb begin
    br_taken_any = 1'b0; br_target = '0; kill_e3_1 = 1'b0; br_pair_chk = 1'b0;
    if (prot) begin
      if (x[2][0].valid && is_ctl(x[2][0].uop.unit)) begin
        br_pair_chk = 1'b1;
        if (br_match && x[2][0].br_taken) begin
          br_taken_any = 1'b1; br_target = x[2][0].br_target;
        end
      end
    end else if (x[2][0].valid && is_ctl(x[2][0].uop.unit) && x[2][0].br_taken) begin
      br_taken_any = 1'b1; br_target = x[2][0].br_target; kill_e3_1 = 1'b1;
    end else if (x[2][1].valid && is_ctl(x[2][1].uop.unit) && x[2][1].br_taken) begin
      br_taken_any = 1'b1; br_target = x[2][1].br_target;
    end
  end

  assign l3 = !(x[2][0].valid && fu_of(x[2][0].uop.unit) == FU_LSU);
  assign bx_valid = x[2][l3].valid && fu_of(x[2][l3].uop.unit) == FU_LSU && x[2][l3].ext &&
                    !(l3 && kill_e3_1);

  // An external access has side effects, so it may only go out once every
  // older instruction has committed: a later fault replay or mode flush
  // would otherwise repeat it. The instance that would send the request
  // (the copy, or the single instance without protection) therefore waits
  // in E3 while E4, WB, the result buffer or the older E3 slot still hold
  // anything but its own first instance. E1-E3 hold (an older slot-0
  // instruction in E3 moves on alone), E4/WB drain.
  always_comb begin
    logic older;
    older = l3 && x[2][0].valid;
    for (int k = 3; k < 5; k++)
      for (int s = 0; s < 2; s++)
        if (x[k][s].valid && x[k][s].pc != x[2][l3].pc) older = 1'b1;
    if (rb.valid && rb.pc != x[2][l3].pc) older = 1'b1;
    bx_hold = bx_valid && (!prot || x[2][l3].copy) && older;
  end

  bus_bridge u_bus (
    .clk, .rst_n, .flush_i(flush_all), .prot_i(prot),
    .e3_valid_i(bx_valid && !bx_hold), .e3_copy_i(x[2][l3].copy), .e3_we_i(x[2][l3].uop.unit == UN_ST),
    .e3_addr_i(x[2][l3].addr), .e3_wdata_i(x[2][l3].rs2v),
    .stall_o(freeze), .done_o(bx_done), .first_o(bx_first), .mismatch_o(bx_mm),
    .eccerr_o(bx_eccerr), .rdata_copy_o(bx_rdata_copy), .patch_valid_o(br_patch),
    .rdata_orig_o(br_rdata_orig),
    .req_valid_o(bus_req_valid_o), .req_we_o(bus_req_we_o), .req_addr_o(bus_req_addr_o),
    .req_wdata_o(bus_req_wdata_o), .req_ready_i(bus_req_ready_i),
    .rsp_valid_i(bus_rsp_valid_i), .rsp_rdata_i(bus_rsp_rdata_i));

  always_comb begin
    for (int s = 0; s < 2; s++) e3o[s] = x[2][s];
    if (prot && br_pair_chk && !br_match) begin
      e3o[0].flt = 1'b1; e3o[1].flt = 1'b1;
    end
    if (kill_e3_1) e3o[1].valid = 1'b0;
    if (bx_done) begin
      if (e3o[l3].uop.unit == UN_LD) begin
        if (bx_first) begin
          e3o[l3].pending = 1'b1; e3o[l3].ready = 1'b0;
        end else begin
          e3o[l3].result = bx_rdata_copy; e3o[l3].ready = 1'b1;
        end
      end
      e3o[l3].flt    = e3o[l3].flt | bx_mm;
      e3o[l3].eccerr = e3o[l3].eccerr | bx_eccerr;
    end
  end

  // ---------------------------------------------------------- commit
  logic [1:0]    cm_valid;
  pipe_t         cm [2];
  logic [CW-1:0] cm_rd_word [2], cm_st_word [2];
  logic          fault, fault_ecc;
  logic [31:0]   fault_pc;
  logic          rb_write, pair_check;

  commit_unit u_commit (
    .clk, .rst_n, .en_i(!freeze), .flush_i(flush_all), .prot_i(prot),
    .w_i(x[4]), .patch_valid_i(br_patch), .patch_data_i(br_rdata_orig),
    .cm_valid_o(cm_valid), .cm_o(cm), .cm_rd_word_o(cm_rd_word), .cm_st_word_o(cm_st_word),
    .fault_o(fault), .fault_ecc_o(fault_ecc), .fault_pc_o(fault_pc),
    .rb_o(rb), .rb_write_o(rb_write), .pair_check_o(pair_check));

  // CSRs
  logic        csr_we, trap;
  logic [11:0] csr_waddr;
  logic [31:0] csr_wdata, trap_pc, trap_cause, mtvec, mepc;
  logic        csr_corr, csr_fatal;

  csr_file #(.RESET_MTVEC(RESET_MTVEC)) u_csr (
    .clk, .rst_n, .raddr_i(csr_raddr), .rdata_o(csr_rdata), .rvalid_o(csr_rvalid),
    .we_i(csr_we), .waddr_i(csr_waddr), .wdata_i(csr_wdata),
    .trap_i(trap), .trap_pc_i(trap_pc), .trap_cause_i(trap_cause),
    .flip_en_i(fi_i.csr_en), .flip_idx_i(fi_i.csr_idx), .flip_mask_i(fi_i.csr_mask),
    .prot_o(prot), .detect_o(detect), .mtvec_o(mtvec), .mepc_o(mepc),
    .corrected_o(csr_corr), .fatal_o(csr_fatal));

  // DCCM
  logic           dccm_we;
  logic [DAW-1:0] dccm_waddr;
  logic [CW-1:0]  dccm_wdata;

  tcm_ecc #(.DEPTH(DCCM_DEPTH), .NRD(2)) u_dccm (
    .clk, .we_i(dccm_we), .waddr_i(dccm_waddr), .wdata_i(dccm_wdata),
    .raddr_i(dccm_raddr), .rdata_o(dccm_rdata));

  logic cm_redirect, mode_flush;
  logic [31:0] cm_redirect_pc;

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      rf_we[k]    = cm_valid[k] && cm[k].uop.wen;
      rf_waddr[k] = cm[k].uop.rd;
      rf_wdata[k] = cm_rd_word[k];
    end
    dccm_we = 1'b0; dccm_waddr = '0; dccm_wdata = '0;
    csr_we  = 1'b0; csr_waddr = '0; csr_wdata = '0;
    trap = 1'b0; trap_pc = '0; trap_cause = '0;
    cm_redirect = 1'b0; cm_redirect_pc = '0; mode_flush = 1'b0;
    for (int k = 0; k < 2; k++)
      if (cm_valid[k]) begin
        case (cm[k].uop.unit)
          UN_ST: if (!cm[k].ext) begin
            dccm_we = 1'b1; dccm_waddr = cm[k].addr[DAW+1:2]; dccm_wdata = cm_st_word[k];
          end
          UN_CSR: if (cm[k].csr_we) begin
            csr_we = 1'b1; csr_waddr = cm[k].uop.csr; csr_wdata = cm[k].csr_wdata;
            if (cm[k].uop.csr == CSR_UPROT) begin
              mode_flush = 1'b1; cm_redirect = 1'b1; cm_redirect_pc = cm[k].pc + 32'd4;
            end
          end
          UN_MRET: begin cm_redirect = 1'b1; cm_redirect_pc = mepc; end
          UN_ILL: begin
            trap = 1'b1; trap_pc = cm[k].pc; trap_cause = CAUSE_ILLEGAL;
            cm_redirect = 1'b1; cm_redirect_pc = mtvec;
          end
          default: ;
        endcase
      end
    // A detected fault overrides everything else. An older instruction that
    // commit_unit let through in the same cycle still commits: the replay or
    // trap starts at the faulting one, which is younger.
    if (fault) begin
      csr_we = 1'b0; mode_flush = 1'b0;
      cm_redirect = 1'b1;
      if (detect || fault_ecc) begin
        trap = 1'b1; trap_pc = fault_pc; trap_cause = fault_ecc ? CAUSE_ECC : CAUSE_FAULT;
        cm_redirect_pc = mtvec;
      end else begin
        trap = 1'b0; cm_redirect_pc = fault_pc;
      end
    end
    if (dccm_wr_en_i) begin   // backdoor load
      dccm_we = 1'b1; dccm_waddr = dccm_wr_addr_i;
      dccm_wdata = ecc_encode(dccm_wr_data_i) ^ dccm_wr_flip_i;
    end
    flush_all   = cm_redirect;
    flush_front = !flush_all && !freeze && !bx_hold && br_taken_any;
    redirect    = flush_all || flush_front;
    redirect_pc = flush_all ? cm_redirect_pc : br_target;
  end

  // ------------------------------------------------ pipeline registers
  pipe_t iss_e [2];
  always_comb
    for (int s = 0; s < 2; s++) begin
      iss_e[s] = '0;
      if (take > 2'(s)) begin
        iss_e[s].valid  = 1'b1;
        iss_e[s].copy   = cand[s].copy;
        iss_e[s].pc     = cand[s].pc;
        iss_e[s].uop    = cand[s].uop;
        iss_e[s].rs1v   = opnd[s][0];
        iss_e[s].rs2v   = opnd[s][1];
        iss_e[s].eccerr = cand[s].eccerr ||
                          (cand[s].uop.use_rs1 && !f_hit[s][0] && rf_rerr[2*s]) ||
                          (cand[s].uop.use_rs2 && !f_hit[s][1] && rf_rerr[2*s+1]);
      end
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 5; k++) for (int s = 0; s < 2; s++) st[k][s] <= '0;
    end else if (flush_all) begin
      for (int k = 0; k < 5; k++) for (int s = 0; s < 2; s++) st[k][s] <= '0;
    end else if (!freeze && bx_hold) begin
      // E1/E2 and the waiting access hold; an older E3 slot-0 instruction
      // moves on alone, so that it can commit
      for (int s = 0; s < 2; s++) begin
        st[3][s] <= '0;
        st[4][s] <= x[3][s];
      end
      if (l3 && x[2][0].valid) begin
        st[3][0] <= e3o[0];
        st[2][0] <= '0;
      end
    end else if (!freeze) begin
      for (int s = 0; s < 2; s++) begin
        st[0][s] <= flush_front ? '0 : iss_e[s];
        st[1][s] <= flush_front ? '0 : x[0][s];
        st[2][s] <= flush_front ? '0 : e2o[s];
        st[3][s] <= e3o[s];
        st[4][s] <= x[3][s];
      end
    end else begin
      // frozen: only late external-load data is filled in
      for (int s = 0; s < 2; s++) begin
        st[3][s] <= x[3][s];
        st[4][s] <= x[4][s];
      end
    end
  end

  // ---------------------------------------------------------- status
  always_comb begin
    prot_o   = prot;
    detect_o = detect;
    alarm_o  = pc_fatal || csr_fatal;
    ev_o = '0;
    ev_o.issued       = take;
    ev_o.issue_pair   = take == 2'd2 && iss_atomic;
    ev_o.issue_seq    = take != 2'd0 && prot && !iss_atomic;
    ev_o.issue_mixed  = take == 2'd2 && prot && !iss_atomic;
    ev_o.fwd_stall    = !freeze && iss_max != 0 && opnd_stall0;
    ev_o.fwd_hit      = take != 0 && (f_hit[0][0] || f_hit[0][1]);
    ev_o.rb_fwd       = take != 0 && ((f_hit[0][0] && f_idx[0][0] == 4'd10) ||
                                      (f_hit[0][1] && f_idx[0][1] == 4'd10));
    ev_o.rb_write     = rb_write;
    ev_o.commits      = 2'(cm_valid[0]) + 2'(cm_valid[1]);
    ev_o.pair_check   = pair_check && !fault;
    ev_o.fault        = fault;
    ev_o.fault_trap   = fault && (detect || fault_ecc);
    ev_o.fault_replay = fault && !(detect || fault_ecc);
    ev_o.e3_check     = !freeze && !bx_hold && br_pair_chk;
    ev_o.branch_flush = flush_front;
    ev_o.mode_flush   = mode_flush;
    ev_o.bus_txn      = bx_done && !bx_first && !bx_mm;
    ev_o.freeze       = freeze;
    ev_o.ecc_corr     = pc_corr || csr_corr || (take != 0 && (rf_rcorr[0] || rf_rcorr[1]));
  end
endmodule

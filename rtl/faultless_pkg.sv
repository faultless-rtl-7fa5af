// faultless_pkg: types, constants and the (39,32) SECDED code shared by the
// FAULTLESS core and its blocks.
//
// The core executes RV32IM (word loads/stores only) on two arithmetic pipes,
// one multiplier/divider and one load-store unit. When protection is on,
// every instruction is held twice in the instruction buffer: the original
// and a copy whose `copy` flag is set. Original and copy travel through the
// pipeline as separate `pipe_t` entries and are compared before anything is
// committed. ALU, branch, CSR, fence and system instructions run both
// instances side by side on the two pipes (spatial redundancy); multiply,
// divide, load and store run them one after the other (temporal redundancy).
//
// SECDED layout (this design's choice; the document names Hamming codes but
// no layout): a codeword is {ecc[6:0], data[31:0]}. ecc[5:0] are the Hamming
// check bits of an extended Hamming space in which data bit i sits at the
// i-th position >= 3 that is not a power of two; check bit j is the XOR of
// the data bits whose position has bit j set. ecc[6] is the XOR of all 38
// other bits (overall parity), which turns single-error correction into
// single-error correction / double-error detection.
package faultless_pkg;

  localparam int XLEN = 32;
  localparam int ECCW = 7;
  localparam int CW   = XLEN + ECCW;   // 39-bit codeword

  // ---------------------------------------------------------------- CSRs
  // The document names u_protectionmode and u_detectionmode but gives no
  // addresses; they are placed in the custom user read/write range.
  localparam logic [11:0] CSR_UPROT   = 12'h800;
  localparam logic [11:0] CSR_UDETECT = 12'h801;
  localparam logic [11:0] CSR_MTVEC   = 12'h305;
  localparam logic [11:0] CSR_MEPC    = 12'h341;
  localparam logic [11:0] CSR_MCAUSE  = 12'h342;

  // Trap causes. 2 is the RISC-V illegal-instruction cause; the two fault
  // causes are taken from the custom range (24 and up).
  localparam logic [31:0] CAUSE_ILLEGAL   = 32'd2;
  localparam logic [31:0] CAUSE_FAULT     = 32'd24;  // pair comparison failed
  localparam logic [31:0] CAUSE_ECC       = 32'd25;  // uncorrectable ECC error on a data path

  // ------------------------------------------------------- decoded ops
  typedef enum logic [3:0] {
    UN_ALU, UN_BR, UN_JAL, UN_JALR, UN_MULDIV, UN_LD, UN_ST,
    UN_CSR, UN_MRET, UN_FENCE, UN_ILL
  } unit_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR,
    ALU_SRL, ALU_SRA, ALU_OR, ALU_AND, ALU_PASSB
  } alu_op_e;

  typedef struct packed {
    unit_e       unit;
    alu_op_e     alu_op;
    logic [2:0]  funct3;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [4:0]  rd;
    logic        use_rs1;
    logic        use_rs2;
    logic        wen;       // writes rd (never set for rd = x0)
    logic [31:0] imm;
    logic        use_imm;   // second ALU operand is imm
    logic        use_pc;    // first ALU operand is pc (AUIPC)
    logic [11:0] csr;
  } uop_t;

  // Functional-unit class used by the issue logic.
  typedef enum logic [1:0] { FU_ALU, FU_MULDIV, FU_LSU } fu_e;

  function automatic fu_e fu_of(unit_e u);
    case (u)
      UN_MULDIV:   return FU_MULDIV;
      UN_LD, UN_ST: return FU_LSU;
      default:     return FU_ALU;
    endcase
  endfunction

  // Spatial redundancy: both instances issued together on the two pipes.
  function automatic logic is_spatial(unit_e u);
    return fu_of(u) == FU_ALU;
  endfunction

  // Instructions that only issue into an empty pipeline, alone.
  function automatic logic is_serial(unit_e u);
    return u inside {UN_CSR, UN_MRET, UN_FENCE, UN_ILL};
  endfunction

  // One slot of the instruction buffer.
  typedef struct packed {
    logic        copy;
    logic        eccerr;    // fetched word failed its ECC check
    logic [31:0] pc;
    uop_t        uop;
  } ibuf_t;

  // One instruction instance in the execute pipeline (E1..E4, WB).
  typedef struct packed {
    logic        valid;
    logic        copy;
    logic [31:0] pc;
    uop_t        uop;
    logic [31:0] rs1v;
    logic [31:0] rs2v;
    logic [31:0] result;
    logic        ready;     // result may be forwarded
    logic        pending;   // first instance of an external load waiting for its data
    logic [31:0] addr;      // load/store address
    logic        ext;       // address lies outside the DCCM
    logic        br_taken;
    logic [31:0] br_target;
    logic [31:0] csr_wdata;
    logic        csr_we;
    logic        flt;       // a check on the way already failed
    logic        eccerr;    // uncorrectable ECC error on a data path
  } pipe_t;

  // Fault injection hook used by testbenches (XOR into live state).
  typedef struct packed {
    logic        pipe_en;
    logic [2:0]  stage;     // 1 = E1 output .. 5 = WB
    logic        slot;
    logic [31:0] mask;
    logic        csr_en;
    logic [2:0]  csr_idx;
    logic [CW-1:0] csr_mask;
  } fi_t;

  // Event pulses for performance and coverage counting.
  typedef struct packed {
    logic [1:0] issued;        // instances issued this cycle
    logic       issue_pair;    // original + copy issued side by side
    logic       issue_seq;     // a temporally redundant instance issued
    logic       issue_mixed;   // two different sequential instances paired
    logic       fwd_stall;     // issue held back by an unready producer
    logic       fwd_hit;       // an operand came from the bypass network
    logic       rb_fwd;        // an operand came from the result buffer
    logic       rb_write;      // result buffer took a first instance
    logic [1:0] commits;       // architectural instructions committed
    logic       pair_check;    // a comparison at commit passed
    logic       fault;         // a fault was detected
    logic       fault_trap;    // ... and raised an exception
    logic       fault_replay;  // ... and triggered flush and re-execution
    logic       e3_check;      // branch pair compared in E3
    logic       branch_flush;
    logic       mode_flush;    // flush after writing u_protectionmode
    logic       bus_txn;       // external bus transaction completed
    logic       freeze;        // pipeline frozen for the bus
    logic       ecc_corr;      // a single-bit error was corrected somewhere
  } ev_t;

  // ------------------------------------------------------------- SECDED
  // Hamming position (3..38) of data bit i; evaluated at elaboration only.
  function automatic int unsigned hpos(int unsigned i);
    int unsigned p, n;
    p = 3; n = 0;
    for (int unsigned k = 3; k < 64; k++) begin
      if ((k & (k - 1)) != 0) begin
        if (n == i) begin p = k; break; end
        n++;
      end
    end
    return p;
  endfunction

  // Check-bit masks: HMASK[j] selects the data bits whose position has bit j set.
  function automatic logic [5:0][31:0] hmask_f();
    logic [5:0][31:0] m;
    int unsigned p;
    m = '0;
    for (int unsigned i = 0; i < 32; i++) begin
      p = hpos(i);
      for (int unsigned j = 0; j < 6; j++) m[j][i] = p[j];
    end
    return m;
  endfunction

  function automatic logic [31:0][5:0] hpos_tab_f();
    logic [31:0][5:0] t;
    for (int unsigned i = 0; i < 32; i++) t[i] = 6'(hpos(i));
    return t;
  endfunction

  localparam logic [5:0][31:0] HMASK    = hmask_f();
  localparam logic [31:0][5:0] HPOS_TAB = hpos_tab_f();

  function automatic logic [5:0] hcheck(logic [31:0] d);
    logic [5:0] c;
    for (int j = 0; j < 6; j++) c[j] = ^(d & HMASK[j]);
    return c;
  endfunction

  function automatic logic [CW-1:0] ecc_encode(logic [31:0] d);
    logic [5:0] c;
    c = hcheck(d);
    return {^{c, d}, c, d};
  endfunction

endpackage

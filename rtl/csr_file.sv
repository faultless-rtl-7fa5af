// csr_file: the FAULTLESS control registers and the few machine CSRs the
// trap path needs.
//   u_protectionmode (0x800) bit 0: 1 = duplicate and compare instructions
//   u_detectionmode  (0x801) bit 0: 1 = a detected fault raises an exception,
//                                   0 = flush and re-execute from the oldest
//                                       instruction in flight
//   mtvec 0x305, mepc 0x341, mcause 0x342
// Each register is stored as a SECDED codeword and decoded all the time
// (continuous self-check), so the control outputs `prot_o` and `detect_o`
// always show the corrected value. A corrected error is written back in the
// next cycle; an uncorrectable one raises `fatal_o`.
// Two combinational read ports serve the two pipes (both instances of a CSR
// instruction read in parallel). One write port is used at commit; the trap
// port writes mepc/mcause and has priority over the write port.
// The two mode CSRs, their meaning and the continuous check follow the
// document; addresses, reset values and the trap CSRs are this design's
// choice. `flip_*` XORs a mask into one stored word (fault injection).
module csr_file
  import faultless_pkg::*;
#(
  parameter logic [31:0] RESET_MTVEC = 32'h0000_0100
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [11:0]   raddr_i [2],
  output logic [31:0]   rdata_o [2],
  output logic          rvalid_o [2],    // address is implemented
  input  logic          we_i,
  input  logic [11:0]   waddr_i,
  input  logic [31:0]   wdata_i,
  input  logic          trap_i,
  input  logic [31:0]   trap_pc_i,
  input  logic [31:0]   trap_cause_i,
  input  logic          flip_en_i,
  input  logic [2:0]    flip_idx_i,
  input  logic [CW-1:0] flip_mask_i,
  output logic          prot_o,
  output logic          detect_o,
  output logic [31:0]   mtvec_o,
  output logic [31:0]   mepc_o,
  output logic          corrected_o,
  output logic          fatal_o
);
  localparam int N = 5;
  localparam int I_PROT = 0, I_DET = 1, I_TVEC = 2, I_EPC = 3, I_CAUSE = 4;

  logic [CW-1:0] q [N];
  logic [31:0]   val [N];
  logic [31:0]   raw [N];
  logic          s [N], d [N];

  for (genvar i = 0; i < N; i++) begin : g_chk
    secded_dec u_dec (.code_i(q[i]), .data_o(val[i]), .raw_o(raw[i]),
                      .single_o(s[i]), .double_o(d[i]));
  end

  function automatic int idx_of(logic [11:0] a);
    case (a)
      CSR_UPROT:   return I_PROT;
      CSR_UDETECT: return I_DET;
      CSR_MTVEC:   return I_TVEC;
      CSR_MEPC:    return I_EPC;
      CSR_MCAUSE:  return I_CAUSE;
      default:     return -1;
    endcase
  endfunction

  function automatic logic [31:0] legalize(int i, logic [31:0] v);
    case (i)
      I_PROT, I_DET: return {31'b0, v[0]};
      I_TVEC, I_EPC: return {v[31:2], 2'b00};
      default:       return v;
    endcase
  endfunction

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      int k;
      k = idx_of(raddr_i[p]);
      rvalid_o[p] = (k >= 0);
      rdata_o[p]  = (k >= 0) ? val[k] : '0;
    end
    prot_o   = val[I_PROT][0];
    detect_o = val[I_DET][0];
    mtvec_o  = val[I_TVEC];
    mepc_o   = val[I_EPC];
    corrected_o = 1'b0;
    fatal_o     = 1'b0;
    for (int i = 0; i < N; i++) begin
      corrected_o |= s[i];
      fatal_o     |= d[i];
    end
  end

  logic [CW-1:0] q_n [N];

  always_comb
    for (int i = 0; i < N; i++) begin
      q_n[i] = s[i] ? ecc_encode(val[i]) : q[i];            // scrub
      if (trap_i && i == I_EPC)        q_n[i] = ecc_encode(legalize(i, trap_pc_i));
      else if (trap_i && i == I_CAUSE) q_n[i] = ecc_encode(trap_cause_i);
      else if (we_i && idx_of(waddr_i) == i) q_n[i] = ecc_encode(legalize(i, wdata_i));
      if (flip_en_i && int'(flip_idx_i) == i) q_n[i] = q_n[i] ^ flip_mask_i;
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q[I_PROT]  <= ecc_encode('0);
      q[I_DET]   <= ecc_encode('0);
      q[I_TVEC]  <= ecc_encode(RESET_MTVEC);
      q[I_EPC]   <= ecc_encode('0);
      q[I_CAUSE] <= ecc_encode('0);
    end else begin
      for (int i = 0; i < N; i++) q[i] <= q_n[i];
    end
  end
endmodule

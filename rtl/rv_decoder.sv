// rv_decoder: combinational RV32IM decoder producing the micro-op that the
// instruction buffer stores. Supported: LUI, AUIPC, JAL, JALR, the six
// branches, LW, SW, all OP-IMM and OP instructions, the eight M-extension
// instructions, CSRRW/S/C and their immediate forms, MRET and FENCE. Byte
// and half-word loads/stores, ECALL and EBREAK decode as illegal.
// The unit field selects the redundancy strategy later: ALU, branch, jump,
// CSR, MRET and FENCE instances are issued side by side, multiply/divide,
// load and store one after the other (as the document prescribes for the
// VeeR EH1 prototype). The subset is this design's choice.
module rv_decoder
  import faultless_pkg::*;
(
  input  logic [31:0] instr_i,
  output uop_t        uop_o
);
  logic [6:0] opc;
  logic [2:0] f3;
  logic [6:0] f7;
  logic [31:0] imm_i, imm_s, imm_b, imm_u, imm_j;

  always_comb begin
    opc = instr_i[6:0];
    f3  = instr_i[14:12];
    f7  = instr_i[31:25];
    imm_i = {{20{instr_i[31]}}, instr_i[31:20]};
    imm_s = {{20{instr_i[31]}}, instr_i[31:25], instr_i[11:7]};
    imm_b = {{19{instr_i[31]}}, instr_i[31], instr_i[7], instr_i[30:25], instr_i[11:8], 1'b0};
    imm_u = {instr_i[31:12], 12'b0};
    imm_j = {{11{instr_i[31]}}, instr_i[31], instr_i[19:12], instr_i[20], instr_i[30:21], 1'b0};

    uop_o = '0;
    uop_o.unit   = UN_ILL;
    uop_o.alu_op = ALU_ADD;
    uop_o.funct3 = f3;
    uop_o.rs1    = instr_i[19:15];
    uop_o.rs2    = instr_i[24:20];
    uop_o.rd     = instr_i[11:7];
    uop_o.csr    = instr_i[31:20];

    case (opc)
      7'b0110111: begin // LUI
        uop_o.unit = UN_ALU; uop_o.alu_op = ALU_PASSB; uop_o.imm = imm_u;
        uop_o.use_imm = 1'b1; uop_o.wen = 1'b1;
      end
      7'b0010111: begin // AUIPC
        uop_o.unit = UN_ALU; uop_o.imm = imm_u; uop_o.use_imm = 1'b1;
        uop_o.use_pc = 1'b1; uop_o.wen = 1'b1;
      end
      7'b1101111: begin // JAL
        uop_o.unit = UN_JAL; uop_o.imm = imm_j; uop_o.wen = 1'b1;
      end
      7'b1100111: if (f3 == 3'b000) begin // JALR
        uop_o.unit = UN_JALR; uop_o.imm = imm_i; uop_o.use_rs1 = 1'b1; uop_o.wen = 1'b1;
      end
      7'b1100011: if (f3 != 3'b010 && f3 != 3'b011) begin // branches
        uop_o.unit = UN_BR; uop_o.imm = imm_b; uop_o.use_rs1 = 1'b1; uop_o.use_rs2 = 1'b1;
      end
      7'b0000011: if (f3 == 3'b010) begin // LW
        uop_o.unit = UN_LD; uop_o.imm = imm_i; uop_o.use_rs1 = 1'b1; uop_o.wen = 1'b1;
      end
      7'b0100011: if (f3 == 3'b010) begin // SW
        uop_o.unit = UN_ST; uop_o.imm = imm_s; uop_o.use_rs1 = 1'b1; uop_o.use_rs2 = 1'b1;
      end
      7'b0010011: begin // OP-IMM
        uop_o.unit = UN_ALU; uop_o.imm = imm_i; uop_o.use_imm = 1'b1;
        uop_o.use_rs1 = 1'b1; uop_o.wen = 1'b1;
        case (f3)
          3'b000: uop_o.alu_op = ALU_ADD;
          3'b010: uop_o.alu_op = ALU_SLT;
          3'b011: uop_o.alu_op = ALU_SLTU;
          3'b100: uop_o.alu_op = ALU_XOR;
          3'b110: uop_o.alu_op = ALU_OR;
          3'b111: uop_o.alu_op = ALU_AND;
          3'b001: if (f7 == 7'b0) uop_o.alu_op = ALU_SLL; else uop_o.unit = UN_ILL;
          3'b101: if (f7 == 7'b0) uop_o.alu_op = ALU_SRL;
                  else if (f7 == 7'b0100000) uop_o.alu_op = ALU_SRA;
                  else uop_o.unit = UN_ILL;
          default: ;
        endcase
      end
      7'b0110011: begin // OP / M
        uop_o.use_rs1 = 1'b1; uop_o.use_rs2 = 1'b1; uop_o.wen = 1'b1;
        if (f7 == 7'b0000001) uop_o.unit = UN_MULDIV;
        else begin
          uop_o.unit = UN_ALU;
          case ({f7, f3})
            {7'b0000000, 3'b000}: uop_o.alu_op = ALU_ADD;
            {7'b0100000, 3'b000}: uop_o.alu_op = ALU_SUB;
            {7'b0000000, 3'b001}: uop_o.alu_op = ALU_SLL;
            {7'b0000000, 3'b010}: uop_o.alu_op = ALU_SLT;
            {7'b0000000, 3'b011}: uop_o.alu_op = ALU_SLTU;
            {7'b0000000, 3'b100}: uop_o.alu_op = ALU_XOR;
            {7'b0000000, 3'b101}: uop_o.alu_op = ALU_SRL;
            {7'b0100000, 3'b101}: uop_o.alu_op = ALU_SRA;
            {7'b0000000, 3'b110}: uop_o.alu_op = ALU_OR;
            {7'b0000000, 3'b111}: uop_o.alu_op = ALU_AND;
            default: uop_o.unit = UN_ILL;
          endcase
        end
      end
      7'b1110011: begin // SYSTEM
        if (f3 == 3'b000) begin
          if (instr_i == 32'h3020_0073) uop_o.unit = UN_MRET;
        end else if (f3 != 3'b100) begin
          uop_o.unit = UN_CSR; uop_o.wen = 1'b1;
          uop_o.use_rs1 = !f3[2];
          uop_o.use_imm = f3[2];
          uop_o.imm = {27'b0, instr_i[19:15]};
        end
      end
      7'b0001111: uop_o.unit = UN_FENCE;
      default: ;
    endcase
    if (uop_o.rd == 5'd0) uop_o.wen = 1'b0;
    if (uop_o.unit == UN_ILL) begin
      uop_o.wen = 1'b0; uop_o.use_rs1 = 1'b0; uop_o.use_rs2 = 1'b0;
    end
  end
endmodule

// tb_rv_decoder: decodes instructions built by the test assembler and
// checks unit, operation, registers, immediate and write enable.
module tb_rv_decoder;
  import faultless_pkg::*;
  import rv_asm_pkg::*;
  logic [31:0] ins; uop_t u;
  int checks = 0, failures = 0;
  rv_decoder dut (.instr_i(ins), .uop_o(u));
  task automatic chk(string w, logic ok); checks++; if (!ok) begin failures++; $display("FAIL %s", w); end endtask
  initial begin
    for (int n = 0; n < 200; n++) begin
      logic [4:0] rd, r1, r2; int imm;
      rd = 5'($urandom_range(1, 31)); r1 = 5'($urandom); r2 = 5'($urandom);
      imm = $urandom_range(0, 4095) - 2048;
      ins = ADDI(rd, r1, imm); #1;
      chk("addi", u.unit == UN_ALU && u.alu_op == ALU_ADD && u.rd == rd && u.rs1 == r1 &&
                  u.imm == 32'(imm) && u.use_imm && u.wen && u.use_rs1 && !u.use_rs2);
      ins = SUB(rd, r1, r2); #1;
      chk("sub", u.unit == UN_ALU && u.alu_op == ALU_SUB && u.rs2 == r2 && u.use_rs2 && !u.use_imm);
      ins = MUL(rd, r1, r2); #1;
      chk("mul", u.unit == UN_MULDIV && u.funct3 == 3'd0 && u.wen);
      ins = DIVU(rd, r1, r2); #1;
      chk("divu", u.unit == UN_MULDIV && u.funct3 == 3'd5);
      ins = LW(rd, r1, imm); #1;
      chk("lw", u.unit == UN_LD && u.imm == 32'(imm) && u.wen);
      ins = SW(r2, r1, imm); #1;
      chk("sw", u.unit == UN_ST && u.imm == 32'(imm) && !u.wen && u.use_rs2 && u.rs2 == r2);
      ins = BNE(r1, r2, (imm & ~1)); #1;
      chk("bne", u.unit == UN_BR && u.funct3 == 3'd1 && u.imm == 32'(imm & ~1) && !u.wen);
      ins = JAL(rd, (imm & ~1) * 64); #1;
      chk("jal", u.unit == UN_JAL && u.imm == 32'((imm & ~1) * 64) && u.wen);
      ins = LUI(rd, 20'(imm)); #1;
      chk("lui", u.unit == UN_ALU && u.alu_op == ALU_PASSB && u.imm == {20'(imm), 12'b0});
      ins = ADDI(0, r1, imm); #1;
      chk("rd=x0 never writes", !u.wen);
    end
    ins = CSRRWI(5'd3, 12'h800, 5'd1); #1;
    chk("csrrwi", u.unit == UN_CSR && u.csr == 12'h800 && u.use_imm && u.imm == 1 && u.wen);
    ins = CSRRS(5'd3, 12'h342, 5'd0); #1;
    chk("csrrs", u.unit == UN_CSR && u.csr == 12'h342 && u.use_rs1 && !u.use_imm);
    ins = MRET(); #1;           chk("mret", u.unit == UN_MRET);
    ins = 32'h0000_000f; #1;    chk("fence", u.unit == UN_FENCE);
    ins = 32'h0000_0073; #1;    chk("ecall illegal", u.unit == UN_ILL && !u.wen);
    ins = 32'h0000_1083; #1;    chk("lh illegal", u.unit == UN_ILL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

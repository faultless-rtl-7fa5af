// rv_asm_pkg: tiny RV32IM instruction encoders for the testbenches, so that
// test programs are written as readable calls rather than hex words.
package rv_asm_pkg;
  function automatic logic [31:0] r_t(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                      logic [2:0] f3, logic [4:0] rd, logic [6:0] op);
    return {f7, rs2, rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] i_t(int imm, logic [4:0] rs1, logic [2:0] f3,
                                      logic [4:0] rd, logic [6:0] op);
    logic [31:0] v; v = imm;
    return {v[11:0], rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] ADD (logic [4:0] rd, logic [4:0] a, logic [4:0] b); return r_t(7'h00, b, a, 3'd0, rd, 7'h33); endfunction
  function automatic logic [31:0] SUB (logic [4:0] rd, logic [4:0] a, logic [4:0] b); return r_t(7'h20, b, a, 3'd0, rd, 7'h33); endfunction
  function automatic logic [31:0] XOR_(logic [4:0] rd, logic [4:0] a, logic [4:0] b); return r_t(7'h00, b, a, 3'd4, rd, 7'h33); endfunction
  function automatic logic [31:0] MUL (logic [4:0] rd, logic [4:0] a, logic [4:0] b); return r_t(7'h01, b, a, 3'd0, rd, 7'h33); endfunction
  function automatic logic [31:0] DIVU(logic [4:0] rd, logic [4:0] a, logic [4:0] b); return r_t(7'h01, b, a, 3'd5, rd, 7'h33); endfunction
  function automatic logic [31:0] ADDI(logic [4:0] rd, logic [4:0] a, int imm); return i_t(imm, a, 3'd0, rd, 7'h13); endfunction
  function automatic logic [31:0] SLLI(logic [4:0] rd, logic [4:0] a, int sh); return i_t(sh, a, 3'd1, rd, 7'h13); endfunction
  function automatic logic [31:0] LW  (logic [4:0] rd, logic [4:0] a, int imm); return i_t(imm, a, 3'd2, rd, 7'h03); endfunction
  function automatic logic [31:0] SW  (logic [4:0] src, logic [4:0] a, int imm);
    logic [31:0] v; v = imm;
    return {v[11:5], src, a, 3'd2, v[4:0], 7'h23};
  endfunction
  function automatic logic [31:0] LUI (logic [4:0] rd, logic [19:0] imm); return {imm, rd, 7'h37}; endfunction
  function automatic logic [31:0] BR  (logic [2:0] f3, logic [4:0] a, logic [4:0] b, int off);
    logic [31:0] v; v = off;
    return {v[12], v[10:5], b, a, f3, v[4:1], v[11], 7'h63};
  endfunction
  function automatic logic [31:0] BEQ (logic [4:0] a, logic [4:0] b, int off); return BR(3'd0, a, b, off); endfunction
  function automatic logic [31:0] BNE (logic [4:0] a, logic [4:0] b, int off); return BR(3'd1, a, b, off); endfunction
  function automatic logic [31:0] JAL (logic [4:0] rd, int off);
    logic [31:0] v; v = off;
    return {v[20], v[10:1], v[11], v[19:12], rd, 7'h6f};
  endfunction
  function automatic logic [31:0] CSRRWI(logic [4:0] rd, logic [11:0] csr, logic [4:0] zimm); return {csr, zimm, 3'd5, rd, 7'h73}; endfunction
  function automatic logic [31:0] CSRRS (logic [4:0] rd, logic [11:0] csr, logic [4:0] rs1);  return {csr, rs1, 3'd2, rd, 7'h73}; endfunction
  function automatic logic [31:0] CSRRW (logic [4:0] rd, logic [11:0] csr, logic [4:0] rs1);  return {csr, rs1, 3'd1, rd, 7'h73}; endfunction
  function automatic logic [31:0] MRET(); return 32'h3020_0073; endfunction
endpackage

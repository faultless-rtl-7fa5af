// tb_alu: every ALU operation and branch condition against a reference.
module tb_alu;
  import faultless_pkg::*;
  alu_op_e op; logic [31:0] a, b, r; logic [2:0] f3; logic tk;
  int checks = 0, failures = 0;
  alu dut (.op_i(op), .a_i(a), .b_i(b), .br_funct3_i(f3), .result_o(r), .br_taken_o(tk));
  function automatic logic [31:0] ref_r(alu_op_e o, logic [31:0] x, logic [31:0] y);
    longint sx, sy; sx = longint'($signed(x)); sy = longint'($signed(y));
    case (o)
      ALU_ADD: return 32'(x + y);      ALU_SUB: return 32'(x - y);
      ALU_SLL: return x << y[4:0];     ALU_SLT: return (sx < sy) ? 1 : 0;
      ALU_SLTU: return ({1'b0,x} < {1'b0,y}) ? 1 : 0;  ALU_XOR: return x ^ y;
      ALU_SRL: return x >> y[4:0];
      ALU_SRA: return 32'(sx >> y[4:0]);
      ALU_OR: return x | y; ALU_AND: return x & y; default: return y;
    endcase
  endfunction
  function automatic logic ref_t(logic [2:0] f, logic [31:0] x, logic [31:0] y);
    longint sx, sy; sx = longint'($signed(x)); sy = longint'($signed(y));
    case (f) 0: return x == y; 1: return x != y; 4: return sx < sy; 5: return sx >= sy;
             6: return {1'b0,x} < {1'b0,y}; 7: return {1'b0,x} >= {1'b0,y}; default: return 0; endcase
  endfunction
  initial begin
    for (int n = 0; n < 4000; n++) begin
      op = alu_op_e'($urandom_range(0, 10));
      a = ($urandom_range(0,3) == 0) ? 32'h8000_0000 : $urandom;
      b = ($urandom_range(0,3) == 0) ? a : $urandom;
      f3 = 3'($urandom); #1;
      checks += 2;
      if (r != ref_r(op, a, b)) begin failures++; $display("FAIL %s %h %h -> %h", op.name(), a, b, r); end
      if (tk != ref_t(f3, a, b)) begin failures++; $display("FAIL br %0d %h %h", f3, a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

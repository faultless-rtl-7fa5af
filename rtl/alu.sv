// alu: RV32I integer ALU and branch comparator of one arithmetic pipe.
// Both pipes carry one; in protected mode they compute the original and the
// copy of the same instruction in the same cycle. Combinational.
module alu
  import faultless_pkg::*;
(
  input  alu_op_e     op_i,
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  input  logic [2:0]  br_funct3_i,   // branch condition (BEQ..BGEU encoding)
  output logic [31:0] result_o,
  output logic        br_taken_o
);
  always_comb begin
    case (op_i)
      ALU_ADD:   result_o = a_i + b_i;
      ALU_SUB:   result_o = a_i - b_i;
      ALU_SLL:   result_o = a_i << b_i[4:0];
      ALU_SLT:   result_o = {31'b0, $signed(a_i) < $signed(b_i)};
      ALU_SLTU:  result_o = {31'b0, a_i < b_i};
      ALU_XOR:   result_o = a_i ^ b_i;
      ALU_SRL:   result_o = a_i >> b_i[4:0];
      ALU_SRA:   result_o = $unsigned($signed(a_i) >>> b_i[4:0]);
      ALU_OR:    result_o = a_i | b_i;
      ALU_AND:   result_o = a_i & b_i;
      ALU_PASSB: result_o = b_i;
      default:   result_o = '0;
    endcase
    case (br_funct3_i)
      3'b000:  br_taken_o = (a_i == b_i);
      3'b001:  br_taken_o = (a_i != b_i);
      3'b100:  br_taken_o = $signed(a_i) <  $signed(b_i);
      3'b101:  br_taken_o = $signed(a_i) >= $signed(b_i);
      3'b110:  br_taken_o = a_i <  b_i;
      3'b111:  br_taken_o = a_i >= b_i;
      default: br_taken_o = 1'b0;
    endcase
  end
endmodule

// muldiv_unit: the single multiply/divide unit (RV32M: MUL, MULH, MULHSU,
// MULHU, DIV, DIVU, REM, REMU, with the RISC-V results for division by
// zero and signed overflow). It exists once, so in protected mode the
// original and the copy of an M instruction pass through it one after the
// other. The computation is combinational; the pipeline treats the result
// as available from E3 on, modelling a three-cycle unit (this design's
// choice; the document gives no latency).
module muldiv_unit (
  input  logic [2:0]  funct3_i,
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  output logic [31:0] result_o
);
  logic signed [63:0] pss, psu;
  logic        [63:0] puu;
  logic        [31:0] q_s, r_s;

  always_comb begin
    pss = $signed({{32{a_i[31]}}, a_i}) * $signed({{32{b_i[31]}}, b_i});
    psu = $signed({{32{a_i[31]}}, a_i}) * $signed({32'b0, b_i});
    puu = {32'b0, a_i} * {32'b0, b_i};
    if (b_i == '0) begin
      q_s = '1; r_s = a_i;
    end else if (a_i == 32'h8000_0000 && b_i == '1) begin
      q_s = a_i; r_s = '0;
    end else begin
      q_s = $unsigned($signed(a_i) / $signed(b_i));
      r_s = $unsigned($signed(a_i) % $signed(b_i));
    end
    case (funct3_i)
      3'b000: result_o = puu[31:0];
      3'b001: result_o = pss[63:32];
      3'b010: result_o = psu[63:32];
      3'b011: result_o = puu[63:32];
      3'b100: result_o = q_s;
      3'b101: result_o = (b_i == '0) ? '1 : a_i / b_i;
      3'b110: result_o = r_s;
      default: result_o = (b_i == '0) ? a_i : a_i % b_i;
    endcase
  end
endmodule

// tb_muldiv_unit: all eight RV32M operations on random and corner operands
// (zero divisor, most negative / -1) against 64-bit reference arithmetic.
module tb_muldiv_unit;
  logic [2:0] f3; logic [31:0] a, b, r;
  int checks = 0, failures = 0;
  muldiv_unit dut (.funct3_i(f3), .a_i(a), .b_i(b), .result_o(r));
  function automatic logic [31:0] ref_md(logic [2:0] f, logic [31:0] x, logic [31:0] y);
    longint sx, sy, ux, uy;
    sx = longint'($signed(x)); sy = longint'($signed(y)); ux = longint'(x); uy = longint'(y);
    case (f)
      0: return 32'(ux * uy);
      1: return 32'((sx * sy) >>> 32);
      2: return 32'((sx * uy) >>> 32);
      3: return 32'((ux * uy) >> 32);
      4: return (y == 0) ? 32'hffff_ffff : 32'(sx / sy);
      5: return (y == 0) ? 32'hffff_ffff : 32'(ux / uy);
      6: return (y == 0) ? x : 32'(sx % sy);
      default: return (y == 0) ? x : 32'(ux % uy);
    endcase
  endfunction
  initial begin
    logic [31:0] vals [6] = '{0, 1, 32'hffff_ffff, 32'h8000_0000, 7, 32'h7fff_ffff};
    for (int n = 0; n < 4000; n++) begin
      f3 = 3'(n % 8);
      a = (n < 288) ? vals[(n / 8) % 6] : $urandom;
      b = (n < 288) ? vals[(n / 48) % 6] : (($urandom_range(0, 9) == 0) ? 0 : $urandom);
      #1; checks++;
      if (r != ref_md(f3, a, b)) begin failures++; $display("FAIL f3=%0d %h %h -> %h exp %h", f3, a, b, r, ref_md(f3, a, b)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

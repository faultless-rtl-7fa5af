// pair_compare: the restrictive check that two pipeline entries are the
// original and the copy of the same instruction and agree. It passes only
// if both are valid, exactly `a` is the original and `b` the copy, neither
// carries an earlier fault mark, and every other field (PC, decoded
// control word, operands, result, destination, address, branch outcome,
// CSR write) is identical. Comparing the whole entry also catches faults in
// control-signal pipeline registers. Combinational.
// The pass conditions follow the document ("valid, results and destination
// match, and one instruction is marked as a copy"); comparing every field
// is this design's stricter reading.
module pair_compare
  import faultless_pkg::*;
(
  input  pipe_t a_i,     // expected original
  input  pipe_t b_i,     // expected copy
  output logic  match_o
);
  pipe_t am, bm;
  always_comb begin
    am = a_i; bm = b_i;
    am.copy = 1'b0; bm.copy = 1'b0;
    match_o = a_i.valid && b_i.valid && !a_i.copy && b_i.copy &&
              !a_i.flt && !b_i.flt && (am == bm);
  end
endmodule

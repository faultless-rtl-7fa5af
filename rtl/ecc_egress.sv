// ecc_egress: hand-over of a duplicated value from the redundant pipeline
// into an ECC-protected domain (register file, memory, bus). The data field
// of the outgoing word is taken from the original, the check bits are
// encoded from the copy, and the two instances are compared in parallel.
// A single fault in either instance therefore either trips the comparator
// or leaves a codeword whose data and check bits disagree.
// Purely combinational. Follows the right half of the document's hand-over
// figure (Original -> data, Copy -> ECC Encode, "=" comparator).
module ecc_egress
  import faultless_pkg::*;
(
  input  logic [31:0]   orig_i,
  input  logic [31:0]   copy_i,
  output logic [CW-1:0] code_o,
  output logic          mismatch_o
);
  logic [CW-1:0] enc;

  secded_enc u_enc (.data_i(copy_i), .code_o(enc));

  always_comb begin
    code_o     = {enc[CW-1:32], orig_i};
    mismatch_o = (orig_i != copy_i);
  end
endmodule

// ecc_ingress: hand-over of a word from an ECC-protected domain into the
// redundant pipeline. The raw data bits are fanned out to an original and a
// copy while the SECDED check runs on the same source wires in the same
// cycle, so that a fault on the line before the receiving registers is
// either seen by the check or differs between the two copies. An ECC error
// is reported, not corrected: the word is flagged and the consumer raises a
// fault. Purely combinational.
// Follows the left half of the document's ECC/redundancy hand-over figure;
// reporting single-bit errors instead of correcting them is this design's
// reading of that figure (its data path bypasses the checker).
module ecc_ingress
  import faultless_pkg::*;
(
  input  logic [CW-1:0] code_i,
  output logic [31:0]   orig_o,
  output logic [31:0]   copy_o,
  output logic          err_o      // any ECC error (single or double)
);
  logic [31:0] unused_corr, raw;
  logic        s, d;

  secded_dec u_chk (.code_i(code_i), .data_o(unused_corr), .raw_o(raw),
                    .single_o(s), .double_o(d));

  always_comb begin
    orig_o = code_i[31:0];
    copy_o = raw;
    err_o  = s | d;
  end
endmodule

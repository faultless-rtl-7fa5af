// secded_enc: combinational (39,32) SECDED encoder.
// Output = {ecc[6:0], data[31:0]}; ecc[5:0] are Hamming check bits and
// ecc[6] the overall parity (layout in faultless_pkg). The document asks
// for ECC on registers, CSRs, the PC and the TCMs and names Hamming codes;
// the exact code is this design's choice. No clock, no latency.
module secded_enc
  import faultless_pkg::*;
(
  input  logic [31:0]   data_i,
  output logic [CW-1:0] code_o
);
  always_comb code_o = ecc_encode(data_i);
endmodule

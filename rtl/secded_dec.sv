// secded_dec: combinational (39,32) SECDED checker and corrector.
// The syndrome is the XOR of the stored and recomputed check bits; the
// overall parity bit tells single from double errors:
//   parity odd, any syndrome  -> single error, corrected (syndrome names the
//                                Hamming position, 0 means the parity bit)
//   parity even, syndrome != 0 -> double error, detected only
// `data_o` is the corrected data, `raw_o` the data bits as stored. Pure
// combinational logic, no latency. The code layout is this design's choice.
module secded_dec
  import faultless_pkg::*;
(
  input  logic [CW-1:0] code_i,
  output logic [31:0]   data_o,
  output logic [31:0]   raw_o,
  output logic          single_o,   // one bit was wrong and is corrected
  output logic          double_o    // uncorrectable error
);
  logic [5:0] syn;
  logic       par;

  always_comb begin
    raw_o  = code_i[31:0];
    syn    = hcheck(code_i[31:0]) ^ code_i[37:32];
    par    = ^code_i;
    data_o = code_i[31:0];
    single_o = par;
    double_o = !par && (syn != '0);
    if (par)
      for (int unsigned i = 0; i < 32; i++)
        if (HPOS_TAB[i] == syn) data_o[i] = !code_i[i];
  end
endmodule

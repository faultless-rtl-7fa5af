// pc_ecc: program counter held as a SECDED codeword. The next PC is encoded
// when it is written; the stored word is decoded continuously, so the
// corrected PC is what fetch uses and a single flipped bit never reaches
// the fetch address. A corrected error is rewritten on the next cycle in
// which the PC holds (scrubbing); an uncorrectable one raises `fatal_o`.
// The document asks for the PC to be protected "through ECC or duplication
// and comparison"; the ECC variant and the scrubbing are this design's
// choice. `flip_i` XORs a mask into the stored word (fault injection).
module pc_ecc
  import faultless_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we_i,
  input  logic [31:0]   pc_i,
  input  logic [CW-1:0] flip_i,
  output logic [31:0]   pc_o,
  output logic          corrected_o,
  output logic          fatal_o
);
  logic [CW-1:0] q;
  logic [31:0]   raw;

  secded_dec u_dec (.code_i(q), .data_o(pc_o), .raw_o(raw),
                    .single_o(corrected_o), .double_o(fatal_o));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           q <= ecc_encode(RESET_PC);
    else if (we_i)        q <= ecc_encode(pc_i) ^ flip_i;
    else if (corrected_o) q <= ecc_encode(pc_o) ^ flip_i;
    else                  q <= q ^ flip_i;
  end
endmodule

// tcm_ecc: tightly coupled memory (used as ICCM and DCCM) holding 39-bit
// SECDED codewords. Reads are combinational ("resolved instantly", as the
// document says of TCM accesses) on NRD read ports; one synchronous write
// port stores a codeword built by the writer, so the check bits come from
// the redundant pipeline's egress logic, not from the memory. Words are
// addressed by word index (byte address >> 2, wrapped to DEPTH).
// The document does not give the TCM sizes; DEPTH is this design's choice.
// Contents start as the encoding of zero (initial values, as an FPGA block
// RAM would load them) so that every location holds a valid codeword; the
// array has no reset input.
module tcm_ecc
  import faultless_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned NRD   = 2,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                we_i,
  input  logic [AW-1:0]       waddr_i,
  input  logic [CW-1:0]       wdata_i,
  input  logic [AW-1:0]       raddr_i [NRD],
  output logic [CW-1:0]       rdata_o [NRD]
);
  logic [CW-1:0] mem [DEPTH];

  localparam logic [CW-1:0] ZERO_WORD = ecc_encode('0);

  initial
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = ZERO_WORD;

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
  end

  always_comb
    for (int unsigned p = 0; p < NRD; p++) rdata_o[p] = mem[raddr_i[p]];
endmodule

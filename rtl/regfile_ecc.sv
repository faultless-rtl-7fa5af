// regfile_ecc: RV32 integer register file (x0..x31, x0 reads as zero) whose
// entries are SECDED codewords. Write ports take complete codewords, built
// at the commit point from the original (data) and the copy (check bits),
// so the register file never computes its own ECC from a single instance.
// Every read port decodes its word: single-bit errors are corrected on the
// way out and flagged, double errors are flagged for the consumer to raise
// a fault. Reads are combinational; writes take effect at the clock edge,
// port 1 wins if both ports write the same register.
// ECC on all register read and write ports follows the document; the number
// of ports (four reads for two issue slots, two writes) follows from the
// dual-issue pipeline. Reset clears all registers to the encoding of zero.
module regfile_ecc
  import faultless_pkg::*;
#(
  parameter int unsigned NRD = 4,
  parameter int unsigned NWR = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we_i    [NWR],
  input  logic [4:0]    waddr_i [NWR],
  input  logic [CW-1:0] wdata_i [NWR],
  input  logic [4:0]    raddr_i [NRD],
  output logic [31:0]   rdata_o [NRD],
  output logic          rcorr_o [NRD],
  output logic          rerr_o  [NRD]
);
  logic [CW-1:0] rf [32];
  logic [CW-1:0] rword [NRD];
  logic [31:0]   rraw  [NRD];
  logic [31:0]   rcorr_data [NRD];
  logic          rs [NRD], rd [NRD];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) rf[i] <= ecc_encode('0);
    end else begin
      for (int unsigned w = 0; w < NWR; w++)
        if (we_i[w] && waddr_i[w] != 5'd0) rf[waddr_i[w]] <= wdata_i[w];
    end
  end

  for (genvar p = 0; p < NRD; p++) begin : g_rd
    assign rword[p] = rf[raddr_i[p]];
    secded_dec u_dec (.code_i(rword[p]), .data_o(rcorr_data[p]), .raw_o(rraw[p]),
                      .single_o(rs[p]), .double_o(rd[p]));
    always_comb begin
      if (raddr_i[p] == 5'd0) begin
        rdata_o[p] = '0; rcorr_o[p] = 1'b0; rerr_o[p] = 1'b0;
      end else begin
        rdata_o[p] = rcorr_data[p]; rcorr_o[p] = rs[p]; rerr_o[p] = rd[p];
      end
    end
  end
endmodule

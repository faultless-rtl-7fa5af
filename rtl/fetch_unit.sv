// fetch_unit: instruction fetch from the ICCM, two consecutive words per
// cycle, with the ECC-to-redundancy hand-over at the decode boundary.
// The PC lives in pc_ecc (ECC-protected). Each fetched word passes an
// ecc_ingress, which checks its ECC while fanning it out to an original and
// a copy; the instruction buffer decodes and stores both. The PC advances
// by the number of instructions the buffer accepted, or takes a redirect
// (branch, trap, replay, mode flush), which has priority. An uncorrectable
// PC error stops fetch (`pc_fatal_o`).
// Fetching two words per cycle without alignment or prediction is a
// simplification of the three-stage fetch/align of the document's base
// core; the ECC hand-over follows the document.
module fetch_unit
  import faultless_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0,
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          redirect_i,
  input  logic [31:0]   redirect_pc_i,
  input  logic [1:0]    accept_i,
  input  logic [CW-1:0] pc_flip_i,
  output logic [AW-1:0] iccm_raddr_o [2],
  input  logic [CW-1:0] iccm_rdata_i [2],
  output logic [1:0]    f_valid_o,
  output logic [31:0]   f_pc_o [2],
  output logic [31:0]   f_orig_o [2],
  output logic [31:0]   f_copy_o [2],
  output logic [1:0]    f_err_o,
  output logic          pc_corr_o,
  output logic          pc_fatal_o
);
  logic [31:0] pc;
  logic        pc_we;
  logic [31:0] pc_n;

  pc_ecc #(.RESET_PC(RESET_PC)) u_pc (
    .clk, .rst_n, .we_i(pc_we), .pc_i(pc_n), .flip_i(pc_flip_i),
    .pc_o(pc), .corrected_o(pc_corr_o), .fatal_o(pc_fatal_o));

  for (genvar k = 0; k < 2; k++) begin : g_in
    ecc_ingress u_in (.code_i(iccm_rdata_i[k]), .orig_o(f_orig_o[k]),
                      .copy_o(f_copy_o[k]), .err_o(f_err_o[k]));
  end

  always_comb begin
    f_pc_o[0] = pc;
    f_pc_o[1] = pc + 32'd4;
    iccm_raddr_o[0] = f_pc_o[0][AW+1:2];
    iccm_raddr_o[1] = f_pc_o[1][AW+1:2];
    f_valid_o = pc_fatal_o ? 2'b00 : 2'b11;
    pc_we = redirect_i || (accept_i != 2'd0);
    pc_n  = redirect_i ? redirect_pc_i : pc + {28'b0, accept_i, 2'b00};
  end
endmodule

// fwd_unit: operand bypass for one source register of one issuing instance.
//
// Producers are offered youngest first (E1 results, then E2 .. WB, then the
// commit-stage result buffer). A producer may only feed this consumer if
// its `copy` flag equals the consumer's: originals forward to originals and
// copies to copies, so the two instances of every instruction have separate
// data paths, no instance feeds both instances of a later instruction, and
// an instruction never feeds its own copy (for rd == rs). The youngest
// matching writer of the register wins; if it has no result yet (load in
// flight, multiply before E3, external load waiting) `stall_o` is raised.
// Without a hit the register-file value is used. Combinational.
// The flag-separated forwarding follows the document; the priority scheme
// is the usual one for an in-order pipeline.
module fwd_unit
  import faultless_pkg::*;
#(
  parameter int unsigned NP = 9
) (
  input  logic [4:0]  rs_i,
  input  logic        use_i,
  input  logic        copy_i,
  input  pipe_t       prod_i [NP],    // index 0 is the youngest
  input  logic [31:0] rf_data_i,
  output logic [31:0] data_o,
  output logic        hit_o,
  output logic [$clog2(NP)-1:0] hit_idx_o,
  output logic        stall_o
);
  always_comb begin
    data_o    = rf_data_i;
    hit_o     = 1'b0;
    hit_idx_o = '0;
    stall_o   = 1'b0;
    if (use_i && rs_i != 5'd0) begin
      for (int unsigned p = 0; p < NP; p++) begin
        if (!hit_o && prod_i[p].valid && prod_i[p].uop.wen &&
            prod_i[p].uop.rd == rs_i && prod_i[p].copy == copy_i) begin
          hit_o     = 1'b1;
          hit_idx_o = $clog2(NP)'(p);
          data_o    = prod_i[p].result;
          stall_o   = !prod_i[p].ready || prod_i[p].pending;
        end
      end
    end
  end
endmodule

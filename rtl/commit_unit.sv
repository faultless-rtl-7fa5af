// commit_unit: the commit point of the pipeline (WB stage), where every
// instruction is checked before it changes architectural state.
//
// Protected mode:
//  * spatially redundant pairs arrive together, original in slot 0 and copy
//    in slot 1, and are compared directly (pair_compare);
//  * temporally redundant pairs arrive one after the other: the first
//    instance (the original) is parked in the one-entry result buffer and
//    compared with the second when it arrives; only then is the instruction
//    committed. Slots are processed oldest first, so in one cycle slot 0 may
//    commit against the buffer while slot 1 refills it. The buffer is also
//    offered to the bypass network (`rb_o`) so that originals downstream do
//    not have to wait for the second instance.
// Unprotected mode: each valid entry commits unless it carries a fault mark.
//
// In parallel with each comparison the commit word is built by the ECC
// egress logic: data from the original, check bits from the copy (for the
// destination register and, for stores, the store data). Any failed check
// raises `fault_o` with the PC of the faulting instruction, which is also
// the oldest instruction still in flight; younger entries of the same cycle
// are not committed. `fault_ecc_o` marks faults caused by an uncorrectable
// ECC error rather than by a comparison. When an external load's data
// arrives while its first instance is parked, `patch_*` fills it in.
// `en_i` low (pipeline frozen) holds everything; `flush_i` empties the
// buffer. Outputs are combinational from the WB registers and the buffer.
// The comparison points, the result buffer with forwarding and the ECC
// generation follow the document; the slot conventions are this design's.
module commit_unit
  import faultless_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en_i,
  input  logic          flush_i,
  input  logic          prot_i,
  input  pipe_t         w_i [2],
  input  logic          patch_valid_i,
  input  logic [31:0]   patch_data_i,
  output logic [1:0]    cm_valid_o,
  output pipe_t         cm_o [2],
  output logic [CW-1:0] cm_rd_word_o [2],
  output logic [CW-1:0] cm_st_word_o [2],
  output logic          fault_o,
  output logic          fault_ecc_o,
  output logic [31:0]   fault_pc_o,
  output pipe_t         rb_o,
  output logic          rb_write_o,
  output logic          pair_check_o
);
  pipe_t rb, rb_p, rb_n;
  pipe_t orig [2], cpy [2];
  logic  match_sp, match_t [2];
  logic  mm_unused [4];
  pipe_t cand_a [2];

  // result-buffer view with late external-load data filled in
  always_comb begin
    rb_p = rb;
    if (patch_valid_i && rb.valid && rb.pending) begin
      rb_p.result  = patch_data_i;
      rb_p.pending = 1'b0;
      rb_p.ready   = 1'b1;
    end
  end
  assign rb_o = rb_p;

  // Comparators: one for a spatial pair, one per slot against the buffer
  // (slot 1 compares against whatever slot 0 leaves in the buffer).
  pair_compare u_cmp_sp (.a_i(w_i[0]), .b_i(w_i[1]), .match_o(match_sp));
  always_comb begin
    cand_a[0] = rb_p;
    cand_a[1] = (rb_p.valid && !(w_i[0].valid && !is_spatial(w_i[0].uop.unit))) ? rb_p :
                (!rb_p.valid && w_i[0].valid) ? w_i[0] : '0;
  end
  pair_compare u_cmp_t0 (.a_i(cand_a[0]), .b_i(w_i[0]), .match_o(match_t[0]));
  pair_compare u_cmp_t1 (.a_i(cand_a[1]), .b_i(w_i[1]), .match_o(match_t[1]));

  for (genvar k = 0; k < 2; k++) begin : g_egress
    ecc_egress u_rd (.orig_i(orig[k].result), .copy_i(cpy[k].result),
                     .code_o(cm_rd_word_o[k]), .mismatch_o(mm_unused[2*k]));
    ecc_egress u_st (.orig_i(orig[k].rs2v), .copy_i(cpy[k].rs2v),
                     .code_o(cm_st_word_o[k]), .mismatch_o(mm_unused[2*k+1]));
  end

  always_comb begin
    pipe_t rbv;
    logic  stop;
    rbv          = rb_p;
    stop         = 1'b0;
    cm_valid_o   = '0;
    fault_o      = 1'b0;
    fault_ecc_o  = 1'b0;
    fault_pc_o   = '0;
    rb_write_o   = 1'b0;
    pair_check_o = 1'b0;
    for (int k = 0; k < 2; k++) begin
      orig[k] = w_i[k];
      cpy[k]  = w_i[k];
    end

    if (prot_i) begin
      if (w_i[0].valid && is_spatial(w_i[0].uop.unit) && !w_i[0].copy) begin
        // spatial pair in slots 0/1
        orig[0] = w_i[0]; cpy[0] = w_i[1];
        if (rbv.valid) begin
          fault_o = 1'b1; fault_pc_o = rbv.pc;          // orphaned first instance
        end else if (match_sp && !w_i[0].eccerr && !w_i[1].eccerr) begin
          cm_valid_o[0] = 1'b1; pair_check_o = 1'b1;
        end else begin
          fault_o = 1'b1; fault_pc_o = w_i[0].pc;
          fault_ecc_o = w_i[0].eccerr || w_i[1].eccerr;
        end
      end else begin
        for (int k = 0; k < 2; k++) begin
          if (!stop && w_i[k].valid) begin
            if (!rbv.valid) begin
              if (w_i[k].copy || is_spatial(w_i[k].uop.unit)) begin
                fault_o = 1'b1; fault_pc_o = w_i[k].pc; stop = 1'b1;
              end else begin
                rbv = w_i[k]; rb_write_o = 1'b1;
              end
            end else begin
              orig[k] = rbv; cpy[k] = w_i[k];
              if (match_t[k] && !rbv.eccerr && !w_i[k].eccerr) begin
                cm_valid_o[k] = 1'b1; pair_check_o = 1'b1;
                rbv = '0;
              end else begin
                fault_o = 1'b1; fault_pc_o = rbv.pc; stop = 1'b1;
                fault_ecc_o = rbv.eccerr || w_i[k].eccerr;
              end
            end
          end
        end
      end
    end else begin
      for (int k = 0; k < 2; k++) begin
        if (!stop && w_i[k].valid) begin
          if (w_i[k].flt || w_i[k].eccerr) begin
            fault_o = 1'b1; fault_pc_o = w_i[k].pc; stop = 1'b1;
            fault_ecc_o = w_i[k].eccerr;
          end else begin
            cm_valid_o[k] = 1'b1;
          end
        end
      end
    end
    rb_n = rbv;
    for (int k = 0; k < 2; k++) cm_o[k] = orig[k];
    if (!en_i) begin
      cm_valid_o = '0; fault_o = 1'b0; fault_ecc_o = 1'b0;
      rb_write_o = 1'b0; pair_check_o = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              rb <= '0;
    else if (flush_i || fault_o) rb <= '0;
    else if (en_i)           rb <= rb_n;
    else                     rb <= rb_p;
  end
endmodule

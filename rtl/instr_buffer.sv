// instr_buffer: the decode-stage instruction queue (DEPTH entries, the two
// oldest offered for issue every cycle).
//
// Duplication: in protected mode (`prot_i`) every incoming instruction is
// written twice, first the original and then the copy with its `copy` flag
// set; the two decoded words come from the two outputs of the fetch ECC
// hand-over, so they are independent from the ICCM word on. One instruction
// (two entries) is then accepted per cycle. Without protection up to two
// instructions are accepted per cycle, each written once.
//
// Issue strategy (`iss_max_o`, `iss_atomic_o`): the pipeline takes `take_i`
// of the offered entries (0, 1 or 2, oldest first).
//   protected, head spatially redundant (ALU/branch/CSR/system):
//       head and its copy go together or not at all (atomic, 2)
//   protected, head temporally redundant (MUL/DIV, load, store):
//       the head goes alone, except that a copy at the head may be paired
//       with the original of the next temporally redundant instruction if
//       that one needs a different unit ("two different but sequentially
//       issued instructions are parallelised")
//   unprotected: two entries unless they need the same unique unit or
//       either must issue alone (CSR, MRET, FENCE, illegal)
// Free space is counted before this cycle's issue (a small loss of refill
// rate, this design's choice). `flush_i` empties the queue.
// DEPTH = 4 and two issue slots follow the document.
module instr_buffer
  import faultless_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush_i,
  input  logic        prot_i,
  // from fetch/decode
  input  logic [1:0]  in_valid_i,
  input  logic [31:0] in_pc_i [2],
  input  uop_t        in_uop_a_i,     // instruction 0 (original)
  input  uop_t        in_uop_b_i,     // protected: copy of instruction 0; else instruction 1
  input  logic [1:0]  in_eccerr_i,
  output logic [1:0]  accept_o,       // number of instructions accepted
  // to issue
  output ibuf_t       iss_o [2],
  output logic [1:0]  iss_max_o,
  output logic        iss_atomic_o,
  input  logic [1:0]  take_i,
  output logic [$clog2(DEPTH+1)-1:0] count_o
);
  localparam int unsigned PW = $clog2(DEPTH);

  ibuf_t            q [DEPTH];
  logic [PW-1:0]    head;
  logic [PW:0]      cnt;
  logic [PW:0]      free;
  ibuf_t            h, n;
  logic [PW-1:0]    tail;
  logic [PW:0]      nw;

  always_comb begin
    h = q[head];
    n = q[PW'(head + 1'b1)];
    iss_o[0] = h;
    iss_o[1] = n;
    free = (PW+1)'(DEPTH) - cnt;

    iss_atomic_o = 1'b0;
    iss_max_o    = 2'd0;
    if (cnt != 0) begin
      if (prot_i) begin
        if (is_spatial(h.uop.unit)) begin
          iss_atomic_o = 1'b1;
          iss_max_o    = (cnt >= 2) ? 2'd2 : 2'd0;
        end else begin
          iss_max_o = 2'd1;
          if (cnt >= 2 && h.copy && !n.copy && !is_spatial(n.uop.unit) &&
              fu_of(n.uop.unit) != fu_of(h.uop.unit))
            iss_max_o = 2'd2;
        end
      end else begin
        iss_max_o = 2'd1;
        if (cnt >= 2 && !is_serial(h.uop.unit) && !is_serial(n.uop.unit) &&
            !(fu_of(h.uop.unit) == fu_of(n.uop.unit) && fu_of(h.uop.unit) != FU_ALU))
          iss_max_o = 2'd2;
      end
    end

    accept_o = 2'd0;
    if (in_valid_i[0]) begin
      if (prot_i) begin
        if (free >= 2) accept_o = 2'd1;
      end else begin
        if (free >= 1) accept_o = 2'd1;
        if (free >= 2 && in_valid_i[1]) accept_o = 2'd2;
      end
    end
    count_o = cnt;
    tail = PW'(head + cnt);
    nw   = (accept_o == 2'd0) ? '0 : (prot_i || accept_o == 2'd2) ? (PW+1)'(2) : (PW+1)'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0;
      cnt  <= '0;
      for (int unsigned i = 0; i < DEPTH; i++) q[i] <= '0;
    end else if (flush_i) begin
      head <= '0;
      cnt  <= '0;
    end else begin
      if (accept_o != 0) begin
        q[tail] <= '{copy: 1'b0, eccerr: in_eccerr_i[0], pc: in_pc_i[0], uop: in_uop_a_i};
        if (prot_i) begin
          q[PW'(tail + 1'b1)] <= '{copy: 1'b1, eccerr: in_eccerr_i[0], pc: in_pc_i[0], uop: in_uop_b_i};
        end else if (accept_o == 2'd2) begin
          q[PW'(tail + 1'b1)] <= '{copy: 1'b0, eccerr: in_eccerr_i[1], pc: in_pc_i[1], uop: in_uop_b_i};
        end
      end
      head <= PW'(head + take_i);
      cnt  <= cnt + nw - (PW+1)'(take_i);
    end
  end

  // The pipeline may never take more than is offered, nor split an atomic pair.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
    end else if (!flush_i) begin
      assert (take_i <= iss_max_o) else $error("instr_buffer: take exceeds offer");
      assert (!(iss_atomic_o && take_i == 2'd1)) else $error("instr_buffer: atomic pair split");
    end
endmodule

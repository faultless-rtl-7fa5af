// bus_bridge: the load-store unit's store/bus buffer for external
// (non-TCM) addresses, where the pipeline's redundancy is handed over to
// an ECC-protected bus.
//
// External targets may have side effects, so each access is performed on
// the bus exactly once even though the pipeline carries two instances:
//  * protected mode: the first instance (original) reaching E3 is parked in
//    the buffer and leaves E3 at once (a load is marked pending). When the
//    second instance (copy) reaches E3 its address, direction and data are
//    compared with the parked ones while the write data is ECC-encoded
//    (ecc_egress: data from the original, check bits from the copy). Only
//    if they agree is the request sent; otherwise the copy is marked faulty
//    and nothing goes out.
//  * unprotected mode: the single instance is sent directly.
// While the request and its response are outstanding `stall_o` freezes the
// pipeline. The response word is ECC-checked while it is duplicated
// (ecc_ingress): the copy's value goes to the E3 instance (`rdata_copy_o`)
// and the original's value patches the pending first instance
// (`patch_valid_o`, `rdata_orig_o`), so the loaded value is read from the
// bus buffer twice.
// Bus protocol (this design's choice; the real core uses AXI4/AHB):
// req_valid/req_ready handshake, then one rsp_valid pulse carrying a
// 39-bit codeword (ignored for stores). `flush_i` drops a parked instance.
module bus_bridge
  import faultless_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          flush_i,
  input  logic          prot_i,
  // E3 entry (an external load or store)
  input  logic          e3_valid_i,
  input  logic          e3_copy_i,
  input  logic          e3_we_i,
  input  logic [31:0]   e3_addr_i,
  input  logic [31:0]   e3_wdata_i,
  output logic          stall_o,
  output logic          done_o,          // E3 entry leaves this cycle
  output logic          first_o,         // ... as a parked first instance
  output logic          mismatch_o,      // ... with a failed comparison
  output logic          eccerr_o,        // ... with a response ECC error
  output logic [31:0]   rdata_copy_o,
  output logic          patch_valid_o,
  output logic [31:0]   rdata_orig_o,
  // bus
  output logic          req_valid_o,
  output logic          req_we_o,
  output logic [31:0]   req_addr_o,
  output logic [CW-1:0] req_wdata_o,
  input  logic          req_ready_i,
  input  logic          rsp_valid_i,
  input  logic [CW-1:0] rsp_rdata_i
);
  typedef enum logic [1:0] { S_IDLE, S_HELD, S_REQ, S_RSP } state_e;

  state_e        st, st_n;
  logic          h_we;
  logic [31:0]   h_addr, h_wdata;
  logic          r_we, r_prot;
  logic [31:0]   r_addr;
  logic [CW-1:0] r_wdata;
  logic [CW-1:0] enc_word;
  logic          enc_mm;
  logic          in_err;
  logic [31:0]   in_orig, in_copy;
  logic          send, capture;

  ecc_egress  u_out (.orig_i(st == S_HELD ? h_wdata : e3_wdata_i), .copy_i(e3_wdata_i),
                     .code_o(enc_word), .mismatch_o(enc_mm));
  ecc_ingress u_in  (.code_i(rsp_rdata_i), .orig_o(in_orig), .copy_o(in_copy), .err_o(in_err));

  always_comb begin
    st_n = st; stall_o = 1'b0; done_o = 1'b0; first_o = 1'b0;
    mismatch_o = 1'b0; eccerr_o = 1'b0; patch_valid_o = 1'b0;
    send = 1'b0; capture = 1'b0;
    rdata_copy_o = in_copy; rdata_orig_o = in_orig;
    case (st)
      S_IDLE: if (e3_valid_i) begin
        if (prot_i && !e3_copy_i) begin
          capture = 1'b1; done_o = 1'b1; first_o = 1'b1; st_n = S_HELD;
        end else if (prot_i) begin
          done_o = 1'b1; mismatch_o = 1'b1;           // copy without a first instance
        end else begin
          send = 1'b1; stall_o = 1'b1; st_n = S_REQ;
        end
      end
      S_HELD: if (e3_valid_i) begin
        if (e3_copy_i && !enc_mm && h_addr == e3_addr_i && h_we == e3_we_i) begin
          send = 1'b1; stall_o = 1'b1; st_n = S_REQ;
        end else begin
          done_o = 1'b1; mismatch_o = 1'b1; st_n = S_IDLE;
        end
      end
      S_REQ: begin
        stall_o = 1'b1;
        if (req_ready_i) st_n = S_RSP;
      end
      default: begin // S_RSP
        if (rsp_valid_i) begin
          done_o = 1'b1; st_n = S_IDLE;
          eccerr_o = !r_we && in_err;
          patch_valid_o = r_prot && !r_we;
        end else begin
          stall_o = 1'b1;
        end
      end
    endcase
    req_valid_o = (st == S_REQ);
    req_we_o    = r_we;
    req_addr_o  = r_addr;
    req_wdata_o = r_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; h_we <= 1'b0; h_addr <= '0; h_wdata <= '0;
      r_we <= 1'b0; r_prot <= 1'b0; r_addr <= '0; r_wdata <= '0;
    end else if (flush_i && st != S_REQ && st != S_RSP) begin
      st <= S_IDLE;
    end else begin
      st <= st_n;
      if (capture) begin
        h_we <= e3_we_i; h_addr <= e3_addr_i; h_wdata <= e3_wdata_i;
      end
      if (send) begin
        r_we <= e3_we_i; r_addr <= e3_addr_i; r_wdata <= enc_word; r_prot <= prot_i;
      end
    end
  end

  // Bus rule: a request, once raised, stays up with a stable address until accepted.
  logic        past_wait;
  logic [31:0] past_addr;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      past_wait <= 1'b0;
      past_addr <= '0;
    end else begin
      past_wait <= req_valid_o && !req_ready_i;
      past_addr <= req_addr_o;
      if (past_wait)
        assert (req_valid_o && req_addr_o == past_addr) else $error("bus_bridge: request dropped or changed");
    end
endmodule

// ext_mem_model: behavioural model of an external memory on the core's
// simple request/response bus. A request is accepted REQ_LAT cycles after
// it is raised; the response (a 39-bit codeword, echoed from what was
// stored) follows RSP_LAT cycles later. Stores keep the codeword exactly as
// sent, so the check bits produced by the core travel end to end. It counts
// reads and writes so a test can prove each access happened exactly once.
module ext_mem_model
  import faultless_pkg::*;
#(
  parameter int unsigned WORDS   = 256,
  parameter int unsigned REQ_LAT = 1,
  parameter int unsigned RSP_LAT = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  input  logic          req_we,
  input  logic [31:0]   req_addr,
  input  logic [CW-1:0] req_wdata,
  output logic          req_ready,
  output logic          rsp_valid,
  output logic [CW-1:0] rsp_rdata,
  input  logic [$clog2(WORDS)-1:0] peek_addr,
  output logic [CW-1:0] peek_data,
  output int            n_reads,
  output int            n_writes
);
  logic [CW-1:0] mem [WORDS];
  int            wcnt, rcnt;
  logic          busy;

  initial for (int i = 0; i < WORDS; i++) mem[i] = ecc_encode('0);

  assign req_ready = req_valid && !busy && (wcnt >= int'(REQ_LAT));
  assign peek_data = mem[peek_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt <= 0; rcnt <= 0; busy <= 1'b0; rsp_valid <= 1'b0; rsp_rdata <= '0;
      n_reads <= 0; n_writes <= 0;
    end else begin
      rsp_valid <= 1'b0;
      if (req_valid && !busy) wcnt <= wcnt + 1; else wcnt <= 0;
      if (req_ready) begin
        busy <= 1'b1; rcnt <= 0;
        if (req_we) begin
          mem[req_addr[$clog2(WORDS)+1:2]] <= req_wdata; n_writes <= n_writes + 1;
        end else begin
          rsp_rdata <= mem[req_addr[$clog2(WORDS)+1:2]]; n_reads <= n_reads + 1;
        end
      end else if (busy) begin
        rcnt <= rcnt + 1;
        if (rcnt + 1 >= int'(RSP_LAT)) begin
          busy <= 1'b0; rsp_valid <= 1'b1;
        end
      end
    end
  end
endmodule

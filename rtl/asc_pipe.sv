// asc_pipe: one MBU/AU pipeline of the ASC central processor - the
// arithmetic pipe (asc_au, with its ROM control) fed by two MBU operand
// streams with octet look-ahead (asc_mbu_stream).
//
// Scalar instructions arrive from the IPU with both operands (issue with
// is_vector low) and go straight into the arithmetic pipe.  A vector
// instruction arrives with the word addresses of its A and B vectors and its
// length; the MBU then runs it without further help from the IPU: both
// streams start fetching octets, and once both hold their look-ahead (or the
// whole vector) the pipe is started with the head pair; every pair the pipe
// takes afterwards is popped from the two streams.  Results leave on the
// result port marked for the IPU (scalars, dot products) or the MBU (vector
// elements); storing vector results to memory is outside this model.
//
// The issue handshake (issue/issue_ready), waiting for the look-ahead before
// starting, and the port layout are this design's choices.  An assertion
// checks the look-ahead is never exhausted while the pipe takes operands.
module asc_pipe
  import asc_au_pkg::*;
#(
  parameter int unsigned ADDR_W    = 24,
  parameter int unsigned LEN_W     = 16,
  parameter int unsigned LOOKAHEAD = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the IPU
  input  logic              issue,
  output logic              issue_ready,
  input  opcode_e           opcode,
  input  logic              is_vector,
  input  logic [LEN_W-1:0]  vlen,
  input  logic [ADDR_W-1:0] base_a,
  input  logic [ADDR_W-1:0] base_b,
  input  word_t             scalar_a,
  input  word_t             scalar_b,
  input  logic              sc_a,
  input  logic              sc_b,
  // memory, one port per operand stream
  output logic              mema_req,
  output logic [ADDR_W-4:0] mema_addr,
  input  logic              mema_ready,
  input  logic              mema_rvalid,
  input  logic [8*64-1:0]   mema_rdata,
  output logic              memb_req,
  output logic [ADDR_W-4:0] memb_addr,
  input  logic              memb_ready,
  input  logic              memb_rvalid,
  input  logic [8*64-1:0]   memb_rdata,
  // results
  output word_t             result,
  output logic              result_valid,
  output logic              result_to_ipu,
  output logic [1:0]        result_cc,
  output logic              result_ovf,
  output logic              result_unf
);
  typedef enum logic [1:0] {S_IDLE, S_PRIME, S_RUN} state_e;
  state_e state;

  opcode_e          op_q;
  logic [LEN_W-1:0] len_q;
  logic             au_start, au_ready, au_take, au_eol;
  opcode_e          au_op;
  logic [LEN_W-1:0] au_len;
  word_t            au_a, au_b;
  word_t            sa_word, sb_word;
  logic             sa_avail, sb_avail, sa_primed, sb_primed;
  logic             st_start;

  assign issue_ready = (state == S_IDLE) && au_ready;
  assign st_start    = issue && issue_ready && is_vector;

  asc_mbu_stream #(.ADDR_W(ADDR_W), .LEN_W(LEN_W), .LOOKAHEAD(LOOKAHEAD)) u_sa (
    .clk, .rst_n, .start(st_start), .base(base_a), .n(vlen),
    .take(au_take && state != S_IDLE), .word(sa_word), .avail(sa_avail), .primed(sa_primed),
    .mem_req(mema_req), .mem_addr(mema_addr), .mem_ready(mema_ready),
    .mem_rvalid(mema_rvalid), .mem_rdata(mema_rdata)
  );
  asc_mbu_stream #(.ADDR_W(ADDR_W), .LEN_W(LEN_W), .LOOKAHEAD(LOOKAHEAD)) u_sb (
    .clk, .rst_n, .start(st_start), .base(base_b), .n(vlen),
    .take(au_take && state != S_IDLE), .word(sb_word), .avail(sb_avail), .primed(sb_primed),
    .mem_req(memb_req), .mem_addr(memb_addr), .mem_ready(memb_ready),
    .mem_rvalid(memb_rvalid), .mem_rdata(memb_rdata)
  );

  always_comb begin
    if (state == S_IDLE) begin
      au_start = issue && issue_ready && !is_vector;
      au_op    = opcode;
      au_len   = LEN_W'(1);
      au_a     = scalar_a;
      au_b     = scalar_b;
    end else begin
      au_start = (state == S_PRIME) && sa_primed && sb_primed;
      au_op    = op_q;
      au_len   = len_q;
      au_a     = sa_word;
      au_b     = sb_word;
    end
  end

  asc_au #(.LEN_W(LEN_W)) u_au (
    .clk, .rst_n, .start(au_start), .opcode(au_op), .vlen(au_len),
    .sc_a(sc_a && state == S_IDLE), .sc_b(sc_b && state == S_IDLE),
    .opnd_a(au_a), .opnd_b(au_b), .opnd_take(au_take), .ready(au_ready),
    .result, .result_valid, .result_to_ipu, .result_cc, .result_ovf, .result_unf,
    .eol(au_eol)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      op_q  <= OP_ADD;
      len_q <= '0;
    end else begin
      case (state)
        S_IDLE:  if (st_start) begin
                   state <= S_PRIME;
                   op_q  <= opcode;
                   len_q <= vlen;
                 end
        S_PRIME: if (au_start) state <= S_RUN;
        S_RUN:   if (au_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  logic unused_eol;
  assign unused_eol = au_eol;

  // the look-ahead must never run dry while the pipe takes operand pairs
  a_no_underrun: assert property (@(posedge clk) disable iff (!rst_n)
    (state != S_IDLE && au_take) |-> (sa_avail && sb_avail));
endmodule

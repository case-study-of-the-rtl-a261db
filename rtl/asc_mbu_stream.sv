// asc_mbu_stream: one operand stream of the memory buffer unit (MBU) with
// octet look-ahead.
//
// A vector operand (n consecutive 64-bit words from word address base) is
// fetched from the interleaved memory in octets, aligned blocks of eight
// words, and buffered ahead of its use: the stream keeps up to LOOKAHEAD
// octets requested or held (3 in the document), so that the arithmetic pipe
// can take one word per clock.  Octets are requested in address order as soon
// as a buffer slot is free; the memory must answer in request order.  The
// head word is offered on word/avail; take consumes it.  A buffer slot is
// freed when its last needed word is taken.
//
// primed goes high once the buffer holds either all n words or LOOKAHEAD full
// octets; the pipe control starts a vector only then.  That start rule, the
// in-order memory interface and the element-count interface are this
// design's choices: the document gives the octet size, the 8-way interleave
// and the 3-octet look-ahead, not the MBU's logic.
//
// Memory interface: mem_req/mem_addr (octet address) are accepted when
// mem_ready is high; mem_rvalid/mem_rdata return one octet (word 0 in the low
// 64 bits).
module asc_mbu_stream
  import asc_au_pkg::*;
#(
  parameter int unsigned ADDR_W    = 24,   // word address width
  parameter int unsigned LEN_W     = 16,
  parameter int unsigned LOOKAHEAD = 3     // octets
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [ADDR_W-1:0]   base,
  input  logic [LEN_W-1:0]    n,
  input  logic                take,
  output word_t               word,
  output logic                avail,
  output logic                primed,
  output logic                mem_req,
  output logic [ADDR_W-4:0]   mem_addr,
  input  logic                mem_ready,
  input  logic                mem_rvalid,
  input  logic [8*64-1:0]     mem_rdata
);
  localparam int unsigned PTR_W = $clog2(LOOKAHEAD + 1);

  logic [8*64-1:0]   buf_q [LOOKAHEAD];
  logic [PTR_W-1:0]  wr_slot, rd_slot;
  logic [PTR_W:0]    held, inflight;
  logic [ADDR_W-4:0] next_oct;      // next octet address to request
  logic [LEN_W:0]    oct_left;      // octets still to request
  logic [LEN_W-1:0]  words_left;    // words still to deliver
  logic [2:0]        rd_word;       // word index inside the head octet
  logic              last_in_oct;
  logic [LEN_W+3:0]  span;

  function automatic logic [PTR_W-1:0] inc(logic [PTR_W-1:0] p);
    return (p == PTR_W'(LOOKAHEAD - 1)) ? '0 : p + 1'b1;
  endfunction

  assign mem_req     = (oct_left != '0) && (held + inflight < (PTR_W+1)'(LOOKAHEAD));
  assign mem_addr    = next_oct;
  assign avail       = (held != '0) && (words_left != '0);
  assign word        = buf_q[rd_slot][64*rd_word +: 64];
  assign last_in_oct = (rd_word == 3'd7) || (words_left == LEN_W'(1));
  assign primed      = (words_left != '0) && (held != '0) &&
                       ((held == (PTR_W+1)'(LOOKAHEAD)) || (oct_left == '0 && inflight == '0));
  // octets the vector touches: from base's octet to the octet of its last word
  assign span        = (LEN_W+4)'(base[2:0]) + (LEN_W+4)'(n) + (LEN_W+4)'(7);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_slot    <= '0;
      rd_slot    <= '0;
      held       <= '0;
      inflight   <= '0;
      next_oct   <= '0;
      oct_left   <= '0;
      words_left <= '0;
      rd_word    <= '0;
    end else if (start) begin
      wr_slot    <= '0;
      rd_slot    <= '0;
      held       <= '0;
      inflight   <= '0;
      next_oct   <= base[ADDR_W-1:3];
      oct_left   <= (LEN_W+1)'(span >> 3);
      words_left <= n;
      rd_word    <= base[2:0];
    end else begin
      logic [PTR_W:0] h;
      h = held;
      if (mem_req && mem_ready) begin
        next_oct <= next_oct + 1'b1;
        oct_left <= oct_left - 1'b1;
      end
      inflight <= inflight + (PTR_W+1)'(mem_req && mem_ready) - (PTR_W+1)'(mem_rvalid);
      if (mem_rvalid) begin
        buf_q[wr_slot] <= mem_rdata;
        wr_slot <= inc(wr_slot);
        h = h + 1'b1;
      end
      if (take && avail) begin
        words_left <= words_left - 1'b1;
        rd_word <= rd_word + 1'b1;
        if (last_in_oct) begin
          rd_slot <= inc(rd_slot);
          h = h - 1'b1;
        end
      end
      held <= h;
    end
  end
endmodule

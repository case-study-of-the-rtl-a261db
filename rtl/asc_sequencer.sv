// asc_sequencer: ROM address control for the MBU/AU pipe (part of the MBU).
//
// On start it points the control ROM at the first word of the instruction
// and, for a vector instruction, loads the element count.  Each following
// clock it takes the next address from the current word: B1 normally, B2
// once the last operand pair of the vector has been fetched (end of loop).
// A vector loop thus runs fill words, then one steady word whose B1 is its
// own address for as long as operands stream in, then drain words that empty
// the pipe.  The word marked done ends the instruction.
//
// Operand handshake with the rest of the MBU: the first pair is taken with
// start; afterwards 'take' is high in each clock in which the current word
// asks for an operand pair (fetch) and elements remain.  The MBU must present
// the pair on that clock (its look-ahead buffers are assumed never to run
// dry).  The element counter is this design's way of seeing the end of the
// loop; in the original machine the MBU recognised it from the operand
// addresses.
// ready is high when a new instruction may start; start is ignored otherwise.
// vlen (>= 1) is used only by vector instructions.
module asc_sequencer
  import asc_au_pkg::*;
#(
  parameter int unsigned LEN_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  opcode_e          opcode,
  input  logic [LEN_W-1:0] vlen,
  input  ctl_t             word,      // ROM output at addr
  output rom_addr_t        addr,
  output logic             active,    // word drives the pipe this clock
  output logic             take,      // an operand pair is taken this clock
  output logic             eol,       // last operand pair has been fetched
  output logic             ready
);
  logic [LEN_W-1:0] remaining;
  logic             fetch_go, accept;

  assign accept   = start && !active;
  assign ready    = !active;
  assign fetch_go = active && word.fetch && (remaining != '0);
  assign take     = accept || fetch_go;
  assign eol      = (remaining == '0) || (fetch_go && remaining == LEN_W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr      <= '0;
      active    <= 1'b0;
      remaining <= '0;
    end else if (accept) begin
      addr      <= start_addr(opcode);
      active    <= 1'b1;
      remaining <= (opcode >= OP_VADD && vlen != '0) ? vlen - LEN_W'(1) : '0;
    end else if (active) begin
      if (fetch_go) remaining <= remaining - LEN_W'(1);
      if (word.done) active <= 1'b0;
      addr <= eol ? word.b2 : word.b1;
    end
  end
endmodule

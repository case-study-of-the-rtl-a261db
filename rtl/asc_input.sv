// asc_input: Input section of the ASC arithmetic-unit pipe.
//
// Buffers one operand pair (A, B) delivered by the memory buffer unit (MBU)
// and hands it to the internal sections.  The "short circuit" of the text is a
// multiplexer in front of each register: instead of the MBU operand it can take
// the previous result of the pipe from the output section, so that a result is
// used again without a round trip through the IPU register file.
//
// Timing: when load is high at a rising clock edge the pair is registered and
// valid pulses high for exactly one clock; the registers keep the pair until
// the next load (sections that use the pair later, such as the second step of
// a shift, read it from here).  Which operand is short-circuited is supplied by
// the instruction issuer with the load (sc_a / sc_b); that interface is this
// design's own.
module asc_input
  import asc_au_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  word_t mbu_a,
  input  word_t mbu_b,
  input  logic  sc_a,       // take A from the previous result
  input  logic  sc_b,       // take B from the previous result
  input  word_t prev_result,
  output word_t a,
  output word_t b,
  output logic  valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a     <= '0;
      b     <= '0;
      valid <= 1'b0;
    end else begin
      valid <= load;
      if (load) begin
        a <= sc_a ? prev_result : mbu_a;
        b <= sc_b ? prev_result : mbu_b;
      end
    end
  end
endmodule

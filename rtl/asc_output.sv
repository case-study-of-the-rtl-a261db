// asc_output: Output section of the ASC arithmetic-unit pipe.
//
// Takes the result from whichever section finishes the instruction and sends
// it to the MBU (vector results) or the IPU (scalar results and dot products).
// It also performs the logical instructions (AND, OR, exclusive OR) on the
// operands coming straight from the Input section.
//
// Control: the output fields of a control word act one clock after the word
// is read, because the section a word finishes writes its register in that
// clock; this section therefore keeps its own one-clock copy of the fields
// (sel, any, ipu) and of the Input operands it uses for logical instructions.
// The result register loads when the selected source has new data, or always
// when 'any' is set (used for the fixed dot product, whose accumulator may
// have finished earlier).  res_valid pulses for one clock per result.
// Status: cc (compare condition), ovf (fixed overflow or exponent overflow),
// unf (exponent underflow) belong to the result beside them.
module asc_output
  import asc_au_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  out_ctl_e sel,
  input  logic     any,
  input  logic     ipu,
  input  word_t    in_a,
  input  word_t    in_b,
  input  logic     in_valid,
  input  word_t    acc,
  input  logic     acc_valid,
  input  logic [1:0] exs_cc,
  input  logic     exs_valid,
  input  word_t    aln_result,
  input  logic     aln_valid,
  input  word_t    add_result,
  input  logic     add_ovf,
  input  logic     add_valid,
  input  word_t    nrm_result,
  input  logic     nrm_ovf,
  input  logic     nrm_unf,
  input  logic     nrm_valid,
  output word_t    result,
  output logic     res_valid,
  output logic     res_to_ipu,
  output logic [1:0] res_cc,
  output logic     res_ovf,
  output logic     res_unf
);
  out_ctl_e sel_q;
  logic     any_q, ipu_q;
  word_t    a_q, b_q;
  logic     inv_q;
  word_t    r_n;
  logic     v_n, ovf_n, unf_n;

  always_comb begin
    r_n   = '0;
    v_n   = 1'b0;
    ovf_n = 1'b0;
    unf_n = 1'b0;
    case (sel_q)
      OUT_AND: begin r_n = a_q & b_q; v_n = inv_q; end
      OUT_OR:  begin r_n = a_q | b_q; v_n = inv_q; end
      OUT_XOR: begin r_n = a_q ^ b_q; v_n = inv_q; end
      OUT_ACC: begin r_n = acc; v_n = acc_valid; end
      OUT_EXS: begin r_n = {62'b0, exs_cc}; v_n = exs_valid; end
      OUT_ALN: begin r_n = aln_result; v_n = aln_valid; end
      OUT_ADD: begin r_n = add_result; v_n = add_valid; ovf_n = add_ovf; end
      OUT_NRM: begin r_n = nrm_result; v_n = nrm_valid; ovf_n = nrm_ovf; unf_n = nrm_unf; end
      default: ;
    endcase
    if (sel_q == OUT_NONE) v_n = 1'b0;
    else if (any_q) v_n = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q      <= OUT_NONE;
      any_q      <= 1'b0;
      ipu_q      <= 1'b0;
      a_q        <= '0;
      b_q        <= '0;
      inv_q      <= 1'b0;
      result     <= '0;
      res_valid  <= 1'b0;
      res_to_ipu <= 1'b0;
      res_cc     <= '0;
      res_ovf    <= 1'b0;
      res_unf    <= 1'b0;
    end else begin
      sel_q     <= sel;
      any_q     <= any;
      ipu_q     <= ipu;
      a_q       <= in_a;
      b_q       <= in_b;
      inv_q     <= in_valid;
      res_valid <= v_n;
      if (v_n) begin
        result     <= r_n;
        res_to_ipu <= ipu_q;
        res_cc     <= (sel_q == OUT_EXS) ? exs_cc : 2'b00;
        res_ovf    <= ovf_n;
        res_unf    <= unf_n;
      end
    end
  end
endmodule

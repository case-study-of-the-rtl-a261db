// asc_accumulate: Accumulator section of the ASC arithmetic-unit pipe.
//
// Adds the Multiplier's Pseudosum and Pseudocarry, and optionally its own
// registered output as a third operand, in one clock.  The three operands go
// through one row of full adders (3:2) and then the 64-bit double-level
// lookahead adder (asc_cla64).  The feedback operand serves the fixed-point
// vector dot product, which sums its products here.
//
// Modes (ctl):
//   ACC_FIX  acc = psum + pcarry (+ acc when fb): 64-bit fixed result.
//   ACC_FLT  the sum is the 48-bit product of two 24-bit fractions; it is
//            presented as an unpacked floating operand (acc_f) with the
//            fraction placed in the top 48 of 56 fraction bits and the sign
//            and exponent formed by the Multiplier.  This partial product is
//            not normalized (it may have one leading zero hex digit).
// The register loads only when in_valid is high (new multiplier output) and
// ctl selects the section; clr zeroes it.  out_valid pulses for one clock
// after each load.
module asc_accumulate
  import asc_au_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  acc_ctl_e          ctl,
  input  logic              fb,
  input  logic              clr,
  input  logic              in_valid,
  input  word_t             psum,
  input  word_t             pcarry,
  input  logic              p_sign,
  input  logic signed [9:0] p_exp,
  output word_t             acc,
  output ufloat_t           acc_f,
  output logic              out_valid
);
  word_t third, s3, c3, sum;
  logic  unused_cout;

  assign third = fb ? acc : '0;
  assign s3 = psum ^ pcarry ^ third;
  assign c3 = ((psum & pcarry) | (psum & third) | (pcarry & third)) << 1;

  asc_cla64 u_cla (.a(s3), .b(c3), .cin(1'b0), .sum(sum), .cout(unused_cout));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      acc_f     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (ctl != ACC_NONE);
      if (clr) begin
        acc   <= '0;
        acc_f <= '0;
      end else if (in_valid && ctl != ACC_NONE) begin
        acc        <= sum;
        acc_f.sign <= p_sign;
        acc_f.exp  <= p_exp;
        acc_f.frac <= {sum[47:0], 8'b0};
      end
    end
  end
endmodule

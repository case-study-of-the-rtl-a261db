// asc_add: Add section of the ASC arithmetic-unit pipe.
//
// Holds the 64-bit carry-propagate adder with double-level carry lookahead
// (asc_cla64) and puts its result in a single register.
//   ADD_FIX  64-bit two's-complement add or subtract of the input operands
//            (the Input section feeds this section directly, as for a fixed
//            add).  ovf flags two's-complement overflow.
//   ADD_FLT  adds the aligned fractions from the Align section.  Equal signs
//            add the magnitudes; different signs subtract the small fraction
//            from the large one, and when that goes negative a second adder's
//            (small - large) is taken instead with the small operand's sign.
//            The 57-bit magnitude (carry digit included) goes to the
//            Normalizer with the sign and the large operand's exponent.
// Using a second adder for the reversed difference is this design's choice.
// No guard digit is kept: bits shifted out by the Align section are lost.
// Timing: one clock; out_valid pulses when new data was registered.
module asc_add
  import asc_au_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  add_ctl_e          ctl,
  input  logic              sub,
  input  word_t             in_a,
  input  word_t             in_b,
  input  logic              in_valid,
  input  ufloat_t           aln_large,
  input  logic              aln_small_sign,
  input  logic [FRAC_W-1:0] aln_small_frac,
  input  logic              aln_valid,
  output word_t             fix_result,
  output logic              fix_ovf,
  output logic              f_sign,
  output logic signed [9:0] f_exp,
  output logic [FRAC_W:0]   f_mag,
  output logic              out_valid
);
  word_t a0, b0, s0, s1, lf, sf;
  logic  c0, eff_sub, v;
  logic  unused_co0, unused_co1;

  assign lf      = {8'b0, aln_large.frac};
  assign sf      = {8'b0, aln_small_frac};
  assign eff_sub = aln_large.sign ^ aln_small_sign;

  always_comb begin
    if (ctl == ADD_FIX) begin
      a0 = in_a;
      b0 = sub ? ~in_b : in_b;
      c0 = sub;
    end else begin
      a0 = lf;
      b0 = eff_sub ? ~sf : sf;
      c0 = eff_sub;
    end
  end

  asc_cla64 u_main (.a(a0), .b(b0), .cin(c0),   .sum(s0), .cout(unused_co0));
  asc_cla64 u_rev  (.a(sf), .b(~lf), .cin(1'b1), .sum(s1), .cout(unused_co1));

  assign v = (ctl == ADD_FIX) ? in_valid : (ctl == ADD_FLT) ? aln_valid : 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fix_result <= '0;
      fix_ovf    <= 1'b0;
      f_sign     <= 1'b0;
      f_exp      <= '0;
      f_mag      <= '0;
      out_valid  <= 1'b0;
    end else begin
      out_valid <= v;
      if (v && ctl == ADD_FIX) begin
        fix_result <= s0;
        fix_ovf    <= (a0[63] == b0[63]) && (s0[63] != a0[63]);
      end
      if (v && ctl == ADD_FLT) begin
        f_exp <= aln_large.exp;
        if (eff_sub && s0[63]) begin
          f_mag  <= s1[FRAC_W:0];
          f_sign <= aln_small_sign;
        end else begin
          f_mag  <= s0[FRAC_W:0];
          f_sign <= aln_large.sign;
        end
      end
    end
  end
endmodule
